// tb_dpaa_timing: self-checking testbench of the array timing.
//
// Counts interface clocks from reset and checks that the reload slot (t1)
// comes once every 128 clocks and first, that 127 chip slots follow it, that
// `last` marks slot 127, that the bit index advances once per system clock
// and wraps after 16, and that `word_tick` comes once every 2048 clocks, on
// the reload slot of bit 0.
module tb_dpaa_timing;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] slot;
  logic [3:0] bit_idx;
  logic reload, step, last, word_tick;
  int checks = 0, failures = 0;

  dpaa_timing dut (.clk, .rst_n, .slot, .bit_idx, .reload, .step, .last, .word_tick);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n_reload = 0, n_word = 0, n_step = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 5 * 2048; c++) begin
      check(reload == (c % 128 == 0), $sformatf("clk %0d reload %b", c, reload));
      check(step == (c % 128 != 0), $sformatf("clk %0d step %b", c, step));
      check(last == (c % 128 == 127), $sformatf("clk %0d last %b", c, last));
      check(int'(bit_idx) == (c / 128) % 16, $sformatf("clk %0d bit_idx %0d", c, bit_idx));
      check(word_tick == (c % 2048 == 0), $sformatf("clk %0d word_tick %b", c, word_tick));
      n_reload += int'(reload); n_word += int'(word_tick); n_step += int'(step);
      @(negedge clk);
    end
    check(n_reload == 80 && n_word == 5 && n_step == 80 * 127, "totals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
