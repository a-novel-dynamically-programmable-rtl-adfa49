// tb_pn_code_gen: self-checking testbench of the PN code generator.
//
// For a set of setup codes (all 127 nonzero ones) the generator is loaded
// and stepped; its chips are compared with the sequence x(t+1) = x(t-2) XOR
// x(t-6) worked out here from the loaded code, the period must be exactly 127
// chips (the state returns to the setup code after 127 steps and not
// before), each period must hold 64 ones and 63 zeros, and a load must win
// over a step. Code 0 must give all-zero chips.
module tb_pn_code_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, step = 1'b0;
  logic [6:0] seed = '0;
  logic chip;
  int checks = 0, failures = 0;

  pn_code_gen dut (.clk, .rst_n, .load, .step, .seed, .chip);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
    bit x [0:400];   // x[6 + t] is stage 1 at step t; x[0..6] from the seed
    int ones;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < 128; s++) begin
      for (int i = 0; i <= 6; i++) x[6 - i] = s[i];
      for (int t = 7; t <= 400; t++) x[t] = x[t - 3] ^ x[t - 7];
      @(negedge clk) begin seed = 7'(s); load = 1'b1; step = 1'b1; end   // load beats step
      @(negedge clk) begin load = 1'b0; step = 1'b1; end
      ones = 0;
      for (int t = 0; t < 254; t++) begin
        // chip = stage 7 = stage 1 six steps ago
        check(chip == x[t], $sformatf("seed %0d chip %0d: %b expected %b", s, t, chip, x[t]));
        if (t < 127 && chip) ones++;
        if (t > 0 && t < 127 && s != 0)
          check(dut.sr != 7'(s), $sformatf("seed %0d repeats after %0d steps", s, t));
        if (t == 127)
          check(dut.sr == 7'(s), $sformatf("seed %0d period is not 127", s));
        @(negedge clk);
      end
      check(ones == ((s == 0) ? 0 : 64), $sformatf("seed %0d: %0d ones per period", s, ones));
      // without load or step the chip holds
      begin
        logic c0;
        step = 1'b0; c0 = chip;
        repeat (3) @(negedge clk);
        check(chip == c0, "hold without step");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
