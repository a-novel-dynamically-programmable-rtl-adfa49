// tb_io_in_port: self-checking testbench of an input port.
//
// Random words are presented at the port and must come out bit-serially,
// least significant bit first, one bit per system clock, during the word
// period that starts at the word tick where they were sampled. A word
// changed between word ticks must not disturb the word being sent.
module tb_io_in_port;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, word_tick = 1'b0;
  logic [15:0] word = '0;
  logic y_bit;
  int checks = 0, failures = 0;

  io_in_port dut (.clk, .rst_n, .tick, .word_tick, .word, .y_bit);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200 * 16 * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 150; p++) begin
      w = 16'($urandom);
      for (int k = 0; k < 16; k++) begin
        @(negedge clk) begin
          tick = 1'b1; word_tick = (k == 0);
          word = (k == 0) ? w : 16'($urandom);
        end
        @(negedge clk) begin tick = 1'b0; word_tick = 1'b0; end
        // bit k is out for the rest of this system clock
        checks++;
        if (y_bit != w[k]) begin
          failures++;
          if (failures < 10) $display("word %0d bit %0d: %b expected %b", p, k, y_bit, w[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
