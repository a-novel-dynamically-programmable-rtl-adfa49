// tb_io_out_port: self-checking testbench of an output port.
//
// Words are fed bit-serially the way a receiver delivers them (the bit of
// system clock k in the reload slot of system clock k+1, the last bit in the
// reload slot of bit 0 of the next word), sometimes with VALID low on one
// bit or on all bits. At each word tick the port must show the whole word,
// and `valid` only if every one of its 16 bits was valid.
module tb_io_out_port;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, word_tick = 1'b0;
  logic d_bit = 1'b0, d_valid = 1'b0;
  logic [15:0] word;
  logic valid;
  int checks = 0, failures = 0;
  int n_invalid = 0;

  io_out_port dut (.clk, .rst_n, .tick, .word_tick, .d_bit, .d_valid, .word, .valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (210 * 16 * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] W [201];
    logic [15:0] V [201];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 201; p++) begin
      W[p] = 16'($urandom);
      case ($urandom_range(0, 3))
        0: V[p] = ~(16'd1 << $urandom_range(0, 15));
        1: V[p] = '0;
        default: V[p] = '1;
      endcase
    end
    for (int p = 0; p < 201; p++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk) begin
          tick = 1'b1; word_tick = (k == 0);
          d_bit   = (k == 0) ? ((p > 0) ? W[p-1][15] : 1'b0) : W[p][k-1];
          d_valid = (k == 0) ? ((p > 0) ? V[p-1][15] : 1'b0) : V[p][k-1];
        end
        @(negedge clk) begin tick = 1'b0; word_tick = 1'b0; end
        if (k == 0 && p > 0) begin
          checks += 2;
          if (valid != (V[p-1] == '1)) failures++;
          if (word != W[p-1]) begin
            failures++;
            if (failures < 10) $display("word %0d: %h expected %h", p-1, word, W[p-1]);
          end
          if (!valid) n_invalid++;
        end
      end
    end
    $display("invalid words %0d", n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
