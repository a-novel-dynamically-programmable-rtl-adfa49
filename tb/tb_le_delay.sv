// tb_le_delay: self-checking testbench of the delay block logic element (le_delay).
//
// The element is fed bit-serially the way the bus receivers feed it: one bit
// per system clock tick, least significant first, where the tick of bit 0 of
// a word period delivers the last bit of the previous word. Random words
// (small, large and extreme values) go in, the serial output is collected
// the same way, and every result word is compared with y = a,
// computed here in wide integer arithmetic. The result of the operands of
// word period n must appear in word period n+1 (a latency of exactly one
// word period), and its overflow flag during that same period.
module tb_le_delay;
  localparam int NW = 400;           // words per run
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, word_tick = 1'b0;
  logic a_bit = 1'b0, b_bit = 1'b0, y_bit, ovf;
  int   checks = 0, failures = 0;
  int   n_ovf = 0;

  logic [15:0] A [NW+2], B [NW+2], Y [NW+2];

  le_delay dut (.clk, .rst_n, .tick, .word_tick, .a_bit(a_bit), .y_bit(y_bit));
  assign ovf = 1'b0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NW + 4) * 16 * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] rnd_word();
    case ($urandom_range(0, 3))
      0: return 16'($signed($urandom_range(0, 511)) - 256);
      1: return 16'($urandom);
      2: return ($urandom_range(0, 1) != 0) ? 16'h7fff : 16'h8000;
      default: return 16'($signed($urandom_range(0, 8191)) - 4096);
    endcase
  endfunction

  function automatic void model(input logic [15:0] a, input logic [15:0] b,
                                output logic [15:0] y, output logic o);
    y = a; o = 1'b0;
  endfunction

  initial begin
    logic [15:0] a, b, ye;
    logic oe;
    for (int p = 0; p < NW + 2; p++) begin
      if (p < NW) begin a = rnd_word(); b = '0; end else begin a = '0; b = '0; end
      A[p] = a; B[p] = b; Y[p] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < NW + 2; p++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        tick = 1'b1; word_tick = (k == 0);
        a_bit = (k == 0) ? ((p > 0) ? A[p-1][15] : 1'b0) : A[p][k-1];
        b_bit = (k == 0) ? ((p > 0) ? B[p-1][15] : 1'b0) : B[p][k-1];
        // output bit k-1 of this period's word, or bit 15 of the last one
        if (k == 0) begin
          if (p > 0) begin
            Y[p-1][15] = y_bit;
            if (p - 1 >= 1) model(A[p-2], B[p-2], ye, oe); else begin ye = '0; oe = 1'b0; end
            checks++;
            if (Y[p-1] !== ye) begin
              failures++;
              if (failures < 10) $display("word %0d: got %h expected %h (a=%h b=%h)", p-1, Y[p-1], ye, (p>1)?A[p-2]:16'h0, (p>1)?B[p-2]:16'h0);
            end
          end
        end else begin
          Y[p][k-1] = y_bit;
        end
        if (k == 5 && p >= 1) begin
          model(A[p-1], B[p-1], ye, oe);
          checks++;
          if (ovf !== oe) begin
            failures++;
            if (failures < 10) $display("word %0d: ovf %b expected %b", p, ovf, oe);
          end
          if (oe) n_ovf++;
        end
        @(negedge clk);
        tick = 1'b0; word_tick = 1'b0;
      end
    end
    $display("le_delay: %0d words, %0d with overflow", NW, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
