// le_mul: multiplier logic element, out = (a * b) >>> FRAC, 16-bit signed
// fixed point with FRAC fraction bits (default 8, i.e. the value 1.0 is
// 256).
//
// Operands arrive bit-serially (LSB first) from two bus receivers. At the
// end of a word (`word_tick`) the full 32-bit signed product is formed,
// shifted right arithmetically by FRAC and cut to 16 bits; `ovf` is raised
// when the cut loses significant bits (the result wraps). The result is sent
// bit-serially during the next word period, one word period after its
// operands, as for every logic element. With b = 1.0 the multiplier acts as
// a one-word delay.
//
// Interface: `tick` = t1 slot of each system clock, `word_tick` = t1 slot of
// bit 0; `a_bit`/`b_bit` from the receivers; `y_bit` to the transmitter;
// `ovf` belongs to the word being sent.
//
// From the document: 16-bit multiplier element with overflow support,
// conversion to a delay by multiplying by one. This design's choices: the
// fixed-point format, truncation of the fraction, wrap-around with a flag.
module le_mul #(
  parameter int unsigned W    = dpaa_pkg::WORD_W,
  parameter int unsigned FRAC = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic word_tick,
  input  logic a_bit,
  input  logic b_bit,
  output logic y_bit,
  output logic ovf
);
  logic [W-1:0] a, b, y;
  logic signed [2*W-1:0] p, ps;

  le_deser #(.W(W)) u_da (.clk, .rst_n, .tick, .bit_in(a_bit), .word(a));
  le_deser #(.W(W)) u_db (.clk, .rst_n, .tick, .bit_in(b_bit), .word(b));

  assign p  = signed'(a) * signed'(b);
  assign ps = p >>> FRAC;
  assign y  = ps[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ovf <= 1'b0;
    else if (word_tick) ovf <= (ps != {{W{y[W-1]}}, y});
  end

  le_ser #(.W(W)) u_s (.clk, .rst_n, .tick, .load(word_tick), .word(y), .bit_out(y_bit));
endmodule
