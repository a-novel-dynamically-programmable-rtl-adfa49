// le_shift: shifter logic element, out = a shifted by the signed amount in
// the low 5 bits of b: left for 0..15, arithmetic right for -1..-16.
//
// Operands arrive bit-serially (LSB first) from two bus receivers. At the
// end of a word (`word_tick`) the shift is applied; a left shift that loses
// significant bits raises `ovf` (the result wraps). The result is sent
// bit-serially during the next word period, one word period after its
// operands, as for every logic element. A right shift by k is a
// multiplication by 2^-k, e.g. for a small step size.
//
// Interface: `tick` = t1 slot of each system clock, `word_tick` = t1 slot of
// bit 0; `a_bit` (data) and `b_bit` (amount) from the receivers; `y_bit` to
// the transmitter; `ovf` belongs to the word being sent.
//
// From the document: a 16-bit shifter element with overflow support. Its
// operands and shift range are not given and are this design's choice.
module le_shift #(
  parameter int unsigned W = dpaa_pkg::WORD_W
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
  logic signed [4:0] amt;
  logic ovf_nxt;

  le_deser #(.W(W)) u_da (.clk, .rst_n, .tick, .bit_in(a_bit), .word(a));
  le_deser #(.W(W)) u_db (.clk, .rst_n, .tick, .bit_in(b_bit), .word(b));

  assign amt = signed'(b[4:0]);

  always_comb begin
    if (amt >= 0) begin
      y       = a << amt;
      // lossless exactly when shifting back gives the operand
      ovf_nxt = (signed'(y) >>> amt) != signed'(a);
    end else begin
      y       = W'(signed'(a) >>> (-int'(amt)));
      ovf_nxt = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ovf <= 1'b0;
    else if (word_tick) ovf <= ovf_nxt;
  end

  le_ser #(.W(W)) u_s (.clk, .rst_n, .tick, .load(word_tick), .word(y), .bit_out(y_bit));
endmodule
