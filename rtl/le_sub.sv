// le_sub: subtractor logic element, out = a - b, 16-bit two's complement.
//
// Operands arrive bit-serially (LSB first) from two bus receivers; at the
// end of a word (`word_tick`) the difference is formed and sent bit-serially
// during the next word period (latency one word period, as for every logic
// element). The result wraps; no overflow flag is given, since the document
// lists overflow support for adders, multipliers and shifters only. With b
// unconnected (zero) the subtractor acts as a one-word delay.
//
// Interface: `tick` = t1 slot of each system clock, `word_tick` = t1 slot of
// bit 0; `a_bit`/`b_bit` from the receivers; `y_bit` to the transmitter.
module le_sub #(
  parameter int unsigned W = dpaa_pkg::WORD_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic word_tick,
  input  logic a_bit,
  input  logic b_bit,
  output logic y_bit
);
  logic [W-1:0] a, b, y;

  le_deser #(.W(W)) u_da (.clk, .rst_n, .tick, .bit_in(a_bit), .word(a));
  le_deser #(.W(W)) u_db (.clk, .rst_n, .tick, .bit_in(b_bit), .word(b));

  assign y = a - b;

  le_ser #(.W(W)) u_s (.clk, .rst_n, .tick, .load(word_tick), .word(y), .bit_out(y_bit));
endmodule
