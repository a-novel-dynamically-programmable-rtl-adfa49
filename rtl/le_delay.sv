// le_delay: delay logic element, out = a one word period later.
//
// The delay block is used to line up paths of different depth (timing
// synchronization of a program) and as the taps of a shift register. The
// word arriving bit-serially in one word period is sent again bit-serially,
// unchanged, during the next, so it is a 16-bit serial shift register of one
// word. Its latency is the same one word period as that of every other
// logic element.
//
// Interface: `tick` = t1 slot of each system clock, `word_tick` = t1 slot of
// bit 0; `a_bit` from the receiver; `y_bit` to the transmitter.
module le_delay #(
  parameter int unsigned W = dpaa_pkg::WORD_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic word_tick,
  input  logic a_bit,
  output logic y_bit
);
  logic [W-1:0] a;

  le_deser #(.W(W)) u_da (.clk, .rst_n, .tick, .bit_in(a_bit), .word(a));
  le_ser   #(.W(W)) u_s  (.clk, .rst_n, .tick, .load(word_tick), .word(a), .bit_out(y_bit));
endmodule
