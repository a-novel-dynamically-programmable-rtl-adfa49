// le_add: adder logic element, out = a + b, 16-bit two's complement.
//
// The element receives both operands bit-serially (LSB first, one bit per
// system clock) from its two bus receivers. When the last bit of a word has
// arrived (`word_tick`) it adds the two words, raises `ovf` if the signed sum
// does not fit in 16 bits (the result wraps), and sends the sum back out
// bit-serially during the next word period. Latency is therefore exactly one
// word period, the same for every logic element, so a program can balance
// paths by counting elements. With one input unconnected (it reads zero) the
// adder acts as a one-word delay; fed back onto itself it is an accumulator
// or, with the other input unconnected, a register that holds its value.
//
// Interface: `tick` = t1 slot of each system clock, `word_tick` = t1 slot of
// bit 0; `a_bit`/`b_bit` from the receivers; `y_bit` to the transmitter;
// `ovf` belongs to the word being sent.
//
// From the document: one fixed function per element, 16 bits, serial
// operation, overflow support, conversion to a delay by adding zero. This
// design's choices: the one-word latency, wrap-around on overflow, and a
// flag held for the word period.
module le_add #(
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

  le_deser #(.W(W)) u_da (.clk, .rst_n, .tick, .bit_in(a_bit), .word(a));
  le_deser #(.W(W)) u_db (.clk, .rst_n, .tick, .bit_in(b_bit), .word(b));

  assign y = a + b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ovf <= 1'b0;
    else if (word_tick) ovf <= (a[W-1] == b[W-1]) && (y[W-1] != a[W-1]);
  end

  le_ser #(.W(W)) u_s (.clk, .rst_n, .tick, .load(word_tick), .word(y), .bit_out(y_bit));
endmodule
