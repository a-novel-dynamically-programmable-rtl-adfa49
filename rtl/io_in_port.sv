// io_in_port: one of the array's data inputs.
//
// The 16-bit word on `word` is sampled at `word_tick` (the t1 slot of bit 0)
// and sent bit-serially, LSB first, during the word period that begins
// there, through the port's transmitter. The port behaves to the rest of
// the array like a logic element whose value is set from outside.
//
// Interface: `tick`/`word_tick` from the array timing, `word` from the pins,
// `y_bit` to the transmitter. The document gives the prototype 4 inputs; the
// parallel word interface is this design's choice.
module io_in_port #(
  parameter int unsigned W = dpaa_pkg::WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         word_tick,
  input  logic [W-1:0] word,
  output logic         y_bit
);
  le_ser #(.W(W)) u_s (.clk, .rst_n, .tick, .load(word_tick), .word, .bit_out(y_bit));
endmodule
