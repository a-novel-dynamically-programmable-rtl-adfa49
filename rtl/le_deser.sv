// le_deser: serial-to-word input stage shared by the logic elements and the
// output ports.
//
// Bits arrive least significant first, one per system clock, and are taken
// in the t1 slot (`tick`). In the t1 slot of bit 0 of the next word period
// the receiver delivers the last bit of the previous word, so at that tick
// (`word_tick`) `word` = {that bit, the 15 bits shifted in before} is the
// complete word. `word` is only meaningful while `word_tick` is high.
module le_deser #(
  parameter int unsigned W = dpaa_pkg::WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         bit_in,
  output logic [W-1:0] word
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (tick) sr <= {bit_in, sr[W-1:1]};
  end

  assign word = {bit_in, sr[W-1:1]};
endmodule
