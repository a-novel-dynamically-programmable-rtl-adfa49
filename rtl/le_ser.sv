// le_ser: word-to-serial output stage shared by the logic elements and the
// input ports.
//
// In the t1 slot of bit 0 (`load`) the new word is taken; at every other t1
// slot (`tick`) the register moves one bit down. `bit_out` is bit k of the
// word during the system clock of bit k, stable across its 127 t2 slots,
// which is what the transmitter needs.
module le_ser #(
  parameter int unsigned W = dpaa_pkg::WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         load,
  input  logic [W-1:0] word,
  output logic         bit_out
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (load)   sr <= word;
    else if (tick)   sr <= {1'b0, sr[W-1:1]};
  end

  assign bit_out = sr[0];
endmodule
