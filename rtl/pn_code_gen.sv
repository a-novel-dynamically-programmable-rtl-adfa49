// pn_code_gen: PN sequence code generator of one bus interface.
//
// A 7-bit linear feedback shift register. Stage 1 takes the XOR of the
// outputs of stage 3 and stage 7, every other stage takes its left
// neighbour; stage 7 is the chip output. With these taps the register runs
// through all 127 nonzero states, so every nonzero setup code gives one
// phase of the same 127-chip m-sequence and two different codes are two
// different phases.
//
// Interface: `load` (the t1 slot of every system clock) copies `seed`, the
// setup information, into all stages in parallel; `step` (each of the 127
// t2 slots) advances the register by one chip. `chip` is valid from the
// cycle after the load. Seed 0 freezes the register at zero.
//
// From the document: 7-bit LFSR, parallel load of the setup information,
// one XOR in the feedback from stages 3 and 7, reload once per system clock.
// This design's choice: stage 7 as the chip output, and load over step when
// both are high.
module pn_code_gen #(
  parameter int unsigned W = dpaa_pkg::LFSR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  input  logic [W-1:0] seed,
  output logic         chip
);
  logic [W-1:0] sr;   // sr[0] is stage 1, sr[W-1] is stage W

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= seed;
    else if (step)  sr <= {sr[W-2:0], sr[2] ^ sr[W-1]};
  end

  assign chip = sr[W-1];
endmodule
