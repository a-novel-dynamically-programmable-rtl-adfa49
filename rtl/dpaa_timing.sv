// dpaa_timing: clocking of the array.
//
// The whole array runs on the bus interface clock. One system clock is 128
// interface clocks: slot 0 is t1, in which every code generator reloads its
// setup information, receivers' decisions are taken over by the logic
// elements and the logic elements move to their next data bit; slots 1 to
// 127 are t2, one PN chip each. Words are 16 bits sent one bit per system
// clock, least significant bit first, so one word period is 16 system clocks
// (2048 interface clocks).
//
// Outputs: `slot` (0..127); `reload` = t1 (the system clock tick);
// `step` = any t2 slot; `last` = slot 127; `bit_idx` = the bit of the word
// sent in the current system clock, valid from its t1 slot; `word_tick` =
// the t1 slot of bit 0, where words are complete and new words start.
//
// From the document: 128 I/F clocks per system clock, 127 for the code and one
// to reload. This design's choice: the t1 slot first, bit-serial words.
module dpaa_timing #(
  parameter int unsigned SLOTS  = dpaa_pkg::SLOTS,
  parameter int unsigned WORD_W = dpaa_pkg::WORD_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic [$clog2(SLOTS)-1:0]    slot,
  output logic [$clog2(WORD_W)-1:0]   bit_idx,
  output logic                        reload,
  output logic                        step,
  output logic                        last,
  output logic                        word_tick
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      bit_idx <= '0;
    end else begin
      slot <= (slot == $clog2(SLOTS)'(SLOTS - 1)) ? '0 : slot + 1'b1;
      if (slot == $clog2(SLOTS)'(SLOTS - 1))
        bit_idx <= (bit_idx == $clog2(WORD_W)'(WORD_W - 1)) ? '0 : bit_idx + 1'b1;
    end
  end

  assign reload    = (slot == '0);
  assign step      = !reload;
  assign last      = (slot == $clog2(SLOTS)'(SLOTS - 1));
  assign word_tick = reload && (bit_idx == '0);
endmodule
