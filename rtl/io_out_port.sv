// io_out_port: one of the array's data outputs.
//
// The port's receiver delivers one bit and its VALID flag per system clock.
// The port collects the 16 bits of a word (LSB first) and at `word_tick`,
// when the last bit is in, presents the whole word on `word` and raises
// `valid` if VALID was high for all 16 bits, i.e. the port's code matched a
// transmitter for the whole word. Both hold for one word period.
//
// Interface: `tick`/`word_tick` from the array timing, `d_bit`/`d_valid` from
// the receiver, `word`/`valid` to the pins. The document gives the prototype
// 4 outputs; the parallel word interface and the word valid are this
// design's choice.
module io_out_port #(
  parameter int unsigned W = dpaa_pkg::WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         word_tick,
  input  logic         d_bit,
  input  logic         d_valid,
  output logic [W-1:0] word,
  output logic         valid
);
  logic [W-1:0] w;
  logic         all_valid;   // VALID seen on every bit so far

  le_deser #(.W(W)) u_d (.clk, .rst_n, .tick, .bit_in(d_bit), .word(w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word      <= '0;
      valid     <= 1'b0;
      all_valid <= 1'b1;
    end else if (tick) begin
      if (word_tick) begin
        word      <= w;
        valid     <= all_valid && d_valid;
        all_valid <= 1'b1;
      end else begin
        all_valid <= all_valid && d_valid;
      end
    end
  end
endmodule
