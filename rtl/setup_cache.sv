// setup_cache: the lookup table (memory cache) that holds one receiver's
// setup information, the 7-bit code of the transmitter it listens to.
//
// The caches of the array form one serial configuration bus. While `shift`
// is high, each clock moves the shadow register one bit towards bit 0:
// `sdi` enters at the top and bit 0 leaves on `sdo` to the next cache, so a
// chain of caches acts as one long shift register filled least significant
// bit first. `commit` copies the shadow into the active code that the code
// generator reads. The code generator reads the active code only in the t1
// reload slot, so a commit at any time of a system clock switches the
// connection cleanly at the next reload and never disturbs a bit in flight.
//
// From the document: 7-bit setup information per receiver held in a memory
// cache, loaded through serial buses. This design's choice: the shadow
// register with a commit strobe, and reset to code 0 (disconnected).
module setup_cache #(
  parameter int unsigned W = dpaa_pkg::LFSR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sdi,
  output logic         sdo,
  input  logic         commit,
  output logic [W-1:0] code
);
  logic [W-1:0] shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0;
      code   <= '0;
    end else begin
      if (shift)  shadow <= {sdi, shadow[W-1:1]};
      if (commit) code   <= shadow;
    end
  end

  assign sdo = shadow[0];
endmodule
