// bus_rx: receiver of a bus interface.
//
// The receiver's own code generator is loaded in the t1 slot with the code
// from its setup cache and runs in step with every transmitter. In each t2
// slot the bus value is multiplied by the receiver's +/-1 chip (the mixer)
// and added to an accumulator (the low pass filter, an integrate-and-dump
// over the 127 chips). Two different phases of the m-sequence correlate to
// -1, the same phase to 127, so with a matched code the sum is
// +/-127 plus at most one unit per other transmitter, while without a match
// it stays within the number of transmitters. The level detector takes the
// sign as the data bit (negative = 1) and raises VALID when the magnitude
// reaches THRESH. When VALID is low the data bit is forced to 0, so an
// unconnected input reads as zero.
//
// Interface: `load`/`step`/`last` from the array timing (t1, t2, last t2
// slot). `data`/`valid` are registered at the end of the last t2 slot and
// hold through the next system clock, so the logic element samples them in
// the following t1 slot.
//
// From the document: mixer, LPF, level detect, VALID, 127-chip code from the
// setup cache. This design's choices: integrate-and-dump as the LPF, the
// threshold of 64 (half the code length), and zero data when not valid.
module bus_rx #(
  parameter int unsigned W      = dpaa_pkg::LFSR_W,
  parameter int unsigned BUS_W  = 7,
  parameter int unsigned THRESH = (1 << (W - 1))
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic                    step,
  input  logic                    last,
  input  logic [W-1:0]            code,
  input  logic signed [BUS_W-1:0] bus,
  output logic                    data,
  output logic                    valid
);
  localparam int unsigned ACC_W = BUS_W + W;

  logic chip;
  logic signed [ACC_W-1:0] acc, acc_nxt, prod;

  pn_code_gen #(.W(W)) u_gen (
    .clk, .rst_n, .load, .step, .seed(code), .chip
  );

  // mixer
  assign prod    = chip ? -ACC_W'(bus) : ACC_W'(bus);
  assign acc_nxt = acc + prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      data  <= 1'b0;
      valid <= 1'b0;
    end else if (step) begin
      if (last) begin
        // level detect, then dump the integrator
        valid <= (acc_nxt >= signed'(ACC_W'(THRESH))) ||
                 (acc_nxt <= -signed'(ACC_W'(THRESH)));
        data  <= (acc_nxt <= -signed'(ACC_W'(THRESH)));
        acc   <= '0;
      end else begin
        acc <= acc_nxt;
      end
    end
  end
endmodule
