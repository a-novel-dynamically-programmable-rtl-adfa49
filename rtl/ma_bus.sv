// ma_bus: the multiple access bus.
//
// Every transmitter adds its modulated chip to the shared bus at once; the
// bus carries their sum, a noise-like multi-level signal. Chip 0 counts as
// +1 and chip 1 as -1, so the bus value is N - 2*(number of ones). This is
// the logic-level counterpart of the analog summing wire of the original
// circuit.
//
// Interface: `chips` holds one modulated chip per transmitter; `bus` is the
// signed sum, combinational, BUS_W bits wide.
module ma_bus #(
  parameter int unsigned N     = 54,
  parameter int unsigned BUS_W = $clog2(N + 1) + 1
) (
  input  logic [N-1:0]            chips,
  output logic signed [BUS_W-1:0] bus
);
  always_comb begin
    logic [BUS_W-1:0] ones;
    ones = '0;
    for (int unsigned i = 0; i < N; i++) ones += BUS_W'(chips[i]);
    bus = signed'(BUS_W'(N)) - signed'(ones << 1);
  end
endmodule
