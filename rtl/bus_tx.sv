// bus_tx: transmitter of a bus interface.
//
// The data bit of the current system clock is spread by the transmitter's
// PN code: the chip sent in each t2 slot is data XOR code chip, which the
// multiple access bus reads as +1 (chip 0) or -1 (chip 1). The code is
// fixed per transmitter (held in ROM), given here by the parameter CODE.
//
// Interface: `load`/`step` come from the array timing (t1 reload, t2 chip
// slots); `data` must be stable through the t2 slots; `chip_out` is the
// modulated chip. The analog charge pump of the original circuit, which
// puts a small voltage step on a shared wire, is replaced by this logic
// value and the digital summation in ma_bus.
module bus_tx #(
  parameter int unsigned W = dpaa_pkg::LFSR_W,
  parameter logic [W-1:0] CODE = W'(1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  input  logic data,
  output logic chip_out
);
  logic chip;

  pn_code_gen #(.W(W)) u_gen (
    .clk, .rst_n, .load, .step, .seed(CODE), .chip
  );

  // mixer: multiply the +/-1 data symbol by the +/-1 code chip
  assign chip_out = data ^ chip;
endmodule
