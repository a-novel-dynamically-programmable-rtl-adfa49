// bus_interface: the I/F block that joins one logic element (or I/O port) to
// the multiple access bus.
//
// It holds one transmitter, whose PN code is fixed (ROM, parameter TX_CODE),
// and N_RX receivers (0, 1 or 2, one per operand), each with its own setup
// cache holding the code of the transmitter it listens to. Connecting an
// operand to any element is only a matter of writing that element's code
// into the cache, so every element can reach every other and one output can
// be taken by many receivers at once (broadcast).
//
// The caches of the interface are chained for the serial configuration bus:
// cfg_sdi -> cache N_RX-1 -> ... -> cache 0 -> cfg_sdo; each cache is filled
// least significant bit first, so a chain of interfaces loads like one shift
// register holding receiver k's code at bits [7k+6:7k].
//
// Interface: `reload`/`step`/`last` from the array timing; `tx_data` is the
// element's serial output, `tx_chip` the modulated chip to the bus; `bus` is
// the bus sum; `rx_data[i]`/`rx_valid[i]` the decoded operand bits
// (`rx_data` is 0 when not valid). With HAS_TX = 0 `tx_chip` is 0 and must
// be left out of the bus; with N_RX = 0 the configuration bits pass straight
// through and the one-bit receiver outputs are 0.
module bus_interface #(
  parameter int unsigned W       = dpaa_pkg::LFSR_W,
  parameter bit          HAS_TX  = 1'b1,
  parameter int unsigned N_RX    = 2,
  parameter logic [W-1:0] TX_CODE = W'(1),
  parameter int unsigned BUS_W   = 7,
  localparam int unsigned RXW    = (N_RX > 0) ? N_RX : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    reload,
  input  logic                    step,
  input  logic                    last,
  input  logic                    tx_data,
  output logic                    tx_chip,
  input  logic signed [BUS_W-1:0] bus,
  input  logic                    cfg_shift,
  input  logic                    cfg_commit,
  input  logic                    cfg_sdi,
  output logic                    cfg_sdo,
  output logic [RXW-1:0]          rx_data,
  output logic [RXW-1:0]          rx_valid
);
  if (HAS_TX) begin : g_tx
    bus_tx #(.W(W), .CODE(TX_CODE)) u_tx (
      .clk, .rst_n, .load(reload), .step, .data(tx_data), .chip_out(tx_chip)
    );
  end else begin : g_no_tx
    assign tx_chip = 1'b0;
  end

  if (N_RX > 0) begin : g_rx
    logic [N_RX:0] chain;   // chain[i+1] feeds cache i, cache i drives chain[i]
    assign chain[N_RX] = cfg_sdi;
    assign cfg_sdo     = chain[0];

    for (genvar i = 0; i < N_RX; i++) begin : g_ch
      logic [W-1:0] code;

      setup_cache #(.W(W)) u_cache (
        .clk, .rst_n, .shift(cfg_shift), .sdi(chain[i+1]), .sdo(chain[i]),
        .commit(cfg_commit), .code
      );

      bus_rx #(.W(W), .BUS_W(BUS_W)) u_rx (
        .clk, .rst_n, .load(reload), .step, .last, .code, .bus,
        .data(rx_data[i]), .valid(rx_valid[i])
      );
    end
  end else begin : g_no_rx
    assign cfg_sdo  = cfg_sdi;
    assign rx_data  = '0;
    assign rx_valid = '0;
  end
endmodule
