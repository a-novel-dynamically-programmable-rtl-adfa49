// dpaa_top: the Dynamically Programmable Arithmetic Array, prototype
// configuration: 16 adders, 10 multipliers, 8 shifters, 8 subtractors and
// 8 delay blocks (16-bit, bit-serial), 4 data inputs and 4 data outputs, all
// on one code-division multiple access bus.
//
// Every element and every input port owns a transmitter with a fixed PN code
// (transmitter t uses LFSR state t+1). Every operand of an element and
// every output port owns a receiver whose code is programmed through the
// serial configuration bus: a receiver set to transmitter t's code takes
// t's output as its operand; code 0 leaves it unconnected (it reads zero).
// The program of the array is therefore just the list of receiver codes,
// and it can be rewritten while the array runs: a commit takes effect at the
// next system clock boundary.
//
// Timing: `clk` is the bus interface clock. 128 clocks form one system clock
// (one reload slot, then 127 chip slots) and 16 system clocks one word
// period (2048 clocks). Every element takes its operands during one word
// period and sends its result during the next (latency one word period).
// `in_word[i]` is sampled at `word_tick` and sent during the word period
// that starts there; `out_word[o]` and `out_valid[o]` change at `word_tick`
// to the word the connected element sent during the word period that has
// just ended.
//
// Transmitter numbering: inputs 0..N_IN-1, then adders, multipliers,
// shifters, subtractors, delays. Receiver numbering (configuration chain):
// adder k operands a,b = 2k, 2k+1; then multipliers, shifters, subtractors
// (two each, a then b); then delays (one each); then output ports (one
// each). The configuration chain is filled least significant bit first, so
// after 7*N_RXT shifts receiver k holds bits [7k+6:7k] of the shifted
// stream; `cfg_sdo` is the last bit of the chain.
//
// From the document: the element mix and counts, 16-bit words, the 4 inputs
// and 4 outputs, the bus interface (transmitter, receivers, setup caches,
// 127-chip codes, 128-clock system clock), serially loaded caches, fixed
// transmitter codes. This design's own: the logic-level bus, the word and
// configuration ports, one configuration chain, the numbering above and the
// arithmetic formats of the elements.
//
// Programming: with `seq_en` low the chain is driven directly from the
// `cfg_*` pins, as on the prototype chip, which was configured from outside.
// With `seq_en` high the built-in sequencer (dpaa_sequencer) drives it: it
// keeps up to SEQ_DEPTH programs, written through `seq_wr_*`, and while
// `seq_run` is high loads one per word period (start, then the loop
// first..last), so a program applies from the word period after the one in
// which it was picked. The document names a controller/sequencer that loads
// the setup information; its program memory, depth and loop control are this
// design's own.
module dpaa_top
  import dpaa_pkg::*;
#(
  parameter int unsigned N_IN    = 4,
  parameter int unsigned N_OUT   = 4,
  parameter int unsigned N_ADD   = 16,
  parameter int unsigned N_MUL   = 10,
  parameter int unsigned N_SHIFT = 8,
  parameter int unsigned N_SUB   = 8,
  parameter int unsigned N_DELAY = 8,
  parameter int unsigned FRAC    = 8,
  parameter int unsigned SEQ_DEPTH = 32,
  // transmitter bases
  localparam int unsigned TX_IN    = 0,
  localparam int unsigned TX_ADD   = TX_IN + N_IN,
  localparam int unsigned TX_MUL   = TX_ADD + N_ADD,
  localparam int unsigned TX_SHIFT = TX_MUL + N_MUL,
  localparam int unsigned TX_SUB   = TX_SHIFT + N_SHIFT,
  localparam int unsigned TX_DELAY = TX_SUB + N_SUB,
  localparam int unsigned N_TX     = TX_DELAY + N_DELAY,
  // receiver bases
  localparam int unsigned RX_ADD   = 0,
  localparam int unsigned RX_MUL   = RX_ADD + 2 * N_ADD,
  localparam int unsigned RX_SHIFT = RX_MUL + 2 * N_MUL,
  localparam int unsigned RX_SUB   = RX_SHIFT + 2 * N_SHIFT,
  localparam int unsigned RX_DELAY = RX_SUB + 2 * N_SUB,
  localparam int unsigned RX_OUT   = RX_DELAY + N_DELAY,
  localparam int unsigned N_RXT    = RX_OUT + N_OUT,
  localparam int unsigned BUS_W    = $clog2(N_TX + 1) + 1,
  localparam int unsigned SEQ_AW   = $clog2(SEQ_DEPTH),
  localparam int unsigned RX_AW    = $clog2(N_RXT)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // data
  input  logic [N_IN-1:0][WORD_W-1:0]      in_word,
  output logic [N_OUT-1:0][WORD_W-1:0]     out_word,
  output logic [N_OUT-1:0]                 out_valid,
  // timing
  output logic                             sys_tick,
  output logic                             word_tick,
  output logic [$clog2(WORD_W)-1:0]        bit_idx,
  output logic [$clog2(SLOTS)-1:0]         slot,
  // serial configuration bus
  input  logic                             cfg_shift,
  input  logic                             cfg_sdi,
  input  logic                             cfg_commit,
  output logic                             cfg_sdo,
  // sequencer: program memory write port and run control
  input  logic                             seq_en,
  input  logic                             seq_wr_en,
  input  logic [SEQ_AW-1:0]                seq_wr_prog,
  input  logic [RX_AW-1:0]                 seq_wr_rx,
  input  logic [LFSR_W-1:0]                seq_wr_code,
  input  logic                             seq_run,
  input  logic [SEQ_AW-1:0]                seq_start,
  input  logic [SEQ_AW-1:0]                seq_first,
  input  logic [SEQ_AW-1:0]                seq_last,
  output logic [SEQ_AW-1:0]                seq_prog,
  // status
  output logic [N_ADD-1:0]                 ovf_add,
  output logic [N_MUL-1:0]                 ovf_mul,
  output logic [N_SHIFT-1:0]               ovf_shift,
  output logic [N_RXT-1:0]                 rx_valid
);
  logic reload, step, last;
  logic [N_TX-1:0]  tx_bit;    // serial output of each transmitting block
  logic [N_TX-1:0]  tx_chip;   // modulated chip of each transmitter
  logic [N_RXT:0]   chain;     // configuration chain, chain[k+1] -> rx k -> chain[k]
  logic signed [BUS_W-1:0] bus;
  logic ch_shift, ch_sdi, ch_commit;   // what drives the chain
  logic sq_shift, sq_sdi, sq_commit;   // the sequencer's chain outputs

  dpaa_timing u_timing (
    .clk, .rst_n, .slot, .bit_idx, .reload, .step, .last, .word_tick
  );
  assign sys_tick = reload;

  ma_bus #(.N(N_TX), .BUS_W(BUS_W)) u_bus (.chips(tx_chip), .bus);

  // the sequencer, which drives the configuration chain when seq_en is high
  dpaa_sequencer #(.N_RX(N_RXT), .DEPTH(SEQ_DEPTH)) u_seq (
    .clk, .rst_n, .word_tick, .bit_idx, .slot,
    .wr_en(seq_wr_en), .wr_prog(seq_wr_prog), .wr_rx(seq_wr_rx), .wr_code(seq_wr_code),
    .run(seq_run), .start(seq_start), .first(seq_first), .last(seq_last), .prog(seq_prog),
    .cfg_shift(sq_shift), .cfg_sdi(sq_sdi), .cfg_commit(sq_commit));

  assign ch_shift     = seq_en ? sq_shift  : cfg_shift;
  assign ch_sdi       = seq_en ? sq_sdi    : cfg_sdi;
  assign ch_commit    = seq_en ? sq_commit : cfg_commit;
  assign chain[N_RXT] = ch_sdi;
  assign cfg_sdo      = chain[0];

  // One logic element's or port's bus interface: transmitter T (or none)
  // and NR receivers starting at receiver R.
  `define DPAA_IF(NAME, T, HT, R, NR)                                          \
    logic [(NR > 0 ? NR : 1)-1:0] NAME``_rd, NAME``_rv;                       \
    bus_interface #(.HAS_TX(HT), .N_RX(NR), .TX_CODE(tx_code(T)),             \
                    .BUS_W(BUS_W)) NAME (                                     \
      .clk, .rst_n, .reload, .step, .last,                                    \
      .tx_data(tx_bit[T]), .tx_chip(tx_chip[T]), .bus,                        \
      .cfg_shift(ch_shift), .cfg_commit(ch_commit), .cfg_sdi(chain[R + NR]), .cfg_sdo(chain[R]),   \
      .rx_data(NAME``_rd), .rx_valid(NAME``_rv));

  // ---------------- input ports ----------------
  for (genvar i = 0; i < N_IN; i++) begin : g_in
    logic [0:0] u_if_rd, u_if_rv;
    logic       unused_sdo;
    bus_interface #(.HAS_TX(1'b1), .N_RX(0), .TX_CODE(tx_code(TX_IN + i)),
                    .BUS_W(BUS_W)) u_if (
      .clk, .rst_n, .reload, .step, .last,
      .tx_data(tx_bit[TX_IN + i]), .tx_chip(tx_chip[TX_IN + i]), .bus,
      .cfg_shift(ch_shift), .cfg_commit(ch_commit), .cfg_sdi(1'b0), .cfg_sdo(unused_sdo),
      .rx_data(u_if_rd), .rx_valid(u_if_rv));
    io_in_port u_port (
      .clk, .rst_n, .tick(reload), .word_tick, .word(in_word[i]),
      .y_bit(tx_bit[TX_IN + i]));
  end

  // ---------------- adders ----------------
  for (genvar i = 0; i < N_ADD; i++) begin : g_add
    `DPAA_IF(u_if, TX_ADD + i, 1'b1, RX_ADD + 2 * i, 2)
    assign rx_valid[RX_ADD + 2 * i +: 2] = u_if_rv;
    le_add u_le (
      .clk, .rst_n, .tick(reload), .word_tick,
      .a_bit(u_if_rd[0]), .b_bit(u_if_rd[1]), .y_bit(tx_bit[TX_ADD + i]),
      .ovf(ovf_add[i]));
  end

  // ---------------- multipliers ----------------
  for (genvar i = 0; i < N_MUL; i++) begin : g_mul
    `DPAA_IF(u_if, TX_MUL + i, 1'b1, RX_MUL + 2 * i, 2)
    assign rx_valid[RX_MUL + 2 * i +: 2] = u_if_rv;
    le_mul #(.FRAC(FRAC)) u_le (
      .clk, .rst_n, .tick(reload), .word_tick,
      .a_bit(u_if_rd[0]), .b_bit(u_if_rd[1]), .y_bit(tx_bit[TX_MUL + i]),
      .ovf(ovf_mul[i]));
  end

  // ---------------- shifters ----------------
  for (genvar i = 0; i < N_SHIFT; i++) begin : g_shift
    `DPAA_IF(u_if, TX_SHIFT + i, 1'b1, RX_SHIFT + 2 * i, 2)
    assign rx_valid[RX_SHIFT + 2 * i +: 2] = u_if_rv;
    le_shift u_le (
      .clk, .rst_n, .tick(reload), .word_tick,
      .a_bit(u_if_rd[0]), .b_bit(u_if_rd[1]), .y_bit(tx_bit[TX_SHIFT + i]),
      .ovf(ovf_shift[i]));
  end

  // ---------------- subtractors ----------------
  for (genvar i = 0; i < N_SUB; i++) begin : g_sub
    `DPAA_IF(u_if, TX_SUB + i, 1'b1, RX_SUB + 2 * i, 2)
    assign rx_valid[RX_SUB + 2 * i +: 2] = u_if_rv;
    le_sub u_le (
      .clk, .rst_n, .tick(reload), .word_tick,
      .a_bit(u_if_rd[0]), .b_bit(u_if_rd[1]), .y_bit(tx_bit[TX_SUB + i]));
  end

  // ---------------- delay blocks ----------------
  for (genvar i = 0; i < N_DELAY; i++) begin : g_delay
    `DPAA_IF(u_if, TX_DELAY + i, 1'b1, RX_DELAY + i, 1)
    assign rx_valid[RX_DELAY + i] = u_if_rv[0];
    le_delay u_le (
      .clk, .rst_n, .tick(reload), .word_tick,
      .a_bit(u_if_rd[0]), .y_bit(tx_bit[TX_DELAY + i]));
  end

  // ---------------- output ports ----------------
  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    logic [0:0] u_if_rd, u_if_rv;
    logic       unused_chip;
    bus_interface #(.HAS_TX(1'b0), .N_RX(1), .BUS_W(BUS_W)) u_if (
      .clk, .rst_n, .reload, .step, .last,
      .tx_data(1'b0), .tx_chip(unused_chip), .bus,
      .cfg_shift(ch_shift), .cfg_commit(ch_commit), .cfg_sdi(chain[RX_OUT + i + 1]), .cfg_sdo(chain[RX_OUT + i]),
      .rx_data(u_if_rd), .rx_valid(u_if_rv));
    assign rx_valid[RX_OUT + i] = u_if_rv[0];
    io_out_port u_port (
      .clk, .rst_n, .tick(reload), .word_tick,
      .d_bit(u_if_rd[0]), .d_valid(u_if_rv[0]),
      .word(out_word[i]), .valid(out_valid[i]));
  end

  `undef DPAA_IF
endmodule
