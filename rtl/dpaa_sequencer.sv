// dpaa_sequencer: the sequencer that programs the array. It holds a small
// library of programs and loads one into the configuration chain every word
// period, so the array can be reconfigured every cycle without a host.
//
// A program is the list of the N_RX receiver codes (7 bits each). The
// program memory holds DEPTH programs and is written one code at a time
// through `wr_en`, `wr_prog`, `wr_rx` and `wr_code`; it has no reset. While
// `run` is high, at every `word_tick` the sequencer takes program `pc` and
// moves `pc` on: to `first` after `last`, otherwise to `pc + 1`. The first
// word_tick of a run (run high, also straight out of reset) takes `start`
// instead of `pc`, so a run begins with program `start`
// and counts up (wrapping at DEPTH) until it reaches `last`; from then on
// it loops over `first..last`. Programs before the loop can so prepare it.
//
// Timing: the program picked at the `word_tick` that starts word period n is
// shifted out during period n. It takes 7*N_RX clocks, receiver 0 first and
// least significant bit first, which fits in a period for up to 292
// receivers. `commit` is then pulsed in bit 15 of period n, after its reload
// slot, so the program takes effect at the `word_tick` that starts period
// n+1. `cfg_shift`, `cfg_sdi` and `cfg_commit` are registered. `prog`
// shows the program being loaded.
//
// From the document: a controller/sequencer beside the elements that loads
// the setup information into the caches over the serial bus, and programs
// changed every cycle. This design's own: the program memory, its depth, its
// write port, the start/first/last loop and the load-then-commit timing.
module dpaa_sequencer #(
  parameter int unsigned N_RX  = 96,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned W    = dpaa_pkg::LFSR_W,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RW   = (N_RX > 1) ? $clog2(N_RX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // timing of the array
  input  logic          word_tick,
  input  logic [3:0]    bit_idx,
  input  logic [6:0]    slot,
  // program memory write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_prog,
  input  logic [RW-1:0] wr_rx,
  input  logic [W-1:0]  wr_code,
  // sequencing
  input  logic          run,
  input  logic [AW-1:0] start,
  input  logic [AW-1:0] first,
  input  logic [AW-1:0] last,
  output logic [AW-1:0] prog,
  // configuration chain of the array
  output logic          cfg_shift,
  output logic          cfg_sdi,
  output logic          cfg_commit
);
  logic [W-1:0] mem [DEPTH * N_RX];

  logic [AW-1:0] pc, sel;
  logic          running, busy, pend;
  logic [RW-1:0] rx;
  logic [2:0]    b;
  logic [W-1:0]  cur;

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_prog) * N_RX + int'(wr_rx)] <= wr_code;
  end

  assign cur = mem[int'(prog) * N_RX + int'(rx)];
  assign sel = running ? pc : start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      prog       <= '0;
      running    <= 1'b0;
      busy       <= 1'b0;
      pend       <= 1'b0;
      rx         <= '0;
      b          <= '0;
      cfg_shift  <= 1'b0;
      cfg_sdi    <= 1'b0;
      cfg_commit <= 1'b0;
    end else begin
      cfg_shift  <= 1'b0;
      cfg_commit <= 1'b0;
      if (!run) begin
        running <= 1'b0;
      end else if (word_tick) begin
        running <= 1'b1;
        prog    <= sel;
        pc      <= (sel == last) ? first : sel + 1'b1;
        busy <= 1'b1;
        pend <= 1'b0;
        rx   <= '0;
        b    <= '0;
      end
      if (busy && !(run && word_tick)) begin
        cfg_shift <= 1'b1;
        cfg_sdi   <= cur[b];
        if (b == 3'(W - 1)) begin
          b <= '0;
          if (int'(rx) == N_RX - 1) begin
            busy <= 1'b0;
            pend <= 1'b1;
          end else begin
            rx <= rx + 1'b1;
          end
        end else begin
          b <= b + 1'b1;
        end
      end
      // commit after the last reload slot of the period
      if (pend && !busy && bit_idx == 4'd15 && slot == 7'd1) begin
        cfg_commit <= 1'b1;
        pend       <= 1'b0;
      end
    end
  end
endmodule
