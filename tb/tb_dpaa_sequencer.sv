// tb_dpaa_sequencer: self-checking testbench of the sequencer.
//
// A sequencer for 3 receivers and 4 programs runs from the real timing
// generator. A model of the configuration chain, three 7-bit shadow
// registers shifted least significant bit first plus their active copies,
// is fed from its outputs. Random programs are written into the memory and
// the run starts at program 3, counts on (wrapping to 0) and then loops over
// programs 1..2: 3, 0, 1, 2, 1, 2, ... For every word
// period the test checks these things:
//   * exactly 21 shifts happen;
//   * exactly one commit happens, in bit 15 after all the shifts;
//   * at the next word_tick the active codes equal the expected program.
// Program 1 is rewritten during the run and must show up the next time it is
// loaded. While `run` is low nothing may be shifted or committed. A new run
// must start again at the start program.
module tb_dpaa_sequencer;
  localparam int NR = 3;
  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] slot;
  logic [3:0] bit_idx;
  logic reload, step, last_slot, word_tick;
  logic wr_en = 1'b0;
  logic [1:0] wr_prog = '0, start = 2'd3, first = 2'd1, last = 2'd2;
  logic [1:0] wr_rx = '0;
  logic [6:0] wr_code = '0;
  logic run = 1'b0;
  logic [1:0] prog;
  logic cfg_shift, cfg_sdi, cfg_commit;
  int checks = 0, failures = 0;

  dpaa_timing u_t (.clk, .rst_n, .slot, .bit_idx, .reload, .step, .last(last_slot), .word_tick);
  dpaa_sequencer #(.N_RX(NR), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .word_tick, .bit_idx, .slot, .wr_en, .wr_prog, .wr_rx, .wr_code,
    .run, .start, .first, .last, .prog, .cfg_shift, .cfg_sdi, .cfg_commit);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40 * 2048) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chain model and per-period counters
  logic [7*NR-1:0] shadow = '0, active = '0;
  int n_shift = 0, n_commit = 0;
  bit commit_ok = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (cfg_shift) begin
      shadow <= {cfg_sdi, shadow[7*NR-1:1]};
      n_shift <= n_shift + 1;
    end
    if (cfg_commit) begin
      active <= shadow;
      n_commit <= n_commit + 1;
      if (bit_idx != 4'd15 || cfg_shift || n_shift != 7 * NR) commit_ok <= 1'b0;
    end
  end

  logic [7*NR-1:0] lib [DEPTH];

  task automatic write_prog(input int p, input logic [7*NR-1:0] v);
    for (int r = 0; r < NR; r++) begin
      @(negedge clk) begin
        wr_en = 1'b1; wr_prog = 2'(p); wr_rx = 2'(r); wr_code = v[7*r +: 7];
      end
    end
    @(negedge clk) wr_en = 1'b0;
    lib[p] = v;
  endtask

  function automatic logic [7*NR-1:0] rnd_prog();
    logic [7*NR-1:0] v;
    for (int r = 0; r < NR; r++) v[7*r +: 7] = 7'($urandom);
    return v;
  endfunction

  initial begin
    int pick, prev_pick, n_loads = 0;
    logic [7*NR-1:0] before_stop;
    for (int p = 0; p < DEPTH; p++) write_prog(p, rnd_prog());
    run = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pick = 3;
    prev_pick = -1;
    // the sequencer picks its first program at the first clock edge out of
    // reset, where word_tick is high (slot 0 of bit 0)
    @(posedge clk);
    #1;
    checks++;
    if (prog != 2'(pick)) failures++;
    prev_pick = pick;
    pick = (pick == 2) ? 1 : (pick + 1) % DEPTH;
    for (int n = 1; n < 24; n++) begin
      // just before the word_tick that starts period n
      @(negedge clk iff word_tick);
      checks += 3;
      if (active !== lib[prev_pick]) begin
        failures++;
        $display("period %0d: active %h expected program %0d %h", n, active, prev_pick, lib[prev_pick]);
      end
      if (n_shift != 7 * NR) failures++;
      if (n_commit != 1) failures++;
      n_loads++;
      n_shift = 0; n_commit = 0;
      // at the word_tick the next program is picked
      @(posedge clk);
      #1;
      checks++;
      if (prog != 2'(pick)) failures++;
      if (n == 3) write_prog(1, rnd_prog());   // rewrite program 1 while program 2 loads
      prev_pick = pick;
      pick = (pick == 2) ? 1 : (pick + 1) % DEPTH;
    end
    // stop: nothing moves while run is low
    @(negedge clk iff (slot == 7'd3)) run = 1'b0;
    @(negedge clk iff word_tick);
    @(negedge clk iff word_tick);
    before_stop = active;
    n_shift = 0; n_commit = 0;
    repeat (2) @(negedge clk iff word_tick);
    checks += 2;
    if (n_shift != 0 || n_commit != 0) failures++;
    if (active !== before_stop) failures++;
    // restart: begins again with the start program
    @(negedge clk) run = 1'b1;
    @(negedge clk iff word_tick);
    @(posedge clk);
    #1;
    checks++;
    if (prog != start) failures++;
    @(negedge clk iff word_tick);
    checks++;
    if (active !== lib[3]) failures++;
    checks += 2;
    if (!commit_ok) failures++;
    if (n_loads != 23) failures++;
    $display("programs loaded %0d", n_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
