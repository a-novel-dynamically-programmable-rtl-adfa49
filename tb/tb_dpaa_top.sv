// tb_dpaa_top: end-to-end testbench of the full DPAA array at its default
// size (16 adders, 10 multipliers, 8 shifters, 8 subtractors, 8 delays,
// 4 inputs, 4 outputs, 127-chip codes).
//
// The array is programmed, through the serial configuration bus only, with
// the first phase of a CMA adaptive array: the complex two-tap FIR
// OUT = sum h_k * c_k of the example program, with a four-stage complex shift
// register of delay blocks, complex products from four multipliers and a
// subtractor/adder pair per tap, an adder tree and two accumulating adders
// (outr = totalr + outr). The coefficients are held in adders that feed back
// on themselves with their other operand unconnected; they are loaded by
// reprogramming the array on the fly for one word period each, connecting
// an input port to the adder's free operand. A shifter scales totalr by an
// amount held the same way. Later the program is changed again (an output
// port is moved, a coefficient is raised) and large input values force
// overflows. From word period P_SEQ on, the programs come from the built-in
// sequencer instead: they are written into its program memory before the
// run, and the pins of the configuration bus fall silent.
//
// The word-level model of the array in dpaa_ref_pkg (every element: operands of
// word period n -> result in word period n+1; receivers follow the program
// active in that period) predicts every output word, its valid flag and every
// overflow flag, which are compared each word period. The word period must
// be 2048 interface clocks. The test counts and requires: dynamic
// reprogramming, broadcast of one transmitter to several receivers, an
// unconnected receiver (VALID low), accumulation through a self loop, a
// coefficient held by an adder adding zero, overflow in an adder, a
// multiplier and a shifter, and programs loaded by the sequencer.
module tb_dpaa_top;
  import dpaa_ref_pkg::*;
  localparam int NP = 64;
  localparam int P_SEQ = 56;   // first word period programmed by the sequencer

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0][15:0] in_word = '0;
  logic [3:0][15:0] out_word;
  logic [3:0] out_valid;
  logic sys_tick, word_tick;
  logic [3:0] bit_idx;
  logic [6:0] slot;
  logic cfg_shift = 1'b0, cfg_sdi = 1'b0, cfg_commit = 1'b0, cfg_sdo;
  logic [15:0] ovf_add;
  logic [9:0]  ovf_mul;
  logic [7:0]  ovf_shift;
  logic [95:0] rx_valid;
  logic seq_en = 1'b0, seq_wr_en = 1'b0, seq_run = 1'b0;
  logic [4:0] seq_wr_prog = '0, seq_prog;
  logic [6:0] seq_wr_rx = '0, seq_wr_code = '0;
  logic [4:0] seq_start = '0, seq_first = 5'(NP - P_SEQ), seq_last = 5'(NP - P_SEQ);

  dpaa_top dut (
    .clk, .rst_n, .in_word, .out_word, .out_valid, .sys_tick, .word_tick, .bit_idx, .slot,
    .cfg_shift, .cfg_sdi, .cfg_commit, .cfg_sdo,
    .seq_en, .seq_wr_en, .seq_wr_prog, .seq_wr_rx, .seq_wr_code, .seq_run, .seq_start,
    .seq_first, .seq_last, .seq_prog,
    .ovf_add, .ovf_mul, .ovf_shift, .rx_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reprog = 0, n_bcast = 0, n_unconn = 0, n_accum = 0, n_hold = 0;
  int n_ovf_add = 0, n_ovf_mul = 0, n_ovf_shift = 0, n_seq = 0;

  initial begin : watchdog
    repeat ((NP + 4) * 2048) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program of each word period ----------------
  function automatic prog_t program_of(int p);
    prog_t g;
    g = empty_program();
    if (p < 2) return g;
    // complex shift register hr1..hr4, hi1..hi4
    g[r_delay(0)] = code(t_in(0));
    g[r_delay(4)] = code(t_in(1));
    for (int k = 1; k < 4; k++) begin
      g[r_delay(k)]     = code(t_delay(k - 1));
      g[r_delay(4 + k)] = code(t_delay(4 + k - 1));
    end
    // coefficient registers cr1 ci1 cr2 ci2 (adders 0..3) and shift amount (adder 10)
    for (int k = 0; k < 4; k++) g[r_add(k, 0)] = code(t_add(k));
    g[r_add(10, 0)] = code(t_add(10));
    if (p == 2) begin g[r_add(0, 1)] = code(t_in(2)); g[r_add(1, 1)] = code(t_in(3)); end
    if (p == 3) begin g[r_add(2, 1)] = code(t_in(2)); g[r_add(3, 1)] = code(t_in(3)); end
    if (p == 4) g[r_add(10, 1)] = code(t_in(2));
    if (p == 50) g[r_add(0, 1)] = code(t_in(2));   // raise cr1 by 8.0
    // complex products, tap 1 (hr1, hi1 x cr1, ci1) and tap 2 (hr2, hi2 x cr2, ci2)
    for (int k = 0; k < 2; k++) begin
      g[r_mul(4*k+0, 0)] = code(t_delay(k));     g[r_mul(4*k+0, 1)] = code(t_add(2*k));
      g[r_mul(4*k+1, 0)] = code(t_delay(k));     g[r_mul(4*k+1, 1)] = code(t_add(2*k+1));
      g[r_mul(4*k+2, 0)] = code(t_delay(4+k));   g[r_mul(4*k+2, 1)] = code(t_add(2*k));
      g[r_mul(4*k+3, 0)] = code(t_delay(4+k));   g[r_mul(4*k+3, 1)] = code(t_add(2*k+1));
      // or_k = ta1 - ta4, oi_k = ta2 + ta3
      g[r_sub(k, 0)]   = code(t_mul(4*k+0));     g[r_sub(k, 1)]   = code(t_mul(4*k+3));
      g[r_add(4+k, 0)] = code(t_mul(4*k+1));     g[r_add(4+k, 1)] = code(t_mul(4*k+2));
    end
    // totalr = or1 + or2, totali = oi1 + oi2
    g[r_add(6, 0)] = code(t_sub(0));   g[r_add(6, 1)] = code(t_sub(1));
    g[r_add(7, 0)] = code(t_add(4));   g[r_add(7, 1)] = code(t_add(5));
    // outr = totalr + outr, outi = totali + outi
    g[r_add(8, 0)] = code(t_add(6));   g[r_add(8, 1)] = code(t_add(8));
    g[r_add(9, 0)] = code(t_add(7));   g[r_add(9, 1)] = code(t_add(9));
    // scaled totalr
    g[r_shift(0, 0)] = code(t_add(6)); g[r_shift(0, 1)] = code(t_add(10));
    g[r_out(0)] = code(t_add(8));
    g[r_out(1)] = code(t_add(9));
    g[r_out(2)] = code(t_shift(0));
    // output 3 unconnected at first, later moved onto totali
    if (p >= 30) g[r_out(3)] = code(t_add(7));
    return g;
  endfunction

  // input words of each word period (8 fraction bits: 1.0 = 256)
  function automatic logic [15:0] small_val();
    return 16'($signed($urandom_range(0, 1023)) - 512);
  endfunction

  function automatic logic [15:0] input_word(int p, int i);
    if (i == 2) return (p == 2) ? 16'sd192 : (p == 3) ? -16'sd96 : (p == 4) ? 16'sd3 :
                        (p == 50) ? 16'sd2048 : 16'($urandom);
    if (i == 3) return (p == 2) ? -16'sd64 : (p == 3) ? 16'sd128 : 16'($urandom);
    return (p >= 44) ? 16'($urandom) : small_val();
  endfunction

  // ---------------- word-level reference model ----------------
  dpaa_model m = new();

  // ---------------- configuration bus ----------------
  task automatic shift_program(input prog_t g);
    for (int k = 0; k < 7 * N_RX; k++) begin
      @(negedge clk) begin cfg_sdi = g[k / 7][k % 7]; cfg_shift = 1'b1; end
    end
    @(negedge clk) cfg_shift = 1'b0;
  endtask

  // ---------------- stimulus and checks ----------------
  initial begin
    prog_t g_prev, g_cur, g_next;
    logic [3:0][15:0] iw;
    longint t_last, t_now;
    logic [15:0] e;
    g_prev = program_of(-1);
    g_cur  = program_of(0);
    for (int i = 0; i < 4; i++) iw[i] = input_word(0, i);
    in_word = iw;
    // programs of periods P_SEQ..NP into the sequencer's slots 0..NP-P_SEQ
    for (int q = P_SEQ; q <= NP; q++) begin
      g_next = program_of(q);
      for (int r = 0; r < N_RX; r++) begin
        @(negedge clk) begin
          seq_wr_en = 1'b1; seq_wr_prog = 5'(q - P_SEQ); seq_wr_rx = 7'(r); seq_wr_code = g_next[r];
        end
      end
    end
    @(negedge clk) seq_wr_en = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t_last = -1;
    for (int p = 0; p < NP; p++) begin
      // word tick that starts period p: inputs sampled, outputs of period p-1 shown
      @(posedge clk iff word_tick);
      t_now = $time;
      if (t_last >= 0) check(t_now - t_last == 2048 * 10, $sformatf("word period %0d clocks", (t_now - t_last) / 10));
      t_last = t_now;
      @(negedge clk);
      // outputs: period p-1 words under the program of period p-1
      for (int o = 0; o < 4; o++) begin
        logic [6:0] c;
        c = g_prev[r_out(o)];
        e = m.opnd(c);
        check(out_valid[o] == (c != 0), $sformatf("p%0d out%0d valid %b", p, o, out_valid[o]));
        if (c != 0)
          check(out_word[o] == e, $sformatf("p%0d out%0d %h expected %h", p, o, out_word[o], e));
        else if (p > 0) n_unconn++;
      end
      // model: words sent in period p
      m.step(g_prev, iw);
      for (int i = 0; i < 16; i++) check(ovf_add[i] == m.ov_add[i], $sformatf("p%0d ovf_add[%0d]", p, i));
      for (int i = 0; i < 10; i++) check(ovf_mul[i] == m.ov_mul[i], $sformatf("p%0d ovf_mul[%0d]", p, i));
      for (int i = 0; i < 8; i++)  check(ovf_shift[i] == m.ov_shift[i], $sformatf("p%0d ovf_shift[%0d]", p, i));
      foreach (m.ov_add[i])   n_ovf_add   += int'(m.ov_add[i]);
      foreach (m.ov_mul[i])   n_ovf_mul   += int'(m.ov_mul[i]);
      foreach (m.ov_shift[i]) n_ovf_shift += int'(m.ov_shift[i]);
      if (g_prev[r_add(8, 1)] == code(t_add(8)) && m.nxt[t_add(8)] != m.cur[t_add(8)]) n_accum++;
      if (g_prev[r_add(0, 1)] == 0 && g_prev[r_add(0, 0)] == code(t_add(0)) && m.nxt[t_add(0)] == m.cur[t_add(0)] && m.cur[t_add(0)] != 0) n_hold++;
      m.commit();
      // inputs for period p+1
      for (int i = 0; i < 4; i++) iw[i] = input_word(p + 1, i);
      in_word = iw;
      // broadcast: delay 0 (hr1) feeds two multipliers and delay 1, all valid
      @(negedge clk iff (bit_idx == 4'd3 && slot == 7'd1));
      if (g_cur[r_mul(0, 0)] == code(t_delay(0)) && rx_valid[r_mul(0, 0)] && rx_valid[r_mul(1, 0)] && rx_valid[r_delay(1)])
        n_bcast++;
      // program of period p+1: load while period p runs, commit in its last system clock
      g_next = program_of(p + 1);
      if (p + 1 >= P_SEQ) begin
        // the sequencer picked slot p+1-P_SEQ at this period's word tick
        check(seq_prog == 5'(p + 1 - P_SEQ), $sformatf("p%0d sequencer program %0d", p, seq_prog));
        n_seq++;
      end else if (g_next != g_cur) begin
        shift_program(g_next);
        @(negedge clk iff (bit_idx == 4'd15 && slot == 7'd5));
        cfg_commit = 1'b1;
        @(negedge clk) cfg_commit = 1'b0;
        n_reprog++;
      end
      // hand the configuration bus to the sequencer for the following periods
      if (p + 2 == P_SEQ) begin
        @(negedge clk iff (bit_idx == 4'd15 && slot == 7'd20));
        seq_en = 1'b1;
        seq_run = 1'b1;
      end
      g_prev = g_cur;
      g_cur  = g_next;
    end
    $display("reprogrammings %0d, broadcast periods %0d, unconnected output words %0d", n_reprog, n_bcast, n_unconn);
    $display("accumulations %0d, coefficient holds %0d", n_accum, n_hold);
    $display("overflows: add %0d mul %0d shift %0d", n_ovf_add, n_ovf_mul, n_ovf_shift);
    $display("periods programmed by the sequencer %0d", n_seq);
    check(n_reprog > 0, "no dynamic reprogramming");
    check(n_bcast > 0, "no broadcast");
    check(n_unconn > 0, "no unconnected receiver");
    check(n_accum > 0, "no accumulation");
    check(n_hold > 0, "no register by adding zero");
    check(n_ovf_add > 0, "no adder overflow");
    check(n_ovf_mul > 0, "no multiplier overflow");
    check(n_ovf_shift > 0, "no shifter overflow");
    check(n_seq > 0, "no program from the sequencer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
