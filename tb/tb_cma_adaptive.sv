// tb_cma_adaptive: the array running a complete 4-tap CMA adaptive array
// (output, error and weight update) by reprogramming itself every word
// period.
//
//   OUT(k)   = sum_t h_t(k) c_t(k)                       (complex, 4 taps)
//   e'(k)    = OUT(k) (1 - |OUT(k)|^2)                   (= -epsilon)
//   c_t(k+1) = c_t(k) + mu e'(k) conj(h_t(k)),  mu = 2^-4
//
// Values use 8 fraction bits (1.0 = 256). One sample takes a frame of 16
// word periods, each with its own program:
//   0      shift the new sample into the tap registers (delays hr1..4, hi1..4)
//   1-2    complex products of taps 1-2, then taps 3-4 (8 multipliers)
//   2-5    real/imaginary parts per tap, adder tree, OUT
//   6-9    |OUT|^2, 1 - |OUT|^2, e' (1.0 comes from input 3)
//   10     e' into two registers (adders that add zero)
//   11-13  products e' x conj(h) for taps 1-2 and 3-4, their sums
//   13-14  scaling by mu in the shifters (amount from input 2)
//   14-15  weight registers accumulate the updates
// The delay blocks hold the taps and the adders 0-7 the weights between
// frames by feeding back on themselves.
//
// The array runs on its own: the 17 programs (one that loads c1 = 1.0, then
// the 16 of a frame) are written into the built-in sequencer before reset,
// and the sequencer loads one program per word period. It starts with the
// loading program and then loops over the frame for as long as the run lasts.
//
// Two independent references are checked: the word-level model of the
// array (dpaa_ref_pkg) predicts every output word and overflow flag in every
// word period, and the algorithm above, computed here sample by sample in
// the same 16-bit arithmetic, must match OUT and the first weight read at
// the output ports. The input is QPSK through a two-path channel
// 1 + (0.35+0.25j) z^-1; the dispersion E[(|OUT|^2-1)^2] must fall between
// the first and the last 50 samples.
module tb_cma_adaptive;
  import dpaa_ref_pkg::*;
  localparam int F = 16;         // word periods per sample
  localparam int NS = 200;       // samples
  localparam int MU_SHIFT = -4;  // mu = 2^-4

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
  logic seq_en = 1'b1, seq_wr_en = 1'b0, seq_run = 1'b1;
  logic [4:0] seq_wr_prog = '0, seq_prog;
  logic [6:0] seq_wr_rx = '0, seq_wr_code = '0;
  logic [4:0] seq_start = 5'd0, seq_first = 5'd1, seq_last = 5'(F);

  dpaa_top dut (
    .clk, .rst_n, .in_word, .out_word, .out_valid, .sys_tick, .word_tick, .bit_idx, .slot,
    .cfg_shift, .cfg_sdi, .cfg_commit, .cfg_sdo,
    .seq_en, .seq_wr_en, .seq_wr_prog, .seq_wr_rx, .seq_wr_code, .seq_run, .seq_start,
    .seq_first, .seq_last, .seq_prog,
    .ovf_add, .ovf_mul, .ovf_shift, .rx_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat ((NS * F + 8) * 2048) @(posedge clk);
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

  // element helpers
  function automatic void hold_regs(ref prog_t g);
    for (int k = 0; k < 8; k++) g[r_delay(k)]  = code(t_delay(k));   // taps
    for (int k = 0; k < 8; k++) g[r_add(k, 0)] = code(t_add(k));     // weights
  endfunction

  function automatic void set2(ref prog_t g, input int r0, input int ta, input int tb);
    g[r0] = code(ta); g[r0 + 1] = code(tb);
  endfunction

  // program of step s of a frame (s = -1: load the initial weight c1 = 1.0)
  function automatic prog_t frame_program(int s);
    prog_t g;
    g = empty_program();
    hold_regs(g);
    g[r_out(0)] = code(t_add(8));    // OUTr while it is held
    g[r_out(1)] = code(t_add(9));    // OUTi
    g[r_out(2)] = code(t_add(0));    // cr1
    g[r_out(3)] = code(t_add(4));    // ci1
    case (s)
      -1: begin g[r_add(0, 0)] = '0; g[r_add(0, 1)] = code(t_in(3)); end
      0: begin
        g[r_delay(0)] = code(t_in(0));
        g[r_delay(4)] = code(t_in(1));
        for (int k = 1; k < 4; k++) begin
          g[r_delay(k)]     = code(t_delay(k - 1));
          g[r_delay(4 + k)] = code(t_delay(4 + k - 1));
        end
      end
      1, 2: begin
        // complex products of taps (s-1)*2 .. +1 on multipliers 0-7
        for (int j = 0; j < 2; j++) begin
          int t;
          t = 2 * (s - 1) + j;
          set2(g, r_mul(4*j+0, 0), t_delay(t),     t_add(t));       // hr*cr
          set2(g, r_mul(4*j+1, 0), t_delay(t),     t_add(4 + t));   // hr*ci
          set2(g, r_mul(4*j+2, 0), t_delay(4 + t), t_add(t));       // hi*cr
          set2(g, r_mul(4*j+3, 0), t_delay(4 + t), t_add(4 + t));   // hi*ci
        end
        if (s == 2) begin
          set2(g, r_sub(0, 0), t_mul(0), t_mul(3));   // or1
          set2(g, r_add(8, 0), t_mul(1), t_mul(2));   // oi1
          set2(g, r_sub(1, 0), t_mul(4), t_mul(7));   // or2
          set2(g, r_add(9, 0), t_mul(5), t_mul(6));   // oi2
        end
      end
      3: begin
        set2(g, r_sub(2, 0), t_mul(0), t_mul(3));     // or3
        set2(g, r_add(10, 0), t_mul(1), t_mul(2));    // oi3
        set2(g, r_sub(3, 0), t_mul(4), t_mul(7));     // or4
        set2(g, r_add(11, 0), t_mul(5), t_mul(6));    // oi4
        set2(g, r_add(12, 0), t_sub(0), t_sub(1));    // tr12
        set2(g, r_add(13, 0), t_add(8), t_add(9));    // ti12
      end
      4: begin
        set2(g, r_add(14, 0), t_sub(2), t_sub(3));    // tr34
        set2(g, r_add(15, 0), t_add(10), t_add(11));  // ti34
        g[r_add(12, 0)] = code(t_add(12));            // hold tr12, ti12
        g[r_add(13, 0)] = code(t_add(13));
      end
      5: begin
        set2(g, r_add(8, 0), t_add(12), t_add(14));   // OUTr
        set2(g, r_add(9, 0), t_add(13), t_add(15));   // OUTi
      end
      6, 7, 8, 9: begin
        g[r_add(8, 0)] = code(t_add(8));              // hold OUT
        g[r_add(9, 0)] = code(t_add(9));
        if (s == 6) begin
          set2(g, r_mul(0, 0), t_add(8), t_add(8));   // OUTr^2
          set2(g, r_mul(1, 0), t_add(9), t_add(9));   // OUTi^2
        end
        if (s == 7) set2(g, r_add(10, 0), t_mul(0), t_mul(1));   // |OUT|^2
        if (s == 8) set2(g, r_sub(0, 0), t_in(3), t_add(10));    // 1 - |OUT|^2
        if (s == 9) begin
          set2(g, r_mul(0, 0), t_add(8), t_sub(0));   // e'r
          set2(g, r_mul(1, 0), t_add(9), t_sub(0));   // e'i
        end
      end
      10: begin
        g[r_add(10, 1)] = code(t_mul(0));             // e' registers
        g[r_add(11, 1)] = code(t_mul(1));
      end
      11, 12, 13, 14, 15: begin
        if (s <= 12) begin
          g[r_add(10, 0)] = code(t_add(10));          // hold e'
          g[r_add(11, 0)] = code(t_add(11));
          for (int j = 0; j < 2; j++) begin
            int t;
            t = 2 * (s - 11) + j;
            set2(g, r_mul(4*j+0, 0), t_add(10), t_delay(t));       // e'r*hr
            set2(g, r_mul(4*j+1, 0), t_add(11), t_delay(4 + t));   // e'i*hi
            set2(g, r_mul(4*j+2, 0), t_add(11), t_delay(t));       // e'i*hr
            set2(g, r_mul(4*j+3, 0), t_add(10), t_delay(4 + t));   // e'r*hi
          end
        end
        if (s == 12 || s == 13) begin
          int b;
          b = (s == 12) ? 0 : 2;
          set2(g, r_add(12 + b, 0), t_mul(0), t_mul(1));   // Sr tap b+1
          set2(g, r_sub(b, 0),      t_mul(2), t_mul(3));   // Si tap b+1
          set2(g, r_add(13 + b, 0), t_mul(4), t_mul(5));   // Sr tap b+2
          set2(g, r_sub(b + 1, 0),  t_mul(6), t_mul(7));   // Si tap b+2
        end
        if (s == 13 || s == 14) begin
          int b;
          b = (s == 13) ? 0 : 2;
          for (int j = 0; j < 2; j++) begin
            set2(g, r_shift(4*(b/2) + 2*j, 0),     t_add(12 + b + j), t_in(2));  // mu*Sr
            set2(g, r_shift(4*(b/2) + 2*j + 1, 0), t_sub(b + j),      t_in(2));  // mu*Si
          end
        end
        if (s == 14 || s == 15) begin
          int b;
          b = (s == 14) ? 0 : 2;
          for (int j = 0; j < 2; j++) begin
            g[r_add(b + j, 1)]     = code(t_shift(2*b + 2*j));       // cr += mu*Sr
            g[r_add(4 + b + j, 1)] = code(t_shift(2*b + 2*j + 1));   // ci += mu*Si
          end
        end
      end
      default: ;
    endcase
    return g;
  endfunction

  // ---------------- the algorithm, sample by sample ----------------
  function automatic logic [15:0] w16(input longint x);
    return x[15:0];
  endfunction

  logic [15:0] a_hr [4], a_hi [4], a_cr [4], a_ci [4];
  logic [15:0] a_or, a_oi;
  longint disp [NS];

  task automatic algo_sample(input logic [15:0] xr, input logic [15:0] xi);
    logic [15:0] orr [4], oii [4], m2, sdev, er, ei, sr, si;
    bit o;
    for (int t = 3; t > 0; t--) begin a_hr[t] = a_hr[t-1]; a_hi[t] = a_hi[t-1]; end
    a_hr[0] = xr; a_hi[0] = xi;
    for (int t = 0; t < 4; t++) begin
      orr[t] = w16(sx(f_mul(a_hr[t], a_cr[t], o)) - sx(f_mul(a_hi[t], a_ci[t], o)));
      oii[t] = w16(sx(f_mul(a_hr[t], a_ci[t], o)) + sx(f_mul(a_hi[t], a_cr[t], o)));
    end
    a_or = w16(sx(w16(sx(orr[0]) + sx(orr[1]))) + sx(w16(sx(orr[2]) + sx(orr[3]))));
    a_oi = w16(sx(w16(sx(oii[0]) + sx(oii[1]))) + sx(w16(sx(oii[2]) + sx(oii[3]))));
    m2   = w16(sx(f_mul(a_or, a_or, o)) + sx(f_mul(a_oi, a_oi, o)));
    sdev = w16(256 - sx(m2));
    er   = f_mul(a_or, sdev, o);
    ei   = f_mul(a_oi, sdev, o);
    for (int t = 0; t < 4; t++) begin
      sr = w16(sx(f_mul(er, a_hr[t], o)) + sx(f_mul(ei, a_hi[t], o)));
      si = w16(sx(f_mul(ei, a_hr[t], o)) - sx(f_mul(er, a_hi[t], o)));
      a_cr[t] = w16(sx(a_cr[t]) + sx(f_shift(sr, 16'(MU_SHIFT), o)));
      a_ci[t] = w16(sx(a_ci[t]) + sx(f_shift(si, 16'(MU_SHIFT), o)));
    end
  endtask

  // ---------------- stimulus ----------------
  dpaa_model m = new();

  task automatic write_program(input int slot_no, input prog_t g);
    for (int r = 0; r < N_RX; r++) begin
      @(negedge clk) begin
        seq_wr_en = 1'b1; seq_wr_prog = 5'(slot_no); seq_wr_rx = 7'(r); seq_wr_code = g[r];
      end
    end
    @(negedge clk) seq_wr_en = 1'b0;
  endtask

  initial begin
    prog_t g_prev, g_cur, g_next;
    logic [3:0][15:0] iw;
    logic [15:0] xr [NS], xi [NS];
    int sr_prev, si_prev, s_r, s_i;
    int np, frame, step;
    longint d_first, d_last;
    // QPSK (+-0.707 = +-181) through 1 + (0.35 + 0.25j) z^-1
    sr_prev = 0; si_prev = 0;
    for (int k = 0; k < NS; k++) begin
      s_r = ($urandom_range(0, 1) != 0) ? 181 : -181;
      s_i = ($urandom_range(0, 1) != 0) ? 181 : -181;
      xr[k] = 16'(s_r + ((90 * sr_prev - 64 * si_prev) >>> 8));
      xi[k] = 16'(s_i + ((90 * si_prev + 64 * sr_prev) >>> 8));
      sr_prev = s_r; si_prev = s_i;
    end
    for (int t = 0; t < 4; t++) begin a_hr[t] = '0; a_hi[t] = '0; a_cr[t] = '0; a_ci[t] = '0; end
    a_cr[0] = 16'd256;
    // period 0 idle, period 1 loads c1 = 1.0, then frames from period 2
    np = 2 + NS * F + 2;
    g_prev = empty_program();
    g_cur  = empty_program();
    iw[0] = '0; iw[1] = '0; iw[2] = 16'(MU_SHIFT); iw[3] = 16'd256;
    in_word = iw;
    // program library: slot 0 loads c1, slots 1..F are the steps of a frame
    write_program(0, frame_program(-1));
    for (int k = 0; k < F; k++) write_program(k + 1, frame_program(k));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < np; p++) begin
      @(posedge clk iff word_tick);
      @(negedge clk);
      for (int o = 0; o < 4; o++) begin
        logic [6:0] c;
        c = g_prev[r_out(o)];
        check(out_valid[o] == (c != 0), $sformatf("p%0d out%0d valid", p, o));
        if (c != 0) check(out_word[o] == m.opnd(c), $sformatf("p%0d out%0d %h expected %h", p, o, out_word[o], m.opnd(c)));
      end
      m.step(g_prev, iw);
      for (int i = 0; i < 16; i++) check(ovf_add[i] == m.ov_add[i], $sformatf("p%0d ovf_add[%0d]", p, i));
      for (int i = 0; i < 10; i++) check(ovf_mul[i] == m.ov_mul[i], $sformatf("p%0d ovf_mul[%0d]", p, i));
      for (int i = 0; i < 8; i++)  check(ovf_shift[i] == m.ov_shift[i], $sformatf("p%0d ovf_shift[%0d]", p, i));
      m.commit();
      // algorithm-level checks: the array has finished step s of a frame
      // when period (2 + frame*F + s + 1) starts; OUT is shown while held
      frame = (p - 2) / F; step = (p - 2) % F;
      if (p >= 2 && frame < NS) begin
        if (step == 8) begin        // OUT computed in step 5, sent in periods 6..9, shown at 7..10
          algo_sample(xr[frame], xi[frame]);
          disp[frame] = (sx(a_or) * sx(a_or) + sx(a_oi) * sx(a_oi) - 65536) / 256;
          disp[frame] = disp[frame] * disp[frame];
          check(out_word[0] == a_or && out_word[1] == a_oi,
                $sformatf("sample %0d OUT %h %h expected %h %h", frame, out_word[0], out_word[1], a_or, a_oi));
        end
      end
      if (p >= 2 && frame >= 1 && frame <= NS && step == 2) begin
        // weights of the previous sample updated in step 15, shown two periods later
        check(out_word[2] == a_cr[0] && out_word[3] == a_ci[0],
              $sformatf("sample %0d c1 %h %h expected %h %h", frame - 1, out_word[2], out_word[3], a_cr[0], a_ci[0]));
      end
      // inputs and program of period p+1
      frame = (p - 1) / F; step = (p - 1) % F;
      iw[0] = (p + 1 >= 2 && frame < NS) ? xr[frame] : 16'h0;
      iw[1] = (p + 1 >= 2 && frame < NS) ? xi[frame] : 16'h0;
      in_word = iw;
      // the sequencer picked this program at this period's word tick
      if (p + 1 == 1) g_next = frame_program(-1);
      else g_next = frame_program(step);
      check(seq_prog == ((p == 0) ? 5'd0 : 5'(step + 1)), $sformatf("p%0d sequencer program %0d", p, seq_prog));
      g_prev = g_cur;
      g_cur  = g_next;
    end
    d_first = 0; d_last = 0;
    for (int k = 0; k < 50; k++) begin d_first += disp[k]; d_last += disp[NS - 50 + k]; end
    $display("dispersion first 50 samples %0d, last 50 samples %0d (x 1/65536)", d_first / 50, d_last / 50);
    $display("weights: c1 (%0d,%0d) c2 (%0d,%0d) c3 (%0d,%0d) c4 (%0d,%0d) (1/256)",
             sx(a_cr[0]), sx(a_ci[0]), sx(a_cr[1]), sx(a_ci[1]), sx(a_cr[2]), sx(a_ci[2]), sx(a_cr[3]), sx(a_ci[3]));
    check(d_last < d_first, "CMA dispersion did not fall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
