// dpaa_ref_pkg: word-level reference model of the DPAA array for the
// end-to-end testbenches, written from the array's specification rather
// than its RTL.
//
// At word level every element computes, in word period n+1, its function of
// the words its operands' transmitters sent in word period n, under the
// program (receiver codes) active in period n; an unconnected operand
// (code 0) reads zero. Input ports send the word sampled at the start of
// the period. The numbering of transmitters and receivers is the array's:
// transmitters inputs 0-3, adders 4-19, multipliers 20-29, shifters 30-37,
// subtractors 38-45, delays 46-53 (code = number + 1); receivers adders
// 0-31, multipliers 32-51, shifters 52-67, subtractors 68-83 (operand a
// then b), delays 84-91, outputs 92-95.
package dpaa_ref_pkg;
  localparam int N_TX = 54, N_RX = 96;

  function automatic int t_in(int i);    return i;      endfunction
  function automatic int t_add(int i);   return 4 + i;  endfunction
  function automatic int t_mul(int i);   return 20 + i; endfunction
  function automatic int t_shift(int i); return 30 + i; endfunction
  function automatic int t_sub(int i);   return 38 + i; endfunction
  function automatic int t_delay(int i); return 46 + i; endfunction
  function automatic int r_add(int i, int op);   return 2 * i + op;      endfunction
  function automatic int r_mul(int i, int op);   return 32 + 2 * i + op; endfunction
  function automatic int r_shift(int i, int op); return 52 + 2 * i + op; endfunction
  function automatic int r_sub(int i, int op);   return 68 + 2 * i + op; endfunction
  function automatic int r_delay(int i);         return 84 + i;          endfunction
  function automatic int r_out(int i);           return 92 + i;          endfunction
  function automatic logic [6:0] code(int t);    return 7'(t + 1);       endfunction

  typedef logic [6:0] prog_t [N_RX];

  function automatic prog_t empty_program();
    prog_t g;
    foreach (g[i]) g[i] = '0;
    return g;
  endfunction

  function automatic bit fits16(input longint s);
    return (s <= 32767) && (s >= -32768);
  endfunction

  // signed 16-bit value as an integer
  function automatic longint sx(input logic [15:0] w);
    return longint'(signed'(w));
  endfunction

  // element functions: 16-bit two's complement, multiplier with 8 fraction bits
  function automatic logic [15:0] f_mul(input logic [15:0] a, input logic [15:0] b, output bit o);
    longint s;
    s = (sx(a) * sx(b)) >>> 8;
    o = !fits16(s);
    return s[15:0];
  endfunction

  function automatic logic [15:0] f_shift(input logic [15:0] a, input logic [15:0] b, output bit o);
    longint s;
    int amt;
    amt = int'(signed'(b[4:0]));
    if (amt >= 0) begin s = sx(a) * (longint'(1) << amt); o = !fits16(s); end
    else begin s = sx(a) >>> (-amt); o = 1'b0; end
    return s[15:0];
  endfunction

  class dpaa_model;
    logic [15:0] cur [N_TX];   // words sent in the last period
    logic [15:0] nxt [N_TX];
    bit ov_add [16], ov_mul [10], ov_shift [8];

    function new();
      foreach (cur[i]) cur[i] = '0;
    endfunction

    function logic [15:0] opnd(input logic [6:0] c);
      return (c == 0) ? 16'h0 : cur[c - 1];
    endfunction

    // one word period under program g with input words iw; nxt = new words
    function void step(input prog_t g, input logic [3:0][15:0] iw);
      longint s;
      for (int i = 0; i < 4; i++) nxt[t_in(i)] = iw[i];
      for (int i = 0; i < 16; i++) begin
        s = sx(opnd(g[r_add(i, 0)])) + sx(opnd(g[r_add(i, 1)]));
        nxt[t_add(i)] = s[15:0]; ov_add[i] = !fits16(s);
      end
      for (int i = 0; i < 10; i++)
        nxt[t_mul(i)] = f_mul(opnd(g[r_mul(i, 0)]), opnd(g[r_mul(i, 1)]), ov_mul[i]);
      for (int i = 0; i < 8; i++)
        nxt[t_shift(i)] = f_shift(opnd(g[r_shift(i, 0)]), opnd(g[r_shift(i, 1)]), ov_shift[i]);
      for (int i = 0; i < 8; i++) begin
        s = sx(opnd(g[r_sub(i, 0)])) - sx(opnd(g[r_sub(i, 1)]));
        nxt[t_sub(i)] = s[15:0];
      end
      for (int i = 0; i < 8; i++) nxt[t_delay(i)] = opnd(g[r_delay(i)]);
    endfunction

    function void commit();
      foreach (cur[i]) cur[i] = nxt[i];
    endfunction
  endclass
endpackage
