// pn_ref_pkg: reference model of the 127-chip PN code for the testbenches,
// written from the recurrence of the code generator: with x(0..6) taken
// from the setup code (stage 7 first), x(n) = x(n-3) XOR x(n-7), and chip t
// of a period is x(t).
package pn_ref_pkg;
  typedef bit code_seq_t [127];

  function automatic code_seq_t pn_seq(input logic [6:0] s);
    bit x [134];
    code_seq_t c;
    for (int i = 0; i <= 6; i++) x[6 - i] = s[i];
    for (int n = 7; n < 134; n++) x[n] = x[n - 3] ^ x[n - 7];
    for (int t = 0; t < 127; t++) c[t] = x[t];
    return c;
  endfunction
endpackage
