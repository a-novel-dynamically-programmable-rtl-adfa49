// dpaa_pkg: constants and helpers shared by the DPAA array.
//
// The array moves 16-bit words between fixed-function logic elements (LEs)
// bit-serially over one code-division multiple access bus. One data bit is
// sent per system clock; one system clock is 128 interface clocks: one slot
// (t1) in which every code generator reloads its setup information, then 127
// slots (t2) that each carry one chip of the 127-chip PN code.
//
// The word width, the code length and the LE counts follow the document; the
// seed (ROM code) numbering of the transmitters is this design's choice.
package dpaa_pkg;

  // Data path
  localparam int unsigned WORD_W    = 16;  // 16-bit processing elements
  // Bus interface
  localparam int unsigned LFSR_W    = 7;   // 7-bit LFSR, 7-bit setup information
  localparam int unsigned CODE_LEN  = (1 << LFSR_W) - 1;  // 127-chip PN code
  localparam int unsigned SLOTS     = CODE_LEN + 1;       // 128 I/F clocks per system clock
  // Code 0 is the all-zero LFSR state: it never matches a transmitter, so a
  // receiver set to it is disconnected and delivers zeros.
  localparam logic [LFSR_W-1:0] CODE_NONE = '0;

  // ROM code of transmitter number n (0-based): the LFSR state n+1.
  // Distinct nonzero states are distinct phases of the same m-sequence.
  function automatic logic [LFSR_W-1:0] tx_code(input int unsigned n);
    return LFSR_W'(n + 1);
  endfunction

endpackage
