// tpg_pkg -- types and size functions shared by the crosstalk test pattern
// generator.
//
// The generator produces one of two test sequences for an n-line bus:
//   MAFM  - Maximum Aggressor Fault Model sequence, faults Pg0, Ng1, Dr, Df
//           for every victim line; 8n+1 vectors.
//   XMAFM - extended MAFM, adds Pg1, Ng0, Sr, Sf; 12n+3 vectors.
// The functions below give, for a sequence type and a bus width n, the
// modulus and width of the low counter TPC0, the width of the high counter
// TPC1, the initial value of the one-bit counter CNT and the sequence length.
// All of these follow the generator's published size table; the package
// itself (names, encoding of the enum) is this design's own.
package tpg_pkg;

  typedef enum logic {
    SEQ_MAFM  = 1'b0,
    SEQ_XMAFM = 1'b1
  } seq_e;

  // TPC0 counts modulo n (MAFM) or modulo 2n (XMAFM).
  function automatic int unsigned tpc0_mod(seq_e seq, int unsigned n);
    return (seq == SEQ_MAFM) ? n : 2 * n;
  endfunction

  // l0 = ceil(log2(n)) for MAFM, ceil(log2(n)) + 1 for XMAFM.
  function automatic int unsigned tpc0_width(seq_e seq, int unsigned n);
    return $clog2(tpc0_mod(seq, n));
  endfunction

  // l1 = 4 for MAFM, 3 for XMAFM.
  function automatic int unsigned tpc1_width(seq_e seq);
    return (seq == SEQ_MAFM) ? 4 : 3;
  endfunction

  // Initial state of the CNT toggle: 0 for MAFM, 1 for XMAFM.
  function automatic logic cnt_init(seq_e seq);
    return (seq == SEQ_XMAFM);
  endfunction

  // Number of vectors m: 8n+1 (MAFM) or 12n+3 (XMAFM).
  function automatic int unsigned seq_length(seq_e seq, int unsigned n);
    return (seq == SEQ_MAFM) ? 8 * n + 1 : 12 * n + 3;
  endfunction

endpackage
