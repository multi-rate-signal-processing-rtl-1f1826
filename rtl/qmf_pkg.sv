// qmf_pkg: types and constants shared by the 2-D QMF filter bank.
//
// The bank computes the four subbands of one DWT decomposition step with a
// single 2-D filter whose two sign bits, B_H (horizontal) and B_V
// (vertical), turn the low-pass row/column filters into high-pass ones.
// This package names the four subbands, fixes which sign bits select which
// subband, and gives the normalisation shift and internal width of a 1-D
// filter of mask length L.
package qmf_pkg;

  // Subbands in the order the bank computes them. The encoding is the pair
  // {B_V, B_H}: 00 = LL, 01 = HL (high-pass along the rows), 10 = LH
  // (high-pass along the columns), 11 = HH.
  typedef enum logic [1:0] {
    SB_LL = 2'b00,
    SB_HL = 2'b01,
    SB_LH = 2'b10,
    SB_HH = 2'b11
  } subband_e;

  // Horizontal sign bit of a subband.
  function automatic logic sb_bh(subband_e sb);
    return (sb == SB_HL) || (sb == SB_HH);
  endfunction

  // Vertical sign bit of a subband.
  function automatic logic sb_bv(subband_e sb);
    return (sb == SB_LH) || (sb == SB_HH);
  endfunction

  // The binomial masks of length L have coefficients summing to 2^(L-1), so
  // a 1-D output is normalised by an arithmetic right shift of L-1 bits.
  function automatic int unsigned norm_shift(int unsigned l);
    return l - 1;
  endfunction

  // Width that holds any 1-D filter sum exactly: |sum| <= 2^(L-1) * 2^(W-1).
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned l);
    return data_w + l - 1;
  endfunction

endpackage
