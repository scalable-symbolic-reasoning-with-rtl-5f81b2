// Shared constants, types and arithmetic helpers of the GHRR accelerator.
//
// A GHRR hypervector holds DIM unitary m x m complex matrices (m = M). The
// hardware works on the flattened form: each dimension j contributes the M*M
// complex entries of its matrix, held as one wide word of interleaved
// real/imaginary fixed-point numbers. That word is the unit of transfer
// everywhere: one external-memory word, one transform-memory word, one query
// or codebook buffer word.
//
// Default sizes follow the evaluated configuration (DIM = 8000, m = 2, P = 8).
// The fixed-point format (16-bit, 14 fraction bits), the 8-bit phase, the
// maximum sequence length and the number of codebook groups are this design's
// choices.
package ghrr_pkg;

  // Element format: signed two's complement, FRAC fraction bits (Q1.14).
  parameter int unsigned DW    = 16;
  parameter int unsigned FRAC  = 14;
  // Matrix order m, hypervector dimension D, candidates compared in parallel P.
  parameter int unsigned M     = 2;
  parameter int unsigned DIM   = 8000;
  parameter int unsigned P     = 8;
  // Phase word width (2*pi maps to 2**PH_W).
  parameter int unsigned PH_W  = 8;
  // Longest sequence the encoder binds, and codebook groups of P classes.
  parameter int unsigned SEQ_MAX = 8;
  parameter int unsigned NGRP    = 2;

  // One complex value: real part in the upper half, imaginary in the lower.
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Width of one flattened dimension word (M*M complex values).
  parameter int unsigned WORD_W = 2 * DW * M * M;

  // Rounded fixed-point complex product, result in the element format.
  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    logic signed [2*DW:0] pr, pi;
    cplx_t r;
    pr = (2*DW+1)'(a.re * b.re) - (2*DW+1)'(a.im * b.im) + (2*DW+1)'(1 << (FRAC-1));
    pi = (2*DW+1)'(a.re * b.im) + (2*DW+1)'(a.im * b.re) + (2*DW+1)'(1 << (FRAC-1));
    r.re = DW'(pr >>> FRAC);
    r.im = DW'(pi >>> FRAC);
    return r;
  endfunction

  // Full-precision complex product (no rescaling), for accumulation.
  function automatic logic signed [2*DW+1:0] cmul_re_full(cplx_t a, cplx_t b);
    return (2*DW+2)'(a.re * b.re) - (2*DW+2)'(a.im * b.im);
  endfunction
  function automatic logic signed [2*DW+1:0] cmul_im_full(cplx_t a, cplx_t b);
    return (2*DW+2)'(a.re * b.im) + (2*DW+2)'(a.im * b.re);
  endfunction

endpackage
