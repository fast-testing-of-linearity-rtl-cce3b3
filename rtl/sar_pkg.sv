// sar_pkg: constants and types shared by the SAR ADC test-support RTL.
//
// The converter resolves N_BITS = 10 bits (the resolution of the prototype
// chip). The comparison sequence is a generalized non-binary search: each
// step k moves the reference by a weight w(k) read from a small RAM, so the
// same hardware runs the plain binary search (weights 2^(N-k)) or a redundant
// search with more steps than bits. MAX_STEPS bounds the number of steps and
// is this design's choice. Reference codes carry two extra bits (one for
// overshoot above full scale, one for sign) because a redundant search may
// step outside 0 .. 2^N-1 before it settles.
`timescale 1ns / 1ps
package sar_pkg;

  parameter int unsigned N_BITS_DEF     = 10;   // converter resolution
  parameter int unsigned MAX_STEPS_DEF  = 16;   // longest comparison sequence
  parameter int unsigned TEST_DEPTH_DEF = 1024; // test-mode RAM: one preset per code
  parameter int unsigned SAMPLE_CYC_DEF = 2;    // clock cycles of the sample phase

  // Comparator-error injection select (MUX4). The codes are those the
  // error-tolerance test uses; the unused codes behave like SEL_NORMAL.
  typedef enum logic [2:0] {
    SEL_NORMAL = 3'd0,  // pass the comparator decision
    SEL_INVERT = 3'd1,  // invert it: a forced decision error
    SEL_FORCE0 = 3'd3,  // force the decision to 0
    SEL_FORCE1 = 3'd4   // force the decision to 1
  } err_sel_e;

endpackage
