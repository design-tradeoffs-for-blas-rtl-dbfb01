// blas_pkg: types and constants shared by the BLAS accelerator modules.
//
// All arithmetic is IEEE-754 double precision (64-bit words). The pipeline
// depths of the floating-point units are the ones of the units the designs
// were characterised with: a 19-stage adder and a 12-stage multiplier. Every
// module takes its latency as a parameter whose default comes from here, so a
// different adder or multiplier can be plugged in without touching the
// architecture or its control.
package blas_pkg;

  localparam int unsigned FP_W    = 64;  // floating-point word width (w)
  localparam int unsigned ADD_LAT = 19;  // adder pipeline stages (alpha)
  localparam int unsigned MUL_LAT = 12;  // multiplier pipeline stages

  typedef logic [FP_W-1:0] fp64_t;

  localparam fp64_t FP_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_QNAN = 64'h7FF8_0000_0000_0000;

endpackage : blas_pkg
