// fft_pkg: sizes, number format and shared helpers of the 32-point FFT engine.
//
// The engine works on complex samples held as one 32-bit word: the real part in
// bits 31:16 and the imaginary part in bits 15:0, each a signed Q5.10 number
// (sign bit, 5 integer bits, 10 fraction bits; 1.0 = 16'h0400). The transform
// is a radix-2 decimation-in-time FFT of N = 32 points in log2(N) = 5 levels of
// N/2 = 16 butterflies. Word layout, Q format and sizes follow the design
// description; the helper functions are this implementation's own.
package fft_pkg;

  localparam int unsigned N      = 32;         // FFT points
  localparam int unsigned LOGN   = 5;          // address bits, number of levels
  localparam int unsigned DW     = 16;         // bits per real or imaginary part
  localparam int unsigned FRAC   = 10;         // fraction bits of Q5.10
  localparam int unsigned WW     = 2 * DW;     // bits per complex RAM word

  // One complex RAM word: {re, im}.
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Reverse the order of the LOGN address bits (00001 -> 10000).
  function automatic logic [LOGN-1:0] bit_reverse(input logic [LOGN-1:0] a);
    logic [LOGN-1:0] r;
    for (int i = 0; i < int'(LOGN); i++) r[i] = a[LOGN-1-i];
    return r;
  endfunction

endpackage
