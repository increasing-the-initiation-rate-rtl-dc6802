// fir4_pkg: shared constants and types for the 4-tap FIR filter datapaths.
//
// All four datapaths compute Y = a0*X + a1*X@1 + a2*X@2 + a3*X@3, where X@k is the
// input sample k steps back. They differ only in their schedule: how many clocks
// separate two accepted samples (the initiation rate) and how many clocks one
// sample takes from input to output (the latency).
//
// The filter's structure (four taps, four products N2..N5, three sums N7, N6, N8)
// follows the flowgraph the design is built from. The word widths are this
// design's own choice: 16-bit signed samples and coefficients, full-precision
// 32-bit products and a 34-bit output, so no result is ever rounded or wrapped.
package fir4_pkg;

  localparam int NTAPS  = 4;                 // taps a0..a3
  localparam int DATA_W = 16;                // sample width (own choice)
  localparam int COEF_W = 16;                // coefficient width (own choice)
  localparam int PROD_W = DATA_W + COEF_W;   // full product width
  localparam int ACC_W  = PROD_W + 2;        // sum of four products never overflows

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Sign-extend a product to the accumulator width.
  function automatic acc_t ext(input prod_t p);
    return acc_t'(p);
  endfunction

endpackage
