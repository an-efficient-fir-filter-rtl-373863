// fir_pkg: sizes shared by the 9-tap FIR filter and its testbenches.
// TAPS and DATA_W are the filter's own numbers (nine taps, 8-bit samples); the
// coefficient width and the derived widths are this design's choice.
package fir_pkg;
  localparam int unsigned TAPS   = 9;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned PROD_W = DATA_W + COEF_W;  // full product width
  localparam int unsigned L1_W   = PROD_W + 2;       // sum of three products
  localparam int unsigned OUT_W  = L1_W + 2;         // sum of nine products

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [OUT_W-1:0]  acc_t;
endpackage
