// fir_pkg: widths shared by the heterogeneous-adder FIR block.
//
// The filter multiplies four 8-bit coefficients with four 8-bit samples
// (16-bit products) and adds the products with 18-bit heterogeneous adders,
// whose width is the sum of a 4-bit ripple-carry, a 10-bit carry look-ahead
// and a 4-bit carry-select section. The seven filter outputs are 16 bits wide.
// The 8-bit operands, the 16-bit outputs and the 4 + 10 + 4 split are the
// values the design is specified with; 18 bits is exactly the width of a sum
// of four 16-bit products, so no internal sum can overflow.
package fir_pkg;
  localparam int unsigned TAPS     = 4;             // coefficients h0..h3
  localparam int unsigned SAMPLES  = 4;             // samples x(n)..x(n-3)
  localparam int unsigned DATA_W   = 8;             // coefficient and sample width
  localparam int unsigned PROD_W   = 2 * DATA_W;    // 16-bit products
  localparam int unsigned RCA_W    = 4;             // low section of the adder
  localparam int unsigned CLA_W    = 10;            // middle section
  localparam int unsigned CSL_W    = 4;             // high section
  localparam int unsigned SUM_W    = RCA_W + CLA_W + CSL_W; // 18
  localparam int unsigned OUT_W    = 16;            // filter output width
  localparam int unsigned NMUL     = TAPS * SAMPLES; // 16 multipliers
  localparam int unsigned NADD     = (TAPS - 1) * (SAMPLES - 1); // 9 adders

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [SUM_W-1:0]  sum_t;
  typedef logic [OUT_W-1:0]  out_t;
endpackage
