// relax_pkg: types, sizes and arithmetic helpers shared by the relaxation
// labeling array.
//
// The array runs either discrete relaxation labeling (DRL: one bit per
// object-label pair, Boolean AND / OR arithmetic) or probabilistic relaxation
// labeling (PRL: 8-bit real numbers, multiply / add / divide). The default
// sizes are the worked example used throughout the design description:
// N = 5 objects, M = 3 labels, 8-bit real numbers. The fixed-point format of
// the real numbers (signed, 6 fraction bits) and the width of the partial
// sums (12 bits) are this design's own choices; the description only says
// that a real number is 8 bits wide.
package relax_pkg;

  // Functional-unit configuration (the DRL / PRL columns of the mode table).
  typedef enum logic {
    MODE_DRL = 1'b0,
    MODE_PRL = 1'b1
  } mode_e;

  // Default problem size of the worked examples.
  localparam int unsigned N_OBJ = 5;   // objects
  localparam int unsigned M_LAB = 3;   // labels
  localparam int unsigned DW    = 8;   // data word: label vector (DRL) or real number (PRL)
  localparam int unsigned YW    = 12;  // partial supporting-evidence word on the Y line
  localparam int unsigned FRAC  = 6;   // fraction bits of every real number

  // Saturating signed addition of two YW-bit numbers.
  function automatic logic signed [YW-1:0] sat_add(input logic signed [YW-1:0] a,
                                                   input logic signed [YW-1:0] b);
    logic signed [YW:0] s;
    s = {a[YW-1], a} + {b[YW-1], b};
    if (s > $signed({2'b00, {(YW-1){1'b1}}}))
      return {1'b0, {(YW-1){1'b1}}};
    else if (s < $signed({2'b11, {(YW-1){1'b0}}}))
      return {1'b1, {(YW-1){1'b0}}};
    else
      return s[YW-1:0];
  endfunction

  // Product of a coefficient and an estimate (both DW-bit, FRAC fraction bits),
  // rescaled to FRAC fraction bits on YW bits (truncation toward minus infinity).
  function automatic logic signed [YW-1:0] fx_mul(input logic signed [DW-1:0] c,
                                                  input logic signed [DW-1:0] p);
    logic signed [2*DW-1:0] prod;
    prod = c * p;
    return YW'(prod >>> FRAC);
  endfunction

endpackage
