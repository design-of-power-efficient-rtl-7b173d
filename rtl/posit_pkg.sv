// posit_pkg: constants shared by the posit multiplier modules.
//
// The multiplier is built for an N-bit posit with ES exponent bits. The
// 8-bit width is the one the design is demonstrated at; the exponent size
// ES = 0 is this design's choice (the classic posit<8,0> format). The
// mantissa multiplier is cut into square sub-multipliers of SEG_W x SEG_W
// bits; SEG_W = 4 is this design's choice and gives a 2 x 2 grid of 4-bit
// sub-multipliers at N = 8. All modules take these values as parameter
// defaults, so a different format is chosen by overriding parameters.
package posit_pkg;
  localparam int unsigned DEF_N     = 8;  // posit width
  localparam int unsigned DEF_ES    = 0;  // exponent field width
  localparam int unsigned DEF_SEG_W = 4;  // sub-multiplier width
endpackage
