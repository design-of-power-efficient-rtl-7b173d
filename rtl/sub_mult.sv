// sub_mult: one small W x W unsigned multiplier with operand isolation.
//
// When en is low both operands are forced to zero before they reach the
// array, so the partial-product logic sees no toggling and the product is 0.
// The array itself is a plain shift-and-add structure: row r adds a << r
// when bit r of b is set. Forcing idle operands to zero is this design's
// choice of how a sub-multiplier is switched off. Combinational.
//
// Ports: en - enable; a, b - W-bit operands; p - 2W-bit product (0 when idle)
module sub_mult #(
  parameter int unsigned W = posit_pkg::DEF_SEG_W
) (
  input  logic           en,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  logic [W-1:0] ag, bg;   // gated operands

  always_comb begin
    ag = en ? a : '0;
    bg = en ? b : '0;
    p  = '0;
    for (int r = 0; r < W; r++)
      if (bg[r]) p = p + ((2*W)'(ag) << r);
  end
endmodule
