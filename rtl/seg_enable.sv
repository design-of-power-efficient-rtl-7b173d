// seg_enable: picks which sub-multipliers of the mantissa multiplier run.
//
// Each N-bit significand is cut, from the most significant bit down, into
// NSEG = N / SEG_W segments of SEG_W bits. Segment 0 holds the hidden bit and
// is needed for every non-zero operand. Segment j (j > 0) holds significand
// bits N-1-j*SEG_W down to N-SEG_W-j*SEG_W; it carries fraction bits only if
// j*SEG_W <= fw, since the fraction occupies the fw bits right below the
// hidden bit and everything under it is zero. Sub-multiplier (i, j), which
// multiplies segment i of operand A by segment j of operand B, is enabled
// when both segments are needed and valid is high. As fw follows directly
// from the regime length, this is how the regime width controls which small
// multipliers are switched on. That the regime width selects the enabled
// sub-multipliers follows the reference design; the segment size and the
// enable rule are this design's own. Combinational.
//
// Ports: valid    - an operation with two ordinary (non-zero, non-NaR) operands
//        fw_a/fw_b - fraction widths from data_extract
//        need_a/need_b - per-operand segment use, bit j = segment j
//        en       - bit i*NSEG + j enables sub-multiplier (i, j)
module seg_enable #(
  parameter int unsigned N     = posit_pkg::DEF_N,
  parameter int unsigned SEG_W = posit_pkg::DEF_SEG_W,
  localparam int unsigned NSEG = N / SEG_W,
  localparam int unsigned LW   = $clog2(N) + 1
) (
  input  logic                 valid,
  input  logic [LW-1:0]        fw_a,
  input  logic [LW-1:0]        fw_b,
  output logic [NSEG-1:0]      need_a,
  output logic [NSEG-1:0]      need_b,
  output logic [NSEG*NSEG-1:0] en
);
  always_comb begin
    for (int j = 0; j < NSEG; j++) begin
      need_a[j] = valid && (32'(j * SEG_W) <= 32'(fw_a));
      need_b[j] = valid && (32'(j * SEG_W) <= 32'(fw_b));
    end
    for (int i = 0; i < NSEG; i++)
      for (int j = 0; j < NSEG; j++)
        en[i*NSEG + j] = need_a[i] && need_b[j];
  end
endmodule
