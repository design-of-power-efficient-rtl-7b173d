// posit_mult: power-efficient N-bit posit multiplier (top level).
//
// A posit packs a sign, a variable-length regime, ES exponent bits and a
// fraction into N bits. The longer the regime, the fewer fraction bits are
// left, so a multiplier sized for the widest fraction mostly multiplies
// zeros. This multiplier keeps the full-width mantissa multiplier but
// divides it into a grid of smaller sub-multipliers and, operation by
// operation, enables only those whose operand segments can hold fraction
// bits. The fraction width, and with it the set of enabled sub-multipliers,
// is derived from the regime length of each operand.
//
// Datapath (one combinational pass, no clock):
//   posit_abs     x2  - two's complement of negative operands (xin1, xin2)
//   data_extract  x2  - regime length and value, exponent, significand,
//                       fraction width (uut_de1, uut_de2)
//   seg_enable        - sub-multiplier enables from the fraction widths
//   DSR_right_N_S     - segmented significand multiplier (dsr2), P = 2N bits
//   posit_encode      - scale sum, normalise, round to nearest even,
//                       saturate, sign, zero and NaR handling
//
// The operand names in1/in2, the start input, the instance names and the
// 2N-bit Product output follow the 8-bit datapath this design is modelled
// on. Here Product carries the significand product P of the two operands
// (hidden bits at bit N-1 of each significand), and out carries the posit
// result. start qualifies the operation: while start is low every
// sub-multiplier is disabled and out and Product read 0 (this design's
// choice). Zero and NaR operands also leave the multiplier disabled.
//
// Ports: in1, in2 - posit operands; start - operation enable
//        out      - posit product in1 * in2
//        Product  - significand product (2N bits)
//        seg_en   - enables of the NSEG x NSEG sub-multipliers, bit i*NSEG+j
//        round_up, sat_max, sat_min - rounding and saturation events
module posit_mult #(
  parameter int unsigned N     = posit_pkg::DEF_N,
  parameter int unsigned ES    = posit_pkg::DEF_ES,
  parameter int unsigned SEG_W = posit_pkg::DEF_SEG_W,
  localparam int unsigned NSEG = N / SEG_W
) (
  input  logic [N-1:0]         in1,
  input  logic [N-1:0]         in2,
  input  logic                 start,
  output logic [N-1:0]         out,
  output logic [2*N-1:0]       Product,
  output logic [NSEG*NSEG-1:0] seg_en,
  output logic                 round_up,
  output logic                 sat_max,
  output logic                 sat_min
);
  localparam int unsigned LW  = $clog2(N) + 1;
  localparam int unsigned EW  = (ES > 0) ? ES : 1;
  localparam int unsigned SCW = $clog2(N) + ES + 4;

  localparam logic [N-1:0] NAR = {1'b1, (N-1)'(0)};

  logic                 s1, s2;
  logic [N-1:0]         xin1, xin2;
  logic                 rc1, rc2;
  logic [LW-1:0]        rlen1, rlen2;
  logic signed [LW:0]   k1, k2;
  logic [EW-1:0]        e1, e2;
  logic [N-1:0]         m1, m2;
  logic [LW-1:0]        fw1, fw2;
  logic                 zero, nar, valid;
  logic [NSEG-1:0]      need1, need2;
  logic [2*N-1:0]       p;
  logic signed [SCW-1:0] scale1, scale2, scale;
  logic [N-1:0]         res;
  logic                 rup, smax, smin;

  posit_abs #(.N(N)) xin1_i (.in(in1), .sign(s1), .mag(xin1));
  posit_abs #(.N(N)) xin2_i (.in(in2), .sign(s2), .mag(xin2));

  data_extract #(.N(N), .ES(ES)) uut_de1 (
    .in(xin1), .rc(rc1), .rlen(rlen1), .k(k1), .exp(e1), .mant(m1), .fw(fw1));
  data_extract #(.N(N), .ES(ES)) uut_de2 (
    .in(xin2), .rc(rc2), .rlen(rlen2), .k(k2), .exp(e2), .mant(m2), .fw(fw2));

  always_comb begin
    nar   = (in1 == NAR) || (in2 == NAR);
    zero  = !nar && ((in1 == '0) || (in2 == '0));
    valid = start && !nar && !zero;
  end

  seg_enable #(.N(N), .SEG_W(SEG_W)) u_seg (
    .valid(valid), .fw_a(fw1), .fw_b(fw2),
    .need_a(need1), .need_b(need2), .en(seg_en));

  DSR_right_N_S #(.N(N), .SEG_W(SEG_W)) dsr2 (
    .a(m1), .b(m2), .en(seg_en), .P(p));

  // operand scale = k * 2^ES + exponent
  always_comb begin
    scale1 = (SCW'(k1) <<< ES) + SCW'({1'b0, e1});
    scale2 = (SCW'(k2) <<< ES) + SCW'({1'b0, e2});
    if (ES == 0) begin
      scale1 = SCW'(k1);
      scale2 = SCW'(k2);
    end
    scale = scale1 + scale2;
  end

  posit_encode #(.N(N), .ES(ES)) u_enc (
    .sign(s1 ^ s2), .scale(scale), .P(p), .zero(zero), .nar(nar),
    .out(res), .round_up(rup), .sat_max(smax), .sat_min(smin));

  always_comb begin
    out      = start ? res : '0;
    Product  = p;
    round_up = start && rup;
    sat_max  = start && smax;
    sat_min  = start && smin;
  end
endmodule
