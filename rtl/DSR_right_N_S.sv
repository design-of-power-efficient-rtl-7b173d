// DSR_right_N_S: segmented N x N mantissa multiplier.
//
// The multiplier is sized for the widest significand a posit of N bits can
// have, but is divided into NSEG x NSEG smaller SEG_W x SEG_W multipliers
// (sub_mult). Sub-multiplier (i, j) multiplies segment i of a by segment j of
// b, counting segments from the most significant end, and its product is
// added in at bit position (2*NSEG - 2 - i - j) * SEG_W. Each one has its
// own enable; a disabled one has its operands held at zero and contributes
// nothing, which saves its switching power. When the enables come from
// seg_enable, only segments that hold zeros are switched off, so P is the
// exact product a * b. The module and port names follow the 8-bit datapath
// this design is modelled on (a[7:0], b[7:0], P[15:0]). Combinational.
//
// Ports: a, b - N-bit significands; en - sub-multiplier enables, bit
//        i*NSEG + j for pair (i, j); P - 2N-bit sum of enabled products
module DSR_right_N_S #(
  parameter int unsigned N     = posit_pkg::DEF_N,
  parameter int unsigned SEG_W = posit_pkg::DEF_SEG_W,
  localparam int unsigned NSEG = N / SEG_W
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic [NSEG*NSEG-1:0] en,
  output logic [2*N-1:0]       P
);
  logic [2*SEG_W-1:0] pp [NSEG*NSEG];   // sub-products

  initial assert (N % SEG_W == 0) else $error("N must be a multiple of SEG_W");

  for (genvar i = 0; i < NSEG; i++) begin : g_row
    for (genvar j = 0; j < NSEG; j++) begin : g_col
      sub_mult #(.W(SEG_W)) u_sub (
        .en (en[i*NSEG + j]),
        .a  (a[N-1-i*SEG_W -: SEG_W]),
        .b  (b[N-1-j*SEG_W -: SEG_W]),
        .p  (pp[i*NSEG + j])
      );
    end
  end

  always_comb begin
    P = '0;
    for (int i = 0; i < NSEG; i++)
      for (int j = 0; j < NSEG; j++)
        P = P + ((2*N)'(pp[i*NSEG + j]) << ((2*NSEG - 2 - i - j) * SEG_W));
  end
endmodule
