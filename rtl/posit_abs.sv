// posit_abs: conditional two's complement of a posit operand.
//
// Posits store negative values as the two's complement of the positive
// pattern, so the fields of a negative operand are read after negating it.
// This block computes 0 - in and selects it when the sign bit (in[N-1]) is
// set, otherwise it passes the operand through: one subtractor and one 2:1
// multiplexer per operand, as in the 8-bit datapath this design follows.
// NaR (1 followed by zeros) negates to itself and zero stays zero.
// Purely combinational.
//
// Ports: in  - posit operand
//        sign - in[N-1]
//        mag  - in when sign is 0, 0 - in when sign is 1
module posit_abs #(
  parameter int unsigned N = posit_pkg::DEF_N
) (
  input  logic [N-1:0] in,
  output logic         sign,
  output logic [N-1:0] mag
);
  logic [N-1:0] neg;

  always_comb begin
    sign = in[N-1];
    neg  = '0 - in;
    mag  = sign ? neg : in;
  end
endmodule
