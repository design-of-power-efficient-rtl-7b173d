// data_extract: posit component extraction.
//
// Takes a non-negative posit pattern (the output of posit_abs) and splits it
// into its fields. Bit N-1 is the sign and is ignored here. The regime is the
// run of identical bits that starts at bit N-2; its length rlen is counted by
// a leading-ones / leading-zeros scan, and the regime value is
// k = rlen - 1 for a run of ones and k = -rlen for a run of zeros. The bit
// that ends the run is skipped, the next ES bits are the exponent (bits cut
// off by a long regime read as 0), and what remains is the fraction.
//
// The fraction is returned left-aligned behind a hidden 1 in an N-bit
// significand mant, so mant / 2^(N-1) lies in [1, 2). fw is the number of
// fraction bits the pattern really holds, N - 2 - ES - rlen (0 when the
// regime leaves no room). fw is what lets the mantissa multiplier switch off
// the parts of itself that would only multiply zeros: a longer regime means
// a shorter fraction.
//
// The block name and its place after the operand negation follow the
// reference 8-bit datapath; the set of outputs and the scan-and-shift method
// are this design's own. Zero and NaR are not flagged here; the caller
// detects them. Combinational.
//
// Ports: in   - posit pattern with in[N-1] = 0 (or NaR)
//        rc   - regime bit (value of the run)
//        rlen - regime run length, 1 .. N-1
//        k    - regime value, signed
//        exp  - exponent field (ES bits, one zero bit when ES = 0)
//        mant - {1, fraction, zeros}
//        fw   - fraction width in bits
module data_extract #(
  parameter int unsigned N  = posit_pkg::DEF_N,
  parameter int unsigned ES = posit_pkg::DEF_ES,
  localparam int unsigned LW  = $clog2(N) + 1,      // width of counts
  localparam int unsigned EW  = (ES > 0) ? ES : 1   // exponent port width
) (
  input  logic [N-1:0]          in,
  output logic                  rc,
  output logic [LW-1:0]         rlen,
  output logic signed [LW:0]    k,
  output logic [EW-1:0]         exp,
  output logic [N-1:0]          mant,
  output logic [LW-1:0]         fw
);
  logic [N-2:0] body;     // pattern without the sign bit
  logic [N-2:0] rest;     // pattern after regime and terminating bit
  logic         run;      // still inside the regime run

  always_comb begin
    body = in[N-2:0];
    rc   = body[N-2];

    // leading-ones / leading-zeros count of the regime
    rlen = '0;
    run  = 1'b1;
    for (int i = N - 2; i >= 0; i--) begin
      if (run && (body[i] == rc)) rlen = rlen + 1'b1;
      else                        run  = 1'b0;
    end

    k = rc ? $signed({1'b0, rlen}) - 1 : -$signed({1'b0, rlen});

    // drop regime and terminating bit; a full-length regime leaves nothing
    rest = (rlen >= LW'(N - 1)) ? '0 : body << (rlen + 1'b1);

    exp = '0;
    if (ES > 0) exp = EW'(rest >> (N - 1 - EW));

    mant = {1'b1, (N-1)'(rest << ES)};

    fw = ((32'(rlen) + 2 + ES) >= N) ? '0 : LW'(N - 2 - ES - 32'(rlen));
  end
endmodule
