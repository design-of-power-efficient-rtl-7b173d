// posit_encode: normalisation, rounding and packing of the posit product.
//
// Inputs are the sign of the result, the sum of the two operand scales
// (scale = k * 2^ES + exponent) and the 2N-bit significand product P of two
// N-bit significands with hidden bits at position N-1, so P / 2^(2N-2) lies
// in [1, 4). If P's top bit is set the product is normalised by taking one
// more step of scale. The result scale is split into a regime value
// k = scale >> ES (floor) and an exponent e = scale mod 2^ES.
//
// Packing: the string {1, 0, e, fraction} (k >= 0) or {0, 1, e, fraction}
// (k < 0) is shifted right arithmetically by k or -k-1, which grows the
// regime to k+1 ones or -k zeros followed by the opposite bit. The top N-1
// bits are the unsigned result (N zero bits below the fraction keep
// everything that is shifted out); the next bit is the guard bit and the OR of
// all lower bits the sticky bit, and the result is rounded to nearest with
// ties to even. Results beyond the range saturate: k > N-2 gives maxpos and
// k < -(N-2) gives minpos, so a product never overflows to NaR nor
// underflows to zero. Negative results are the two's complement. Zero and
// NaR inputs override everything. Combinational.
//
// Rounding and saturation follow the posit format; the document names
// rounding and exception handling without detailing them.
//
// Ports: sign, scale, P, zero, nar - see above
//        out      - N-bit posit result
//        round_up - the rounding incremented the result
//        sat_max/sat_min - the result was clamped to maxpos / minpos
module posit_encode #(
  parameter int unsigned N   = posit_pkg::DEF_N,
  parameter int unsigned ES  = posit_pkg::DEF_ES,
  localparam int unsigned SCW = $clog2(N) + ES + 4   // scale width, signed
) (
  input  logic                  sign,
  input  logic signed [SCW-1:0] scale,
  input  logic [2*N-1:0]        P,
  input  logic                  zero,
  input  logic                  nar,
  output logic [N-1:0]          out,
  output logic                  round_up,
  output logic                  sat_max,
  output logic                  sat_min
);
  localparam int unsigned FW = 2*N - 1;        // fraction bits after normalising
  localparam int unsigned VW = 2 + ES + FW + N; // packed string, N guard zeros

  logic signed [SCW-1:0] sc;      // normalised scale
  logic signed [SCW-1:0] kr;      // result regime value
  logic [FW-1:0]         frac;
  logic [VW-1:0]         v;
  logic [VW-1:0]         vs;      // after regime shift
  logic [SCW-1:0]        sh;
  logic [N-2:0]          mag;
  logic                  guard, sticky;
  logic [N-1:0]          res;

  always_comb begin
    if (P[2*N-1]) begin
      sc   = scale + 1'b1;
      frac = P[2*N-2:0];
    end else begin
      sc   = scale;
      frac = {P[2*N-3:0], 1'b0};
    end
    kr = sc >>> ES;

    // {regime seed, exponent = low ES bits of sc, fraction}
    v = {(kr < 0) ? 2'b01 : 2'b10, (ES + FW)'({sc, frac}), N'(0)};

    sh = (kr < 0) ? SCW'(-kr - SCW'(1)) : SCW'(kr);
    vs = VW'($signed(v) >>> sh);

    mag    = vs[VW-1 -: N-1];
    guard  = vs[VW-N];
    sticky = |vs[VW-N-1:0];

    sat_max  = (kr > $signed(SCW'(N - 2)));
    sat_min  = (kr < -$signed(SCW'(N - 2)));
    round_up = !sat_max && !sat_min && guard && (mag[0] || sticky);

    if (sat_max)      mag = '1;
    else if (sat_min) mag = (N-1)'(1);
    else              mag = mag + (N-1)'(round_up);

    res = sign ? ('0 - {1'b0, mag}) : {1'b0, mag};

    if (nar)       out = {1'b1, (N-1)'(0)};
    else if (zero) out = '0;
    else           out = res;

    if (nar || zero) begin
      round_up = 1'b0;
      sat_max  = 1'b0;
      sat_min  = 1'b0;
    end
  end
endmodule
