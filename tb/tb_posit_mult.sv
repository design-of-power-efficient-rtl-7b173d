// tb_posit_mult: end-to-end test of the 8-bit posit multiplier at its
// default parameters (posit<8,0>, 4-bit sub-multipliers).
//
// Every one of the 65536 operand pairs is applied with start high. The
// expected posit result is the nearest posit to the exact real product of
// the two operand values (NaR if either operand is NaR, 0 if either is
// zero). The expected significand product and sub-multiplier enables come
// from a bit-walking reference decoder. Then a sample of pairs is applied
// with start low, where out, Product and all enables must be 0.
//
// Mechanisms counted, each of which must occur at least once: operations
// with part of the mantissa multiplier switched off, operations with all of
// it on, rounding up, saturation to maxpos and to minpos, NaR and zero
// operands, negative operands, and idle cycles with start low.
module tb_posit_mult;
  import posit_ref_pkg::*;
  logic [7:0]  in1, in2, out;
  logic        start;
  logic [15:0] Product;
  logic [3:0]  seg_en;
  logic        round_up, sat_max, sat_min;
  int checks = 0, failures = 0;
  int n_gated = 0, n_full = 0, n_rup = 0, n_smax = 0, n_smin = 0;
  int n_nar = 0, n_zero = 0, n_neg = 0, n_idle = 0;

  posit_mult dut (.in1(in1), .in2(in2), .start(start), .out(out), .Product(Product),
                  .seg_en(seg_en), .round_up(round_up), .sat_max(sat_max), .sat_min(sat_min));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] exp_en(input int fa, input int fb);
    logic [1:0] na, nb;
    for (int j = 0; j < 2; j++) begin
      na[j] = (j * 4 <= fa);
      nb[j] = (j * 4 <= fb);
    end
    return {na[1] & nb[1], na[1] & nb[0], na[0] & nb[1], na[0] & nb[0]};
  endfunction

  initial begin
    start = 1;
    #1;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        logic [7:0]  eo;
        logic [15:0] ep;
        logic [3:0]  ee;
        bit special;
        in1 = 8'(x);
        in2 = 8'(y);
        #1;
        special = 0;
        if (x == 128 || y == 128) begin
          eo = 8'h80; ep = '0; ee = '0; special = 1; n_nar++;
        end else if (x == 0 || y == 0) begin
          eo = 8'h00; ep = '0; ee = '0; special = 1; n_zero++;
        end else begin
          int k1, e1, fw1, k2, e2, fw2;
          longint f1, f2, m1, m2;
          ref_decode(longint'(x), 8, 0, k1, e1, f1, fw1);
          ref_decode(longint'(y), 8, 0, k2, e2, f2, fw2);
          m1 = ((longint'(1) << fw1) | f1) << (7 - fw1);
          m2 = ((longint'(1) << fw2) | f2) << (7 - fw2);
          ep = 16'(m1 * m2);
          ee = exp_en(fw1, fw2);
          eo = 8'(ref_nearest(ref_value(longint'(x), 8, 0) * ref_value(longint'(y), 8, 0), 8, 0));
        end
        checks++;
        if (out !== eo || Product !== ep || seg_en !== ee) begin
          failures++;
          if (failures < 10)
            $display("FAIL %02h * %02h: out=%02h/%02h Product=%04h/%04h seg_en=%b/%b",
                     x, y, out, eo, Product, ep, seg_en, ee);
        end
        if (!special) begin
          if (seg_en != 4'hf) n_gated++;
          else                n_full++;
          if (x >= 128 || y >= 128) n_neg++;
        end
        n_rup  += int'(round_up);
        n_smax += int'(sat_max);
        n_smin += int'(sat_min);
      end

    start = 0;
    for (int t = 0; t < 500; t++) begin
      in1 = 8'($urandom);
      in2 = 8'($urandom);
      #1;
      checks++;
      n_idle++;
      if (out !== 8'h00 || Product !== 16'h0 || seg_en !== 4'h0 || round_up || sat_max || sat_min) begin
        failures++;
        if (failures < 10) $display("FAIL idle %02h * %02h: out=%02h Product=%04h", in1, in2, out, Product);
      end
    end

    $display("events: gated=%0d full=%0d round_up=%0d sat_max=%0d sat_min=%0d nar=%0d zero=%0d neg=%0d idle=%0d",
             n_gated, n_full, n_rup, n_smax, n_smin, n_nar, n_zero, n_neg, n_idle);
    if (n_gated == 0) failures++;
    if (n_full == 0)  failures++;
    if (n_rup == 0)   failures++;
    if (n_smax == 0)  failures++;
    if (n_smin == 0)  failures++;
    if (n_nar == 0)   failures++;
    if (n_zero == 0)  failures++;
    if (n_neg == 0)   failures++;
    if (n_idle == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
