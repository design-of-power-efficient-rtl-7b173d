// tb_posit_encode: checks result packing and rounding for posit<8,0>.
// Random significand pairs (hidden bit set) and scales from -16 to 16 are
// turned into a real value; the expected posit is the nearest one found by
// scanning all patterns (ties to even, saturation at maxpos and minpos).
// A second sweep uses exact significands with up to seven fraction bits,
// which hits many exact ties. Zero and NaR inputs are checked separately. Counts how often rounding up
// and each saturation happened and fails if one never did.
module tb_posit_encode;
  import posit_ref_pkg::*;
  logic        sign, zero, nar;
  logic signed [6:0] scale;
  logic [15:0] P;
  logic [7:0]  out;
  logic        round_up, sat_max, sat_min;
  int checks = 0, failures = 0;
  int n_rup = 0, n_smax = 0, n_smin = 0;

  posit_encode dut (.sign(sign), .scale(scale), .P(P), .zero(zero), .nar(nar),
                    .out(out), .round_up(round_up), .sat_max(sat_max), .sat_min(sat_min));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    zero = 0;
    nar  = 0;
    for (int t = 0; t < 4000; t++) begin
      int m1, m2, sc;
      real v;
      longint expv;
      m1 = 128 + int'($urandom_range(127));
      m2 = 128 + int'($urandom_range(127));
      if (t % 4 == 0) m1 = 128 + (int'($urandom_range(15)) << 3);   // short fractions
      sc = int'($urandom_range(32)) - 16;
      sign  = 1'($urandom);
      scale = 7'(sc);
      P     = 16'(m1 * m2);
      #1;
      v = real'(m1 * m2) / 16384.0 * (2.0 ** sc);
      if (sign) v = -v;
      expv = ref_nearest(v, 8, 0);
      checks++;
      if (out !== 8'(expv)) begin
        failures++;
        if (failures < 10) $display("FAIL m1=%0d m2=%0d sc=%0d sign=%0d out=%02h exp=%02h",
                                    m1, m2, sc, sign, out, 8'(expv));
      end
      n_rup  += int'(round_up);
      n_smax += int'(sat_max);
      n_smin += int'(sat_min);
    end
    // exact significands with up to 7 fraction bits: many exact ties
    for (int m = 128; m < 256; m++)
      for (int sc = -8; sc <= 8; sc++) begin
        real v;
        longint expv;
        sign  = 1'(m & 1);
        scale = 7'(sc);
        P     = 16'(m * 128);
        #1;
        v = real'(m) / 128.0 * (2.0 ** sc);
        if (sign) v = -v;
        expv = ref_nearest(v, 8, 0);
        checks++;
        if (out !== 8'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL tie m=%0d sc=%0d out=%02h exp=%02h", m, sc, out, 8'(expv));
        end
      end
    zero = 1; #1;
    checks++;
    if (out !== 8'h00) failures++;
    nar = 1; #1;
    checks++;
    if (out !== 8'h80) failures++;
    $display("events: round_up=%0d sat_max=%0d sat_min=%0d", n_rup, n_smax, n_smin);
    if (n_rup == 0)  failures++;
    if (n_smax == 0) failures++;
    if (n_smin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
