// tb_posit_mult_wide: the multiplier built for the 16-bit and 32-bit posit
// formats (posit<16,1> and posit<32,2>, 4-bit sub-multipliers, so 16 and 64
// of them). Random operand pairs, a quarter of them with long regimes (short
// fractions), plus zero and NaR, are checked against a reference that
// decodes the operands bit by bit, multiplies the significands as integers
// and packs the result bit by bit with round to nearest even. The
// significand product (Product) and the sub-multiplier enables are checked
// too. Counts how often part of the multiplier was switched off.
module tb_posit_mult_wide;
  import posit_ref_pkg::*;
  logic [15:0] a16, b16, o16;
  logic [31:0] p16;
  logic [15:0] en16;
  logic [31:0] a32, b32, o32;
  logic [63:0] p32;
  logic [63:0] en32;
  logic        start;
  logic        r16, x16, n16, r32, x32, n32;
  int checks = 0, failures = 0;
  int gated16 = 0, gated32 = 0;

  posit_mult #(.N(16), .ES(1), .SEG_W(4)) dut16 (
    .in1(a16), .in2(b16), .start(start), .out(o16), .Product(p16), .seg_en(en16),
    .round_up(r16), .sat_max(x16), .sat_min(n16));
  posit_mult #(.N(32), .ES(2), .SEG_W(4)) dut32 (
    .in1(a32), .in2(b32), .start(start), .out(o32), .Product(p32), .seg_en(en32),
    .round_up(r32), .sat_max(x32), .sat_min(n32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operand with a random regime length: a run of r identical bits first
  function automatic logic [63:0] rand_posit(input int n);
    logic [63:0] v;
    int r;
    v = {$urandom, $urandom};
    if ($urandom_range(3) == 0) begin
      r = int'($urandom_range(n - 2)) + 1;
      for (int i = 0; i < r; i++) v[n - 2 - i] = v[n - 2];
    end
    if ($urandom_range(40) == 0) v = 0;
    if ($urandom_range(40) == 0) v = 64'(1) << (n - 1);
    return v & ((64'(1) << n) - 1);
  endfunction

  // expected outputs for one format
  task automatic expect_mult(input logic [63:0] x, input logic [63:0] y, input int n,
                             input int es, input int segw,
                             output logic [63:0] eo, output logic [127:0] ep,
                             output logic [63:0] ee);
    longint nar;
    int k1, e1, fw1, k2, e2, fw2, ns;
    longint f1, f2;
    logic [63:0] m1, m2;
    nar = longint'(1) << (n - 1);
    ee = 0;
    ep = 0;
    if (x == 64'(nar) || y == 64'(nar)) eo = 64'(nar);
    else if (x == 0 || y == 0)          eo = 0;
    else begin
      ref_decode(longint'(x), n, es, k1, e1, f1, fw1);
      ref_decode(longint'(y), n, es, k2, e2, f2, fw2);
      m1 = ((64'(1) << fw1) | 64'(f1)) << (n - 1 - fw1);
      m2 = ((64'(1) << fw2) | 64'(f2)) << (n - 1 - fw2);
      ep = 128'(m1) * 128'(m2);
      eo = ref_pack(x[n-1] ^ y[n-1], (k1 << es) + e1 + (k2 << es) + e2, ep, n, es);
      ns = n / segw;
      for (int i = 0; i < ns; i++)
        for (int j = 0; j < ns; j++)
          ee[i*ns + j] = (i * segw <= fw1) && (j * segw <= fw2);
    end
  endtask

  initial begin
    start = 1;
    #1;
    for (int t = 0; t < 20000; t++) begin
      logic [63:0]  eo, ee;
      logic [127:0] ep;
      a16 = 16'(rand_posit(16));
      b16 = 16'(rand_posit(16));
      a32 = 32'(rand_posit(32));
      b32 = 32'(rand_posit(32));
      #1;
      expect_mult(64'(a16), 64'(b16), 16, 1, 4, eo, ep, ee);
      checks++;
      if (o16 !== 16'(eo) || p16 !== 32'(ep) || en16 !== 16'(ee)) begin
        failures++;
        if (failures < 10) $display("FAIL p16 %04h * %04h: out=%04h/%04h Product=%08h/%08h",
                                    a16, b16, o16, 16'(eo), p16, 32'(ep));
      end
      if (en16 != '0 && en16 != '1) gated16++;
      expect_mult(64'(a32), 64'(b32), 32, 2, 4, eo, ep, ee);
      checks++;
      if (o32 !== 32'(eo) || p32 !== 64'(ep) || en32 !== ee) begin
        failures++;
        if (failures < 10) $display("FAIL p32 %08h * %08h: out=%08h/%08h Product=%016h/%016h",
                                    a32, b32, o32, 32'(eo), p32, 64'(ep));
      end
      if (en32 != '0 && en32 != '1) gated32++;
    end
    $display("events: gated16=%0d gated32=%0d", gated16, gated32);
    if (gated16 == 0) failures++;
    if (gated32 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
