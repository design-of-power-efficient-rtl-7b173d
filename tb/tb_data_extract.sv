// tb_data_extract: exhaustive check of posit field extraction.
// Every positive 8-bit pattern is decoded for ES = 0 (default instance) and
// ES = 2 and compared with a bit-walking reference decoder: regime value,
// exponent, fraction width and the left-aligned significand.
module tb_data_extract;
  import posit_ref_pkg::*;
  logic [7:0] in;
  logic       rc0, rc2;
  logic [3:0] rlen0, rlen2, fw0, fw2;
  logic signed [4:0] k0, k2;
  logic [0:0] e0;
  logic [1:0] e2;
  logic [7:0] m0, m2;
  int checks = 0, failures = 0;

  data_extract dut0 (.in(in), .rc(rc0), .rlen(rlen0), .k(k0), .exp(e0), .mant(m0), .fw(fw0));
  data_extract #(.N(8), .ES(2)) dut2 (.in(in), .rc(rc2), .rlen(rlen2), .k(k2), .exp(e2),
                                      .mant(m2), .fw(fw2));

  task automatic check(input int es, input int v, input int k, input int e, input int fw,
                       input logic [7:0] m);
    int rk, re, rfw;
    longint rf;
    logic [7:0] rm;
    ref_decode(longint'(v), 8, es, rk, re, rf, rfw);
    rm = 8'(((longint'(1) << rfw) | rf) << (7 - rfw));
    checks++;
    if (k != rk || e != re || fw != rfw || m !== rm) begin
      failures++;
      $display("FAIL es=%0d in=%02h k=%0d/%0d e=%0d/%0d fw=%0d/%0d m=%02h/%02h",
               es, v, k, rk, e, re, fw, rfw, m, rm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 1; v < 128; v++) begin
      in = 8'(v);
      #1;
      check(0, v, int'(k0), 0, int'(fw0), m0);
      check(2, v, int'(k2), int'(e2), int'(fw2), m2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
