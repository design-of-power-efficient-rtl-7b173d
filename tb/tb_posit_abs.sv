// tb_posit_abs: exhaustive check of the conditional negation for 8 bits.
// Expected value: the operand read as an integer, and 256 minus it when the
// sign bit is set, reduced modulo 256.
module tb_posit_abs;
  logic [7:0] in, mag;
  logic       sign;
  int checks = 0, failures = 0;

  posit_abs #(.N(8)) dut (.in(in), .sign(sign), .mag(mag));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int exp_mag;
      in = 8'(v);
      #1;
      exp_mag = (v >= 128) ? (256 - v) % 256 : v;
      checks++;
      if (sign !== (v >= 128) || mag !== 8'(exp_mag)) begin
        failures++;
        $display("FAIL in=%0d sign=%0d mag=%0d expected %0d", v, sign, mag, exp_mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
