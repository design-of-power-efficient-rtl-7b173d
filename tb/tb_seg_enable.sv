// tb_seg_enable: exhaustive check of the sub-multiplier enables (N = 8,
// SEG_W = 4, and N = 8, SEG_W = 2). A segment j is needed when its top bit
// position 7 - j*SEG_W is at or above the last fraction bit 7 - fw.
module tb_seg_enable;
  logic       valid;
  logic [3:0] fa, fb;
  logic [1:0] na4, nb4;
  logic [3:0] en4;
  logic [3:0] na2, nb2;
  logic [15:0] en2;
  int checks = 0, failures = 0;

  seg_enable dut4 (.valid(valid), .fw_a(fa), .fw_b(fb), .need_a(na4), .need_b(nb4), .en(en4));
  seg_enable #(.N(8), .SEG_W(2)) dut2 (.valid(valid), .fw_a(fa), .fw_b(fb),
                                       .need_a(na2), .need_b(nb2), .en(en2));

  function automatic bit needed(input int j, input int w, input int fw);
    return (7 - j * w) >= (7 - fw);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vl = 0; vl < 2; vl++)
      for (int a = 0; a <= 7; a++)
        for (int b = 0; b <= 7; b++) begin
          logic [3:0]  x4;
          logic [15:0] x2;
          valid = vl[0];
          fa = 4'(a);
          fb = 4'(b);
          #1;
          for (int i = 0; i < 2; i++)
            for (int j = 0; j < 2; j++)
              x4[i*2+j] = vl[0] && needed(i, 4, a) && needed(j, 4, b);
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              x2[i*4+j] = vl[0] && needed(i, 2, a) && needed(j, 2, b);
          checks++;
          if (en4 !== x4 || en2 !== x2) begin
            failures++;
            $display("FAIL valid=%0d fa=%0d fb=%0d en4=%b/%b en2=%b/%b", vl, a, b, en4, x4, en2, x2);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
