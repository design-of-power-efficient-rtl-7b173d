// tb_DSR_right_N_S: checks the segmented multiplier (N = 8, SEG_W = 4).
// Part 1: all sub-multipliers on, every 8 x 8 operand pair, P must equal
// a * b. Part 2: random operands and random per-operand segment masks; the
// enable of pair (i, j) is the AND of the two masks, and P must equal the
// product of the operands with their disabled segments cleared.
module tb_DSR_right_N_S;
  logic [7:0]  a, b;
  logic [3:0]  en;
  logic [15:0] P;
  int checks = 0, failures = 0;

  DSR_right_N_S dut (.a(a), .b(b), .en(en), .P(P));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '1;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x);
        b = 8'(y);
        #1;
        checks++;
        if (P !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", x, y, P);
        end
      end
    for (int t = 0; t < 2000; t++) begin
      logic [1:0] ma, mb;
      logic [7:0] am, bm;
      a  = 8'($urandom);
      b  = 8'($urandom);
      ma = 2'($urandom);
      mb = 2'($urandom);
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          en[i*2+j] = ma[i] & mb[j];
      am = a & {{4{ma[0]}}, {4{ma[1]}}};
      bm = b & {{4{mb[0]}}, {4{mb[1]}}};
      #1;
      checks++;
      if (P !== 16'(int'(am) * int'(bm))) begin
        failures++;
        if (failures < 10) $display("FAIL masked a=%02h b=%02h en=%b P=%0d", a, b, en, P);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
