// tb_posit_mult_activity: switching activity of the gated sub-multipliers.
//
// Drives the default 8-bit multiplier with a stream of random operand pairs
// and counts, for each of the four sub-multipliers, how many operand bits
// toggle at the array input (after the operand isolation gates) from one
// operation to the next. The same count is taken on the ungated segment
// inputs, which is what an always-on multiplier of the same shape would see.
// Checks, per operation, that every sub-multiplier array sees its segments
// when enabled and zeros when not, and at the end that gating removed
// activity on the stream it is meant for. Two streams are used: uniformly
// random patterns, and patterns with long regimes (values far from 1).
// On the uniform stream, forcing idle operands to zero and releasing them
// again costs about as many toggles as it saves, so only the long-regime
// stream is required to show a reduction; both are reported.
module tb_posit_mult_activity;
  logic [7:0]  in1, in2, out;
  logic        start;
  logic [15:0] Product;
  logic [3:0]  seg_en;
  logic        round_up, sat_max, sat_min;
  int checks = 0, failures = 0;

  posit_mult dut (.in1(in1), .in2(in2), .start(start), .out(out), .Product(Product),
                  .seg_en(seg_en), .round_up(round_up), .sat_max(sat_max), .sat_min(sat_min));

  // array inputs of the four sub-multipliers, gated and ungated
  logic [3:0] ga [4], gb [4], ra [4], rb [4];
  assign ga[0] = dut.dsr2.g_row[0].g_col[0].u_sub.ag;
  assign gb[0] = dut.dsr2.g_row[0].g_col[0].u_sub.bg;
  assign ga[1] = dut.dsr2.g_row[0].g_col[1].u_sub.ag;
  assign gb[1] = dut.dsr2.g_row[0].g_col[1].u_sub.bg;
  assign ga[2] = dut.dsr2.g_row[1].g_col[0].u_sub.ag;
  assign gb[2] = dut.dsr2.g_row[1].g_col[0].u_sub.bg;
  assign ga[3] = dut.dsr2.g_row[1].g_col[1].u_sub.ag;
  assign gb[3] = dut.dsr2.g_row[1].g_col[1].u_sub.bg;
  assign ra[0] = dut.m1[7:4];
  assign rb[0] = dut.m2[7:4];
  assign ra[1] = dut.m1[7:4];
  assign rb[1] = dut.m2[3:0];
  assign ra[2] = dut.m1[3:0];
  assign rb[2] = dut.m2[7:4];
  assign ra[3] = dut.m1[3:0];
  assign rb[3] = dut.m2[3:0];

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] long_regime();
    logic [7:0] v;
    int r;
    v = 8'($urandom);
    r = int'($urandom_range(4)) + 3;
    for (int i = 0; i < r; i++) v[6 - i] = v[6];
    return v;
  endfunction

  task automatic run_stream(input int mode, input int len);
    logic [3:0] pga [4], pgb [4], pra [4], prb [4];
    longint tg, tu;
    tg = 0;
    tu = 0;
    for (int s = 0; s < 4; s++) begin
      pga[s] = 0; pgb[s] = 0; pra[s] = 0; prb[s] = 0;
    end
    for (int t = 0; t < len; t++) begin
      in1 = (mode == 0) ? 8'($urandom) : long_regime();
      in2 = (mode == 0) ? 8'($urandom) : long_regime();
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (ga[s] !== (seg_en[s] ? ra[s] : 4'h0) || gb[s] !== (seg_en[s] ? rb[s] : 4'h0)) begin
          failures++;
          if (failures < 10) $display("FAIL sub-multiplier %0d isolation, en=%b", s, seg_en[s]);
        end
        tg += $countones(ga[s] ^ pga[s]) + $countones(gb[s] ^ pgb[s]);
        tu += $countones(ra[s] ^ pra[s]) + $countones(rb[s] ^ prb[s]);
        pga[s] = ga[s]; pgb[s] = gb[s]; pra[s] = ra[s]; prb[s] = rb[s];
      end
    end
    $display("stream %s: sub-multiplier operand toggles gated=%0d always-on=%0d (%0d%% removed)",
             (mode == 0) ? "uniform" : "long-regime", tg, tu,
             (tu > 0) ? int'((tu - tg) * 100 / tu) : 0);
    if (mode == 1) begin
      checks++;
      if (!(tg < tu)) failures++;
    end
  endtask

  initial begin
    start = 1;
    #1;
    run_stream(0, 20000);
    run_stream(1, 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
