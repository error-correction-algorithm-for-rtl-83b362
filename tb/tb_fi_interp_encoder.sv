// Self-checking testbench of fi_interp_encoder.
//
// Two instances, M = 3 (the reference configuration) and M = 2. For every
// position s within one folding period (P = 4*2**M LSBs) the testbench builds
// the comparator pattern the interpolation circuit would give, zc[k] = 1
// when (s - 1 - k) mod P < P/2, and checks the outputs against values worked
// out from s alone: g_lo = low M+1 bits of the Gray code of s (bit M is the
// sign of Q, true for 2**M <= s < 3*2**M), ii = (s < P/2), and g_lo = 0 when
// out_rng = 0. It then inserts single-comparator bubbles and checks that the
// lowest zero crossing is taken.
module tb_fi_interp_encoder;
  logic [15:0] zc3;
  logic [7:0]  zc2;
  logic        out_rng;
  logic [3:0]  g3_lo;
  logic [2:0]  g2_lo;
  logic        ii3, ii2;
  int          checks = 0, failures = 0;

  fi_interp_encoder #(.M(3)) dut3 (.zc(zc3), .out_rng(out_rng), .g_lo(g3_lo), .ii(ii3));
  fi_interp_encoder #(.M(2)) dut2 (.zc(zc2), .out_rng(out_rng), .g_lo(g2_lo), .ii(ii2));

  function automatic int pmod(int a, int b);
    return ((a % b) + b) % b;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
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
    for (int r = 0; r < 2; r++) begin
      out_rng = 1'(r);
      for (int s = 0; s < 32; s++) begin
        int s2;
        s2 = s % 16;
        for (int k = 0; k < 16; k++) zc3[k] = pmod(s - 1 - k, 32) < 16;
        for (int k = 0; k < 8; k++)  zc2[k] = pmod(s2 - 1 - k, 16) < 8;
        #1;
        check($sformatf("M=3 s=%0d g_lo", s), int'(g3_lo),
              (r != 0) ? ((s ^ (s >> 1)) & 15) : 0);
        check($sformatf("M=3 s=%0d g3", s), int'(g3_lo[3]),
              (r != 0) ? int'(s >= 8 && s < 24) : 0);
        check($sformatf("M=3 s=%0d ii", s), int'(ii3), int'(s < 16));
        check($sformatf("M=2 s=%0d g_lo", s2), int'(g2_lo),
              (r != 0) ? ((s2 ^ (s2 >> 1)) & 7) : 0);
        check($sformatf("M=2 s=%0d ii", s2), int'(ii2), int'(s2 < 8));
      end
    end
    // bubbles: a position s with one comparator flipped inside the run of
    // ones far from the real crossing gives a second, higher crossing; the
    // lowest one must win
    out_rng = 1'b1;
    for (int s = 9; s < 13; s++) begin
      for (int k = 0; k < 16; k++) zc3[k] = pmod(s - 1 - k, 32) < 16;
      zc3[s + 2] = 1'b1;  // stray one above the crossing at s
      zc3[s + 3] = 1'b0;
      #1;
      check($sformatf("bubble s=%0d fine bits", s), int'(g3_lo[2:0]),
            (s ^ (s >> 1)) & 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
