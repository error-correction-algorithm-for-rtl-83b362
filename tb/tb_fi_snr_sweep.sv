// Signal-to-noise sweep of the ADC back end against the folding-to-
// interpolation delay dt.
//
// A full-scale sine of frequency fin = 17/1024 of the sample rate is
// converted 1024 times for each dt from 0 to 4.0 sample periods in steps of
// 0.2 (the folding comparators see the sine at nT, the interpolation
// comparators at nT+dt, through the ideal model fi_analog_model). The
// S/N of the corrected output g, and of the uncorrected code (folding bits
// gf5, gf4, qf taken as they are, fine bits from the interpolation), is
// computed with a single-bin DFT at the signal bin and Parseval's theorem.
// Checks:
//   * for dt <= 1/(fin * 2**K * pi) (about 2.39) every corrected sample is
//     the exact Gray code of the input at nT+dt;
//   * in that range the corrected S/N stays within 0.5 dB of its dt = 0
//     value, which is close to the ideal 6-bit figure of 37.9 dB;
//   * for 0 < dt <= that limit the uncorrected S/N is at least 0.5 dB below
//     the corrected one;
//   * at dt = 4.0, far beyond the limit, the correction is no longer exact.
module tb_fi_snr_sweep;
  import fi_adc_pkg::*;

  localparam int  M    = M_BITS;
  localparam int  N    = K_BITS + M_BITS;
  localparam int  FS   = 2**N;
  localparam int  NS   = 1024;
  localparam int  FBIN = 17;
  localparam real PI   = 3.14159265358979323846;

  logic ck = 1'b0, rst_n = 1'b0;
  real  vin_f = 0.0, vin_i = 0.0;
  logic cmp_g5, cmp_g4, cmp_q, cmp_i, cmp_out_rng;
  logic [2**(M+1)-1:0] cmp_zc;
  logic [N-1:0] g;
  int checks = 0, failures = 0;

  fi_analog_model #(.M(M)) u_model (
    .vin_f(vin_f), .vin_i(vin_i), .cmp_g5(cmp_g5), .cmp_g4(cmp_g4),
    .cmp_q(cmp_q), .cmp_i(cmp_i), .cmp_out_rng(cmp_out_rng), .cmp_zc(cmp_zc));

  fi_adc_digital dut (
    .ck(ck), .rst_n(rst_n), .cmp_g5(cmp_g5), .cmp_g4(cmp_g4), .cmp_q(cmp_q),
    .cmp_i(cmp_i), .cmp_out_rng(cmp_out_rng), .cmp_zc(cmp_zc), .g(g));

  always #5 ck = ~ck;

  function automatic real vin_at(real t);
    return real'(FS / 2) + real'(FS / 2) * $sin(2.0 * PI * real'(FBIN) * t / real'(NS));
  endfunction

  function automatic int code_of(real v);
    if (v <= 0.0) return 0;
    if (v >= real'(FS)) return FS - 1;
    return int'($floor(v));
  endfunction

  // S/N in dB of a record of codes, signal taken at bin FBIN
  function automatic real snr_db(real x[NS]);
    real mean, tot, re, im, ps;
    mean = 0.0; tot = 0.0; re = 0.0; im = 0.0;
    for (int n = 0; n < NS; n++) mean += x[n];
    mean /= real'(NS);
    for (int n = 0; n < NS; n++) begin
      real d;
      d = x[n] - mean;
      tot += d * d;
      re  += d * $cos(2.0 * PI * real'(FBIN * n) / real'(NS));
      im  -= d * $sin(2.0 * PI * real'(FBIN * n) / real'(NS));
    end
    tot /= real'(NS);
    ps = 2.0 * (re * re + im * im) / (real'(NS) * real'(NS));
    return 10.0 * $log10(ps / (tot - ps));
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (30 * (NS + 4)) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xc[NS], xu[NS];
    real snr0, limit;
    limit = real'(NS) / (real'(FBIN) * real'(2**K_BITS) * PI);
    $display("delay limit 1/(fin*2^k*pi) = %f sample periods", limit);
    repeat (2) @(posedge ck);
    @(negedge ck) rst_n = 1'b1;
    snr0 = 0.0;
    for (int d = 0; d <= 20; d++) begin
      real dt, sc, su;
      int  wrong;
      logic [2:0] fold_bits;
      dt = 0.2 * real'(d);
      wrong = 0;
      for (int n = 0; n < NS; n++) begin
        @(negedge ck);
        vin_f = vin_at(real'(n));
        vin_i = vin_at(real'(n) + dt);
        #1;
        fold_bits = {cmp_g5, cmp_g4, cmp_q};
        @(posedge ck);
        #1;
        xc[n] = real'(gray2bin(16'(g)));
        xu[n] = real'(gray2bin(16'({fold_bits, g[M-1:0]})));
        if (int'(g) != int'(bin2gray(16'(code_of(vin_i))))) wrong++;
      end
      sc = snr_db(xc);
      su = snr_db(xu);
      if (d == 0) snr0 = sc;
      $display("dt=%4.1f  S/N corrected %6.2f dB  uncorrected %6.2f dB  wrong codes %0d",
               dt, sc, su, wrong);
      if (dt <= limit) begin
        check($sformatf("dt=%f exact", dt), wrong == 0);
        check($sformatf("dt=%f S/N held", dt), sc > snr0 - 0.5 && sc < snr0 + 0.5);
      end
      if (d > 0 && dt <= limit)
        check($sformatf("dt=%f uncorrected worse", dt), su < sc - 0.5);
      if (d == 20) check("dt=4.0 beyond limit", wrong > 0);
    end
    check("S/N at dt=0 near 6-bit ideal", snr0 > 36.5 && snr0 < 39.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
