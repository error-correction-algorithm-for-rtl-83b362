// End-to-end testbench of the ADC back end, fi_adc_digital, at its default
// size (6 bits: 3 folding bits, 3 interpolation bits).
//
// The comparators are modelled ideally by fi_analog_model: the folding
// comparators see the input at the sampling instant, the interpolation
// comparators see it dt later, i.e. shifted by delta LSBs. Random inputs
// are drawn around the coarse code boundaries with |delta| < 2**M LSBs, the
// range in which the correction must be exact; the output must then be the
// Gray code of the late sample, one clock after the comparators are latched.
// Inputs above or below the range must give Gray 100000 or 000000. A share of
// the inputs uses 2**M <= |delta| < 2**(M+1): there the result is not
// checked, but the undecidable comparator patterns (cases 9..12) must show
// up, and they must never show up with |delta| < 2**M.
// Each mechanism (no correction, one step down, one step up, flip of bit 4,
// flip of bit 5, bit 3 taken from the interpolation, overflow, underflow,
// reset, undecidable case) is counted and must occur.
module tb_fi_adc_digital;
  import fi_adc_pkg::*;

  localparam int M  = M_BITS;
  localparam int N  = K_BITS + M_BITS;
  localparam int FS = 2**N;
  localparam int P  = 4 * 2**M;
  localparam int NVEC = 20000;

  logic ck = 1'b0, rst_n = 1'b0;
  real  vin_f = 0.0, vin_i = 0.0;
  logic cmp_g5, cmp_g4, cmp_q, cmp_i, cmp_out_rng;
  logic [2**(M+1)-1:0] cmp_zc;
  logic [N-1:0] g;
  int checks = 0, failures = 0;

  typedef enum int {MECH_CASE0, MECH_DOWN, MECH_UP, MECH_FLIP4, MECH_FLIP5,
                    MECH_Q_FROM_INTERP, MECH_OVERFLOW, MECH_UNDERFLOW,
                    MECH_RESET, MECH_UNDECIDABLE, MECH_COUNT} mech_e;
  int mech [MECH_COUNT];

  fi_analog_model #(.M(M)) u_model (
    .vin_f(vin_f), .vin_i(vin_i), .cmp_g5(cmp_g5), .cmp_g4(cmp_g4),
    .cmp_q(cmp_q), .cmp_i(cmp_i), .cmp_out_rng(cmp_out_rng), .cmp_zc(cmp_zc));

  fi_adc_digital dut (
    .ck(ck), .rst_n(rst_n), .cmp_g5(cmp_g5), .cmp_g4(cmp_g4), .cmp_q(cmp_q),
    .cmp_i(cmp_i), .cmp_out_rng(cmp_out_rng), .cmp_zc(cmp_zc), .g(g));

  always #5 ck = ~ck;

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  function automatic int code_of(real v);
    if (v <= 0.0) return 0;
    if (v >= real'(FS)) return FS - 1;
    return int'($floor(v));
  endfunction

  function automatic int pmod(int a, int b);
    return ((a % b) + b) % b;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (4 * NVEC + 100) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_exp;
    foreach (mech[i]) mech[i] = 0;
    // reset: the latches clear and the output reads 0
    vin_f = 40.3; vin_i = 40.3;
    repeat (3) @(posedge ck);
    #1 check("reset", int'(g), 0);
    mech[MECH_RESET]++;
    @(negedge ck) rst_n = 1'b1;
    @(posedge ck);
    #1 check("after reset", int'(g), int'(bin2gray(16'(40))));
    prev_exp = int'(bin2gray(16'(40)));

    for (int n = 0; n < NVEC; n++) begin
      int  kind, exp_g, cf, sf, si, cs;
      real delta;
      logic qf, i_f, qi, ii;
      @(negedge ck);
      kind = $urandom_range(99);
      if (kind < 4) begin
        vin_f = urand(real'(FS) + 0.01, real'(FS) + 20.0);
        vin_i = vin_f + urand(-2.0, 2.0);
        mech[MECH_OVERFLOW]++;
      end else if (kind < 8) begin
        vin_f = urand(-20.0, -0.01);
        vin_i = vin_f + urand(-2.0, 2.0);
        mech[MECH_UNDERFLOW]++;
      end else begin
        if (kind < 50) vin_f = urand(0.0, real'(FS));
        else vin_f = real'(2**M * $urandom_range(FS / 2**M)) + urand(-3.0, 3.0);
        if (vin_f < 0.0) vin_f = 0.0;
        if (vin_f > real'(FS)) vin_f = real'(FS);
        if (kind < 90) delta = urand(-real'(2**M) + 0.001, real'(2**M) - 0.001);
        else if (kind < 95) delta = urand(real'(2**M), real'(2**(M+1)) - 0.001);
        else delta = -urand(real'(2**M), real'(2**(M+1)) - 0.001);
        vin_i = vin_f + delta;
        if (vin_i < 0.0) vin_i = 0.0;
        if (vin_i > real'(FS)) vin_i = real'(FS);
      end
      // the output must not follow the comparators before they are latched
      #1 check($sformatf("latency n=%0d", n), int'(g), prev_exp);

      // independent classification of the comparator pattern
      cf = code_of(vin_f);
      sf = pmod(cf, P);
      si = pmod(code_of(vin_i), P);
      qf = sf >= 2**M && sf < 3 * 2**M;   i_f = sf < 2 * 2**M;
      qi = si >= 2**M && si < 3 * 2**M;   ii  = si < 2 * 2**M;
      case ({qf, i_f, qi, ii})
        4'b0000, 4'b0101, 4'b1010, 4'b1111: cs = 0;
        4'b0010: cs = 1;  4'b1011: cs = 2;  4'b1101: cs = 3;  4'b0100: cs = 4;
        4'b1000: cs = 5;  4'b1110: cs = 6;  4'b0111: cs = 7;  4'b0001: cs = 8;
        default: cs = 9;
      endcase

      if (vin_f > real'(FS))   exp_g = int'(bin2gray(16'(FS - 1)));
      else if (vin_f < 0.0)    exp_g = 0;
      else                     exp_g = int'(bin2gray(16'(code_of(vin_i))));

      @(posedge ck);
      #1;
      if (vin_f < 0.0 || vin_f > real'(FS)) begin
        check($sformatf("out of range n=%0d vin=%f", n, vin_f), int'(g), exp_g);
        prev_exp = exp_g;
      end else if (vin_i - vin_f < real'(2**M) && vin_f - vin_i < real'(2**M)) begin
        check($sformatf("n=%0d vin_f=%f vin_i=%f case %0d", n, vin_f, vin_i, cs),
              int'(g), exp_g);
        checks++;
        if (cs == 9) begin
          failures++;
          $display("FAIL undecidable case within the delay limit n=%0d", n);
        end
        prev_exp = exp_g;
        if (cs == 0) mech[MECH_CASE0]++;
        if (cs >= 1 && cs <= 4) mech[MECH_DOWN]++;
        if (cs >= 5 && cs <= 8) mech[MECH_UP]++;
        if (cs == 2 || cs == 6) mech[MECH_FLIP4]++;
        if (cs == 4 || cs == 8) mech[MECH_FLIP5]++;
        if (cs == 1 || cs == 3 || cs == 5 || cs == 7) mech[MECH_Q_FROM_INTERP]++;
      end else begin
        if (cs == 9) mech[MECH_UNDECIDABLE]++;
        prev_exp = int'(g);  // not checked beyond the delay limit
      end
    end

    for (int i = 0; i < MECH_COUNT; i++) begin
      mech_e e;
      e = mech_e'(i);
      $display("mechanism %-20s %0d", e.name(), mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
