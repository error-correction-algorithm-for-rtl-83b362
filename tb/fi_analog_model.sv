// Ideal model of the analog front end of the folding/interpolation ADC, for
// testbenches only (not synthesizable: real-valued inputs).
//
// Input voltages are given in LSBs: the converter's range is 0 .. 2**(K+M)
// (0 .. 64 for the 6-bit reference configuration), a full-scale input of
// exactly 2**(K+M) still reads as the top code. vin_f is the input as the
// folding circuits see it at the sampling instant nT, vin_i as the
// interpolation circuit sees it at nT+dt. Outputs are the comparator
// decisions, before the latches:
//   cmp_g5, cmp_g4  Gray bits 5 and 4 of the code of vin_f (a folding circuit
//                   gives (1,0) above and (0,0) below the range by itself);
//   cmp_q, cmp_i    sign of Q and of I: with s the code modulo one folding
//                   period P = 4*2**M, q = (2**M <= s < 3*2**M) (equal to Gray
//                   bit 3) and i = (s < 2*2**M);
//   cmp_out_rng     1 when vin_f lies within the range;
//   cmp_zc[k]       sign of the k-th interpolated signal at vin_i: 1 when
//                   (s_i - 1 - k) mod P < P/2, a circular thermometer code.
module fi_analog_model #(
  parameter int M = 3
) (
  input  real                 vin_f,
  input  real                 vin_i,
  output logic                cmp_g5,
  output logic                cmp_g4,
  output logic                cmp_q,
  output logic                cmp_i,
  output logic                cmp_out_rng,
  output logic [2**(M+1)-1:0] cmp_zc
);
  localparam int FS = 8 * 2**M;   // full scale in LSBs (K = 3)
  localparam int P  = 4 * 2**M;   // folding period in LSBs

  function automatic int code_of(real v);
    int c;
    c = int'($floor(v));
    if (v == real'(FS)) c = FS - 1;
    return c;
  endfunction

  function automatic int pmod(int a, int b);
    return ((a % b) + b) % b;
  endfunction

  always_comb begin
    int cf, sf, si;
    cf = code_of(vin_f);
    sf = pmod(cf, P);
    si = pmod(code_of(vin_i), P);
    cmp_g5      = vin_f >= real'(FS / 2);
    cmp_g4      = vin_f >= real'(FS / 4) && vin_f < real'(3 * FS / 4);
    cmp_q       = sf >= 2**M && sf < 3 * 2**M;
    cmp_i       = sf < 2 * 2**M;
    cmp_out_rng = vin_f >= 0.0 && vin_f <= real'(FS);
    for (int k = 0; k < 2**(M+1); k++)
      cmp_zc[k] = pmod(si - 1 - k, P) < P / 2;
  end
endmodule
