// Shared constants and helpers of the folding/interpolation ADC back end.
//
// The converter has K_BITS coarse bits made by folding circuits and M_BITS
// fine bits made by the interpolation circuit; the output is the Gray code of
// the input. K_BITS = 3 and M_BITS = 3 (a 6-bit converter) are the reference
// configuration. The coarse correction equations exist for K_BITS = 3 only;
// M_BITS is a parameter of the fine encoder and of the top level.
package fi_adc_pkg;

  localparam int unsigned K_BITS = 3;
  localparam int unsigned M_BITS = 3;

  // Binary to reflected-binary Gray code (up to 16 bits).
  function automatic logic [15:0] bin2gray(input logic [15:0] b);
    return b ^ (b >> 1);
  endfunction

  // Reflected-binary Gray code to binary (up to 16 bits).
  function automatic logic [15:0] gray2bin(input logic [15:0] g);
    logic [15:0] b;
    b[15] = g[15];
    for (int i = 14; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
