// Self-checking testbench of fi_msb_correct.
//
// Drives all 64 input combinations. The expected bits come from the case
// table of the error-correction algorithm, not from the block's equations:
// each (qf, if, qi, ii) is given its case number 0..12, cases 0..8 are
// checked against the case-by-case rule (keep, flip bit 4, flip bit 5) and
// against a Gray-code increment/decrement of the 3-bit coarse code, and the
// undecidable cases 9..12 against the behaviour of the gate-level form.
// For the physically possible inputs, cases 1..4 must equal the coarse code
// one Gray step down and cases 5..8 one step up.
// With out_rng = 0 the folding bits must pass unchanged.
module tb_fi_msb_correct;
  import fi_adc_pkg::*;

  logic gf5, gf4, qf, if_, ii, qi, out_rng;
  logic g5, g4;
  int   checks = 0, failures = 0;

  fi_msb_correct dut (.gf5(gf5), .gf4(gf4), .qf(qf), .if_(if_), .ii(ii),
                      .out_rng(out_rng), .g5(g5), .g4(g4));

  function automatic int case_of(logic [3:0] v);  // v = {qf, if, qi, ii}
    case (v)
      4'b0000, 4'b0101, 4'b1010, 4'b1111: return 0;
      4'b0010: return 1;  4'b1011: return 2;
      4'b1101: return 3;  4'b0100: return 4;
      4'b1000: return 5;  4'b1110: return 6;
      4'b0111: return 7;  4'b0001: return 8;
      4'b0011: return 9;  4'b1001: return 10;
      4'b1100: return 11; default: return 12;  // 4'b0110
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [1:0] exp54;
      logic [15:0] coarse_bin, moved;
      int c;
      {gf5, gf4, qf, if_, qi, ii} = 6'(v);
      c = case_of({qf, if_, qi, ii});
      for (int r = 0; r < 2; r++) begin
        out_rng = 1'(r);
        #1;
        if (!out_rng) exp54 = {gf5, gf4};
        else case (c)
          0, 1, 3, 5, 7: exp54 = {gf5, gf4};
          2, 6, 10, 11:  exp54 = {gf5, ~gf4};
          default:       exp54 = {~gf5, gf4};  // 4, 8, 9, 12
        endcase
        checks++;
        if ({g5, g4} !== exp54) begin
          failures++;
          $display("FAIL case %0d in=%b out_rng=%b got %b%b exp %b",
                   c, v[5:0], out_rng, g5, g4, exp54);
        end
        // Gray-code step view: cases 1..4 one step down, 5..8 one step up
        if (out_rng && c >= 1 && c <= 8) begin
          coarse_bin = gray2bin({13'd0, gf5, gf4, qf});
          moved = (c <= 4) ? coarse_bin - 16'd1 : coarse_bin + 16'd1;
          // only inputs the folding circuits can produce (the sign of I is
          // set by the coarse code: i = 1 in the first half of each folding
          // period), and no step out of the 3-bit range
          if (moved[15:3] == '0 && if_ == (coarse_bin[1:0] < 2'd2)) begin
            checks++;
            if ({g5, g4, qi} !== bin2gray(moved)[2:0]) begin
              failures++;
              $display("FAIL step case %0d in=%b got %b%b%b exp %b", c, v[5:0],
                       g5, g4, qi, bin2gray(moved)[2:0]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
