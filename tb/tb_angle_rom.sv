// tb_angle_rom: self-checking test of the classical-stage angle ROM and its
// decoder, for the default word length (two classical stages, two words) and
// for B = 32 (seven classical stages, 64 words).
//
// For every combination of the classical direction bits the signed
// contribution (sub ? -word : word) must equal sum_i (d_i ? +1 : -1)
// atan(2^-i), computed with $atan, to within half an LSB of the 2^-(B-1)
// angle format plus the rounding of the stored word.
module tb_angle_rom;
  import vcordic_pkg::*;

  localparam int B16 = 16, K16 = 2;
  localparam int B32 = 32, K32 = 7;

  logic [K16-1:0]       dirs16;
  logic signed [B16+2:0] word16;
  logic                 sub16;
  logic [K32-1:0]       dirs32;
  logic signed [B32+2:0] word32;
  logic                 sub32;

  int checks = 0, failures = 0;

  angle_rom dut16 (.dirs(dirs16), .word(word16), .sub(sub16));
  angle_rom #(.B(B32)) dut32 (.dirs(dirs32), .word(word32), .sub(sub32));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expv, got;
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < (1 << K16); c++) begin
        dirs16 = K16'(c);
        #1;
        expv = 0.0;
        for (int s = 0; s < K16; s++)
          expv += dirs16[K16-1-s] ? $atan(2.0 ** (-(2 + s))) : -$atan(2.0 ** (-(2 + s)));
        got = real'(sub16 ? -word16 : word16) / (2.0 ** (B16 - 1));
        checks++;
        if (got - expv > 0.5 / (2.0 ** (B16 - 1)) || expv - got > 0.5 / (2.0 ** (B16 - 1))) begin
          failures++;
          $display("B=16 dirs=%b: %f expected %f", dirs16, got, expv);
        end
      end
    end
    if (sf_first(B32) - 2 != K32) begin
      failures++;
      $display("unexpected stage split for B=32");
    end
    for (int c = 0; c < (1 << K32); c++) begin
      dirs32 = K32'(c);
      #1;
      expv = 0.0;
      for (int s = 0; s < K32; s++)
        expv += dirs32[K32-1-s] ? $atan(2.0 ** (-(2 + s))) : -$atan(2.0 ** (-(2 + s)));
      got = real'(sub32 ? -word32 : word32) / (2.0 ** (B32 - 1));
      checks++;
      if (got - expv > 1.0 / (2.0 ** (B32 - 1)) || expv - got > 1.0 / (2.0 ** (B32 - 1))) begin
        failures++;
        $display("B=32 dirs=%b: %.12f expected %.12f", dirs32, got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
