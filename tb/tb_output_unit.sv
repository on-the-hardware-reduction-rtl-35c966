// tb_output_unit: self-checking test of the angle reconstruction.
//
// Random direction-bit words and tokens are applied. The expected phase is
// computed in real arithmetic, without the bit-pattern trick:
//   z   = sum(+-atan 2^-i, i = 2,3) + sum(+-2^-i, i = 4..15)
//   phi = z (low), pi/4 + z (mid), pi/2 - z (high)
//   phase = phi, -phi, pi - phi, phi - pi for quad 00, 01, 10, 11
// and phase_out must match it within 1.25 LSB of 2^-14 (rounding of the ROM
// words, of pi/4, pi/2, pi and of the output). The one-clock latency of
// out_valid is checked as well.
module tb_output_unit;
  import vcordic_pkg::*;

  localparam int N_CONV   = 2;
  localparam int N_STAGES = 14;
  localparam int PW       = 17;

  logic                 clk = 1'b0;
  logic                 rst_n, in_valid, out_valid;
  logic [N_STAGES-1:0]  dirs_in;
  token_t               token_in;
  logic signed [PW-1:0] phase_out;

  int checks = 0, failures = 0;

  output_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    real z, phi, ph, got;
    logic [N_STAGES-1:0] dv;
    token_t tk;
    rst_n = 1'b0; in_valid = 1'b0; dirs_in = '0; token_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      dv = N_STAGES'($urandom);
      if (n == 0) dv = '0;
      if (n == 1) dv = '1;
      tk.quad   = 2'($urandom);
      tk.domain = domain_e'($urandom_range(2));
      in_valid <= 1'b1;
      dirs_in  <= dv;
      token_in <= tk;
      @(posedge clk);
      in_valid <= 1'b0;
      #1;
      z = 0.0;
      for (int s = 0; s < N_STAGES; s++) begin
        automatic real a = (s < N_CONV) ? $atan(1.0 / real'(1 << (s + 2)))
                                        : 1.0 / real'(1 << (s + 2));
        z += dv[N_STAGES-1-s] ? a : -a;
      end
      unique case (tk.domain)
        DOM_MID:  phi = M_PI / 4.0 + z;
        DOM_HIGH: phi = M_PI / 2.0 - z;
        default:  phi = z;
      endcase
      unique case (tk.quad)
        2'b01:   ph = -phi;
        2'b10:   ph = M_PI - phi;
        2'b11:   ph = phi - M_PI;
        default: ph = phi;
      endcase
      got = real'(phase_out) / 16384.0;
      checks++;
      if (!out_valid || got - ph > 1.25 / 16384.0 || ph - got > 1.25 / 16384.0) begin
        failures++;
        if (failures < 10)
          $display("dirs=%b quad=%b dom=%0d: %f expected %f", dv, tk.quad, tk.domain, got, ph);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid stuck");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
