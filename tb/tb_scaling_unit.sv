// tb_scaling_unit: self-checking test of the magnitude scale compensation.
//
// Random non-negative x values over the whole 18-bit range and random domain
// tokens are applied. One clock later mag_out must equal x / K_CONV, or
// x / (sqrt(2) K_CONV) for the pre-rotated domain, with
// K_CONV = sqrt(1+2^-4) sqrt(1+2^-6) computed in real arithmetic, clipped to the unsigned 16-bit output range; negative x gives 0.
module tb_scaling_unit;
  import vcordic_pkg::*;

  localparam int DW = 16;
  typedef logic signed [DW+1:0] data_t;

  logic          clk = 1'b0;
  logic          rst_n, in_valid, out_valid;
  data_t         x_in;
  domain_e       domain_in;
  logic [DW-1:0] mag_out;

  int checks = 0, failures = 0;
  int cnt_sat = 0, cnt_mid = 0, cnt_other = 0;

  scaling_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k, e;
    int  xv;
    domain_e dm;
    k = $sqrt(1.0 + 1.0 / 16.0) * $sqrt(1.0 + 1.0 / 64.0);
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; domain_in = DOM_LOW;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      xv = (n < 100) ? int'($urandom_range(131071)) : int'($urandom_range(69000));
      if (n == 100) xv = -5;
      dm = domain_e'($urandom_range(2));
      in_valid  <= 1'b1;
      x_in      <= data_t'(xv);
      domain_in <= dm;
      @(posedge clk);
      in_valid <= 1'b0;
      #1;
      e = real'(xv) / k;
      if (dm == DOM_MID) begin e = e / $sqrt(2.0); cnt_mid++; end
      else cnt_other++;
      if (e > 65535.0) begin e = 65535.0; cnt_sat++; end
      if (e < 0.0) e = 0.0;
      checks++;
      if (!out_valid || real'(mag_out) - e > 6.0 || e - real'(mag_out) > 6.0) begin
        failures++;
        if (failures < 10) $display("x=%0d dom=%0d: %0d expected %f", xv, dm, mag_out, e);
      end
    end
    checks++;
    if (cnt_sat == 0 || cnt_mid == 0 || cnt_other == 0) begin
      failures++;
      $display("a case was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
