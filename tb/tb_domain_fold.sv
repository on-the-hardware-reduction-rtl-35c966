// tb_domain_fold: self-checking test of the domain folding unit.
//
// Random 16-bit vectors (plus axis and extreme values) are applied; for each
// the test checks, one clock later:
//   * quad equals the input signs {x<0, y<0};
//   * the domain agrees with the true first-quadrant angle atan2(|y|, |x|)
//     (exact boundaries pi/8 and 3pi/8, a band of 0.02 rad around each
//     boundary is accepted either way);
//   * the outputs are |x|,|y| (low), |x|+|y|, |y|-|x| (mid) or |y|,|x| (high);
//   * the folded angle lies inside [-0.40, 0.40] rad;
//   * out_valid follows in_valid with one clock of latency.
module tb_domain_fold;
  import vcordic_pkg::*;

  localparam int DW = 16;
  typedef logic signed [DW+1:0] data_t;

  logic                 clk = 1'b0;
  logic                 rst_n, in_valid, out_valid;
  logic signed [DW-1:0] x_in, y_in;
  data_t                x_out, y_out;
  token_t               token_out;

  int checks = 0, failures = 0;
  int cnt_dom [3];

  domain_fold dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [DW-1:0] xv, input logic signed [DW-1:0] yv);
    int  ax, ay, ex, ey;
    real th, fth;
    logic dom_ok;
    in_valid <= 1'b1;
    x_in     <= xv;
    y_in     <= yv;
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    ax = (xv < 0) ? -int'(xv) : int'(xv);
    ay = (yv < 0) ? -int'(yv) : int'(yv);
    th = $atan2(real'(ay), real'(ax));
    checks++;
    if (!out_valid || token_out.quad != {xv < 0, yv < 0}) begin
      failures++;
      $display("valid/quad wrong for x=%0d y=%0d", xv, yv);
    end
    unique case (token_out.domain)
      DOM_LOW:  begin ex = ax;      ey = ay;      dom_ok = th <= 3.14159265 / 8 + 0.02; end
      DOM_MID:  begin ex = ax + ay; ey = ay - ax; dom_ok = th >= 3.14159265 / 8 - 0.02
                                                           && th <= 3.0 * 3.14159265 / 8 + 0.02; end
      DOM_HIGH: begin ex = ay;      ey = ax;      dom_ok = th >= 3.0 * 3.14159265 / 8 - 0.02; end
      default:  begin ex = 0;       ey = 0;       dom_ok = 1'b0; end
    endcase
    if (token_out.domain <= DOM_HIGH) cnt_dom[token_out.domain]++;
    checks++;
    if (!dom_ok) begin
      failures++;
      $display("domain %0d wrong for angle %f", token_out.domain, th);
    end
    checks++;
    if (int'(x_out) != ex || int'(y_out) != ey) begin
      failures++;
      $display("folded vector (%0d,%0d) expected (%0d,%0d)", x_out, y_out, ex, ey);
    end
    fth = (x_out == 0 && y_out == 0) ? 0.0 : $atan2(real'(y_out), real'(x_out));
    checks++;
    if (fth > 0.40 || fth < -0.40) begin
      failures++;
      $display("folded angle %f out of range", fth);
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid did not drop");
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; y_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(16'sh4000, 16'sh0000);
    check(16'sh0000, 16'sh4000);
    check(-16'sh8000, -16'sh8000);
    check(16'sh7fff, -16'sh8000);
    check(16'sh0000, 16'sh0000);
    check(16'sh2000, 16'sh2000);
    for (int n = 0; n < 4000; n++) check(DW'($urandom), DW'($urandom));
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (cnt_dom[k] == 0) begin failures++; $display("domain %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
