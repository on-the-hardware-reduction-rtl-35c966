// tb_conv_stage: self-checking test of the classical micro-rotation stage for
// i = 2 and i = 3.
//
// For random vectors the test checks, one clock after the input:
//   * the direction bit equals (y >= 0);
//   * x', y' equal x +- floor(y/2^i), y -+ floor(x/2^i) exactly;
//   * the output vector is the input turned by -+atan(2^-i) and lengthened by
//     sqrt(1+2^-2i), to within 2 LSB (checked in real arithmetic).
module tb_conv_stage;
  import vcordic_pkg::*;

  localparam int B = 16;
  typedef logic signed [B+1:0] data_t;

  logic  clk = 1'b0;
  logic  rst_n, in_valid;
  data_t x_in, y_in;
  logic  v2, v3, d2, d3;
  data_t x2, y2, x3, y3;

  int checks = 0, failures = 0;

  conv_stage #(.B(B), .SHIFT(2)) dut2 (.clk, .rst_n, .in_valid, .x_in, .y_in,
                                .out_valid(v2), .x_out(x2), .y_out(y2), .dir_out(d2));
  conv_stage #(.B(B), .SHIFT(3)) dut3 (.clk, .rst_n, .in_valid, .x_in, .y_in,
                                .out_valid(v3), .x_out(x3), .y_out(y3), .dir_out(d3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_div(input int a, input int sh);
    // floor(a / 2^sh) for signed a
    int q;
    q = a / (1 << sh);
    if (a < 0 && q * (1 << sh) != a) q = q - 1;
    return q;
  endfunction

  task automatic one_check(input int sh, input int xv, input int yv,
                           input logic v, input logic d, input data_t xo, input data_t yo);
    int  ex, ey;
    logic ed;
    real a, xr, yr, g;
    ed = (yv >= 0);
    ex = ed ? xv + floor_div(yv, sh) : xv - floor_div(yv, sh);
    ey = ed ? yv - floor_div(xv, sh) : yv + floor_div(xv, sh);
    checks++;
    if (!v || d != ed || int'(xo) != ex || int'(yo) != ey) begin
      failures++;
      $display("i=%0d x=%0d y=%0d: got (%0d,%0d,d=%0b) expected (%0d,%0d,d=%0b)",
               sh, xv, yv, xo, yo, d, ex, ey, ed);
    end
    // geometric check
    a  = ed ? -$atan(1.0 / real'(1 << sh)) : $atan(1.0 / real'(1 << sh));
    g  = $sqrt(1.0 + 1.0 / real'(1 << (2 * sh)));
    xr = g * (real'(xv) * $cos(a) - real'(yv) * $sin(a));
    yr = g * (real'(xv) * $sin(a) + real'(yv) * $cos(a));
    checks++;
    if ((xr - real'(xo)) > 2.0 || (real'(xo) - xr) > 2.0 ||
        (yr - real'(yo)) > 2.0 || (real'(yo) - yr) > 2.0) begin
      failures++;
      $display("i=%0d rotation off: (%0d,%0d) vs (%f,%f)", sh, xo, yo, xr, yr);
    end
  endtask

  initial begin
    int xv, yv;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; y_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      xv = int'($urandom_range(65535));          // 0 .. 4.0
      yv = int'($urandom_range(65535)) - 32768;  // -2.0 .. 2.0
      if (n == 0) yv = 0;
      in_valid <= 1'b1;
      x_in     <= data_t'(xv);
      y_in     <= data_t'(yv);
      @(posedge clk);
      #1;
      one_check(2, xv, yv, v2, d2, x2, y2);
      one_check(3, xv, yv, v3, d3, x3, y3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
