// tb_basic_pipeline: self-checking test of the 14-stage rotation pipeline.
//
// Streams random vectors with angles in [-0.39, 0.39] rad and lengths from
// 0.25 to 3.9, with random bubbles in in_valid and random tokens. For every
// output sample it checks:
//   * the sample arrives exactly 14 clocks after it entered, with its token;
//   * y has been driven to within 16 LSB of zero;
//   * x equals K_CONV * |v| (K_CONV = sqrt(1+2^-4) sqrt(1+2^-6)) within 0.1 %
//     plus 16 LSB;
//   * the angle rebuilt in real arithmetic from the direction bits,
//     sum(+-atan 2^-i, i=2,3) + sum(+-2^-i, i=4..15), equals atan2(y, x)
//     within 2^-11 rad plus 8 LSB divided by |v|.
module tb_basic_pipeline;
  import vcordic_pkg::*;

  localparam int B        = 16;
  localparam int N_CONV   = 2;
  localparam int N_STAGES = 14;
  typedef logic signed [B+1:0] data_t;

  localparam int LATENCY = 14;
  localparam int NS      = 5000;

  logic                clk = 1'b0;
  logic                rst_n, in_valid, out_valid;
  data_t               x_in, y_in, x_out, y_out;
  token_t              token_in, token_out;
  logic [N_STAGES-1:0] dirs_out;

  int checks = 0, failures = 0;

  basic_pipeline dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     cycle = 0;
  data_t  qx [$];
  data_t  qy [$];
  token_t qk [$];
  int     qt [$];
  int     nout = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic data_t  ex = qx.pop_front();
      automatic data_t  ey = qy.pop_front();
      automatic token_t ek = qk.pop_front();
      automatic int     t0 = qt.pop_front();
      automatic real    m, th, ang, k, e;
      nout++;
      checks++;
      if (cycle - t0 - 1 != LATENCY || token_out != ek) begin
        failures++;
        $display("latency %0d or token mismatch", cycle - t0 - 1);
      end
      m  = $sqrt(real'(ex) * real'(ex) + real'(ey) * real'(ey));
      th = $atan2(real'(ey), real'(ex));
      k  = $sqrt(1.0 + 1.0 / 16.0) * $sqrt(1.0 + 1.0 / 64.0);
      ang = 0.0;
      for (int s = 0; s < N_STAGES; s++) begin
        automatic real a = (s < N_CONV) ? $atan(1.0 / real'(1 << (s + 2)))
                                        : 1.0 / real'(1 << (s + 2));
        ang += dirs_out[N_STAGES-1-s] ? a : -a;
      end
      checks++;
      if (y_out > 16 || y_out < -16) begin
        failures++;
        $display("residual y %0d", y_out);
      end
      checks++;
      e = real'(x_out) - k * m;
      if (e < 0) e = -e;
      if (e > 16.0 + 0.001 * k * m) begin
        failures++;
        $display("x %0d expected %f", x_out, k * m);
      end
      checks++;
      e = ang - th;
      if (e < 0) e = -e;
      if (e > 1.0 / 2048.0 + 8.0 / m) begin
        failures++;
        $display("angle from bits %f expected %f", ang, th);
      end
    end
  end

  initial begin
    real m, th;
    token_t tk;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; y_in = '0; token_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      if ($urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      m  = 4096.0 + real'($urandom_range(59000));
      th = (real'($urandom_range(20000)) / 10000.0 - 1.0) * 0.39;
      in_valid <= 1'b1;
      x_in     <= data_t'(int'(m * $cos(th)));
      y_in     <= data_t'(int'(m * $sin(th)));
      tk = token_t'($urandom_range(15));
      token_in <= tk;
      qx.push_back(data_t'(int'(m * $cos(th))));
      qy.push_back(data_t'(int'(m * $sin(th))));
      qk.push_back(tk);
      qt.push_back(cycle);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin
      failures++;
      $display("%0d outputs for %0d inputs", nout, NS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
