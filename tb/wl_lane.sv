// wl_lane: test lane used by tb_vcordic_wordlength. Instantiates one
// vcordic_top of word length B, streams N random vectors over the whole input
// plane (one per clock) and compares each result with real-valued $sqrt and
// $atan2:
//   magnitude within MAG_TOL LSB plus 2^-(B-2) relative times 0.001 * 2^(16-B)
//   phase within 2^-(B-6) rad plus 8 LSB divided by the magnitude.
// It also checks the latency of B clocks and that every domain occurred.
// Reports its counts through ports when done.
module wl_lane #(
  parameter int B       = 20,
  parameter int N       = 4000,
  parameter int MAG_TOL = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import vcordic_pkg::*;

  localparam int  LATENCY = B;
  localparam real LSB     = 1.0 / (2.0 ** (B - 2));

  logic                in_valid = 1'b0;
  logic signed [B-1:0] x_in = '0, y_in = '0;
  logic                out_valid;
  logic [B-1:0]        mag_out;
  logic signed [B:0]   phase_out;

  vcordic_top #(.B(B)) dut (.*);

  logic signed [B-1:0] qx [$];
  logic signed [B-1:0] qy [$];
  int                  qt [$];
  int cycle = 0, nres = 0;
  int cnt_dom [3];
  real max_em = 0.0, max_ep = 0.0;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && dut.dom_valid && dut.dom_tok.domain <= DOM_HIGH)
      cnt_dom[dut.dom_tok.domain]++;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic logic signed [B-1:0] sx = qx.pop_front();
      automatic logic signed [B-1:0] sy = qy.pop_front();
      automatic int t0 = qt.pop_front();
      automatic real xr, yr, mr, pr, em, ep;
      xr = real'(sx) * LSB;
      yr = real'(sy) * LSB;
      mr = $sqrt(xr * xr + yr * yr);
      pr = $atan2(yr, xr);
      em = real'(mag_out) * LSB - mr;
      ep = real'(phase_out) * LSB - pr;
      if (ep >  3.14159265) ep = ep - 6.28318531;
      if (ep < -3.14159265) ep = ep + 6.28318531;
      if (em < 0) em = -em;
      if (ep < 0) ep = -ep;
      if (mr == 0.0) ep = 0.0;
      checks++;
      if (cycle - t0 - 1 != LATENCY) begin
        failures++;
        $display("B=%0d latency %0d", B, cycle - t0 - 1);
      end
      checks++;
      if (em > MAG_TOL * LSB + mr * 0.001 * (2.0 ** (16 - B)) ||
          ep > (2.0 ** -(B - 6)) + 8.0 * LSB / mr) begin
        failures++;
        if (failures < 6)
          $display("B=%0d x=%e y=%e mag %e (ref %e) phase %e (ref %e)",
                   B, xr, yr, real'(mag_out) * LSB, mr, real'(phase_out) * LSB, pr);
      end
      if (em > max_em) max_em = em;
      if (mr > 0.25 && ep > max_ep) max_ep = ep;
      nres++;
    end
  end

  initial begin
    logic signed [B-1:0] xv, yv;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    for (int n = 0; n < N; n++) begin
      xv = B'({$urandom, $urandom});
      yv = B'({$urandom, $urandom});
      in_valid <= 1'b1;
      x_in     <= xv;
      y_in     <= yv;
      qx.push_back(xv);
      qy.push_back(yv);
      qt.push_back(cycle);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 4) @(posedge clk);
    checks++;
    if (nres != N) begin
      failures++;
      $display("B=%0d: %0d results for %0d vectors", B, nres, N);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (cnt_dom[k] == 0) begin
        failures++;
        $display("B=%0d: domain %0d never used", B, k);
      end
    end
    $display("B=%0d: %0d stages (%0d classical), max |mag err| %0.2f LSB, max |phase err| (|v|>1/4) %e rad",
             B, B - 2, sf_first(B) - 2, max_em / LSB, max_ep);
    done = 1'b1;
  end

endmodule
