// tb_vcordic_top: end-to-end test of the vectoring CORDIC processor at its
// default (16-bit) configuration.
//
// Drives one sample per clock:
//   * a 200 x 200 grid of vectors with x, y in (0, 1], the accuracy sweep the
//     processor is characterised with (40,000 vectors);
//   * random vectors over the whole Q2.14 input plane (all four quadrants);
//   * axis and corner cases.
// Each result is compared with $sqrt / $atan2 computed in real arithmetic.
// Tolerances: magnitude within 2^-10 absolute (16 LSB) plus 0.1 %;
// phase within 2^-10 rad plus 8 LSB of residual y divided by the magnitude
// (the truncation noise of the 14 stages, 14 fractional bits, turns into an
// angle error that grows as the vector gets shorter). Checks the 16-clock latency and the one-sample-per-
// clock rate, and counts that every domain, quadrant and ROM add/subtract
// case occurred. Reports max and RMS errors.
module tb_vcordic_top;
  import vcordic_pkg::*;

  localparam int DW      = 16;
  localparam int PW      = DW + 1;
  localparam int LATENCY = 16;
  localparam int NGRID   = 200;
  localparam int NRAND   = 20000;
  localparam int NTOTAL  = NGRID * NGRID + NRAND + 8;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  logic signed [DW-1:0] x_in, y_in;
  logic                 out_valid;
  logic [DW-1:0]        mag_out;
  logic signed [PW-1:0] phase_out;

  int checks = 0, failures = 0;

  vcordic_top dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (NTOTAL + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus queues
  logic signed [DW-1:0] qx [$];
  logic signed [DW-1:0] qy [$];
  int                   qt [$];     // issue cycle

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int cnt_dom [3];
  int cnt_quad [4];
  int cnt_rom_add = 0, cnt_rom_sub = 0, cnt_rom_sum = 0, cnt_rom_diff = 0;

  always @(posedge clk) begin
    if (rst_n && dut.dom_valid) begin
      if (dut.dom_tok.domain <= DOM_HIGH) cnt_dom[dut.dom_tok.domain]++;
      cnt_quad[dut.dom_tok.quad]++;
    end
    if (rst_n && dut.pipe_valid) begin
      if (dut.u_out.rom_sub) cnt_rom_sub++; else cnt_rom_add++;
      if (dut.u_out.u_rom.addr[0]) cnt_rom_diff++; else cnt_rom_sum++;
    end
  end

  real max_mag_err = 0.0, max_ph_err = 0.0, sum_mag2 = 0.0, sum_ph2 = 0.0;
  int  nres = 0;
  int  lat_seen = -1;
  int  gaps = 0;
  int  last_out_cycle = -1;

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic real xr, yr, m_ref, p_ref, m_got, p_got, em, ep, tol_m, tol_p;
      automatic logic signed [DW-1:0] sx, sy;
      automatic int t0;
      if (qx.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        sx = qx.pop_front();
        sy = qy.pop_front();
        t0 = qt.pop_front();
        if (lat_seen < 0) lat_seen = cycle - t0 - 1;
        else if (cycle - t0 - 1 != LATENCY) begin
          failures++;
          $display("latency %0d", cycle - t0 - 1);
        end
        if (last_out_cycle >= 0 && cycle != last_out_cycle + 1) gaps++;
        last_out_cycle = cycle;
        xr = real'(sx) / 16384.0;
        yr = real'(sy) / 16384.0;
        m_ref = $sqrt(xr * xr + yr * yr);
        p_ref = $atan2(yr, xr);
        m_got = real'(mag_out) / 16384.0;
        p_got = real'(phase_out) / 16384.0;
        em = m_got - m_ref;
        if (em < 0) em = -em;
        ep = p_got - p_ref;
        // the phase is defined modulo 2 pi; (-pi, pi] vs [-pi, pi) on the axis
        if (ep >  3.14159265) ep = ep - 6.28318531;
        if (ep < -3.14159265) ep = ep + 6.28318531;
        if (ep < 0) ep = -ep;
        tol_m = 1.0 / 1024.0 + 0.001 * m_ref;
        tol_p = 1.0 / 1024.0 + 8.0 / 16384.0 / m_ref;
        if (m_ref == 0.0) ep = 0.0;   // phase of the zero vector is undefined
        checks++;
        if (em > tol_m || ep > tol_p) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH x=%f y=%f mag=%f (ref %f) phase=%f (ref %f)",
                     xr, yr, m_got, m_ref, p_got, p_ref);
        end
        if (em > max_mag_err) max_mag_err = em;
        if (m_ref >= 0.0625 && ep > max_ph_err) max_ph_err = ep;
        sum_mag2 += em * em;
        sum_ph2  += ep * ep;
        nres++;
      end
    end
  end

  task automatic drive(input logic signed [DW-1:0] xv, input logic signed [DW-1:0] yv);
    in_valid <= 1'b1;
    x_in     <= xv;
    y_in     <= yv;
    qx.push_back(xv);
    qy.push_back(yv);
    qt.push_back(cycle);
    @(posedge clk);
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    y_in     = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // grid sweep, x and y from 1/200 to 1
    for (int i = 1; i <= NGRID; i++)
      for (int j = 1; j <= NGRID; j++)
        drive(DW'((i * 16384) / NGRID), DW'((j * 16384) / NGRID));
    // corners and axes
    drive(16'sh4000, 16'sh0000);
    drive(16'sh0000, 16'sh4000);
    drive(-16'sh4000, 16'sh0000);
    drive(16'sh0000, -16'sh4000);
    drive(16'sh7fff, 16'sh7fff);
    drive(-16'sh8000, -16'sh8000);
    drive(-16'sh8000, 16'sh7fff);
    drive(16'sh0000, 16'sh0000);
    // random over the whole plane
    for (int n = 0; n < NRAND; n++)
      drive(DW'($urandom), DW'($urandom));
    in_valid <= 1'b0;
    repeat (LATENCY + 4) @(posedge clk);

    checks++;
    if (lat_seen != LATENCY) begin
      failures++;
      $display("first-sample latency %0d, expected %0d", lat_seen, LATENCY);
    end
    checks++;
    if (gaps != 0 || nres != NTOTAL) begin
      failures++;
      $display("throughput: %0d results, %0d gaps", nres, gaps);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (cnt_dom[k] == 0) begin failures++; $display("domain %0d never used", k); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (cnt_quad[k] == 0) begin failures++; $display("quadrant %0d never used", k); end
    end
    checks += 4;
    if (cnt_rom_add == 0)  begin failures++; $display("ROM add never used"); end
    if (cnt_rom_sub == 0)  begin failures++; $display("ROM subtract never used"); end
    if (cnt_rom_sum == 0)  begin failures++; $display("ROM sum word never used"); end
    if (cnt_rom_diff == 0) begin failures++; $display("ROM difference word never used"); end

    $display("domains low/mid/high = %0d/%0d/%0d, quadrants = %0d/%0d/%0d/%0d",
             cnt_dom[0], cnt_dom[1], cnt_dom[2],
             cnt_quad[0], cnt_quad[1], cnt_quad[2], cnt_quad[3]);
    $display("ROM add/sub = %0d/%0d, sum/diff word = %0d/%0d",
             cnt_rom_add, cnt_rom_sub, cnt_rom_sum, cnt_rom_diff);
    $display("max |mag err| = %e (%0.2f LSB), rms = %e", max_mag_err,
             max_mag_err * 16384.0, $sqrt(sum_mag2 / nres));
    $display("max |phase err| (|v|>=1/16) = %e rad, rms = %e", max_ph_err,
             $sqrt(sum_ph2 / nres));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
