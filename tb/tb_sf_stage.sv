// tb_sf_stage: self-checking test of the scaling-free micro-rotation stage.
//
// Instances for i = 4 and 7 (four adder/subtractors) and i = 8 and 15 (two
// adder/subtractors). For random vectors the test checks, one clock later,
// that the direction bit equals (y >= 0) and that the output is the input
// turned by exactly -+2^-i rad with its length unchanged, computed with real
// cos/sin, to within 2 LSB of truncation plus |v| * 2^-3i / 3 for the
// Taylor approximation of sin (about 3 LSB for i = 4 at full scale).
module tb_sf_stage;
  import vcordic_pkg::*;

  localparam int B = 16;
  typedef logic signed [B+1:0] data_t;

  localparam int NI = 4;
  localparam int SH [NI] = '{4, 7, 8, 15};

  logic  clk = 1'b0;
  logic  rst_n, in_valid;
  data_t x_in, y_in;
  logic  vo [NI];
  logic  dd [NI];
  data_t xo [NI];
  data_t yo [NI];

  int checks = 0, failures = 0;

  for (genvar g = 0; g < NI; g++) begin : g_dut
    sf_stage #(.B(B), .SHIFT(SH[g])) dut (.clk, .rst_n, .in_valid, .x_in, .y_in,
                                   .out_valid(vo[g]), .x_out(xo[g]), .y_out(yo[g]),
                                   .dir_out(dd[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  xv, yv;
    real a, xr, yr, tol;
    logic ed;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; y_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      xv = int'($urandom_range(65535));          // 0 .. 4.0
      yv = int'($urandom_range(16383)) - 8192;   // -0.5 .. 0.5
      in_valid <= 1'b1;
      x_in     <= data_t'(xv);
      y_in     <= data_t'(yv);
      @(posedge clk);
      #1;
      ed = (yv >= 0);
      for (int g = 0; g < NI; g++) begin
        a  = 1.0 / real'(1 << SH[g]);
        if (ed) a = -a;
        xr = real'(xv) * $cos(a) - real'(yv) * $sin(a);
        yr = real'(xv) * $sin(a) + real'(yv) * $cos(a);
        tol = 2.0 + $sqrt(real'(xv) * real'(xv) + real'(yv) * real'(yv))
                    / (3.0 * (2.0 ** (3 * SH[g])));
        checks++;
        if (!vo[g] || dd[g] != ed ||
            (xr - real'(xo[g])) > tol || (real'(xo[g]) - xr) > tol ||
            (yr - real'(yo[g])) > tol || (real'(yo[g]) - yr) > tol) begin
          failures++;
          if (failures < 10)
            $display("i=%0d x=%0d y=%0d: got (%0d,%0d,d=%0b) expected (%f,%f,d=%0b)",
                     SH[g], xv, yv, xo[g], yo[g], dd[g], xr, yr, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
