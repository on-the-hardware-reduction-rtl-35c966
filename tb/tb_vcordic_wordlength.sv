// tb_vcordic_wordlength: runs the processor at the word lengths 20, 24, 28
// and 32 bits side by side (the default 16 is covered by tb_vcordic_top).
// Each lane (wl_lane) derives the stage layout from B, streams random vectors
// and checks magnitude, phase, latency and domain coverage against real
// arithmetic. The word length changes the number of classical stages
// (3, 5, 6, 7) and with it the ROM size (4, 16, 32, 64 words).
module tb_vcordic_wordlength;

  localparam int NL = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [NL];
  int   chk [NL];
  int   fail [NL];

  always #5 clk = ~clk;

  wl_lane #(.B(20)) u20 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  wl_lane #(.B(24)) u24 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  wl_lane #(.B(28)) u28 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  wl_lane #(.B(32)) u32 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  int checks, failures;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0;
    failures = 0;
    for (int l = 0; l < NL; l++) begin
      checks += chk[l];
      failures += fail[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
