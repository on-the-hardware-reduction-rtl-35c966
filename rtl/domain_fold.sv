// domain_fold: input "Domain" unit of the vectoring CORDIC.
//
// Maps an arbitrary input vector (x, y) onto a vector whose angle lies in
// [-pi/8, pi/8], the range the basic pipeline converges over, and records how
// it did so in a token that travels with the sample:
//   * quadrant folding: x and y are replaced by |x| and |y|; quad = {x<0, y<0}.
//   * domain folding of the first-quadrant angle theta, decided by two
//     comparators against tan(pi/8):
//       DOM_HIGH (theta > 3pi/8, |x| < |y| tan(pi/8)): x and y are swapped,
//                the pipeline then sees pi/2 - theta.
//       DOM_MID  (theta > pi/8,  |y| > |x| tan(pi/8)): pre-rotation by -pi/4
//                done with two adder/subtractors, x' = x + y, y' = y - x.
//                The 1/sqrt(2) gain correction is left to the scaling unit.
//       DOM_LOW  otherwise: unchanged.
// The comparators use tan(pi/8) ~ 2^-2 + 2^-3 + 2^-5 (0.40625, this design's
// choice); the boundary error of about 0.007 rad is far inside the pipeline's
// convergence margin (about 0.49 rad against the 0.39 rad needed).
// The folding rule and the two tokens follow the specification; the
// quadrant encoding, the comparator constant and the register are this
// design's own choices.
//
// Interface: B-bit inputs with B-2 fractional bits, (B+2)-bit outputs.
// Timing: one register stage, in_valid -> out_valid after one clock.
// Synchronous active-low reset clears the valid flag and the registers.
module domain_fold
  import vcordic_pkg::*;
#(
  parameter int B = 16                  // word length
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [B-1:0]   x_in,
  input  logic signed [B-1:0]   y_in,
  output logic                  out_valid,
  output logic signed [B+1:0]   x_out,
  output logic signed [B+1:0]   y_out,
  output token_t                token_out
);

  localparam int IW = B + 2;
  typedef logic signed [IW-1:0] data_t;

  data_t   xe, ye, ax, ay, tx, ty;
  logic    high, mid;
  data_t   xf, yf;
  token_t  tok;

  always_comb begin
    xe = data_t'(x_in);
    ye = data_t'(y_in);
    ax = xe[IW-1] ? -xe : xe;
    ay = ye[IW-1] ? -ye : ye;
    // |v| * tan(pi/8), shift-and-add
    tx = (ax >>> TAN8_SH0) + (ax >>> TAN8_SH1) + (ax >>> TAN8_SH2);
    ty = (ay >>> TAN8_SH0) + (ay >>> TAN8_SH1) + (ay >>> TAN8_SH2);
    high = ax < ty;
    mid  = !high && (ay > tx);

    tok.quad = {xe[IW-1], ye[IW-1]};
    if (high) begin
      tok.domain = DOM_HIGH;
      xf = ay;
      yf = ax;
    end else if (mid) begin
      tok.domain = DOM_MID;
      xf = ax + ay;
      yf = ay - ax;
    end else begin
      tok.domain = DOM_LOW;
      xf = ax;
      yf = ay;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
      token_out <= '0;
    end else begin
      out_valid <= in_valid;
      x_out     <= xf;
      y_out     <= yf;
      token_out <= tok;
    end
  end

endmodule
