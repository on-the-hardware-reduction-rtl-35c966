// sf_stage: one scaling-free vectoring micro-rotation by the angle 2^-i rad,
// used for i = p .. B-1 (4 .. 15 for the default B = 16).
//
// sin(2^-i) and cos(2^-i) are replaced by their Taylor forms 2^-i and
// 1 - 2^-(2i+1), which keeps the vector length constant to within 2^-(4i+2):
//   dir = ~y[MSB]  (1: y >= 0, rotate clockwise, angle +2^-i)
//   x' = x - x*2^-(2i+1) + dir_sign * y*2^-i
//   y' = y - y*2^-(2i+1) - dir_sign * x*2^-i
// This needs four adder/subtractors. For i >= B/2 the 2^-(2i+1) term falls
// below the word and is dropped, leaving two adder/subtractors, as in a
// classical stage. Because every stage turns by an exact power of two, the
// direction bits of the scaling-free stages directly form the accumulated angle
// (see output_unit); no angle constant or z adder is needed.
//
// The equations, the adder counts and the i >= B/2 simplification follow the
// specification; the register, valid flag and reset are this design's own
// choices.
//
// Timing: one register stage; outputs appear one clock after the inputs.
module sf_stage #(
  parameter int B     = 16,           // word length
  parameter int SHIFT = 4             // elementary index i
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B+1:0] x_in,
  input  logic signed [B+1:0] y_in,
  output logic                out_valid,
  output logic signed [B+1:0] x_out,
  output logic signed [B+1:0] y_out,
  output logic                dir_out
);

  localparam int IW = B + 2;          // data word with two guard bits
  typedef logic signed [IW-1:0] data_t;

  localparam bit FOUR_ADDER = (SHIFT < B / 2);
  localparam int SQ_SHIFT   = 2 * SHIFT + 1;

  logic  dir;
  data_t xc, yc, xs, ys, xn, yn;

  always_comb begin
    dir = ~y_in[IW-1];
    // cosine part: x*(1 - 2^-(2i+1))
    if (FOUR_ADDER) begin
      xc = x_in - (x_in >>> SQ_SHIFT);
      yc = y_in - (y_in >>> SQ_SHIFT);
    end else begin
      xc = x_in;
      yc = y_in;
    end
    // sine part: 2^-i
    xs = y_in >>> SHIFT;
    ys = x_in >>> SHIFT;
    xn = dir ? (xc + xs) : (xc - xs);
    yn = dir ? (yc - ys) : (yc + ys);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
      dir_out   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      x_out     <= xn;
      y_out     <= yn;
      dir_out   <= dir;
    end
  end

endmodule
