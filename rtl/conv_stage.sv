// conv_stage: one classical (conventional) vectoring CORDIC micro-rotation,
// used for i = 2 .. p-1 in front of the scaling-free stages (i = 2 and 3
// for the default B = 16).
//
// The direction is taken from the sign of the incoming y: dir = ~y[MSB].
//   dir = 1 (y >= 0): x' = x + y*2^-i, y' = y - x*2^-i  (clockwise, angle +atan(2^-i))
//   dir = 0 (y <  0): x' = x - y*2^-i, y' = y + x*2^-i  (counter-clockwise, -atan(2^-i))
// Two adder/subtractors; the shifts are arithmetic and truncate. The stage
// gain sqrt(1 + 2^-2i) is compensated by the scaling unit. dir is passed on so
// that the angle can be rebuilt from the direction bits alone (no z adder,
// no per-stage angle constant).
//
// The rotation equations and the use of the inverted sign bit as the
// direction signal follow the specification; the register, valid flag and
// reset are this design's own choices.
//
// Timing: one register stage; outputs appear one clock after the inputs.
module conv_stage #(
  parameter int B     = 16,           // word length
  parameter int SHIFT = 2             // elementary index i
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

  logic  dir;
  data_t xs, ys, xn, yn;

  always_comb begin
    dir = ~y_in[IW-1];
    xs  = y_in >>> SHIFT;
    ys  = x_in >>> SHIFT;
    xn  = dir ? (x_in + xs) : (x_in - xs);
    yn  = dir ? (y_in - ys) : (y_in + ys);
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
