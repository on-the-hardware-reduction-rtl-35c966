// scaling_unit: scale-factor compensation of the magnitude output.
//
// The classical stages lengthen the vector by K = prod sqrt(1 + 2^-2i),
// i = 2 .. p-1 (1.038798 for B = 16); the scaling-free stages do not (to
// within 2^-(4p+2)). Vectors pre-rotated by -pi/4 in the domain unit
// (DOM_MID) are in addition sqrt(2) too long. The unit therefore multiplies
// the final x by 1/K and, for DOM_MID only, also by 1/sqrt(2).
//
// Both constants are realised by shift-and-add over the binary digits of the
// constant, rounded to B fractional bits: one shifted copy of x per '1'
// digit, summed. The 1/sqrt(2) section is bypassed by a multiplexer when the
// token says the vector was not pre-rotated. The data are widened by
// SCALE_GUARD fractional bits before shifting, and the result is truncated
// once at the end.
//
// The shift-and-add structure and the bypass multiplexer follow the
// specification. The specification gives the factor as 1.040201018; this
// design uses the gain its own stages actually have (1.038798), which the
// given number would miss by about 0.14 %. SCALE_GUARD, the truncation and
// the saturation to the output range are this design's choices.
//
// Interface: x_in is the pipeline's x (B+2 bits, B-2 fractional, non-negative);
// mag_out is an unsigned magnitude with B-2 fractional bits (unsigned Q2.14
// for B = 16, range [0, 4)). Timing: one register stage.
module scaling_unit
  import vcordic_pkg::*;
#(
  parameter int B           = 16,     // word length
  parameter int SCALE_GUARD = 2       // extra fractional bits while scaling
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B+1:0] x_in,
  input  domain_e             domain_in,
  output logic                out_valid,
  output logic [B-1:0]        mag_out
);

  localparam int SW = B + 2 + SCALE_GUARD;
  typedef logic signed [SW-1:0] wide_t;

  // constants with B fractional bits
  localparam logic [B-1:0] C_SCALE  = B'(to_fixed(1.0 / conv_gain(B), B));
  localparam logic [B-1:0] C_ISQRT2 = B'(to_fixed(1.0 / $sqrt(2.0), B));

  wide_t xe, p1, p2, p3, res;
  logic [B-1:0] mag;

  always_comb begin
    xe = wide_t'(x_in) <<< SCALE_GUARD;

    // x * 1/K
    p1 = '0;
    for (int k = 1; k <= B; k++) begin
      if (C_SCALE[B-k]) p1 = p1 + (xe >>> k);
    end

    // optional x * 1/sqrt(2), bypassed unless pre-rotated
    p2 = '0;
    for (int k = 1; k <= B; k++) begin
      if (C_ISQRT2[B-k]) p2 = p2 + (p1 >>> k);
    end
    p3 = (domain_in == DOM_MID) ? p2 : p1;

    res = p3 >>> SCALE_GUARD;
    if (res < 0)                       mag = '0;
    else if (res > wide_t'({B{1'b1}})) mag = '1;
    else                               mag = res[B-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag_out   <= '0;
    end else begin
      out_valid <= in_valid;
      mag_out   <= mag;
    end
  end

endmodule
