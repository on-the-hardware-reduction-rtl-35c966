// vcordic_top: pipelined vectoring CORDIC processor (16-bit by default) that computes the
// magnitude and phase of a vector (x, y) without any arithmetic on the angle
// (z) side of the rotation pipeline.
//
// Structure (left to right):
//   domain_fold    - quadrant and domain folding of (x, y) into [-pi/8, pi/8];
//                    produces the token {quad, domain}.
//   basic_pipeline - classical stages i = 2 .. p-1 and scaling-free stages
//                    i = p .. B-1, p = floor((B - 2.585) / 3) (2 + 12 stages
//                    for B = 16); records one direction bit per stage.
//   output_unit    - rebuilds the angle from the direction bits (cyclic shift
//                    of the scaling-free bits, ROM for the classical bits),
//                    then corrects for domain and quadrant.
//   scaling_unit   - removes the classical-stage gain and, for pre-rotated
//                    vectors, the sqrt(2) of the pre-rotation.
// The unit split follows the specification; the valid handshake, reset and
// the full-circle phase output are this design's own choices.
//
// Interface: x_in, y_in are B-bit two's complement with B-2 fractional bits
// (Q2.14 for B = 16, 1.0 = 16'h4000). mag_out is unsigned with B-2
// fractional bits, phase_out is B+1 bits signed with B-2 fractional bits
// (Q3.14 radians for B = 16), in (-pi, pi]. in_valid/out_valid mark samples;
// there is no back-pressure. B from 16 to 32 has been simulated.
// Timing: one sample per clock, latency B clocks (1 domain + B-2 pipeline +
// 1 output; 16 for B = 16). Synchronous active-low reset.
module vcordic_top
  import vcordic_pkg::*;
#(
  parameter int B = 16                  // word length
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B-1:0] x_in,
  input  logic signed [B-1:0] y_in,
  output logic                out_valid,
  output logic [B-1:0]        mag_out,
  output logic signed [B:0]   phase_out
);

  localparam int N_CONV   = sf_first(B) - 2;
  localparam int N_SF     = B - sf_first(B);
  localparam int N_STAGES = N_CONV + N_SF;

  // the stage layout needs at least two classical stages
  if (N_CONV < 2) begin : g_bad_width
    $error("vcordic_top: word length B must be at least 16");
  end

  logic                dom_valid, pipe_valid, ang_valid, mag_valid;
  logic signed [B+1:0] dom_x, dom_y, pipe_x, pipe_y;
  token_t              dom_tok, pipe_tok;
  logic [N_STAGES-1:0] pipe_dirs;

  domain_fold #(.B(B)) u_domain (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (x_in),
    .y_in     (y_in),
    .out_valid(dom_valid),
    .x_out    (dom_x),
    .y_out    (dom_y),
    .token_out(dom_tok)
  );

  basic_pipeline #(.B(B), .N_CONV(N_CONV), .N_SF(N_SF)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (dom_valid),
    .x_in     (dom_x),
    .y_in     (dom_y),
    .token_in (dom_tok),
    .out_valid(pipe_valid),
    .x_out    (pipe_x),
    .y_out    (pipe_y),
    .dirs_out (pipe_dirs),
    .token_out(pipe_tok)
  );

  output_unit #(.B(B), .N_CONV(N_CONV), .N_SF(N_SF)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pipe_valid),
    .dirs_in  (pipe_dirs),
    .token_in (pipe_tok),
    .out_valid(ang_valid),
    .phase_out(phase_out)
  );

  scaling_unit #(.B(B)) u_scale (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pipe_valid),
    .x_in     (pipe_x),
    .domain_in(pipe_tok.domain),
    .out_valid(mag_valid),
    .mag_out  (mag_out)
  );

  // the residual y is not needed once the direction bits are taken
  logic unused_y;
  assign unused_y  = ^pipe_y;
  assign out_valid = ang_valid & mag_valid;

endmodule
