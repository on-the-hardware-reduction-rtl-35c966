// basic_pipeline: the rotation pipeline of the vectoring CORDIC.
//
// The first N_CONV stages are classical micro-rotations (i = 2 .. p-1), the
// remaining N_SF stages scaling-free micro-rotations (i = p .. B-1), with
// p = floor((B - 2.585) / 3). For the default B = 16 this is 2 + 12 = 14
// stages. Each stage drives y towards zero and produces one direction bit.
// These bits, together with the sample's token (quadrant and domain), travel
// alongside the data in a triangular array of one-bit registers: behind stage
// k sit k+1 direction bits, so that all bits of one sample reach the end of
// the pipeline in the same clock as its x and y. Nothing is computed on the
// angle side; the output unit turns the bits into an angle.
//
// dirs_out ordering: dirs_out[N_STAGES-1] = stage i=2, ..., dirs_out[0] =
// stage i=B-1 (1 = angle +alpha_i). x_out is the (unscaled) magnitude times
// the classical-stage gain; y_out is the residual, close to zero.
//
// The stage order and count, the triangular bit registers and the token
// follow the specification; the valid flag and reset are this design's own.
//
// Timing: fully pipelined, one sample per clock, latency N_STAGES clocks
// (14 for B = 16).
module basic_pipeline
  import vcordic_pkg::*;
#(
  parameter int B        = 16,                   // word length
  parameter int N_CONV   = sf_first(B) - 2,      // classical stages
  parameter int N_SF     = B - sf_first(B),      // scaling-free stages
  parameter int N_STAGES = N_CONV + N_SF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B+1:0] x_in,
  input  logic signed [B+1:0] y_in,
  input  token_t              token_in,
  output logic                out_valid,
  output logic signed [B+1:0] x_out,
  output logic signed [B+1:0] y_out,
  output logic [N_STAGES-1:0] dirs_out,
  output token_t              token_out
);

  typedef logic signed [B+1:0] data_t;

  logic   v   [N_STAGES+1];
  data_t  xs  [N_STAGES+1];
  data_t  ys  [N_STAGES+1];
  logic   d   [N_STAGES];
  token_t tok [N_STAGES+1];

  assign v[0]   = in_valid;
  assign xs[0]  = x_in;
  assign ys[0]  = y_in;
  assign tok[0] = token_in;

  for (genvar k = 0; k < N_STAGES; k++) begin : g_stage
    if (k < N_CONV) begin : g_conv
      conv_stage #(.B(B), .SHIFT(2 + k)) u_stage (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (v[k]),
        .x_in     (xs[k]),
        .y_in     (ys[k]),
        .out_valid(v[k+1]),
        .x_out    (xs[k+1]),
        .y_out    (ys[k+1]),
        .dir_out  (d[k])
      );
    end else begin : g_sf
      sf_stage #(.B(B), .SHIFT(2 + k)) u_stage (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (v[k]),
        .x_in     (xs[k]),
        .y_in     (ys[k]),
        .out_valid(v[k+1]),
        .x_out    (xs[k+1]),
        .y_out    (ys[k+1]),
        .dir_out  (d[k])
      );
    end

    // Triangular direction-bit array: behind stage k, bits of stages 0..k.
    // bits[k] is the stage's own (already registered) bit; the older bits are
    // delayed by one register to stay aligned with the data.
    logic [k:0] bits;
    assign bits[k] = d[k];
    if (k > 0) begin : g_tri
      logic [k-1:0] older_q;
      always_ff @(posedge clk) begin
        if (!rst_n) older_q <= '0;
        else        older_q <= g_stage[k-1].bits;
      end
      assign bits[k-1:0] = older_q;
    end

    // Token register, aligned with the data
    always_ff @(posedge clk) begin
      if (!rst_n) tok[k+1] <= '0;
      else        tok[k+1] <= tok[k];
    end
  end

  // bits of stage k land at position N_STAGES-1-k (stage i=2 is the MSB)
  always_comb begin
    for (int k = 0; k < N_STAGES; k++) begin
      dirs_out[N_STAGES-1-k] = g_stage[N_STAGES-1].bits[k];
    end
  end

  assign out_valid = v[N_STAGES];
  assign x_out     = xs[N_STAGES];
  assign y_out     = ys[N_STAGES];
  assign token_out = tok[N_STAGES];

endmodule
