// output_unit: turns the direction bits of one sample into its phase angle.
//
// 1. Scaling-free part. With direction bits b_p .. b_(B-1) (1 = +2^-i,
//    0 = -2^-i; b4 .. b15 for B = 16), the angle sum(+-2^-i) equals the bit
//    pattern rotated cyclically by one place, so that b_p moves to the
//    2^-(B-1) position, read as a number whose sign is the inverse of b_p:
//      angle_sf = {~b_p (sign), b_(p+1) .. b_(B-1), b_p}  in ones' complement
//               = {~b_p (sign), b_(p+1) .. b_(B-1), 1}    in two's complement.
//    No arithmetic is needed; it is wiring.
// 2. Classical part. angle_rom supplies the signed sum of the classical
//    stage angles; the first adder/subtractor adds or subtracts it.
// 3. Domain correction, second adder/subtractor: DOM_LOW: z,
//    DOM_MID: pi/4 + z, DOM_HIGH: pi/2 - z.
// 4. Quadrant restoration: quad {x<0, y<0} = 00: phi, 01: -phi,
//    10: pi - phi, 11: phi - pi. Result rounded from 2^-(B-1) to 2^-(B-2).
// Steps 1 to 3 follow the specification. The specification only describes
// adding or subtracting pi/4; the pi/2 - z form for swapped vectors and the
// quadrant step (a third adder/subtractor) are this design's own completion.
//
// Interface: dirs_in as produced by basic_pipeline (dirs_in[N_STAGES-1] =
// i=2 ... dirs_in[0] = i=B-1) and the sample's token; phase_out has B-2
// fractional bits and 3 integer bits (Q3.14 for B = 16), range (-pi, pi].
// Timing: one register stage at the output.
module output_unit
  import vcordic_pkg::*;
#(
  parameter int B        = 16,                   // word length
  parameter int N_CONV   = sf_first(B) - 2,
  parameter int N_SF     = B - sf_first(B),
  parameter int N_STAGES = N_CONV + N_SF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N_STAGES-1:0] dirs_in,
  input  token_t              token_in,
  output logic                out_valid,
  output logic signed [B:0]   phase_out
);

  localparam int ZF = B - 1;            // fractional bits of internal angles
  localparam int ZW = ZF + 4;           // internal angle word
  typedef logic signed [ZW-1:0] angle_t;

  localparam angle_t PI_4 = angle_t'(to_fixed(M_PI / 4.0, ZF));
  localparam angle_t PI_2 = angle_t'(to_fixed(M_PI / 2.0, ZF));
  localparam angle_t PI   = angle_t'(to_fixed(M_PI, ZF));

  logic       bp;
  angle_t     a_sf, rom_val, z, ref_ang, ph, ph_sum;
  logic       rom_sub;

  angle_rom #(.B(B), .N_CONV(N_CONV)) u_rom (
    .dirs(dirs_in[N_STAGES-1 -: N_CONV]),
    .word(rom_val),
    .sub (rom_sub)
  );

  always_comb begin
    // cyclic shift of the scaling-free bits into an angle
    bp   = dirs_in[N_SF-1];
    a_sf = angle_t'(signed'({~bp, dirs_in[N_SF-2:0], 1'b1}));

    // classical-stage angle from the ROM
    z = rom_sub ? (a_sf - rom_val) : (a_sf + rom_val);

    // domain correction
    unique case (token_in.domain)
      DOM_MID:  ref_ang = PI_4 + z;
      DOM_HIGH: ref_ang = PI_2 - z;
      default:  ref_ang = z;
    endcase

    // quadrant restoration
    unique case (token_in.quad)
      2'b01:   ph = -ref_ang;
      2'b10:   ph = PI - ref_ang;
      2'b11:   ph = ref_ang - PI;
      default: ph = ref_ang;
    endcase

    // round half up to B-2 fractional bits
    ph_sum = ph + angle_t'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phase_out <= '0;
    end else begin
      out_valid <= in_valid;
      phase_out <= ph_sum[B+1:1];
    end
  end

endmodule
