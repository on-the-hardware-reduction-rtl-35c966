// angle_rom: angle ROM and address decoder for the classical stages.
//
// The classical stages i = 2 .. p-1 turn by atan(2^-i), which are not powers
// of two, so their contribution to the angle cannot be read off the direction
// bits. With K = p-2 classical stages there are 2^K sign combinations, but
// flipping every sign only negates the sum, so 2^(K-1) words suffice: word
// addr holds atan(2^-2) + sum_j (+-atan(2^-j)), j = 3 .. p-1, where the sign
// of stage j is minus when its address bit is 1. For the default B = 16
// (K = 2) the ROM holds two words:
//   ROM[0] = atan(2^-2) + atan(2^-3) = 0.369334
//   ROM[1] = atan(2^-2) - atan(2^-3) = 0.120624
// The decoder forms each address bit as (d2 xor d_j), i.e. "stage j turned
// opposite to stage 2", and tells the output adder/subtractor to subtract the
// word when stage 2 itself turned the negative way (d2 = 0).
//
// Direction bits: 1 = the stage added +alpha_i. Words are at 2^-(B-1)
// resolution, in the output unit's angle format, rounded to nearest and
// computed at elaboration with $atan.
// The stored words, the 2^(K-1) symmetry and the decoder follow the
// specification; the bit-to-word mapping follows from the chosen
// direction-bit convention.
//
// Timing: combinational.
module angle_rom
  import vcordic_pkg::*;
#(
  parameter int B      = 16,                  // word length
  parameter int N_CONV = sf_first(B) - 2      // classical stages K
) (
  input  logic [N_CONV-1:0]   dirs,   // classical direction bits, [N_CONV-1] = i=2
  output logic signed [B+2:0] word,   // selected magnitude, 2^-(B-1) units
  output logic                sub     // 1: subtract word, 0: add word
);

  localparam int NW = 1 << (N_CONV - 1);
  localparam int AW = (N_CONV > 1) ? N_CONV - 1 : 1;

  logic signed [B+2:0] rom [NW];
  for (genvar w = 0; w < NW; w++) begin : g_word
    assign rom[w] = (B + 3)'(rom_word(B, w));
  end

  logic          d2;
  logic [AW-1:0] addr;

  always_comb begin
    d2   = dirs[N_CONV-1];
    addr = '0;
    for (int j = 0; j < N_CONV - 1; j++) addr[j] = d2 ^ dirs[j];
    word = rom[addr];
    sub  = ~d2;
  end

endmodule
