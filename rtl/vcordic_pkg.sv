// vcordic_pkg: types and elaboration-time functions shared by the vectoring
// CORDIC processor with an arithmetic-free angle (z) datapath.
//
// All widths follow from one parameter, the word length B (16 by default):
//   data in/out      B bits, two's complement, B-2 fractional bits
//                    (for B = 16: Q2.14, 1.0 = 16'h4000)
//   pipeline data    B+2 bits (two integer guard bits, this design's choice,
//                    so that the unscaled pi/4 pre-rotation and the gain of
//                    the classical stages cannot overflow)
//   internal angles  B+3 bits with B-1 fractional bits (the weight of the last
//                    stage, 2^-(B-1)), rounded to B-2 fractional bits at the
//                    output; phase output B+1 bits so that +-pi fits.
// Stage layout: the first scaling-free index is p = floor((B - 2.585) / 3),
// the classical stages are i = 2 .. p-1 and the scaling-free stages
// i = p .. B-1; for B = 16 that is 2 classical and 12 scaling-free stages.
//
// The functions below compute the constants at elaboration:
//   rom_word  - atan(2^-2) + sum_j (+-atan(2^-j)) over the other classical
//               stages, rounded to 2^-(B-1)
//   conv_gain - product of sqrt(1 + 2^-2i) over the classical stages
//               (1.038798 for B = 16)
//   to_fixed  - round(value * 2^fb)
package vcordic_pkg;

  // Region of the first-quadrant angle theta
  typedef enum logic [1:0] {
    DOM_LOW  = 2'd0,   // theta in [0, pi/8]        : passed unchanged
    DOM_MID  = 2'd1,   // theta in (pi/8, 3pi/8]    : pre-rotated by -pi/4
    DOM_HIGH = 2'd2    // theta in (3pi/8, pi/2]    : x and y swapped
  } domain_e;

  // Token travelling with each sample: quad = {x < 0, y < 0} of the input
  typedef struct packed {
    logic [1:0] quad;
    domain_e    domain;
  } token_t;

  localparam real M_PI = 3.14159265358979323846;

  // tan(pi/8) = 0.41421 approximated by 2^-2 + 2^-3 + 2^-5 = 0.40625 for the
  // domain comparators (shift amounts)
  localparam int TAN8_SH0 = 2;
  localparam int TAN8_SH1 = 3;
  localparam int TAN8_SH2 = 5;

  // first scaling-free index p = floor((b - 2.585) / 3)
  function automatic int sf_first(input int b);
    return (1000 * b - 2585) / 3000;
  endfunction

  function automatic longint to_fixed(input real v, input int fb);
    return longint'(v * (2.0 ** fb));
  endfunction

  // gain of the classical stages i = 2 .. p-1
  function automatic real conv_gain(input int b);
    real k;
    k = 1.0;
    for (int i = 2; i < sf_first(b); i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return k;
  endfunction

  // ROM word for address addr: bit (p-2-j) of addr, for classical stage
  // j = 3 .. p-1, is 1 when stage j turned opposite to stage 2.
  function automatic longint rom_word(input int b, input int addr);
    int  p;
    real w;
    p = sf_first(b);
    w = $atan(0.25);
    for (int j = 3; j < p; j++) begin
      if (((addr >> (p - 1 - j)) & 1) != 0) w = w - $atan(2.0 ** (-j));
      else                                  w = w + $atan(2.0 ** (-j));
    end
    return to_fixed(w, b - 1);
  endfunction

endpackage
