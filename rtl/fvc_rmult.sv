// Reconfigurable multiplier block of the FVC reconfigurable 1D datapath.
//
// Multiplies one transform input x (input column J of the 8-point or 4-point
// matrix) by the eight coefficients of that column for the selected transform
// type and TU size, using only adders, shifts and multiplexers.
//
// As in the published block there is a common part and a reconfigurable part.
// The common part forms the small odd multiples 3x, 5x and 7x once. The
// reconfigurable part builds each product from the coefficient magnitude
// written in radix 8, |c| = 64*d2 + 8*d1 + d0 (|c| <= 374), by selecting the
// multiple d*x for every digit, shifting and adding, then negating for a
// negative coefficient. The radix-8 split is this design's own choice; the
// published block uses a hand-optimised network with the multiples
// 1, 3, 5, 7, 11, 21. The coefficient selection by (type, size) is the
// reconfiguration. For two 4x4 TUs, column J uses the 4-point column J mod 4.
// Combinational.
module fvc_rmult
  import fvc_pkg::*;
#(
  parameter int IN_W = 16,
  parameter int J    = 0,
  parameter int P_W  = IN_W + COEF_W
) (
  input  tr_type_e                tr_type,
  input  tu_size_e                tu_size,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [P_W-1:0]   p [8]
);

  // Common part: multiples 0..7 of x.
  logic signed [P_W-1:0] m [8];
  always_comb begin
    logic signed [P_W-1:0] x1, x3, x5, x7;
    x1 = P_W'(x);
    x3 = x1 + (x1 <<< 1);
    x5 = x1 + (x1 <<< 2);
    x7 = (x1 <<< 3) - x1;
    m[0] = '0;
    m[1] = x1;
    m[2] = x1 <<< 1;
    m[3] = x3;
    m[4] = x1 <<< 2;
    m[5] = x5;
    m[6] = x3 <<< 1;
    m[7] = x7;
  end

  // Reconfigurable part: digit selection, shifts and two additions per output.
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      coef_t                 c;
      logic [8:0]            mag;      // |c| <= 374 < 2^9
      logic signed [P_W-1:0] acc;
      c   = coef(tr_type, tu_size, i, J);
      mag = 9'(c[COEF_W-1] ? -c : c);
      acc = (m[mag[8:6]] <<< 6) + (m[mag[5:3]] <<< 3) + m[mag[2:0]];
      p[i] = c[COEF_W-1] ? -acc : acc;
    end
  end

endmodule
