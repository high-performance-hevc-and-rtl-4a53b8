// FVC baseline 1D DCT-V, DCT-VIII or DST-VII datapath: one 8x8 datapath.
//
// These transforms have no butterfly symmetry, so the 8-point transform is a
// full 8x8 product. Eight multiplier blocks each multiply one input by the
// fixed coefficients of its column (8-point and 4-point sets); eight adder
// trees select and sum them. For an 8x8 TU output i uses all eight products
// of row i; for two 4x4 TUs outputs 0..3 use the 4-point products of inputs
// 0..3 and outputs 4..7 those of inputs 4..7.
// Data gating: the input register loads only when en is high. The result is
// combinational from that register.
// One 8x8 datapath per type and the data gating follow the published
// baseline; the products are written as constant multiplications and the
// shift-add networks are left to synthesis (this design's choice).
module fvc_bl_8x8
  import fvc_pkg::*;
#(
  parameter tr_type_e T     = TR_DCT5,
  parameter int       IN_W  = 16,
  parameter int       ACC_W = IN_W + COEF_W + 4
) (
  input  logic                    clk,
  input  logic                    en,
  input  tu_size_e                tu_size,
  input  logic signed [IN_W-1:0]  x [8],
  output logic signed [ACC_W-1:0] y [8]
);

  tu_size_e               size_q;
  logic signed [IN_W-1:0] x_q [8];

  always_ff @(posedge clk) begin
    if (en) begin
      size_q <= tu_size;
      x_q    <= x;
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic signed [ACC_W-1:0] s;
      s = '0;
      for (int j = 0; j < 8; j++) begin
        if (size_q == TU_8X8)
          s = s + ACC_W'(x_q[j]) * ACC_W'(C8[int'(T)][i][j]);
        else if ((i < 4) == (j < 4))
          s = s + ACC_W'(x_q[j]) * ACC_W'(C4[int'(T)][i%4][j%4]);
      end
      y[i] = s;
    end
  end

endmodule
