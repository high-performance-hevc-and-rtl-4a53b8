// 4x4 datapath of the FVC baseline DCT-II / DST-I 1D datapaths.
//
// Four multiplier blocks, one per input u[k], each multiplying by the fixed
// coefficients of its matrix column, and four adder trees. For two 4x4 TUs
// the matrix is the 4-point matrix of transform T. For an 8x8 TU it is the
// 4x4 sub-matrix of the 8-point matrix that the even/odd butterfly leaves:
// rows 2i (ODD=0, inputs are the butterfly sums) or rows 2i+1 (ODD=1, inputs
// are the butterfly differences), columns 0..3. Rows of that matrix that
// are symmetric or antisymmetric (all rows of the 4-point DCT-II and DST-I,
// and the even rows of the 8-point DCT-II) go through a second, 4-point
// butterfly and need two products instead of four. All coefficients are
// constants, so each product is a constant multiplication that synthesis
// turns into shifts and adds. Combinational.
// The split into 4x4 datapaths and the 4-point butterfly for 4x4 TUs and
// inside 8x8 TUs follow the published baseline; leaving the
// constant multiplications to synthesis instead of a hand-run Hcub
// multiplier-block generator is this design's choice.
module fvc_bl_4x4
  import fvc_pkg::*;
#(
  parameter tr_type_e T    = TR_DCT2,
  parameter int       ODD  = 0,
  parameter int       IN_W = 17,
  parameter int       O_W  = IN_W + COEF_W + 2
) (
  input  tu_size_e               tu_size,
  input  logic signed [IN_W-1:0] u [4],
  output logic signed [O_W-1:0]  z [4]
);

  localparam int B_W = IN_W + 1;

  logic signed [B_W-1:0] bs [2], bd [2];

  // One output: a row of the matrix times u. A row that is symmetric or
  // antisymmetric about its centre needs only two products, taken from the
  // 4-point butterfly sums or differences; any other row uses all four.
  // The row is a constant, so the choice is made at elaboration.
  function automatic logic signed [O_W-1:0] row_dot(
    input int                    c  [4],
    input logic signed [IN_W-1:0] v [4],
    input logic signed [B_W-1:0] s  [2],
    input logic signed [B_W-1:0] d  [2]
  );
    logic signed [O_W-1:0] acc;
    acc = '0;
    if (c[0] == c[3] && c[1] == c[2]) begin
      for (int k = 0; k < 2; k++) acc = acc + O_W'(s[k]) * O_W'(c[k]);
    end else if (c[0] == -c[3] && c[1] == -c[2]) begin
      for (int k = 0; k < 2; k++) acc = acc + O_W'(d[k]) * O_W'(c[k]);
    end else begin
      for (int k = 0; k < 4; k++) acc = acc + O_W'(v[k]) * O_W'(c[k]);
    end
    return acc;
  endfunction

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      bs[k] = B_W'(u[k]) + B_W'(u[3-k]);
      bd[k] = B_W'(u[k]) - B_W'(u[3-k]);
    end
    for (int i = 0; i < 4; i++) begin
      if (tu_size == TU_8X8) z[i] = row_dot(C8[int'(T)][2*i+ODD][0:3], u, bs, bd);
      else                   z[i] = row_dot(C4[int'(T)][i], u, bs, bd);
    end
  end

endmodule
