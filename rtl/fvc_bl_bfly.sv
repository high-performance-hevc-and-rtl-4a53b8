// FVC baseline 1D DCT-II or DST-I datapath: butterfly plus two 4x4 datapaths.
//
// Both transforms have rows that are even or odd symmetric
// (C[i][7-j] = (-1)^i C[i][j]), so an 8-point transform splits into two
// 4-point products: the butterfly forms e[k] = x[k] + x[7-k] and
// o[k] = x[k] - x[7-k]; the first 4x4 datapath yields the even outputs, the
// second the odd outputs. For two 4x4 TUs the butterfly is bypassed and each
// 4x4 datapath transforms one TU (the 4-point transform done here as a plain
// 4x4 product rather than through a second, 4-point butterfly).
// Data gating: the input register loads only when en is high, i.e. when this
// transform type is selected. The result is combinational from that register.
// Butterfly plus two 4x4 datapaths follows the published baseline; the
// bypass for 4x4 TUs is this design's choice.
module fvc_bl_bfly
  import fvc_pkg::*;
#(
  parameter tr_type_e T     = TR_DCT2,
  parameter int       IN_W  = 16,
  parameter int       ACC_W = IN_W + COEF_W + 4
) (
  input  logic                    clk,
  input  logic                    en,
  input  tu_size_e                tu_size,
  input  logic signed [IN_W-1:0]  x [8],
  output logic signed [ACC_W-1:0] y [8]
);

  localparam int U_W = IN_W + 1;
  localparam int O_W = U_W + COEF_W + 2;

  tu_size_e               size_q;
  logic signed [IN_W-1:0] x_q [8];
  logic signed [U_W-1:0]  ue [4], uo [4];
  logic signed [O_W-1:0]  ze [4], zo [4];

  always_ff @(posedge clk) begin
    if (en) begin
      size_q <= tu_size;
      x_q    <= x;
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (size_q == TU_8X8) begin
        ue[k] = U_W'(x_q[k]) + U_W'(x_q[7-k]);
        uo[k] = U_W'(x_q[k]) - U_W'(x_q[7-k]);
      end else begin
        ue[k] = U_W'(x_q[k]);
        uo[k] = U_W'(x_q[k+4]);
      end
    end
  end

  fvc_bl_4x4 #(.T(T), .ODD(0), .IN_W(U_W)) u_even (.tu_size(size_q), .u(ue), .z(ze));
  fvc_bl_4x4 #(.T(T), .ODD(1), .IN_W(U_W)) u_odd  (.tu_size(size_q), .u(uo), .z(zo));

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      if (size_q == TU_8X8) y[j] = ACC_W'((j % 2 == 0) ? ze[j/2] : zo[j/2]);
      else                  y[j] = ACC_W'((j < 4) ? ze[j%4] : zo[j%4]);
    end
  end

endmodule
