// 1D column/row datapath set of the FVC baseline 2D transform.
//
// Five separate datapaths, one per transform type: DCT-II and DST-I as a
// butterfly with two 4x4 datapaths (fvc_bl_bfly), DCT-V, DCT-VIII and DST-VII
// as one 8x8 datapath each (fvc_bl_8x8). Only the datapath of the selected
// type loads its input register (data gating, as published), so the other
// four do not toggle. An output multiplexer picks the selected datapath and
// its result is registered.
//
// Timing: in_valid to out_valid is LAT = 2 cycles (gated input register,
// output register). One column (or row) per cycle.
module fvc_dp_baseline
  import fvc_pkg::*;
#(
  parameter int IN_W  = 16,
  parameter int ACC_W = IN_W + COEF_W + 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  tr_type_e                tr_type,
  input  tu_size_e                tu_size,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y [8]
);

  logic                    v_q;
  tr_type_e                type_q;
  logic signed [ACC_W-1:0] y_dct2 [8], y_dct5 [8], y_dct8 [8], y_dst1 [8], y_dst7 [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) type_q <= tr_type;
  end

  fvc_bl_bfly #(.T(TR_DCT2), .IN_W(IN_W), .ACC_W(ACC_W)) u_dct2 (
    .clk, .en(in_valid && tr_type == TR_DCT2), .tu_size, .x, .y(y_dct2));
  fvc_bl_8x8  #(.T(TR_DCT5), .IN_W(IN_W), .ACC_W(ACC_W)) u_dct5 (
    .clk, .en(in_valid && tr_type == TR_DCT5), .tu_size, .x, .y(y_dct5));
  fvc_bl_8x8  #(.T(TR_DCT8), .IN_W(IN_W), .ACC_W(ACC_W)) u_dct8 (
    .clk, .en(in_valid && tr_type == TR_DCT8), .tu_size, .x, .y(y_dct8));
  fvc_bl_bfly #(.T(TR_DST1), .IN_W(IN_W), .ACC_W(ACC_W)) u_dst1 (
    .clk, .en(in_valid && tr_type == TR_DST1), .tu_size, .x, .y(y_dst1));
  fvc_bl_8x8  #(.T(TR_DST7), .IN_W(IN_W), .ACC_W(ACC_W)) u_dst7 (
    .clk, .en(in_valid && tr_type == TR_DST7), .tu_size, .x, .y(y_dst7));

  always_ff @(posedge clk) begin
    if (v_q) begin
      unique case (type_q)
        TR_DCT2: y <= y_dct2;
        TR_DCT5: y <= y_dct5;
        TR_DCT8: y <= y_dct8;
        TR_DST1: y <= y_dst1;
        default: y <= y_dst7;
      endcase
    end
  end

endmodule
