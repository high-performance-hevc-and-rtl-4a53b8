// Reconfigurable 1D column/row datapath of the FVC reconfigurable_DSP 2D
// transform.
//
// An 8x8 array of multipliers (the DSP blocks of the FPGA). Multiplier (i, j)
// multiplies input j by coefficient (i, j) of the selected matrix; a
// multiplexer in front of every multiplier picks that coefficient from the
// transform type and TU size. The eight products of row i are summed by adder
// tree i. For an 8x8 TU all 64 multipliers are used. For two 4x4 TUs only the
// 16 multipliers with i, j < 4 (first TU) and the 16 with i, j >= 4 (second
// TU) are used, and the input registers of the other 32 are not updated (data
// gating, as published).
//
// Timing: multiplier input registers, product registers and adder tree output
// registers give LAT = 3 cycles from in_valid to out_valid (the registered
// DSP inputs and products are this design's reading of the two extra cycles
// the published DSP version needs over the other two). One column (or row)
// per cycle.
module fvc_dp_dsp
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

  localparam int P_W = IN_W + COEF_W;

  logic                   v_q, v_qq;
  tu_size_e               size_q, size_qq;
  logic signed [IN_W-1:0] a_q [8][8];   // multiplier data input registers
  coef_t                  b_q [8][8];   // multiplier coefficient input registers
  logic signed [P_W-1:0]  m_q [8][8];   // product registers

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      v_qq      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      v_qq      <= v_q;
      out_valid <= v_qq;
    end
  end

  // Multiplier input registers with coefficient multiplexers and data gating.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      size_q <= tu_size;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if (tu_size == TU_8X8 || ((i < 4) == (j < 4))) begin
            a_q[i][j] <= x[j];
            b_q[i][j] <= coef(tr_type, tu_size, i, j);
          end
    end
  end

  // Multipliers.
  always_ff @(posedge clk) begin
    if (v_q) begin
      size_qq <= size_q;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          m_q[i][j] <= P_W'(a_q[i][j]) * P_W'(b_q[i][j]);
    end
  end

  // Adder trees.
  always_ff @(posedge clk) begin
    if (v_qq) begin
      for (int i = 0; i < 8; i++) begin
        logic signed [ACC_W-1:0] s;
        s = '0;
        for (int j = 0; j < 8; j++)
          if (size_qq == TU_8X8 || ((i < 4) == (j < 4)))
            s = s + ACC_W'(m_q[i][j]);
        y[i] <= s;
      end
    end
  end

endmodule
