// Reconfigurable 1D column/row datapath of the FVC reconfigurable 2D transform.
//
// One datapath serves all five 1D transform types and both TU sizes. Eight
// reconfigurable multiplier blocks (fvc_rmult) multiply the eight inputs by the
// coefficients of the selected matrix; eight adder trees sum them. For an 8x8
// TU output i sums all eight products of row i. For two 4x4 TUs, outputs 0..3
// sum the products of inputs 0..3 (first TU) and outputs 4..7 those of inputs
// 4..7 (second TU).
//
// Timing: inputs, type and size are captured in input registers when in_valid
// is high (they hold otherwise, so an idle datapath does not toggle); the sums
// are registered, so out_valid/y follow in_valid by LAT = 2 cycles. One
// column (or row) per cycle.
module fvc_dp_reconfig
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

  logic                   v_q;
  tr_type_e               type_q;
  tu_size_e               size_q;
  logic signed [IN_W-1:0] x_q [8];
  logic signed [P_W-1:0]  p [8][8];   // p[j][i]: input j times coefficient (i, j)

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
    if (in_valid) begin
      type_q <= tr_type;
      size_q <= tu_size;
      x_q    <= x;
    end
  end

  for (genvar j = 0; j < 8; j++) begin : g_rm
    fvc_rmult #(.IN_W(IN_W), .J(j)) u_rm (
      .tr_type (type_q),
      .tu_size (size_q),
      .x       (x_q[j]),
      .p       (p[j])
    );
  end

  // Adder trees.
  always_ff @(posedge clk) begin
    if (v_q) begin
      for (int i = 0; i < 8; i++) begin
        logic signed [ACC_W-1:0] s;
        s = '0;
        for (int j = 0; j < 8; j++) begin
          if (size_q == TU_8X8 || ((i < 4) == (j < 4)))
            s = s + ACC_W'(p[j][i]);
        end
        y[i] <= s;
      end
    end
  end

endmodule
