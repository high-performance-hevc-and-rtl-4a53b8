// Column clip / row clip of the FVC 2D transform.
//
// Scales the eight outputs of a 1D datapath to OUT_W bits: an arithmetic
// right shift whose amount depends on the TU size (SH4 for 4x4, SH8 for 8x8),
// then saturation to the signed OUT_W range. The column clip uses shifts 3/4
// and the row clip 10/11, both as published; the shift truncates (no rounding
// offset) and saturation on overflow is this design's choice.
// Purely combinational: outputs follow the inputs in the same cycle.
module fvc_clip
  import fvc_pkg::*;
#(
  parameter int IN_W  = 30,
  parameter int OUT_W = 16,
  parameter int SH4   = 3,
  parameter int SH8   = 4
) (
  input  tu_size_e                 tu_size,
  input  logic signed [IN_W-1:0]   din  [8],
  output logic signed [OUT_W-1:0]  dout [8]
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'((longint'(1) <<< (OUT_W-1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(longint'(1) <<< (OUT_W-1));

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic signed [IN_W-1:0] s;
      s = (tu_size == TU_8X8) ? (din[k] >>> SH8) : (din[k] >>> SH4);
      if (s > MAXV)      dout[k] = MAXV[OUT_W-1:0];
      else if (s < MINV) dout[k] = MINV[OUT_W-1:0];
      else               dout[k] = s[OUT_W-1:0];
    end
  end

endmodule
