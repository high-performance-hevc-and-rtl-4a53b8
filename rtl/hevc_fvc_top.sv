// Top level holding the three designs of the thesis side by side. They
// share only the clock and reset; each keeps its own handshake ports:
//   spme_*    : HEVC sub-pixel motion estimation (9x9 integer SADs in,
//               best quarter-pixel offset and SAD out; one PU per 6 cycles)
//   fihw_*    : memory-based HEVC fractional interpolation of 8x8 PUs
//               (15 integer rows in, 40 groups of 8x3 fractional pixels out)
//   fvc_bl_*  : FVC 2D transform, baseline datapaths        (latency 14)
//   fvc_rc_*  : FVC 2D transform, reconfigurable datapaths  (latency 14)
//   fvc_dsp_* : FVC 2D transform, multiplier-array datapaths (latency 16)
// The three FVC transforms are the three published architectures of the
// same function and give identical results; they are all instantiated so
// that every architecture is built and exercised. Timing of each port group
// is described in the header of the instantiated module. No logic is added
// here; the grouping is this design's choice.
//
// Lint note: inside the instantiated modules rst_n is the asynchronous reset
// and also the disable condition of their assertions; verilator reports that
// sampled use as a signal used both synchronously and asynchronously. The
// sampled use is in assertions only, so the reset stays purely asynchronous.
module hevc_fvc_top
  import spme_pkg::*;
  import fihw_pkg::*;
  import fvc_pkg::*;
#(
  parameter int FVC_IN_W  = 9,
  parameter int FVC_MID_W = 16,
  parameter int FVC_OUT_W = 16
) (
  input  logic       clk,
  input  logic       rst_n,

  // HEVC sub-pixel motion estimation
  input  logic       spme_in_valid,
  output logic       spme_in_ready,
  input  sad_t       spme_in_sad [9][9],
  output logic       spme_out_valid,
  output sad_t       spme_out_sad,
  output qoff_t      spme_out_qx,
  output qoff_t      spme_out_qy,

  // HEVC fractional interpolation
  input  logic       fihw_in_valid,
  output logic       fihw_in_ready,
  input  logic [7:0] fihw_in_row [15],
  output logic       fihw_out_valid,
  output fihw_kind_e fihw_out_kind,
  output logic [2:0] fihw_out_idx,
  output logic [7:0] fihw_out_pix [3][8],

  // FVC 2D transform, one port group per architecture (index 0 = baseline,
  // 1 = reconfigurable, 2 = DSP)
  input  logic                        fvc_in_valid   [3],
  output logic                        fvc_in_ready   [3],
  input  tu_size_e                    fvc_in_tu_size [3],
  input  tr_type_e                    fvc_in_type_v  [3],
  input  tr_type_e                    fvc_in_type_h  [3],
  input  logic signed [FVC_IN_W-1:0]  fvc_in_data    [3][8],
  output logic                        fvc_out_valid  [3],
  output tu_size_e                    fvc_out_tu_size[3],
  output logic [2:0]                  fvc_out_row    [3],
  output logic signed [FVC_OUT_W-1:0] fvc_out_data   [3][8]
);

  spme u_spme (
    .clk, .rst_n,
    .in_valid (spme_in_valid),
    .in_ready (spme_in_ready),
    .in_sad   (spme_in_sad),
    .out_valid(spme_out_valid),
    .out_sad  (spme_out_sad),
    .out_qx   (spme_out_qx),
    .out_qy   (spme_out_qy)
  );

  fihw u_fihw (
    .clk, .rst_n,
    .in_valid (fihw_in_valid),
    .in_ready (fihw_in_ready),
    .in_row   (fihw_in_row),
    .out_valid(fihw_out_valid),
    .out_kind (fihw_out_kind),
    .out_idx  (fihw_out_idx),
    .out_pix  (fihw_out_pix)
  );

  localparam arch_e ARCHS [3] = '{ARCH_BASELINE, ARCH_RECONFIG, ARCH_DSP};

  for (genvar a = 0; a < 3; a++) begin : g_fvc
    fvc_2d #(
      .ARCH (ARCHS[a]),
      .IN_W (FVC_IN_W),
      .MID_W(FVC_MID_W),
      .OUT_W(FVC_OUT_W)
    ) u_fvc (
      .clk, .rst_n,
      .in_valid   (fvc_in_valid[a]),
      .in_ready   (fvc_in_ready[a]),
      .in_tu_size (fvc_in_tu_size[a]),
      .in_type_v  (fvc_in_type_v[a]),
      .in_type_h  (fvc_in_type_h[a]),
      .in_data    (fvc_in_data[a]),
      .out_valid  (fvc_out_valid[a]),
      .out_tu_size(fvc_out_tu_size[a]),
      .out_row    (fvc_out_row[a]),
      .out_data   (fvc_out_data[a])
    );
  end

endmodule
