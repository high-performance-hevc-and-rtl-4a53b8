// FVC 2D forward transform for 4x4 and 8x8 TUs (DCT-II, DCT-V, DCT-VIII,
// DST-I, DST-VII, vertical and horizontal type chosen independently).
//
// Structure (as published): 1D column datapath -> column clip -> transpose
// memory -> 1D row datapath -> row clip. ARCH selects the datapath pair:
// ARCH_BASELINE (five separate data-gated datapaths), ARCH_RECONFIG (one
// reconfigurable shift-add datapath) or ARCH_DSP (an 8x8 multiplier array).
// All three compute the same numbers.
//
// Input: one column per cycle. For an 8x8 TU in_data[i] is row i of the
// current column (8 beats per TU); for 4x4 TUs two TUs are sent side by side,
// in_data[0..3] a column of the first TU and in_data[4..7] the same column of
// the second (4 beats). in_tu_size, in_type_v and in_type_h must hold for all
// beats of a TU. A beat is taken when in_valid and in_ready are both high.
// Output: one row per cycle, out_row counting 0..N-1, in the same layout
// (8x8: out_data[j] = coefficient (row, j); 4x4: first TU in 0..3, second in
// 4..7). Result = (T_v * X >> col_shift, saturated) then
// (. * T_h^T >> row_shift, saturated); shifts 3/4 and 10/11 as published.
//
// Timing: the first row of an 8x8 TU appears 14 cycles after its first
// column (16 with ARCH_DSP), rows then follow every cycle. TUs of one size
// stream without stalls; three transpose buffers let column and row phases
// of consecutive TUs overlap. in_ready drops only when a TU would need a
// fourth buffer (a short stall after an 8x8 TU followed by 4x4 TUs).
//
// Lint note: rst_n is the asynchronous reset of the flip-flops and also the
// disable condition of the assertions; verilator reports that second,
// sampled use as a signal used both synchronously and asynchronously. The
// sampled use is in assertions only, so the reset stays purely asynchronous.
module fvc_2d
  import fvc_pkg::*;
#(
  parameter arch_e ARCH  = ARCH_RECONFIG,
  parameter int    IN_W  = 9,     // residual width (signed)
  parameter int    MID_W = 16,    // column clip output width
  parameter int    OUT_W = 16     // row clip output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  tu_size_e                in_tu_size,
  input  tr_type_e                in_type_v,
  input  tr_type_e                in_type_h,
  input  logic signed [IN_W-1:0]  in_data [8],
  output logic                    out_valid,
  output tu_size_e                out_tu_size,
  output logic [2:0]              out_row,
  output logic signed [OUT_W-1:0] out_data [8]
);

  localparam int NBUF   = 3;
  localparam int LAT    = (ARCH == ARCH_DSP) ? 3 : 2;
  localparam int CACC_W = IN_W + COEF_W + 4;
  localparam int RACC_W = MID_W + COEF_W + 4;

  // ---------------------------------------------------------------- write side
  typedef struct packed {
    logic       last;
    logic [1:0] buff;
    logic [2:0] col;
    tu_size_e   size;
  } ctag_t;

  logic [2:0]  wcol;
  logic [1:0]  wbuf;
  logic [NBUF-1:0] busy, full;
  tu_size_e    bsize  [NBUF];
  tr_type_e    btype  [NBUF];
  logic        accept;
  ctag_t       ctag_pipe [LAT];
  logic        cdp_valid;
  logic signed [CACC_W-1:0] cdp_y [8];
  logic signed [MID_W-1:0]  cclip [8];

  assign in_ready = (wcol != 3'd0) || !busy[wbuf];
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcol <= '0;
      wbuf <= '0;
    end else if (accept) begin
      if ((in_tu_size == TU_8X8 && wcol == 3'd7) || (in_tu_size == TU_4X4 && wcol == 3'd3)) begin
        wcol <= '0;
        wbuf <= (wbuf == 2'(NBUF-1)) ? '0 : wbuf + 2'd1;
      end else begin
        wcol <= wcol + 3'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept && wcol == 3'd0) begin
      bsize[wbuf] <= in_tu_size;
      btype[wbuf] <= in_type_h;
    end
  end

  // Column tags travel beside the column datapath.
  always_ff @(posedge clk) begin
    ctag_pipe[0] <= '{last: (in_tu_size == TU_8X8) ? (wcol == 3'd7) : (wcol == 3'd3),
                      buff: wbuf, col: wcol, size: in_tu_size};
    for (int k = 1; k < LAT; k++) ctag_pipe[k] <= ctag_pipe[k-1];
  end

  // ----------------------------------------------------------------- datapaths
  logic                     rdp_in_valid, rdp_valid;
  tr_type_e                 rdp_type;
  tu_size_e                 rdp_size;
  logic signed [MID_W-1:0]  rdp_x [8];
  logic signed [RACC_W-1:0] rdp_y [8];

  if (ARCH == ARCH_BASELINE) begin : g_bl
    fvc_dp_baseline #(.IN_W(IN_W), .ACC_W(CACC_W)) u_col (
      .clk, .rst_n, .in_valid(accept), .tr_type(in_type_v), .tu_size(in_tu_size),
      .x(in_data), .out_valid(cdp_valid), .y(cdp_y));
    fvc_dp_baseline #(.IN_W(MID_W), .ACC_W(RACC_W)) u_row (
      .clk, .rst_n, .in_valid(rdp_in_valid), .tr_type(rdp_type), .tu_size(rdp_size),
      .x(rdp_x), .out_valid(rdp_valid), .y(rdp_y));
  end else if (ARCH == ARCH_DSP) begin : g_dsp
    fvc_dp_dsp #(.IN_W(IN_W), .ACC_W(CACC_W)) u_col (
      .clk, .rst_n, .in_valid(accept), .tr_type(in_type_v), .tu_size(in_tu_size),
      .x(in_data), .out_valid(cdp_valid), .y(cdp_y));
    fvc_dp_dsp #(.IN_W(MID_W), .ACC_W(RACC_W)) u_row (
      .clk, .rst_n, .in_valid(rdp_in_valid), .tr_type(rdp_type), .tu_size(rdp_size),
      .x(rdp_x), .out_valid(rdp_valid), .y(rdp_y));
  end else begin : g_rc
    fvc_dp_reconfig #(.IN_W(IN_W), .ACC_W(CACC_W)) u_col (
      .clk, .rst_n, .in_valid(accept), .tr_type(in_type_v), .tu_size(in_tu_size),
      .x(in_data), .out_valid(cdp_valid), .y(cdp_y));
    fvc_dp_reconfig #(.IN_W(MID_W), .ACC_W(RACC_W)) u_row (
      .clk, .rst_n, .in_valid(rdp_in_valid), .tr_type(rdp_type), .tu_size(rdp_size),
      .x(rdp_x), .out_valid(rdp_valid), .y(rdp_y));
  end

  // Column clip, then straight into the transpose memory.
  fvc_clip #(.IN_W(CACC_W), .OUT_W(MID_W), .SH4(3), .SH8(4)) u_cclip (
    .tu_size(ctag_pipe[LAT-1].size), .din(cdp_y), .dout(cclip));

  // ----------------------------------------------------------------- read side
  logic [1:0] rbuf;
  logic [2:0] rrow;
  logic       rd_en;
  tu_size_e   rsize;

  assign rsize = bsize[rbuf];
  assign rd_en = full[rbuf];

  fvc_tmem #(.NBUF(NBUF), .W(MID_W)) u_tmem (
    .clk,
    .wr_en   (cdp_valid),
    .wr_buf  (ctag_pipe[LAT-1].buff),
    .wr_col  (ctag_pipe[LAT-1].col),
    .wr_size (ctag_pipe[LAT-1].size),
    .wr_data (cclip),
    .rd_en,
    .rd_buf  (rbuf),
    .rd_row  (rrow),
    .rd_size (rsize),
    .rd_data (rdp_x));

  logic rd_last;
  assign rd_last = (rsize == TU_8X8) ? (rrow == 3'd7) : (rrow == 3'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbuf <= '0;
      rrow <= '0;
      busy <= '0;
      full <= '0;
      rdp_in_valid <= 1'b0;
    end else begin
      rdp_in_valid <= rd_en;
      if (accept && wcol == 3'd0) busy[wbuf] <= 1'b1;
      if (cdp_valid && ctag_pipe[LAT-1].last) full[ctag_pipe[LAT-1].buff] <= 1'b1;
      if (rd_en) begin
        if (rd_last) begin
          rrow       <= '0;
          busy[rbuf] <= 1'b0;
          full[rbuf] <= 1'b0;
          rbuf       <= (rbuf == 2'(NBUF-1)) ? '0 : rbuf + 2'd1;
        end else begin
          rrow <= rrow + 3'd1;
        end
      end
    end
  end

  // Row tags: type and size go with the data into the row datapath.
  typedef struct packed {
    logic [2:0] row;
    tu_size_e   size;
  } rtag_t;
  rtag_t rtag_q;
  rtag_t rtag_pipe [LAT];

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rdp_type <= btype[rbuf];
      rdp_size <= rsize;
      rtag_q   <= '{row: rrow, size: rsize};
    end
    rtag_pipe[0] <= rtag_q;
    for (int k = 1; k < LAT; k++) rtag_pipe[k] <= rtag_pipe[k-1];
  end

  // Row clip and output register.
  logic signed [OUT_W-1:0] rclip [8];
  fvc_clip #(.IN_W(RACC_W), .OUT_W(OUT_W), .SH4(10), .SH8(11)) u_rclip (
    .tu_size(rtag_pipe[LAT-1].size), .din(rdp_y), .dout(rclip));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= rdp_valid;
  end

  always_ff @(posedge clk) begin
    if (rdp_valid) begin
      out_data    <= rclip;
      out_row     <= rtag_pipe[LAT-1].row;
      out_tu_size <= rtag_pipe[LAT-1].size;
    end
  end

  // A TU's type and size may not change between its beats.
  tu_size_e cur_size_q;
  always_ff @(posedge clk) if (accept && wcol == 3'd0) cur_size_q <= in_tu_size;
  a_size_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  (accept && wcol != 3'd0) |-> (in_tu_size == cur_size_q));

endmodule
