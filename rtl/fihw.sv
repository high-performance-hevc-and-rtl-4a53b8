// Memory-based HEVC fractional interpolation hardware for 8x8 PUs.
//
// Function: for one 8x8 prediction unit it computes all 48 half and quarter
// pixel planes (a..r, 8x8 pixels each) from the 15x15 integer pixels around
// it (rows and columns -3..11 relative to the PU).
//
// How it works: one shared datapath (fihw_datapath: MEM1/MEM2 products, CSE
// terms, eight adder trees) filters one 15-pixel line per cycle and yields
// eight A, B and C filtered pixels. A 3-way multiplexer in front of the
// input register selects the line source:
//   cycles  0..14 : integer rows -3..11 from the input  -> a, b, c per row,
//                   stored in transpose memories A, B, C (15x8 pixels each)
//                   and kept in an integer buffer (columns 0..7)
//   cycles 15..22 : integer columns 0..7 from the buffer -> d, h, n
//   cycles 23..46 : columns 0..7 of transpose memory A (e, i, p),
//                   B (f, j, q) and C (g, k, r)
// Rows -3..-1 and 8..11 of a, b, c are only needed by the quarter pixels
// and are not sent out.
//
// Interface: in_ready is high during cycles 0..14; a row is consumed on
// in_valid && in_ready (missing rows stall the schedule). Outputs: out_valid
// with out_kind (fihw_pkg::fihw_kind_e), out_idx (row for FK_ROW, column
// otherwise) and out_pix[f][k] for the 1/4, 1/2, 3/4 filter f and position k.
//
// Timing: a line issued in cycle t gives its outputs in cycle t+3 (input
// register, memory/CSE register, adder-tree register). The first row of a
// PU to its last quarter-pixel output takes 50 cycles, as published; the
// next PU's rows are accepted from cycle 47, so back-to-back PUs come every
// 47 cycles. Transpose memory rows are overwritten by the next PU no earlier
// than cycle 50, after the last quarter read in cycle 46.
//
// Follows the paper: single datapath with MEM1/MEM2 and CSE, transpose
// memories A, B, C, rows-then-columns-then-quarters order, 15 + 8 + 24 issue
// cycles and 3 pipeline stages. Own choices: row-by-row input port, the
// integer column buffer, the output grouping and the 8-bit rounding of the
// half pixels before the quarter-pixel pass.
//
// Lint note: rst_n is the asynchronous reset of the flip-flops and also the
// disable condition of the assertions; verilator reports that second,
// sampled use as a signal used both synchronously and asynchronously. The
// sampled use is in assertions only, so the reset stays purely asynchronous.
module fihw
  import fihw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_row   [15],
  output logic       out_valid,
  output fihw_kind_e out_kind,
  output logic [2:0] out_idx,
  output logic [7:0] out_pix  [3][8]
);

  localparam int N_ROW = 15;
  localparam int N_COL = 8;
  localparam int N_CYC = N_ROW + N_COL + 3 * 8;   // 47 issue cycles per PU

  logic [5:0] cyc;
  logic       issue;
  logic [7:0] ibuf [15][8];                        // integer columns 0..7
  logic [7:0] tm_a [15][8], tm_b [15][8], tm_c [15][8];

  // ------------------------------------------------------------ schedule
  assign in_ready = (cyc < 6'(N_ROW));
  assign issue    = in_ready ? in_valid : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cyc <= '0;
    else if (issue) cyc <= (cyc == 6'(N_CYC - 1)) ? '0 : cyc + 6'd1;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      for (int c = 0; c < 8; c++) ibuf[cyc[3:0]][c] <= in_row[c+3];
  end

  // ------------------------------------------- line multiplexer + register
  logic [7:0] line_d [15], line_q [15];
  fihw_kind_e kind_d;
  logic [3:0] idx_d;
  logic       v_q;
  logic [6:0] tag_q;

  always_comb begin
    logic [4:0] q;
    logic [2:0] col;
    q      = 5'(cyc - 6'(N_ROW + N_COL));
    col    = q[2:0];
    line_d = in_row;
    kind_d = FK_ROW;
    idx_d  = cyc[3:0];
    if (cyc >= 6'(N_ROW) && cyc < 6'(N_ROW + N_COL)) begin
      kind_d = FK_COL;
      idx_d  = 4'(cyc - 6'(N_ROW));
      for (int t = 0; t < 15; t++) line_d[t] = ibuf[t][idx_d[2:0]];
    end else if (cyc >= 6'(N_ROW + N_COL)) begin
      idx_d = {1'b0, col};
      unique case (q[4:3])
        2'd0:    kind_d = FK_QA;
        2'd1:    kind_d = FK_QB;
        default: kind_d = FK_QC;
      endcase
      for (int t = 0; t < 15; t++)
        unique case (q[4:3])
          2'd0:    line_d[t] = tm_a[t][col];
          2'd1:    line_d[t] = tm_b[t][col];
          default: line_d[t] = tm_c[t][col];
        endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= issue;
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      line_q <= line_d;
      tag_q  <= {kind_d, idx_d};
    end
  end

  // -------------------------------------------------------------- datapath
  logic       dp_valid;
  logic [6:0] dp_tag;
  logic [7:0] fa [8], fb [8], fc [8];

  fihw_datapath #(.TAG_W(7)) u_dp (
    .clk, .rst_n,
    .in_valid (v_q),
    .in_tag   (tag_q),
    .w        (line_q),
    .out_valid(dp_valid),
    .out_tag  (dp_tag),
    .fa, .fb, .fc
  );

  fihw_kind_e dp_kind;
  logic [3:0] dp_idx;
  assign dp_kind = fihw_kind_e'(dp_tag[6:4]);
  assign dp_idx  = dp_tag[3:0];

  // Row results go to the transpose memories (all 15 rows).
  always_ff @(posedge clk) begin
    if (dp_valid && dp_kind == FK_ROW) begin
      tm_a[dp_idx] <= fa;
      tm_b[dp_idx] <= fb;
      tm_c[dp_idx] <= fc;
    end
  end

  // Outputs: rows 0..7 of a/b/c and every column group.
  always_comb begin
    out_valid = dp_valid &&
                (dp_kind != FK_ROW || (dp_idx >= 4'd3 && dp_idx <= 4'd10));
    out_kind  = dp_kind;
    out_idx   = (dp_kind == FK_ROW) ? 3'(dp_idx - 4'd3) : dp_idx[2:0];
    out_pix[0] = fa;
    out_pix[1] = fb;
    out_pix[2] = fc;
  end

  a_kind_legal: assert property (@(posedge clk) disable iff (!rst_n)
    dp_valid |-> dp_tag[6:4] <= 3'd4);

endmodule
