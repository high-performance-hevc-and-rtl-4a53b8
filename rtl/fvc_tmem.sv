// Transpose memory of the FVC 2D transform: eight 32-bit wide RAM banks.
//
// The column datapath delivers one column of eight 16-bit coefficients per
// cycle; the row datapath needs one row per cycle. Element (row i, column j)
// of a TU is stored in bank (i+j) mod 8 at address {buffer, j}, so a column
// write and a row read each touch every bank exactly once (rotating
// addressing, as published). For two 4x4 TUs only banks 0..3 are used and a
// 32-bit word holds the same element of both TUs ({TU1, TU0}), again as
// published. For an 8x8 TU a word holds one coefficient in its low half.
//
// NBUF buffers (address MSBs) let a TU be written while earlier ones are
// still being read; NBUF=3 is this design's choice and keeps equal-size TU
// streams stall free. Writes take effect at the clock edge; a read returns
// the row one cycle after rd_en (registered read, like a block RAM).
module fvc_tmem
  import fvc_pkg::*;
#(
  parameter int NBUF = 3,
  parameter int W    = 16
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [1:0]            wr_buf,
  input  logic [2:0]            wr_col,
  input  tu_size_e              wr_size,
  input  logic signed [W-1:0]   wr_data [8],
  input  logic                  rd_en,
  input  logic [1:0]            rd_buf,
  input  logic [2:0]            rd_row,
  input  tu_size_e              rd_size,
  output logic signed [W-1:0]   rd_data [8]
);

  localparam int DEPTH = NBUF * 8;

  logic [2*W-1:0] bank_q   [8];
  logic [4:0]     rd_addr  [8];
  logic [2:0]     rd_row_q;
  tu_size_e       rd_size_q;

  // Read address of every bank for the requested row.
  always_comb begin
    for (int b = 0; b < 8; b++) begin
      logic [2:0] j;
      if (rd_size == TU_8X8) j = 3'(b - int'(rd_row));
      else                   j = {1'b0, 2'(b - int'(rd_row))};
      rd_addr[b] = 5'(int'(rd_buf) * 8 + int'(j));
    end
  end

  for (genvar b = 0; b < 8; b++) begin : g_bank
    logic [2*W-1:0] ram [DEPTH];
    logic           we;
    logic [4:0]     wa;
    logic [2*W-1:0] wd;

    always_comb begin
      logic [2:0] i8;
      logic [1:0] i4;
      i8 = 3'(b - int'(wr_col));     // row of the element that lands in this bank
      i4 = 2'(b - int'(wr_col));
      wa = 5'(int'(wr_buf) * 8 + int'(wr_col));
      if (wr_size == TU_8X8) begin
        we = wr_en;
        wd = {{W{1'b0}}, wr_data[i8]};
      end else begin
        we = wr_en && (b < 4);
        wd = {wr_data[{1'b1, i4}], wr_data[{1'b0, i4}]};
      end
    end

    always_ff @(posedge clk) begin
      if (we) ram[wa] <= wd;
      if (rd_en) bank_q[b] <= ram[rd_addr[b]];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_row_q  <= rd_row;
      rd_size_q <= rd_size;
    end
  end

  // Unrotate: element j of the row came from bank (row+j) mod 8 (or mod 4).
  always_comb begin
    for (int j = 0; j < 8; j++) begin
      if (rd_size_q == TU_8X8)
        rd_data[j] = bank_q[(int'(rd_row_q) + j) & 7][W-1:0];
      else if (j < 4)
        rd_data[j] = bank_q[(int'(rd_row_q) + j) & 3][W-1:0];
      else
        rd_data[j] = bank_q[(int'(rd_row_q) + j - 4) & 3][2*W-1:W];
    end
  end

endmodule
