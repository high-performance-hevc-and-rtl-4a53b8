// Self-checking testbench of fvc_tmem (rotating transpose memory). TUs of
// random size (one 8x8 or two 4x4 side by side) are written column by
// column into buffer k mod 3 while the previous TU is read row by row from
// its buffer in the same cycles. Every row read is compared with the
// transpose of what was written; the read data is checked one cycle after
// rd_en (registered read).
module tb_fvc_tmem;
  import fvc_pkg::*;

  localparam int NTU = 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               wr_en, rd_en;
  logic [1:0]         wr_buf, rd_buf;
  logic [2:0]         wr_col, rd_row;
  tu_size_e           wr_size, rd_size;
  logic signed [15:0] wr_data [8], rd_data [8];

  fvc_tmem dut (.*);

  logic [15:0] D [NTU][8][8];      // D[tu][wr_data index][column]
  tu_size_e    S [NTU];
  int n_4 = 0, n_8 = 0;

  initial begin
    for (int k = 0; k < NTU; k++) begin
      S[k] = tu_size_e'($urandom_range(0, 1));
      for (int i = 0; i < 8; i++)
        for (int c = 0; c < 8; c++) D[k][i][c] = 16'($urandom);
    end
    wr_en = 1'b0; rd_en = 1'b0;
    wr_buf = '0; rd_buf = '0; wr_col = '0; rd_row = '0;
    wr_size = TU_8X8; rd_size = TU_8X8;
    for (int i = 0; i < 8; i++) wr_data[i] = '0;
    @(negedge clk);
    for (int k = 0; k <= NTU; k++) begin
      for (int t = 0; t < 8; t++) begin
        // write TU k, read TU k-1
        wr_en = (k < NTU) && (t < ((S[k % NTU] == TU_8X8) ? 8 : 4));
        wr_buf = 2'(k % 3);
        wr_col = 3'(t);
        wr_size = S[k % NTU];
        for (int i = 0; i < 8; i++) wr_data[i] = (k < NTU) ? D[k][i][t] : 16'($urandom);
        rd_en = (k > 0) && (t < ((S[(k + NTU - 1) % NTU] == TU_8X8) ? 8 : 4));
        rd_buf = 2'((k + 2) % 3);
        rd_row = 3'(t);
        rd_size = S[(k + NTU - 1) % NTU];
        @(negedge clk);
        if (rd_en) begin
          automatic int p = k - 1;
          automatic bit ok = 1'b1;
          for (int j = 0; j < 8; j++) begin
            automatic logic [15:0] e;
            if (S[p] == TU_8X8) e = D[p][t][j];
            else if (j < 4)     e = D[p][t][j];
            else                e = D[p][4 + t][j - 4];
            if (rd_data[j] != e) ok = 1'b0;
          end
          checks++;
          if (!ok) begin
            failures++;
            $display("FAIL TU %0d row %0d", p, t);
          end
          if (t == 0) begin
            if (S[p] == TU_8X8) n_8++;
            else n_4++;
          end
        end
      end
    end
    checks++;
    if (n_4 == 0 || n_8 == 0) begin
      failures++;
      $display("FAIL: both TU sizes must be exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTU * 10 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
