// Self-checking testbench of fihw: random 15x15 integer pixel blocks (fully
// random, flat extremes and smooth ramps) are sent row by row, first back to
// back and then with random gaps in in_valid. Every output group is compared
// with a reference that applies the 8-tap HEVC filters directly (half pixels
// rounded and clipped to 8 bits before the quarter-pixel pass, as in the
// design). Also checks the 50-cycle latency from the first row of a PU to
// its last output, and the 47-cycle interval between back-to-back PUs.
module tb_fihw;
  import fihw_pkg::*;

  localparam int NPU = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid;
  logic [7:0] in_row [15];
  fihw_kind_e out_kind;
  logic [2:0] out_idx;
  logic [7:0] out_pix [3][8];

  fihw dut (.*);

  // ------------------------------------------------------------- reference
  int fa [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};
  int fb [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
  int fc [8] = '{0, 1, -5, 17, 58, -10, 4, -1};

  int P  [NPU][15][15];          // integer pixels, [row+3][col+3]
  int E  [NPU][5][8][3][8];      // expected [kind][idx][filter][k]

  function automatic int filt(int f, int line [15], int k);
    int acc = 0;
    int r;
    for (int t = 0; t < 8; t++)
      acc += ((f == 0) ? fa[t] : (f == 1) ? fb[t] : fc[t]) * line[k + t];
    r = (acc + 32) >>> 6;
    return (r < 0) ? 0 : (r > 255) ? 255 : r;
  endfunction

  function automatic void reference(int p);
    int line [15];
    int H [3][15][8];            // a/b/c planes for rows -3..11
    for (int r = 0; r < 15; r++) begin
      for (int c = 0; c < 15; c++) line[c] = P[p][r][c];
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++) H[f][r][k] = filt(f, line, k);
    end
    for (int i = 0; i < 8; i++)
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++) E[p][FK_ROW][i][f][k] = H[f][i+3][k];
    for (int j = 0; j < 8; j++) begin
      for (int r = 0; r < 15; r++) line[r] = P[p][r][j+3];
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++) E[p][FK_COL][j][f][k] = filt(f, line, k);
      for (int h = 0; h < 3; h++) begin
        for (int r = 0; r < 15; r++) line[r] = H[h][r][j];
        for (int f = 0; f < 3; f++)
          for (int k = 0; k < 8; k++) E[p][int'(FK_QA) + h][j][f][k] = filt(f, line, k);
      end
    end
  endfunction

  // ---------------------------------------------------------------- checking
  int first_row_cycle [NPU];
  int n_rows = 0;
  int n_out = 0, pu_out = 0;
  int n_stall = 0;
  int seen [5];

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (n_rows % 15 == 0) first_row_cycle[n_rows / 15] = cycle;
      n_rows++;
    end
    if (rst_n && in_ready && !in_valid && n_rows % 15 != 0) n_stall++;
    if (rst_n && out_valid) begin
      automatic bit ok = 1'b1;
      checks++;
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++)
          if (int'(out_pix[f][k]) != E[pu_out][out_kind][out_idx][f][k]) ok = 1'b0;
      if (!ok) begin
        failures++;
        $display("FAIL PU %0d kind %0d idx %0d", pu_out, out_kind, out_idx);
      end
      seen[out_kind]++;
      n_out++;
      if (n_out == 40) begin
        checks++;
        if (cycle - first_row_cycle[pu_out] != 49 && pu_out < NPU / 2) begin
          failures++;
          $display("FAIL PU %0d latency %0d", pu_out, cycle - first_row_cycle[pu_out] + 1);
        end
        n_out = 0;
        pu_out++;
      end
    end
  end

  initial begin
    for (int p = 0; p < NPU; p++) begin
      for (int r = 0; r < 15; r++)
        for (int c = 0; c < 15; c++)
          case (p % 4)
            0, 1: P[p][r][c] = $urandom_range(0, 255);
            2:    P[p][r][c] = ((r + c) % 2 == 0) ? 255 : 0;
            default: P[p][r][c] = (8 * r + 5 * c + $urandom_range(0, 20)) % 256;
          endcase
      reference(p);
    end

    in_valid = 1'b0;
    for (int c = 0; c < 15; c++) in_row[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < NPU; p++)
      for (int r = 0; r < 15; r++) begin
        // Second half of the run: random gaps between rows.
        if (p >= NPU / 2)
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
        in_valid = 1'b1;
        for (int c = 0; c < 15; c++) in_row[c] = 8'(P[p][r][c]);
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
    in_valid = 1'b0;
  end

  initial begin
    wait (pu_out == NPU);
    checks++;
    for (int p = 1; p < NPU / 2; p++)
      if (first_row_cycle[p] - first_row_cycle[p-1] != 47) begin
        failures++;
        $display("FAIL issue interval %0d at PU %0d", first_row_cycle[p] - first_row_cycle[p-1], p);
        break;
      end
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL: no input stall was exercised");
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] != 8 * NPU) begin
        failures++;
        $display("FAIL: %0d outputs of kind %0d", seen[k], k);
      end
    end
    $display("stalled row slots %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPU * 80 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
