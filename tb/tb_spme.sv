// Self-checking testbench of spme: random 9x9 integer SAD blocks (bowl
// shaped with noise, plus fully random and near-full-scale ones) are sent
// back to back; the best sub-pixel offset and SAD are compared with a
// reference that filters the SAD grid directly with the 8-tap HEVC filters
// and runs the two-stage search. Also checks the 13-cycle latency from
// acceptance and the 6-cycle issue interval.
module tb_spme;
  import spme_pkg::*;

  localparam int NPU = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;

  logic  in_valid, in_ready, out_valid;
  sad_t  in_sad [9][9];
  sad_t  out_sad;
  qoff_t out_qx, out_qy;

  spme dut (.*);

  // ------------------------------------------------------------- reference
  int fa [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};
  int fb [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
  int fc [8] = '{0, 1, -5, 17, 58, -10, 4, -1};

  function automatic int tap(int f, int t);
    return (f == 1) ? fa[t] : (f == 2) ? fb[t] : fc[t];
  endfunction

  function automatic int nrm(longint v);
    longint r = (v + 32) >>> 6;
    if (r < 0) return 0;
    if (r > 1048575) return 1048575;
    return int'(r);
  endfunction

  int S [NPU][9][9];           // S[pu][y+4][x+4]
  int exp_sad [NPU], exp_qx [NPU], exp_qy [NPU];

  function automatic void reference(int p);
    int H [7][9];              // H[qx+3][y+4]
    int G [7][7];              // G[qy+3][qx+3]
    int bx, by, bs, hx, hy;
    for (int qx = -3; qx <= 3; qx++)
      for (int y = 0; y < 9; y++) begin
        if (qx == 0) H[qx+3][y] = S[p][y][4];
        else begin
          int i = (qx < 0) ? -1 : 0;
          int f = qx - 4 * i;
          longint acc = 0;
          for (int t = -3; t <= 4; t++) acc += tap(f, t + 3) * S[p][y][i + t + 4];
          H[qx+3][y] = nrm(acc);
        end
      end
    for (int qx = -3; qx <= 3; qx++)
      for (int qy = -3; qy <= 3; qy++) begin
        if (qy == 0) G[3][qx+3] = H[qx+3][4];
        else begin
          int j = (qy < 0) ? -1 : 0;
          int f = qy - 4 * j;
          longint acc = 0;
          for (int t = -3; t <= 4; t++) acc += tap(f, t + 3) * H[qx+3][j + t + 4];
          G[qy+3][qx+3] = nrm(acc);
        end
      end
    bx = 0; by = 0; bs = G[3][3];
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if ((dx != 0 || dy != 0) && G[2*dy+3][2*dx+3] < bs) begin
          bs = G[2*dy+3][2*dx+3]; bx = 2 * dx; by = 2 * dy;
        end
    hx = bx; hy = by;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if ((dx != 0 || dy != 0) && G[hy+dy+3][hx+dx+3] < bs) begin
          bs = G[hy+dy+3][hx+dx+3]; bx = hx + dx; by = hy + dy;
        end
    exp_sad[p] = bs; exp_qx[p] = bx; exp_qy[p] = by;
  endfunction

  // ---------------------------------------------------------------- checking
  int out_idx = 0;
  int acc_cycle [NPU];
  int n_acc = 0;
  int n_half = 0, n_quarter = 0, n_centre = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      acc_cycle[n_acc] = cycle;
      n_acc++;
    end
    if (rst_n && out_valid) begin
      checks += 2;
      if (out_sad != sad_t'(exp_sad[out_idx]) || int'(out_qx) != exp_qx[out_idx] ||
          int'(out_qy) != exp_qy[out_idx]) begin
        failures++;
        $display("FAIL PU %0d: sad %0d (%0d,%0d), expected %0d (%0d,%0d)", out_idx, out_sad,
                 out_qx, out_qy, exp_sad[out_idx], exp_qx[out_idx], exp_qy[out_idx]);
      end
      if (cycle - acc_cycle[out_idx] != 13) begin
        failures++;
        $display("FAIL PU %0d latency %0d", out_idx, cycle - acc_cycle[out_idx]);
      end
      if (exp_qx[out_idx] == 0 && exp_qy[out_idx] == 0) n_centre++;
      else if (exp_qx[out_idx] % 2 == 0 && exp_qy[out_idx] % 2 == 0) n_half++;
      else n_quarter++;
      out_idx++;
    end
  end

  initial begin
    for (int p = 0; p < NPU; p++) begin
      int cx = $urandom_range(0, 6) - 3;
      int cy = $urandom_range(0, 6) - 3;
      for (int y = 0; y < 9; y++)
        for (int x = 0; x < 9; x++) begin
          if (p % 10 == 7)
            S[p][y][x] = $urandom_range(0, 1048575);
          else if (p % 10 == 9)
            S[p][y][x] = 1048575 - $urandom_range(0, 4000);
          else
            S[p][y][x] = 2000 + 40 * ((4 * (x - 4) - cx) * (4 * (x - 4) - cx) +
                                      (4 * (y - 4) - cy) * (4 * (y - 4) - cy)) +
                         $urandom_range(0, 300);
        end
      reference(p);
    end

    in_valid = 1'b0;
    for (int y = 0; y < 9; y++) for (int x = 0; x < 9; x++) in_sad[y][x] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < NPU; p++) begin
      in_valid = 1'b1;
      for (int y = 0; y < 9; y++) for (int x = 0; x < 9; x++) in_sad[y][x] = sad_t'(S[p][y][x]);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  initial begin
    wait (out_idx == NPU);
    checks++;
    // Back-to-back PUs must be taken every 6 cycles.
    for (int p = 1; p < NPU; p++)
      if (acc_cycle[p] - acc_cycle[p-1] != 6) begin
        failures++;
        $display("FAIL issue interval %0d at PU %0d", acc_cycle[p] - acc_cycle[p-1], p);
        break;
      end
    checks++;
    if (n_half == 0 || n_quarter == 0 || n_centre == 0) begin
      failures++;
      $display("FAIL: not every kind of winner was exercised");
    end
    $display("winners: centre %0d, half %0d, quarter %0d", n_centre, n_half, n_quarter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPU * 6 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
