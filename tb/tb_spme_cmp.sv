// Self-checking testbench of spme_cmp (two-stage best-location search).
// Random 7x7 sub-pixel SAD grids (random, bowl shaped and with many equal
// values to exercise ties) are searched; the result is compared with a
// reference two-stage search (centre and eight half-pixel locations, then
// eight quarter-pixel locations around the winner; strict "less than" in
// raster order). Checks that done comes 7 clock edges after start (six
// compare cycles, as published, plus the result register) and that a new
// search can start every 6 cycles.
module tb_spme_cmp;
  import spme_pkg::*;

  localparam int NS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;

  logic  start, busy, done;
  sad_t  sad [7][7];
  sad_t  best_sad;
  qoff_t best_qx, best_qy;

  spme_cmp dut (.*);

  int G [NS][7][7];
  int e_sad [NS], e_qx [NS], e_qy [NS];
  int st_cycle [NS];
  int n_st = 0, n_done = 0, n_b2b = 0, n_quarter = 0;

  function automatic void reference(int p);
    int bs = G[p][3][3], bx = 0, by = 0, hx, hy;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if ((dx != 0 || dy != 0) && G[p][2*dy+3][2*dx+3] < bs) begin
          bs = G[p][2*dy+3][2*dx+3]; bx = 2 * dx; by = 2 * dy;
        end
    hx = bx; hy = by;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if ((dx != 0 || dy != 0) && G[p][hy+dy+3][hx+dx+3] < bs) begin
          bs = G[p][hy+dy+3][hx+dx+3]; bx = hx + dx; by = hy + dy;
        end
    e_sad[p] = bs; e_qx[p] = bx; e_qy[p] = by;
  endfunction

  always @(posedge clk) begin
    if (rst_n && start) begin
      if (n_st > 0 && cycle - st_cycle[n_st-1] == 6) n_b2b++;
      st_cycle[n_st] = cycle;
      n_st++;
    end
    if (rst_n && done) begin
      checks += 2;
      if (int'(best_sad) != e_sad[n_done] || int'(best_qx) != e_qx[n_done] ||
          int'(best_qy) != e_qy[n_done]) begin
        failures++;
        $display("FAIL search %0d: %0d (%0d,%0d) expected %0d (%0d,%0d)", n_done, best_sad,
                 best_qx, best_qy, e_sad[n_done], e_qx[n_done], e_qy[n_done]);
      end
      if (cycle - st_cycle[n_done] != 7) begin
        failures++;
        $display("FAIL search %0d latency %0d", n_done, cycle - st_cycle[n_done]);
      end
      if (e_qx[n_done] % 2 != 0 || e_qy[n_done] % 2 != 0) n_quarter++;
      n_done++;
    end
  end

  initial begin
    for (int p = 0; p < NS; p++) begin
      automatic int cx = $urandom_range(0, 6);
      automatic int cy = $urandom_range(0, 6);
      for (int y = 0; y < 7; y++)
        for (int x = 0; x < 7; x++)
          case (p % 3)
            0: G[p][y][x] = $urandom_range(0, 1048575);
            1: G[p][y][x] = 100 + 50 * ((x - cx) * (x - cx) + (y - cy) * (y - cy)) +
                            $urandom_range(0, 30);
            default: G[p][y][x] = $urandom_range(0, 2);
          endcase
      reference(p);
    end
    start = 1'b0;
    for (int y = 0; y < 7; y++) for (int x = 0; x < 7; x++) sad[y][x] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < NS; p++) begin
      start = 1'b1;
      for (int y = 0; y < 7; y++) for (int x = 0; x < 7; x++) sad[y][x] = sad_t'(G[p][y][x]);
      @(negedge clk);
      start = 1'b0;
      for (int y = 0; y < 7; y++) for (int x = 0; x < 7; x++) sad[y][x] = sad_t'($urandom);
      repeat (5) @(negedge clk);
      if (p % 2 == 1) repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    start = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_done != NS || n_b2b == 0 || n_quarter == 0) begin
      failures++;
      $display("FAIL: %0d results, %0d back-to-back starts, %0d quarter winners", n_done, n_b2b,
               n_quarter);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 12 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
