// End-to-end testbench of hevc_fvc_top at its default parameters. All five
// designs run at the same time, each on its own stimulus:
//   SPME : 60 integer SAD blocks, back to back and with idle gaps; best
//          offset and SAD compared with a direct filter-and-search model,
//          13-cycle latency and 6-cycle issue interval checked.
//   FIHW : 12 PUs of 15x15 pixels, back to back and with row gaps; all 40
//          output groups per PU compared with direct 8-tap filtering,
//          50-cycle latency and 47-cycle PU interval checked.
//   FVC  : the three architectures get the same 60 TUs (every transform
//          type in both directions, both TU sizes, mixed sizes, saturating
//          inputs); every output row is compared with a model built from the
//          transform basis functions, first-row latency 14/14/16 checked.
// Each mechanism is counted and the run fails if one never occurred:
// SPME back-to-back issue and idle gaps, FIHW back-to-back PUs and stalled
// rows, every output group kind, FVC stalls, 4x4 and 8x8 TUs, every
// transform type vertically and horizontally, and clip saturation.
module tb_hevc_fvc_top;
  import spme_pkg::*;
  import fihw_pkg::*;
  import fvc_pkg::*;

  localparam int S_NPU = 60;
  localparam int F_NPU = 12;
  localparam int NTU   = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;

  // ------------------------------------------------------------------ DUT
  logic       spme_in_valid, spme_in_ready, spme_out_valid;
  sad_t       spme_in_sad [9][9];
  sad_t       spme_out_sad;
  qoff_t      spme_out_qx, spme_out_qy;
  logic       fihw_in_valid, fihw_in_ready, fihw_out_valid;
  logic [7:0] fihw_in_row [15];
  fihw_kind_e fihw_out_kind;
  logic [2:0] fihw_out_idx;
  logic [7:0] fihw_out_pix [3][8];
  logic                fvc_in_valid   [3];
  logic                fvc_in_ready   [3];
  tu_size_e            fvc_in_tu_size [3];
  tr_type_e            fvc_in_type_v  [3];
  tr_type_e            fvc_in_type_h  [3];
  logic signed [8:0]   fvc_in_data    [3][8];
  logic                fvc_out_valid  [3];
  tu_size_e            fvc_out_tu_size[3];
  logic [2:0]          fvc_out_row    [3];
  logic signed [15:0]  fvc_out_data   [3][8];

  hevc_fvc_top dut (.*);

  // Mechanism counters.
  int m_spme_b2b = 0, m_spme_gap = 0, m_fihw_b2b = 0, m_fihw_stall = 0;
  int m_fvc_stall = 0, m_fvc_4 = 0, m_fvc_8 = 0, m_fvc_sat = 0;
  int m_tv [5], m_th [5], m_kind [5];

  // ================================================================= SPME
  int sfa [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};
  int sfb [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
  int sfc [8] = '{0, 1, -5, 17, 58, -10, 4, -1};

  function automatic int s_tap(int f, int t);
    return (f == 1) ? sfa[t] : (f == 2) ? sfb[t] : sfc[t];
  endfunction

  function automatic int s_nrm(longint v);
    longint r = (v + 32) >>> 6;
    if (r < 0) return 0;
    if (r > 1048575) return 1048575;
    return int'(r);
  endfunction

  int S [S_NPU][9][9];
  int s_exp_sad [S_NPU], s_exp_qx [S_NPU], s_exp_qy [S_NPU];

  function automatic void s_reference(int p);
    int H [7][9];
    int G [7][7];
    int bx, by, bs, hx, hy;
    for (int qx = -3; qx <= 3; qx++)
      for (int y = 0; y < 9; y++) begin
        if (qx == 0) H[qx+3][y] = S[p][y][4];
        else begin
          int i = (qx < 0) ? -1 : 0;
          int f = qx - 4 * i;
          longint acc = 0;
          for (int t = -3; t <= 4; t++) acc += s_tap(f, t + 3) * S[p][y][i + t + 4];
          H[qx+3][y] = s_nrm(acc);
        end
      end
    for (int qx = -3; qx <= 3; qx++)
      for (int qy = -3; qy <= 3; qy++) begin
        if (qy == 0) G[3][qx+3] = H[qx+3][4];
        else begin
          int j = (qy < 0) ? -1 : 0;
          int f = qy - 4 * j;
          longint acc = 0;
          for (int t = -3; t <= 4; t++) acc += s_tap(f, t + 3) * H[qx+3][j + t + 4];
          G[qy+3][qx+3] = s_nrm(acc);
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
    s_exp_sad[p] = bs; s_exp_qx[p] = bx; s_exp_qy[p] = by;
  endfunction

  int s_acc_cycle [S_NPU];
  int s_n_acc = 0, s_n_out = 0;

  always @(posedge clk) begin
    if (rst_n && spme_in_valid && spme_in_ready) begin
      if (s_n_acc > 0) begin
        if (cycle - s_acc_cycle[s_n_acc-1] == 6) m_spme_b2b++;
        else m_spme_gap++;
        checks++;
        if (cycle - s_acc_cycle[s_n_acc-1] < 6) begin
          failures++;
          $display("FAIL SPME: PUs accepted %0d cycles apart", cycle - s_acc_cycle[s_n_acc-1]);
        end
      end
      s_acc_cycle[s_n_acc] = cycle;
      s_n_acc++;
    end
    if (rst_n && spme_out_valid) begin
      checks += 2;
      if (int'(spme_out_sad) != s_exp_sad[s_n_out] || int'(spme_out_qx) != s_exp_qx[s_n_out] ||
          int'(spme_out_qy) != s_exp_qy[s_n_out]) begin
        failures++;
        $display("FAIL SPME PU %0d: %0d (%0d,%0d) expected %0d (%0d,%0d)", s_n_out, spme_out_sad,
                 spme_out_qx, spme_out_qy, s_exp_sad[s_n_out], s_exp_qx[s_n_out],
                 s_exp_qy[s_n_out]);
      end
      if (cycle - s_acc_cycle[s_n_out] != 13) begin
        failures++;
        $display("FAIL SPME PU %0d latency %0d", s_n_out, cycle - s_acc_cycle[s_n_out]);
      end
      s_n_out++;
    end
  end

  initial begin
    for (int p = 0; p < S_NPU; p++) begin
      automatic int cx = $urandom_range(0, 6) - 3;
      automatic int cy = $urandom_range(0, 6) - 3;
      for (int y = 0; y < 9; y++)
        for (int x = 0; x < 9; x++)
          S[p][y][x] = (p % 7 == 3) ? $urandom_range(0, 1048575) :
                       2000 + 40 * ((4 * (x - 4) - cx) * (4 * (x - 4) - cx) +
                                    (4 * (y - 4) - cy) * (4 * (y - 4) - cy)) +
                       $urandom_range(0, 300);
      s_reference(p);
    end
    spme_in_valid = 1'b0;
    for (int y = 0; y < 9; y++) for (int x = 0; x < 9; x++) spme_in_sad[y][x] = '0;
    wait (rst_n);
    @(negedge clk);
    for (int p = 0; p < S_NPU; p++) begin
      if (p >= S_NPU / 2) begin
        spme_in_valid = 1'b0;
        repeat ($urandom_range(0, 8)) @(negedge clk);
      end
      spme_in_valid = 1'b1;
      for (int y = 0; y < 9; y++)
        for (int x = 0; x < 9; x++) spme_in_sad[y][x] = sad_t'(S[p][y][x]);
      while (!spme_in_ready) @(negedge clk);
      @(negedge clk);
    end
    spme_in_valid = 1'b0;
  end

  // ================================================================= FIHW
  int P  [F_NPU][15][15];
  int FE [F_NPU][5][8][3][8];

  function automatic int f_filt(int f, int line [15], int k);
    int acc = 0;
    int r;
    for (int t = 0; t < 8; t++)
      acc += ((f == 0) ? sfa[t] : (f == 1) ? sfb[t] : sfc[t]) * line[k + t];
    r = (acc + 32) >>> 6;
    return (r < 0) ? 0 : (r > 255) ? 255 : r;
  endfunction

  function automatic void f_reference(int p);
    int line [15];
    int H [3][15][8];
    for (int r = 0; r < 15; r++) begin
      for (int c = 0; c < 15; c++) line[c] = P[p][r][c];
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++) H[f][r][k] = f_filt(f, line, k);
    end
    for (int i = 0; i < 8; i++)
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++) FE[p][0][i][f][k] = H[f][i+3][k];
    for (int j = 0; j < 8; j++) begin
      for (int r = 0; r < 15; r++) line[r] = P[p][r][j+3];
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++) FE[p][1][j][f][k] = f_filt(f, line, k);
      for (int h = 0; h < 3; h++) begin
        for (int r = 0; r < 15; r++) line[r] = H[h][r][j];
        for (int f = 0; f < 3; f++)
          for (int k = 0; k < 8; k++) FE[p][2 + h][j][f][k] = f_filt(f, line, k);
      end
    end
  endfunction

  int f_first [F_NPU];
  int f_rows = 0, f_out = 0, f_pu = 0;

  always @(posedge clk) begin
    if (rst_n && fihw_in_valid && fihw_in_ready) begin
      if (f_rows % 15 == 0) begin
        f_first[f_rows / 15] = cycle;
        if (f_rows > 0 && cycle - f_first[f_rows / 15 - 1] == 47) m_fihw_b2b++;
      end
      f_rows++;
    end
    if (rst_n && fihw_in_ready && !fihw_in_valid && f_rows % 15 != 0) m_fihw_stall++;
    if (rst_n && fihw_out_valid) begin
      automatic bit ok = 1'b1;
      checks++;
      for (int f = 0; f < 3; f++)
        for (int k = 0; k < 8; k++)
          if (int'(fihw_out_pix[f][k]) != FE[f_pu][int'(fihw_out_kind)][fihw_out_idx][f][k])
            ok = 1'b0;
      if (!ok) begin
        failures++;
        $display("FAIL FIHW PU %0d kind %0d idx %0d", f_pu, fihw_out_kind, fihw_out_idx);
      end
      m_kind[int'(fihw_out_kind)]++;
      f_out++;
      if (f_out == 40) begin
        if (f_pu < F_NPU / 2) begin
          checks++;
          if (cycle - f_first[f_pu] + 1 != 50) begin
            failures++;
            $display("FAIL FIHW PU %0d latency %0d", f_pu, cycle - f_first[f_pu] + 1);
          end
        end
        f_out = 0;
        f_pu++;
      end
    end
  end

  initial begin
    for (int p = 0; p < F_NPU; p++) begin
      for (int r = 0; r < 15; r++)
        for (int c = 0; c < 15; c++)
          P[p][r][c] = (p % 3 == 2) ? (((r + c) % 2 == 0) ? 255 : 0) : $urandom_range(0, 255);
      f_reference(p);
    end
    fihw_in_valid = 1'b0;
    for (int c = 0; c < 15; c++) fihw_in_row[c] = '0;
    wait (rst_n);
    @(negedge clk);
    for (int p = 0; p < F_NPU; p++)
      for (int r = 0; r < 15; r++) begin
        if (p >= F_NPU / 2)
          while ($urandom_range(0, 3) == 0) begin
            fihw_in_valid = 1'b0;
            @(negedge clk);
          end
        fihw_in_valid = 1'b1;
        for (int c = 0; c < 15; c++) fihw_in_row[c] = 8'(P[p][r][c]);
        while (!fihw_in_ready) @(negedge clk);
        @(negedge clk);
      end
    fihw_in_valid = 1'b0;
  end

  // ================================================================== FVC
  int tv8 [5][8][8];
  int tv4 [5][4][4];

  function automatic real basis(int t, int n, int i, int j);
    real pi = 3.14159265358979323846;
    real w0 = (i == 0) ? $sqrt(0.5) : 1.0;
    real w1 = (j == 0) ? $sqrt(0.5) : 1.0;
    case (t)
      0: return w0 * $sqrt(2.0 / n) * $cos(pi * i * (2 * j + 1) / (2.0 * n));
      1: return w0 * w1 * $sqrt(4.0 / (2 * n - 1)) * $cos(2.0 * pi * i * j / (2 * n - 1));
      2: return $sqrt(4.0 / (2 * n + 1)) * $cos(pi * (2 * i + 1) * (2 * j + 1) / (4.0 * n + 2));
      3: return $sqrt(2.0 / (n + 1)) * $sin(pi * (i + 1) * (j + 1) / (n + 1.0));
      default: return $sqrt(4.0 / (2 * n + 1)) * $sin(pi * (2 * i + 1) * (j + 1) / (2.0 * n + 1));
    endcase
  endfunction

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  typedef struct {
    tu_size_e size;
    tr_type_e tv, th;
    int       x   [8][8];
    int       exp [8][8];
  } tu_t;

  tu_t tus [NTU];

  function automatic void compute(int t);
    int n = (tus[t].size == TU_8X8) ? 8 : 4;
    int s1 = (n == 8) ? 4 : 3;
    int s2 = (n == 8) ? 11 : 10;
    int ntu = (n == 8) ? 1 : 2;
    for (int q = 0; q < ntu; q++) begin
      int mid [8][8];
      int off = q * 4;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          longint acc = 0;
          for (int k = 0; k < n; k++)
            acc += longint'((n == 8) ? tv8[tus[t].tv][i][k] : tv4[tus[t].tv][i][k]) *
                   tus[t].x[off + k][j];
          mid[i][j] = sat16(acc >>> s1);
        end
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          longint acc = 0;
          for (int k = 0; k < n; k++)
            acc += longint'(mid[i][k]) * ((n == 8) ? tv8[tus[t].th][j][k] : tv4[tus[t].th][j][k]);
          tus[t].exp[i][off + j] = sat16(acc >>> s2);
          if (tus[t].exp[i][off + j] == 32767 || tus[t].exp[i][off + j] == -32768) m_fvc_sat++;
        end
    end
  endfunction

  logic want, all_ready;
  assign all_ready = fvc_in_ready[0] && fvc_in_ready[1] && fvc_in_ready[2];
  always_comb
    for (int a = 0; a < 3; a++) fvc_in_valid[a] = want && all_ready;

  int tu_idx [3] = '{0, 0, 0};
  int row_idx [3] = '{0, 0, 0};
  int first_in_cycle = -1;
  int first_out_cycle [3] = '{-1, -1, -1};

  always @(posedge clk) begin
    for (int a = 0; a < 3; a++) begin
      if (rst_n && fvc_out_valid[a]) begin
        automatic int t = tu_idx[a];
        automatic int n = (tus[t].size == TU_8X8) ? 8 : 4;
        if (first_out_cycle[a] < 0) first_out_cycle[a] = cycle;
        checks++;
        if (fvc_out_row[a] != 3'(row_idx[a]) || fvc_out_tu_size[a] != tus[t].size) begin
          failures++;
          $display("FAIL FVC arch %0d TU %0d: row %0d, expected %0d", a, t, fvc_out_row[a],
                   row_idx[a]);
        end
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(fvc_out_data[a][k]) != tus[t].exp[row_idx[a]][k]) begin
            failures++;
            if (failures < 20)
              $display("FAIL FVC arch %0d TU %0d row %0d col %0d: got %0d expected %0d", a, t,
                       row_idx[a], k, fvc_out_data[a][k], tus[t].exp[row_idx[a]][k]);
          end
        end
        if (row_idx[a] == n - 1) begin
          row_idx[a] = 0;
          tu_idx[a]++;
        end else row_idx[a]++;
      end
    end
  end

  initial begin
    for (int t = 0; t < 5; t++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) tv8[t][i][j] = rnd(basis(t, 8, i, j) * 256.0 * $sqrt(8.0));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) tv4[t][i][j] = rnd(basis(t, 4, i, j) * 512.0);
    end
    for (int t = 0; t < NTU; t++) begin
      if (t < 10)      tus[t].size = TU_8X8;
      else if (t < 20) tus[t].size = TU_4X4;
      else             tus[t].size = ($urandom_range(0, 1) != 0) ? TU_8X8 : TU_4X4;
      tus[t].tv = tr_type_e'(t % 5);
      tus[t].th = tr_type_e'((t / 5 + t) % 5);
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) tus[t].x[r][c] = $urandom_range(0, 510) - 255;
      if (t >= NTU - 6) begin
        tus[t].tv = TR_DCT2;
        tus[t].th = TR_DCT2;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) tus[t].x[r][c] = (t % 2 == 0) ? 255 : -256;
      end
      compute(t);
      m_tv[tus[t].tv]++;
      m_th[tus[t].th]++;
      if (tus[t].size == TU_8X8) m_fvc_8++;
      else m_fvc_4++;
    end
    want = 1'b0;
    for (int a = 0; a < 3; a++) begin
      fvc_in_tu_size[a] = TU_8X8;
      fvc_in_type_v[a] = TR_DCT2;
      fvc_in_type_h[a] = TR_DCT2;
      for (int k = 0; k < 8; k++) fvc_in_data[a][k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    @(negedge clk);
    for (int t = 0; t < NTU; t++) begin
      automatic int n = (tus[t].size == TU_8X8) ? 8 : 4;
      for (int c = 0; c < n; c++) begin
        want = 1'b1;
        for (int a = 0; a < 3; a++) begin
          fvc_in_tu_size[a] = tus[t].size;
          fvc_in_type_v[a] = tus[t].tv;
          fvc_in_type_h[a] = tus[t].th;
          for (int k = 0; k < 8; k++) fvc_in_data[a][k] = 9'(tus[t].x[k][c]);
        end
        while (!all_ready) begin
          m_fvc_stall++;
          @(negedge clk);
        end
        if (first_in_cycle < 0) first_in_cycle = cycle;
        @(negedge clk);
      end
    end
    want = 1'b0;
  end

  // ================================================================ finish
  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    wait (s_n_out == S_NPU && f_pu == F_NPU &&
          tu_idx[0] == NTU && tu_idx[1] == NTU && tu_idx[2] == NTU);
    repeat (2) @(posedge clk);
    checks += 3;
    if (first_out_cycle[0] - first_in_cycle != 14) begin
      failures++; $display("FAIL baseline latency %0d", first_out_cycle[0] - first_in_cycle);
    end
    if (first_out_cycle[1] - first_in_cycle != 14) begin
      failures++; $display("FAIL reconfig latency %0d", first_out_cycle[1] - first_in_cycle);
    end
    if (first_out_cycle[2] - first_in_cycle != 16) begin
      failures++; $display("FAIL dsp latency %0d", first_out_cycle[2] - first_in_cycle);
    end
    need("SPME back-to-back PUs", m_spme_b2b);
    need("SPME idle gaps", m_spme_gap);
    need("FIHW back-to-back PUs", m_fihw_b2b);
    need("FIHW stalled rows", m_fihw_stall);
    for (int k = 0; k < 5; k++) need($sformatf("FIHW output kind %0d", k), m_kind[k]);
    need("FVC input stall", m_fvc_stall);
    need("FVC 4x4 TUs", m_fvc_4);
    need("FVC 8x8 TUs", m_fvc_8);
    need("FVC clip saturation", m_fvc_sat);
    for (int k = 0; k < 5; k++) begin
      need($sformatf("FVC vertical type %0d", k), m_tv[k]);
      need($sformatf("FVC horizontal type %0d", k), m_th[k]);
    end
    $display("mechanisms: spme b2b %0d gap %0d, fihw b2b %0d stall %0d, fvc stall %0d 4x4 %0d 8x8 %0d sat %0d",
             m_spme_b2b, m_spme_gap, m_fihw_b2b, m_fihw_stall, m_fvc_stall, m_fvc_4, m_fvc_8,
             m_fvc_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
