// Self-checking testbench of fvc_2d: runs the baseline, reconfigurable and
// DSP architectures side by side on one stream of random TUs (all five
// transform types for both directions, both TU sizes, runs of equal sizes
// and mixed sizes, plus full-scale inputs that saturate the clips) and
// compares every output row with a reference computed here from the
// transform basis functions. It also checks the first-row latency (14 cycles,
// 16 for the DSP version), that equal-size TUs stream without stalls, and
// that a stall does occur after an 8x8 TU followed by 4x4 TUs.
module tb_fvc_2d;
  import fvc_pkg::*;

  localparam int NTU = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ reference
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

  task automatic init_tables();
    for (int t = 0; t < 5; t++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) tv8[t][i][j] = rnd(basis(t, 8, i, j) * 256.0 * $sqrt(8.0));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) tv4[t][i][j] = rnd(basis(t, 4, i, j) * 512.0);
    end
  endtask

  // One TU pair / TU: input block x[row][col] (8x8 or two 4x4 side by side
  // in the layout of the ports), expected output rows.
  typedef struct {
    tu_size_e   size;
    tr_type_e   tv, th;
    int         x   [8][8];   // x[r][c]; for 4x4: r<4 of TU0 in [r][c], TU1 in [r+4][c]
    int         exp [8][8];   // exp[row][k] in output-port layout
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
            acc += longint'((n == 8) ? tv8[tus[t].tv][i][k] : tv4[tus[t].tv][i][k]) * tus[t].x[off + k][j];
          mid[i][j] = sat16(acc >>> s1);
        end
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          longint acc = 0;
          for (int k = 0; k < n; k++)
            acc += longint'(mid[i][k]) * ((n == 8) ? tv8[tus[t].th][j][k] : tv4[tus[t].th][j][k]);
          tus[t].exp[i][off + j] = sat16(acc >>> s2);
        end
    end
  endfunction

  // ------------------------------------------------------------------ DUTs
  logic                   want, all_ready;
  tu_size_e               d_size;
  tr_type_e               d_tv, d_th;
  logic signed [8:0]      d_data [8];
  logic                   rdy   [3];
  logic                   ov    [3];
  tu_size_e               osz   [3];
  logic [2:0]             orow  [3];
  logic signed [15:0]     odat  [3][8];

  assign all_ready = rdy[0] && rdy[1] && rdy[2];

  fvc_2d #(.ARCH(ARCH_BASELINE)) u_bl (.clk, .rst_n, .in_valid(want && all_ready), .in_ready(rdy[0]),
    .in_tu_size(d_size), .in_type_v(d_tv), .in_type_h(d_th), .in_data(d_data),
    .out_valid(ov[0]), .out_tu_size(osz[0]), .out_row(orow[0]), .out_data(odat[0]));
  fvc_2d #(.ARCH(ARCH_RECONFIG)) u_rc (.clk, .rst_n, .in_valid(want && all_ready), .in_ready(rdy[1]),
    .in_tu_size(d_size), .in_type_v(d_tv), .in_type_h(d_th), .in_data(d_data),
    .out_valid(ov[1]), .out_tu_size(osz[1]), .out_row(orow[1]), .out_data(odat[1]));
  fvc_2d #(.ARCH(ARCH_DSP)) u_dsp (.clk, .rst_n, .in_valid(want && all_ready), .in_ready(rdy[2]),
    .in_tu_size(d_size), .in_type_v(d_tv), .in_type_h(d_th), .in_data(d_data),
    .out_valid(ov[2]), .out_tu_size(osz[2]), .out_row(orow[2]), .out_data(odat[2]));

  // ------------------------------------------------------------- checking
  int tu_idx [3] = '{0, 0, 0};
  int row_idx [3] = '{0, 0, 0};
  int first_in_cycle = -1;
  int first_out_cycle [3] = '{-1, -1, -1};
  int stalls = 0;
  int beats = 0;

  always @(posedge clk) begin
    for (int a = 0; a < 3; a++) begin
      if (rst_n && ov[a]) begin
        automatic int t = tu_idx[a];
        automatic int n = (tus[t].size == TU_8X8) ? 8 : 4;
        if (first_out_cycle[a] < 0) first_out_cycle[a] = cycle;
        checks++;
        if (orow[a] != 3'(row_idx[a]) || osz[a] != tus[t].size) begin
          failures++;
          $display("FAIL arch %0d TU %0d: row %0d size %0d, expected row %0d", a, t, orow[a], osz[a], row_idx[a]);
        end
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(odat[a][k]) != tus[t].exp[row_idx[a]][k]) begin
            failures++;
            if (failures < 20)
              $display("FAIL arch %0d TU %0d row %0d col %0d: got %0d expected %0d",
                       a, t, row_idx[a], k, odat[a][k], tus[t].exp[row_idx[a]][k]);
          end
        end
        if (row_idx[a] == n - 1) begin
          row_idx[a] = 0;
          tu_idx[a]++;
        end else row_idx[a]++;
      end
    end
  end

  // -------------------------------------------------------------- stimulus
  initial begin
    init_tables();
    // TU list: 10 x 8x8, 10 x 4x4 pairs, then mixed sizes, then saturating inputs.
    for (int t = 0; t < NTU; t++) begin
      if (t < 10)       tus[t].size = TU_8X8;
      else if (t < 20)  tus[t].size = TU_4X4;
      else              tus[t].size = ($urandom_range(0, 1) != 0) ? TU_8X8 : TU_4X4;
      tus[t].tv = tr_type_e'(t % 5);
      tus[t].th = tr_type_e'((t / 5 + t) % 5);
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          tus[t].x[r][c] = (t >= NTU - 6) ? (((r + c + t) % 2 == 0) ? 255 : -255)
                                          : $urandom_range(0, 510) - 255;
      if (t >= NTU - 6) begin
        tus[t].tv = TR_DCT2;
        tus[t].th = TR_DCT2;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) tus[t].x[r][c] = (t % 2 == 0) ? 255 : -255;
      end
      compute(t);
    end

    // The derived 4x4 matrices must be the published ones (spot checks).
    checks += 5;
    if (tv4[0][1][0] != 334) failures++;
    if (tv4[1][0][0] != 194) failures++;
    if (tv4[2][1][3] != -296) failures++;
    if (tv4[3][0][1] != 308) failures++;
    if (tv4[4][2][1] != -117) failures++;

    want = 1'b0;
    d_size = TU_8X8; d_tv = TR_DCT2; d_th = TR_DCT2;
    for (int k = 0; k < 8; k++) d_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    @(negedge clk);

    for (int t = 0; t < NTU; t++) begin
      automatic int n = (tus[t].size == TU_8X8) ? 8 : 4;
      for (int c = 0; c < n; c++) begin
        want   = 1'b1;
        d_size = tus[t].size;
        d_tv   = tus[t].tv;
        d_th   = tus[t].th;
        for (int k = 0; k < 8; k++) d_data[k] = 9'(tus[t].x[k][c]);
        while (!all_ready) begin
          if (t >= 3 && tus[t-1].size == tus[t].size && tus[t-2].size == tus[t].size &&
              tus[t-3].size == tus[t].size) begin
            failures++;
            $display("FAIL: stall in an equal-size TU stream at TU %0d", t);
          end
          stalls++;
          @(negedge clk);
        end
        if (first_in_cycle < 0) first_in_cycle = cycle;
        beats++;
        @(negedge clk);
      end
    end
    want = 1'b0;
  end

  initial begin
    wait (tu_idx[0] == NTU && tu_idx[1] == NTU && tu_idx[2] == NTU);
    repeat (2) @(posedge clk);
    checks += 4;
    if (first_out_cycle[0] - first_in_cycle != 14) begin
      failures++; $display("FAIL baseline latency %0d", first_out_cycle[0] - first_in_cycle);
    end
    if (first_out_cycle[1] - first_in_cycle != 14) begin
      failures++; $display("FAIL reconfig latency %0d", first_out_cycle[1] - first_in_cycle);
    end
    if (first_out_cycle[2] - first_in_cycle != 16) begin
      failures++; $display("FAIL dsp latency %0d", first_out_cycle[2] - first_in_cycle);
    end
    if (stalls == 0) begin
      failures++; $display("FAIL: no stall was ever exercised");
    end
    $display("latency bl=%0d rc=%0d dsp=%0d, beats=%0d stalls=%0d", first_out_cycle[0] - first_in_cycle,
             first_out_cycle[1] - first_in_cycle, first_out_cycle[2] - first_in_cycle, beats, stalls);
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
