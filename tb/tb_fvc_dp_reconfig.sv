// Self-checking testbench of fvc_dp_reconfig (FVC 1D datapath, reconfigurable multiplier blocks).
// Random inputs of all five transform types and both TU sizes are fed with
// random gaps; every output vector is compared with the matrix product
// y[i] = sum_j c(i, j) * x[j] (for 4x4 TUs the two halves are two separate
// 4-point transforms), using the coefficient tables of fvc_pkg. The
// published 4x4 DCT-II row 1 (334, 139, -139, -334) is spot-checked against the
// table. Also checks the 2-cycle latency and that every input gives
// exactly one output (rate: one vector per cycle).
module tb_fvc_dp_reconfig;
  import fvc_pkg::*;

  localparam int IN_W  = 16;
  localparam int ACC_W = IN_W + COEF_W + 4;
  localparam int LAT   = 2;
  localparam int NVEC  = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;

  logic                    in_valid, out_valid;
  tr_type_e                tr_type;
  tu_size_e                tu_size;
  logic signed [IN_W-1:0]  x [8];
  logic signed [ACC_W-1:0] y [8];

  fvc_dp_reconfig dut (.*);

  longint exp_y [NVEC][8];
  int     in_cycle [NVEC];
  int     n_in = 0, n_out = 0;
  int     seen_type [5], seen_size [2];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      for (int i = 0; i < 8; i++) begin
        automatic longint s = 0;
        for (int j = 0; j < 8; j++)
          if (tu_size == TU_8X8 || ((i < 4) == (j < 4)))
            s += longint'(coef(tr_type, tu_size, i, j)) * longint'(x[j]);
        exp_y[n_in][i] = s;
      end
      seen_type[tr_type]++;
      seen_size[tu_size]++;
      in_cycle[n_in] = cycle;
      n_in++;
    end
    if (rst_n && out_valid) begin
      automatic bit ok = 1'b1;
      checks++;
      for (int i = 0; i < 8; i++) if (longint'(y[i]) != exp_y[n_out][i]) ok = 1'b0;
      if (!ok) begin
        failures++;
        $display("FAIL vector %0d: y0 %0d expected %0d", n_out, y[0], exp_y[n_out][0]);
      end
      checks++;
      if (cycle - in_cycle[n_out] != LAT) begin
        failures++;
        $display("FAIL vector %0d latency %0d", n_out, cycle - in_cycle[n_out]);
      end
      n_out++;
    end
  end

  initial begin
    checks++;
    if (coef(TR_DCT2, TU_4X4, 1, 0) != 334 || coef(TR_DCT2, TU_4X4, 1, 1) != 139 ||
        coef(TR_DCT2, TU_4X4, 1, 2) != -139 || coef(TR_DCT2, TU_4X4, 1, 3) != -334) begin
      failures++;
      $display("FAIL: DCT-II 4x4 table");
    end
    in_valid = 1'b0;
    tr_type  = TR_DCT2;
    tu_size  = TU_8X8;
    for (int j = 0; j < 8; j++) x[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        for (int j = 0; j < 8; j++) x[j] = IN_W'($urandom);
        @(negedge clk);
      end
      in_valid = 1'b1;
      tr_type  = tr_type_e'($urandom_range(0, 4));
      tu_size  = tu_size_e'($urandom_range(0, 1));
      for (int j = 0; j < 8; j++)
        case (v % 3)
          0: x[j] = IN_W'($urandom);
          1: x[j] = ($urandom_range(0, 1) == 1) ? {1'b0, {(IN_W-1){1'b1}}} : {1'b1, {(IN_W-1){1'b0}}};
          default: x[j] = IN_W'($urandom_range(0, 511)) - IN_W'(256);
        endcase
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (n_out != NVEC) begin
      failures++;
      $display("FAIL: %0d outputs for %0d inputs", n_out, NVEC);
    end
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (seen_type[t] == 0) begin failures++; $display("FAIL: type %0d unused", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 3 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
