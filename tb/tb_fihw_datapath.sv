// Self-checking testbench of fihw_datapath. Random 15-pixel lines (random,
// extreme 0/255 patterns that make the filter sums overflow both ways, and
// smooth ramps) are fed with random gaps; the 24 outputs of every line are
// compared with the 8-tap HEVC filters applied directly, rounded, divided by
// 64 and clipped to 0..255. Also checks the 2-cycle latency, that the tag
// travels with the line and that one line per cycle is accepted.
module tb_fihw_datapath;

  localparam int NL = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int checks = 0, failures = 0;

  logic       in_valid, out_valid;
  logic [7:0] in_tag, out_tag;
  logic [7:0] w [15];
  logic [7:0] fa [8], fb [8], fc [8];

  fihw_datapath dut (.*);

  int ta [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};
  int tb [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
  int tc [8] = '{0, 1, -5, 17, 58, -10, 4, -1};

  int E [NL][3][8];
  int tag_of [NL], in_cycle [NL];
  int n_in = 0, n_out = 0, n_b2b = 0, n_clip = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      for (int k = 0; k < 8; k++)
        for (int f = 0; f < 3; f++) begin
          automatic int acc = 0;
          automatic int r;
          for (int t = 0; t < 8; t++)
            acc += ((f == 0) ? ta[t] : (f == 1) ? tb[t] : tc[t]) * int'(w[k + t]);
          r = (acc + 32) >>> 6;
          if (r < 0 || r > 255) n_clip++;
          E[n_in][f][k] = (r < 0) ? 0 : (r > 255) ? 255 : r;
        end
      if (n_in > 0 && in_cycle[n_in-1] == cycle - 1) n_b2b++;
      tag_of[n_in] = int'(in_tag);
      in_cycle[n_in] = cycle;
      n_in++;
    end
    if (rst_n && out_valid) begin
      automatic bit ok = 1'b1;
      for (int k = 0; k < 8; k++)
        if (int'(fa[k]) != E[n_out][0][k] || int'(fb[k]) != E[n_out][1][k] ||
            int'(fc[k]) != E[n_out][2][k]) ok = 1'b0;
      checks += 3;
      if (!ok) begin
        failures++;
        $display("FAIL line %0d: a0 %0d b0 %0d c0 %0d expected %0d %0d %0d", n_out, fa[0], fb[0],
                 fc[0], E[n_out][0][0], E[n_out][1][0], E[n_out][2][0]);
      end
      if (int'(out_tag) != tag_of[n_out]) begin
        failures++;
        $display("FAIL line %0d tag", n_out);
      end
      if (cycle - in_cycle[n_out] != 2) begin
        failures++;
        $display("FAIL line %0d latency %0d", n_out, cycle - in_cycle[n_out]);
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 1'b0;
    in_tag = '0;
    for (int t = 0; t < 15; t++) w[t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NL; n++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        for (int t = 0; t < 15; t++) w[t] = 8'($urandom);
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_tag = 8'($urandom);
      for (int t = 0; t < 15; t++)
        case (n % 4)
          0, 1: w[t] = 8'($urandom);
          2: w[t] = ($urandom_range(0, 1) == 1) ? 8'd255 : 8'd0;
          default: w[t] = 8'(17 * t + n);
        endcase
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NL || n_b2b == 0 || n_clip == 0) begin
      failures++;
      $display("FAIL: %0d outputs, %0d back-to-back lines, %0d clipped", n_out, n_b2b, n_clip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NL * 4 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
