// Self-checking testbench of spme_interp (combinational SAD interpolator).
// Random nine-SAD rows (small, full-scale, smooth and extreme patterns that
// drive the sums below zero and above 2^20) are applied; the six outputs are
// compared with the direct 8-tap HEVC filters, rounded, divided by 64 and
// clamped to 0..2^20-1. Combinational: results are checked 1 ns after the
// inputs change.
module tb_spme_interp;
  import spme_pkg::*;

  localparam int NVEC = 20000;
  int checks = 0, failures = 0;

  sad_t s [9];
  sad_t a [2], b [2], c [2];

  spme_interp dut (.*);

  int fa [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};
  int fb [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
  int fc [8] = '{0, 1, -5, 17, 58, -10, 4, -1};

  // Filter f (1 = A, 2 = B, 3 = C) at base position i (-1 or 0).
  function automatic int ref_f(int f, int i, int v [9]);
    longint acc = 0;
    longint r;
    for (int t = 0; t < 8; t++) begin
      int k = i + t - 3 + 4;
      if (k >= 0 && k < 9)
        acc += longint'((f == 1) ? fa[t] : (f == 2) ? fb[t] : fc[t]) * v[k];
    end
    r = (acc + 32) >>> 6;
    if (r < 0) return 0;
    if (r > 1048575) return 1048575;
    return int'(r);
  endfunction

  int n_low = 0, n_high = 0;

  initial begin
    int v [9];
    for (int n = 0; n < NVEC; n++) begin
      for (int k = 0; k < 9; k++)
        case (n % 4)
          0: v[k] = $urandom_range(0, 1048575);
          1: v[k] = $urandom_range(0, 255);
          2: v[k] = 5000 + 300 * (k - 4) * (k - 4) + $urandom_range(0, 50);
          default: v[k] = ($urandom_range(0, 1) == 1) ? 1048575 : 0;
        endcase
      for (int k = 0; k < 9; k++) s[k] = sad_t'(v[k]);
      #1;
      for (int i = 0; i < 2; i++) begin
        automatic int ea = ref_f(1, i - 1, v);
        automatic int eb = ref_f(2, i - 1, v);
        automatic int ec = ref_f(3, i - 1, v);
        checks += 3;
        if (int'(a[i]) != ea) begin failures++; $display("FAIL a[%0d] %0d exp %0d", i, a[i], ea); end
        if (int'(b[i]) != eb) begin failures++; $display("FAIL b[%0d] %0d exp %0d", i, b[i], eb); end
        if (int'(c[i]) != ec) begin failures++; $display("FAIL c[%0d] %0d exp %0d", i, c[i], ec); end
        if (ea == 0 || eb == 0 || ec == 0) n_low++;
        if (ea == 1048575 || eb == 1048575 || ec == 1048575) n_high++;
      end
    end
    checks++;
    if (n_low == 0 || n_high == 0) begin
      failures++;
      $display("FAIL: clamping not exercised (%0d low, %0d high)", n_low, n_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NVEC * 2 + 100);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
