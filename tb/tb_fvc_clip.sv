// Self-checking testbench of fvc_clip. Two instances are checked: the column
// clip (30-bit input, shift 3 for 4x4 and 4 for 8x8) and the row clip
// (shift 10 / 11). Random values of every magnitude, including ones that
// saturate in both directions, are compared with an arithmetic shift
// followed by saturation to 16 bits. Combinational: checked 1 ns after the
// inputs change.
module tb_fvc_clip;
  import fvc_pkg::*;

  localparam int IN_W = 30;
  localparam int NVEC = 20000;
  int checks = 0, failures = 0;

  tu_size_e               tu_size;
  logic signed [IN_W-1:0] din [8];
  logic signed [15:0]     dcol [8], drow [8];

  fvc_clip #(.IN_W(IN_W), .OUT_W(16), .SH4(3),  .SH8(4))  u_col (.tu_size, .din, .dout(dcol));
  fvc_clip #(.IN_W(IN_W), .OUT_W(16), .SH4(10), .SH8(11)) u_row (.tu_size, .din, .dout(drow));

  function automatic longint sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  int n_sat_hi = 0, n_sat_lo = 0;

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      tu_size = tu_size_e'(n % 2);
      for (int k = 0; k < 8; k++)
        din[k] = IN_W'($signed($urandom) >>> $urandom_range(2, 20));
      #1;
      for (int k = 0; k < 8; k++) begin
        automatic longint v  = longint'(din[k]);
        automatic longint ec = sat(v >>> ((tu_size == TU_4X4) ? 3 : 4));
        automatic longint er = sat(v >>> ((tu_size == TU_4X4) ? 10 : 11));
        checks += 2;
        if (longint'(dcol[k]) != ec) begin
          failures++;
          $display("FAIL column clip %0d -> %0d expected %0d", v, dcol[k], ec);
        end
        if (longint'(drow[k]) != er) begin
          failures++;
          $display("FAIL row clip %0d -> %0d expected %0d", v, drow[k], er);
        end
        if (ec == 32767) n_sat_hi++;
        if (ec == -32768) n_sat_lo++;
      end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL: saturation not exercised");
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
