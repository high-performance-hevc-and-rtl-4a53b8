// Self-checking testbench of fvc_rmult (reconfigurable multiplier block).
// One block per input column J = 0..7 is instantiated; random and extreme
// inputs are applied for every transform type and TU size, and each of the
// eight products is compared with coefficient * x (coefficients from the
// fvc_pkg tables). Combinational: results are checked 1 ns after the inputs
// change.
module tb_fvc_rmult;
  import fvc_pkg::*;

  localparam int IN_W = 16;
  localparam int P_W  = IN_W + COEF_W;
  localparam int NVEC = 4000;
  int checks = 0, failures = 0;

  tr_type_e               tr_type;
  tu_size_e               tu_size;
  logic signed [IN_W-1:0] x [8];
  logic signed [P_W-1:0]  p [8][8];

  for (genvar j = 0; j < 8; j++) begin : g_dut
    fvc_rmult #(.IN_W(IN_W), .J(j)) dut (.tr_type, .tu_size, .x(x[j]), .p(p[j]));
  end

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      tr_type = tr_type_e'(n % 5);
      tu_size = tu_size_e'((n / 5) % 2);
      for (int j = 0; j < 8; j++)
        case (n % 7)
          0: x[j] = {1'b0, {(IN_W-1){1'b1}}};
          1: x[j] = {1'b1, {(IN_W-1){1'b0}}};
          default: x[j] = IN_W'($urandom);
        endcase
      #1;
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++) begin
          automatic longint e = longint'(coef(tr_type, tu_size, i, j)) * longint'(x[j]);
          checks++;
          if (longint'(p[j][i]) != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL type %0d size %0d col %0d row %0d: %0d expected %0d", tr_type,
                       tu_size, j, i, p[j][i], e);
          end
        end
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
