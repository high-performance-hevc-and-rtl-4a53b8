// Self-checking testbench of fihw_mem2 (2^8 x 37-bit product memory).
// Every address is read in random order; one cycle after the address the
// products 5*A, -11*A, 17*A and 29*A rebuilt from the stored word and the
// least significant bits of A must be exact.
module tb_fihw_mem2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  addr;
  logic [36:0] dout;

  fihw_mem2 dut (.*);

  initial begin
    int order [256];
    for (int a = 0; a < 256; a++) order[a] = a;
    order.shuffle();
    addr = '0;
    @(negedge clk);
    for (int n = 0; n < 512; n++) begin
      automatic int a = order[n % 256];
      addr = 8'(a);
      @(negedge clk);
      begin
        automatic int p5   = int'({dout[8:0], addr[1:0]});
        automatic int pm11 = int'($signed({dout[17:9], dout[1:0], addr[1:0]}));
        automatic int p17  = int'({dout[26:18], addr[3:0]});
        automatic int p29  = int'({dout[36:27], dout[0], addr[1:0]});
        checks += 4;
        if (p5 != 5 * a)     begin failures++; $display("FAIL A=%0d: 5A %0d", a, p5); end
        if (pm11 != -11 * a) begin failures++; $display("FAIL A=%0d: -11A %0d", a, pm11); end
        if (p17 != 17 * a)   begin failures++; $display("FAIL A=%0d: 17A %0d", a, p17); end
        if (p29 != 29 * a)   begin failures++; $display("FAIL A=%0d: 29A %0d", a, p29); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
