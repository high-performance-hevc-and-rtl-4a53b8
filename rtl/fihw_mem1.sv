// MEM1 of the memory-based fractional interpolation hardware: a 256 x 18-bit
// product ROM addressed by an 8-bit unsigned pixel A.
//
// It holds the products 5*A (11 bits) and -11*A (13 bits, two's complement)
// with the bits that need not be stored removed, as published: the two
// least significant bits of both products equal A[1:0], and bits 3:2 of
// -11*A equal bits 3:2 of 5*A. Word layout, MSB first:
//   [17:9] = (-11*A)[12:4]     [8:0] = (5*A)[10:2]
// Reconstruction by the reader (fihw_datapath):
//   5*A   = {dout[8:0], A[1:0]}
//   -11*A = {dout[17:9], dout[1:0], A[1:0]}
// The contents are computed at elaboration. Registered read: dout is valid
// one cycle after addr.
module fihw_mem1 (
  input  logic        clk,
  input  logic [7:0]  addr,
  output logic [17:0] dout
);

  typedef logic [17:0] rom_t [256];

  function automatic rom_t fill();
    rom_t r;
    for (int a = 0; a < 256; a++) begin
      // kept bits only: (5*A)[10:2] and (-11*A)[12:4]
      r[a] = {9'((-11 * a) >>> 4), 9'((5 * a) >> 2)};
    end
    return r;
  endfunction

  localparam rom_t ROM = fill();

  always_ff @(posedge clk) dout <= ROM[addr];

endmodule
