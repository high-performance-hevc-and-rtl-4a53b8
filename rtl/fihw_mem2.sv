// MEM2 of the memory-based fractional interpolation hardware: a 256 x 37-bit
// product ROM addressed by an 8-bit unsigned pixel A.
//
// It holds 5*A (11 bits), -11*A, 17*A and 29*A (13 bits each) with the bits
// that need not be stored removed, as published: A[1:0] are the two least
// significant bits of 5*A, -11*A and 29*A, A[3:0] the four of 17*A; bit 2 of
// 5*A is bit 2 of -11*A and 29*A, bit 3 of 5*A is bit 3 of -11*A.
// Word layout, MSB first:
//   [36:27] = (29*A)[12:3]  [26:18] = (17*A)[12:4]
//   [17:9]  = (-11*A)[12:4] [8:0]   = (5*A)[10:2]
// Reconstruction by the reader:
//   5*A = {d[8:0], A[1:0]}          -11*A = {d[17:9], d[1:0], A[1:0]}
//   17*A = {d[26:18], A[3:0]}       29*A  = {d[36:27], d[0], A[1:0]}
// The contents are computed at elaboration. Registered read: dout is valid
// one cycle after addr.
module fihw_mem2 (
  input  logic        clk,
  input  logic [7:0]  addr,
  output logic [36:0] dout
);

  typedef logic [36:0] rom_t [256];

  function automatic rom_t fill();
    rom_t r;
    for (int a = 0; a < 256; a++) begin
      // kept bits only: (29*A)[12:3], (17*A)[12:4], (-11*A)[12:4], (5*A)[10:2]
      r[a] = {10'((29 * a) >> 3), 9'((17 * a) >> 4), 9'((-11 * a) >>> 4), 9'((5 * a) >> 2)};
    end
    return r;
  endfunction

  localparam rom_t ROM = fill();

  always_ff @(posedge clk) dout <= ROM[addr];

endmodule
