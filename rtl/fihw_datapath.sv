// Filter datapath of the memory-based HEVC fractional interpolation hardware.
//
// Takes one line of 15 pixels W[0..14] (a row or a column, the pixels at
// offsets -3..11 from the first of the eight output positions) and produces
// 8 type-A, 8 type-B and 8 type-C filtered pixels: output k is the pixel at
// 1/4 (A), 1/2 (B) and 3/4 (C) of the way from W[k+3] to W[k+4], with the
// HEVC luma filters A = (-1, 4, -10, 58, 17, -5, 1), B = (-1, 4, -11, 40,
// 40, -11, 4, -1), C = (1, -5, 17, 58, -10, 4, -1) over W[k..k+7].
//
// Structure, as published: W[2] and W[12] address a MEM1 (5A, -11A), W[3..11]
// a MEM2 (5A, -11A, 17A, 29A); 10A, 40A and 58A are shifts of 5A and 29A.
// The CSE datapath forms the shared end terms 4W[m] - W[m-1] (m = 1..8,
// start of A and B) and 4W[m] - W[m+1] (m = 6..13, end of B and C) with one
// shift and one subtraction each. Eight adder trees then sum the products.
//
// Each sum is rounded, divided by 64 and clipped to 0..255, so that every
// fractional pixel is again an 8-bit value that can address MEM1/MEM2 when
// quarter pixels are filtered from half pixels (this rounding of the
// half pixels is this design's reading of the 8-bit memory address).
//
// Timing: two pipeline stages, the registered memories/CSE and the registered
// adder tree outputs: out_valid and out_tag follow in_valid/in_tag by 2 cycles.
module fihw_datapath #(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic [7:0]       w [15],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [7:0]       fa [8],
  output logic [7:0]       fb [8],
  output logic [7:0]       fc [8]
);

  typedef logic signed [19:0] acc_t;

  // ---------------------------------------------------------------- stage 1
  logic [17:0] m1_q [2];        // MEM1 words of W[2], W[12]
  logic [36:0] m2_q [9];        // MEM2 words of W[3..11]
  logic [7:0]  w_q  [15];       // pixels (low bits complete the products)
  acc_t        cse_p [1:8];     // 4W[m] - W[m-1]
  acc_t        cse_q [6:13];    // 4W[m] - W[m+1]
  logic             v_q;
  logic [TAG_W-1:0] tag_q;

  fihw_mem1 u_mem1_lo (.clk, .addr(w[2]),  .dout(m1_q[0]));
  fihw_mem1 u_mem1_hi (.clk, .addr(w[12]), .dout(m1_q[1]));
  for (genvar t = 3; t <= 11; t++) begin : g_mem2
    fihw_mem2 u_mem2 (.clk, .addr(w[t]), .dout(m2_q[t-3]));
  end

  always_ff @(posedge clk) begin
    w_q   <= w;
    tag_q <= in_tag;
    for (int m = 1; m <= 8; m++)  cse_p[m] <= (acc_t'(w[m]) <<< 2) - acc_t'(w[m-1]);
    for (int m = 6; m <= 13; m++) cse_q[m] <= (acc_t'(w[m]) <<< 2) - acc_t'(w[m+1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

  // ------------------------------------------------- product reconstruction
  // p5[t] = 5*W[t], p11n[t] = -11*W[t] for t = 2..12; p17, p29 for t = 3..11.
  acc_t p5 [15], p11n [15], p17 [15], p29 [15];
  always_comb begin
    for (int t = 0; t < 15; t++) begin
      p5[t] = '0; p11n[t] = '0; p17[t] = '0; p29[t] = '0;
    end
    for (int t = 2; t <= 12; t++) begin
      logic [17:0] d;
      logic [1:0]  lo;
      lo = w_q[t][1:0];
      if (t == 2)       d = m1_q[0];
      else if (t == 12) d = m1_q[1];
      else              d = m2_q[t-3][17:0];
      p5[t]   = acc_t'({1'b0, d[8:0], lo});
      p11n[t] = acc_t'($signed({d[17:9], d[1:0], lo}));
    end
    for (int t = 3; t <= 11; t++) begin
      p17[t] = acc_t'({1'b0, m2_q[t-3][26:18], w_q[t][3:0]});
      p29[t] = acc_t'({1'b0, m2_q[t-3][36:27], m2_q[t-3][0], w_q[t][1:0]});
    end
  end

  function automatic logic [7:0] clip8(acc_t s);
    acc_t r;
    r = (s + acc_t'(32)) >>> 6;
    if (r < 0)   return 8'd0;
    if (r > 255) return 8'd255;
    return r[7:0];
  endfunction

  // ---------------------------------------------------------------- stage 2
  always_ff @(posedge clk) begin
    if (v_q) begin
      out_tag <= tag_q;
      for (int k = 0; k < 8; k++) begin
        acc_t sa, sb, sc;
        // A: -W[k] + 4W[k+1] - 10W[k+2] + 58W[k+3] + 17W[k+4] - 5W[k+5] + W[k+6]
        sa = cse_p[k+1] - (p5[k+2] <<< 1) + (p29[k+3] <<< 1) + p17[k+4] - p5[k+5]
             + acc_t'(w_q[k+6]);
        // B: -W[k] + 4W[k+1] - 11W[k+2] + 40W[k+3] + 40W[k+4] - 11W[k+5] + 4W[k+6] - W[k+7]
        sb = cse_p[k+1] + p11n[k+2] + (p5[k+3] <<< 3) + (p5[k+4] <<< 3) + p11n[k+5]
             + cse_q[k+6];
        // C: W[k+1] - 5W[k+2] + 17W[k+3] + 58W[k+4] - 10W[k+5] + 4W[k+6] - W[k+7]
        sc = acc_t'(w_q[k+1]) - p5[k+2] + p17[k+3] + (p29[k+4] <<< 1) - (p5[k+5] <<< 1)
             + cse_q[k+6];
        fa[k] <= clip8(sa);
        fb[k] <= clip8(sb);
        fc[k] <= clip8(sc);
      end
    end
  end

endmodule
