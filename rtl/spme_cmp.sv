// Comparator unit of the HEVC SPME hardware: two-stage best-location search.
//
// Stage 1 compares the integer location (0,0) with the eight half-pixel
// locations around it; stage 2 compares the stage-1 winner with the eight
// quarter-pixel locations around the stage-1 winner (the two-stage search of
// the HM encoder, as published). Three 20-bit comparators work each cycle:
// the running best and three candidates reduce to one (min of best and c0,
// min of c1 and c2, min of the two). Stage 1 takes cycles 1-3, stage 2
// cycles 4-6, so a search takes 6 cycles, as published. Ties keep the
// earlier candidate; candidates are visited in raster order.
//
// Interface: start loads the 7x7 SAD grid sad[qy+3][qx+3]; done pulses one
// cycle after the sixth compare cycle with best_sad and the best offset
// (best_qx, best_qy) in quarter pixels. A new start may come with done.
//
// Lint note: rst_n is the asynchronous reset of the flip-flops and also the
// disable condition of the assertions; verilator reports that second,
// sampled use as a signal used both synchronously and asynchronously. The
// sampled use is in assertions only, so the reset stays purely asynchronous.
module spme_cmp
  import spme_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  sad_t  sad [7][7],
  output logic  busy,
  output logic  done,
  output sad_t  best_sad,
  output qoff_t best_qx,
  output qoff_t best_qy
);

  sad_t        grid [7][7];
  logic [2:0]  cyc;            // 1..6 while busy
  sad_t        b_sad;
  qoff_t       b_qx, b_qy;     // running best
  qoff_t       h_qx, h_qy;     // stage-1 winner (centre of stage 2)

  // Candidate k (0..7) around a centre: raster order over the 3x3 ring.
  function automatic void ring(input int k, output int dx, output int dy);
    int idx;
    idx = (k < 4) ? k : k + 1;      // skip the centre
    dx = idx % 3 - 1;
    dy = idx / 3 - 1;
  endfunction

  // The three candidates of this cycle.
  sad_t  c_sad [3];
  qoff_t c_qx [3], c_qy [3];
  logic  c_ok [3];

  always_comb begin
    for (int n = 0; n < 3; n++) begin
      int k, dx, dy, cx, cy;
      k = (int'(cyc) - 1) % 3 * 3 + n;    // candidate number within the stage
      ring(k, dx, dy);
      if (cyc <= 3'd3) begin
        cx = 2 * dx;
        cy = 2 * dy;
      end else begin
        cx = int'(h_qx) + dx;
        cy = int'(h_qy) + dy;
      end
      c_ok[n]  = busy && (k < 8);
      c_qx[n]  = qoff_t'(cx);
      c_qy[n]  = qoff_t'(cy);
      c_sad[n] = grid[(cy + 3) % 7][(cx + 3) % 7];
    end
  end

  // Three comparators.
  sad_t  m0_sad, m1_sad, m2_sad;
  qoff_t m0_qx, m0_qy, m1_qx, m1_qy, m2_qx, m2_qy;
  logic  m1_ok;
  always_comb begin
    // comparator 1: running best vs candidate 0
    if (c_ok[0] && c_sad[0] < b_sad) begin
      m0_sad = c_sad[0]; m0_qx = c_qx[0]; m0_qy = c_qy[0];
    end else begin
      m0_sad = b_sad;    m0_qx = b_qx;    m0_qy = b_qy;
    end
    // comparator 2: candidate 1 vs candidate 2
    m1_ok = c_ok[1] || c_ok[2];
    if (c_ok[2] && (!c_ok[1] || c_sad[2] < c_sad[1])) begin
      m1_sad = c_sad[2]; m1_qx = c_qx[2]; m1_qy = c_qy[2];
    end else begin
      m1_sad = c_sad[1]; m1_qx = c_qx[1]; m1_qy = c_qy[1];
    end
    // comparator 3
    if (m1_ok && m1_sad < m0_sad) begin
      m2_sad = m1_sad; m2_qx = m1_qx; m2_qy = m1_qy;
    end else begin
      m2_sad = m0_sad; m2_qx = m0_qx; m2_qy = m0_qy;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cyc  <= '0;
    end else begin
      done <= busy && (cyc == 3'd6);
      if (start) begin
        busy <= 1'b1;
        cyc  <= 3'd1;
      end else if (busy) begin
        if (cyc == 3'd6) begin
          busy <= 1'b0;
          cyc  <= '0;
        end else begin
          cyc <= cyc + 3'd1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && cyc == 3'd6) begin
      best_sad <= m2_sad;
      best_qx  <= m2_qx;
      best_qy  <= m2_qy;
    end
    if (start) begin
      grid  <= sad;
      b_sad <= sad[3][3];
      b_qx  <= '0;
      b_qy  <= '0;
    end else if (busy) begin
      b_sad <= m2_sad;
      b_qx  <= m2_qx;
      b_qy  <= m2_qy;
      if (cyc == 3'd3) begin
        h_qx <= m2_qx;
        h_qy <= m2_qy;
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> (!busy || cyc == 3'd6));

endmodule
