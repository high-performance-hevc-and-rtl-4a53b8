// HEVC sub-pixel motion estimation (SPME) by SAD interpolation.
//
// Instead of interpolating sub-pixels and computing their SADs, the SADs of
// the 48 sub-pixel search locations around the best integer location are
// interpolated directly from the SADs of the surrounding 9x9 integer
// locations with the HEVC luma filters; the two-stage HM search (8 half-pixel
// locations, then 8 quarter-pixel locations around the best of those) then
// runs on these SADs. The result is independent of the PU size.
//
// Datapath, as published: integer SAD buffer (9x9 x 20 bit) -> input MUX ->
// three interpolators (spme_interp) -> DEMUX -> transpose memories A, B, C
// (the a, b, c half-pixel SADs of all nine rows at positions -1 and 0, fed
// back through the MUX column-wise) -> comparator unit (spme_cmp).
// Interpolation schedule, six cycles per PU:
//   steps 0-2  interpolators 1-3 filter rows 3s+u of the buffer horizontally
//              -> a, b, c SADs of 9 rows x 2 positions (to memories A, B, C)
//   step 3     interpolator 1 filters column 0 of the buffer vertically
//              -> d, h, n SADs (the vertical half/quarter locations)
//   steps 4-5  the interpolators filter the six columns of memories A, B, C
//              vertically -> the 36 diagonal quarter/half location SADs
// After step 5 the 49 SADs (with the integer SAD in the centre) go to the
// comparator, which searches them in 6 cycles while the next PU is
// interpolated.
//
// Interface: in_valid/in_ready with in_sad[y+4][x+4] = SAD of integer
// location (x, y). out_valid pulses with out_sad and the best offset
// (out_qx, out_qy) in quarter pixels, -3..3. Timing: a PU can be accepted
// every 6 cycles; its result appears 13 cycles after the cycle it was
// accepted in (12 cycles after the buffer holds it), matching the published
// start-up of 12 cycles followed by one result every 6 cycles.
//
// Lint note: rst_n is the asynchronous reset of the flip-flops and also the
// disable condition of the assertions; verilator reports that second,
// sampled use as a signal used both synchronously and asynchronously. The
// sampled use is in assertions only, so the reset stays purely asynchronous.
module spme
  import spme_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  sad_t  in_sad [9][9],
  output logic  out_valid,
  output sad_t  out_sad,
  output qoff_t out_qx,
  output qoff_t out_qy
);

  // Integer SAD buffer.
  sad_t isad [9][9];
  // Transpose memories A, B, C: [row][position] (position 0 -> -1, 1 -> 0).
  sad_t tm_a [9][2], tm_b [9][2], tm_c [9][2];
  // Results for the comparator: grid[qy+3][qx+3].
  sad_t grid [7][7];

  logic       active;
  logic [2:0] step;
  logic       accept;

  // The next PU is taken during the last step, which no longer reads the
  // buffer, so PUs follow each other every 6 cycles.
  assign in_ready = !active || (step == 3'd5);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      step   <= '0;
    end else if (accept) begin
      active <= 1'b1;
      step   <= '0;
    end else if (active) begin
      if (step == 3'd5) active <= 1'b0;
      else              step   <= step + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) isad <= in_sad;
  end

  // Input MUX.
  sad_t ix [3][9];
  always_comb begin
    for (int u = 0; u < 3; u++)
      for (int k = 0; k < 9; k++) begin
        unique case (step)
          3'd0, 3'd1, 3'd2: ix[u][k] = isad[3*int'(step) + u][k];
          3'd3:             ix[u][k] = (u == 0) ? isad[k][4] : '0;
          3'd4: begin
            if (u == 0)      ix[u][k] = tm_a[k][0];
            else if (u == 1) ix[u][k] = tm_a[k][1];
            else             ix[u][k] = tm_b[k][0];
          end
          default: begin
            if (u == 0)      ix[u][k] = tm_b[k][1];
            else if (u == 1) ix[u][k] = tm_c[k][0];
            else             ix[u][k] = tm_c[k][1];
          end
        endcase
      end
  end

  sad_t oa [3][2], ob [3][2], oc [3][2];
  for (genvar u = 0; u < 3; u++) begin : g_interp
    spme_interp u_interp (.s(ix[u]), .a(oa[u]), .b(ob[u]), .c(oc[u]));
  end

  // Grid column/row of the outputs of a filter at position p (0 -> -1, 1 -> 0)
  // and type t (0 = A, 1 = B, 2 = C): offset 4*(p-1) + t + 1.
  function automatic int off(int p, int t);
    return 4 * (p - 1) + t + 1 + 3;   // +3: grid index
  endfunction

  // Result of a vertical pass on a column at horizontal grid index gx.
  task automatic put_col(input logic [2:0] gx, input sad_t va [2], input sad_t vb [2], input sad_t vc [2],
                         ref sad_t g [7][7]);
    for (int p = 0; p < 2; p++) begin
      g[off(p, 0)][gx] = va[p];
      g[off(p, 1)][gx] = vb[p];
      g[off(p, 2)][gx] = vc[p];
    end
  endtask

  // DEMUX: write transpose memories and the SAD grid.
  logic cmp_start;
  sad_t grid_n [7][7];
  always_comb begin
    grid_n = grid;
    unique case (step)
      3'd3: put_col(3'd3, oa[0], ob[0], oc[0], grid_n);
      3'd4: begin
        put_col(3'(off(0, 0)), oa[0], ob[0], oc[0], grid_n);   // a column x=-1
        put_col(3'(off(1, 0)), oa[1], ob[1], oc[1], grid_n);   // a column x=0
        put_col(3'(off(0, 1)), oa[2], ob[2], oc[2], grid_n);   // b column x=-1
      end
      3'd5: begin
        put_col(3'(off(1, 1)), oa[0], ob[0], oc[0], grid_n);   // b column x=0
        put_col(3'(off(0, 2)), oa[1], ob[1], oc[1], grid_n);   // c column x=-1
        put_col(3'(off(1, 2)), oa[2], ob[2], oc[2], grid_n);   // c column x=0
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (active) begin
      if (step <= 3'd2) begin
        for (int u = 0; u < 3; u++)
          for (int p = 0; p < 2; p++) begin
            tm_a[3*int'(step) + u][p] <= oa[u][p];
            tm_b[3*int'(step) + u][p] <= ob[u][p];
            tm_c[3*int'(step) + u][p] <= oc[u][p];
          end
      end
      grid <= grid_n;
      // Row 0 of the a, b, c memories is the row of the integer location.
      if (step == 3'd2) begin
        for (int p = 0; p < 2; p++) begin
          grid[3][off(p, 0)] <= tm_a[4][p];
          grid[3][off(p, 1)] <= tm_b[4][p];
          grid[3][off(p, 2)] <= tm_c[4][p];
        end
        grid[3][3] <= isad[4][4];
      end
    end
  end

  assign cmp_start = active && (step == 3'd5);

  // A new search may only overlap the last cycle of the previous one.
  logic cmp_busy;
  a_cmp_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                  cmp_start && cmp_busy |=> out_valid);

  // The comparator snapshots the grid as it is written by the last step.
  spme_cmp u_cmp (
    .clk, .rst_n,
    .start    (cmp_start),
    .sad      (grid_n),
    .busy     (cmp_busy),
    .done     (out_valid),
    .best_sad (out_sad),
    .best_qx  (out_qx),
    .best_qy  (out_qy));

endmodule
