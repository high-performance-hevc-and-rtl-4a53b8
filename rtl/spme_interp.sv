// SAD interpolator of the HEVC SPME hardware.
//
// Treats nine integer-location SADs S[-4..4] along a row (or column) like
// nine pixels and applies the three HEVC 8-tap luma filters to them, giving
// the SADs of six fractional locations in one cycle:
//   a(-1), b(-1), c(-1): offsets -3/4, -1/2, -1/4 (between S[-1] and S[0])
//   a(0),  b(0),  c(0):  offsets +1/4, +1/2, +3/4 (between S[0] and S[1])
// with type A = (-1, 4, -10, 58, 17, -5, 1), type B = (-1, 4, -11, 40, 40,
// -11, 4, -1), type C = (1, -5, 17, 58, -10, 4, -1).
//
// Structure as published: a multiplier block per input forms all the
// constant multiples that input needs with shifts and adds (M1 for S[+-2]:
// 5, 10, 11; M2 for S[+-1]: 5, 10, 11, 17, 40, 58; M3 for S[0]: 17, 40, 58),
// C1 forms the shared end terms 4*S[-3] - S[-4] and 4*S[3] - S[4], and the
// splitter hands the products to the adder trees of the six outputs.
// Each filter sum is rounded and divided by 64, (sum + 32) >> 6, and clamped
// to 0 .. 2^20-1 (normalisation and clamp are this design's choices: the
// filter gain is 64 and a negative SAD is meaningless). Combinational.
module spme_interp
  import spme_pkg::*;
(
  input  sad_t s [9],       // s[k] = S[k-4]
  output sad_t a [2],       // [0] = position -1, [1] = position 0
  output sad_t b [2],
  output sad_t c [2]
);

  localparam int W = SAD_W + 9;   // signed working width
  typedef logic signed [W-1:0] acc_t;

  // Multiplier block outputs.
  acc_t x [9];
  acc_t m1_5 [2], m1_10 [2], m1_11 [2];            // S[-2], S[2]
  acc_t m2_5 [2], m2_10 [2], m2_11 [2], m2_17 [2], m2_40 [2], m2_58 [2];  // S[-1], S[1]
  acc_t m3_17, m3_40, m3_58;                        // S[0]
  acc_t c1_l, c1_r;                                 // C1 common terms

  always_comb begin
    for (int k = 0; k < 9; k++) x[k] = acc_t'({1'b0, s[k]});
    // M1: 5 = 4+1, 11 = 16-5, 10 = 5<<1
    for (int h = 0; h < 2; h++) begin
      acc_t v;
      v = x[h == 0 ? 2 : 6];
      m1_5[h]  = (v <<< 2) + v;
      m1_11[h] = (v <<< 4) - m1_5[h];
      m1_10[h] = m1_5[h] <<< 1;
    end
    // M2: 5, 17 = 16+1, 11 = 16-5, 40 = 5<<3, 58 = (17<<1) + (5<<2) + (1<<2)
    for (int h = 0; h < 2; h++) begin
      acc_t v;
      v = x[h == 0 ? 3 : 5];
      m2_5[h]  = (v <<< 2) + v;
      m2_17[h] = (v <<< 4) + v;
      m2_11[h] = (v <<< 4) - m2_5[h];
      m2_10[h] = m2_5[h] <<< 1;
      m2_40[h] = m2_5[h] <<< 3;
      m2_58[h] = (m2_17[h] <<< 1) + (m2_5[h] <<< 2) + (v <<< 2);
    end
    // M3
    m3_17 = (x[4] <<< 4) + x[4];
    m3_40 = ((x[4] <<< 2) + x[4]) <<< 3;
    m3_58 = (m3_17 <<< 1) + (((x[4] <<< 2) + x[4]) <<< 2) + (x[4] <<< 2);
    // C1
    c1_l = (x[1] <<< 2) - x[0];
    c1_r = (x[7] <<< 2) - x[8];
  end

  function automatic sad_t norm(acc_t v);
    acc_t r;
    r = (v + acc_t'(32)) >>> 6;
    if (r < 0) return '0;
    if (r > acc_t'({SAD_W{1'b1}})) return '1;
    return r[SAD_W-1:0];
  endfunction

  // Adder trees (index: x[k] = S[k-4]; h=0 is the S[-*] side, h=1 the S[+*] side).
  always_comb begin
    acc_t sa0, sa1, sb0, sb1, sc0, sc1;
    // a(-1) = -S-4 + 4S-3 - 10S-2 + 58S-1 + 17S0 - 5S1 + S2
    sa0 = c1_l - m1_10[0] + m2_58[0] + m3_17 - m2_5[1] + x[6];
    // a(0)  = -S-3 + 4S-2 - 10S-1 + 58S0 + 17S1 - 5S2 + S3
    sa1 = -x[1] + (x[2] <<< 2) - m2_10[0] + m3_58 + m2_17[1] - m1_5[1] + x[7];
    // b(-1) = -S-4 + 4S-3 - 11S-2 + 40S-1 + 40S0 - 11S1 + 4S2 - S3
    sb0 = c1_l - m1_11[0] + m2_40[0] + m3_40 - m2_11[1] + (x[6] <<< 2) - x[7];
    // b(0)  = -S-3 + 4S-2 - 11S-1 + 40S0 + 40S1 - 11S2 + 4S3 - S4
    sb1 = -x[1] + (x[2] <<< 2) - m2_11[0] + m3_40 + m2_40[1] - m1_11[1] + c1_r;
    // c(-1) = S-3 - 5S-2 + 17S-1 + 58S0 - 10S1 + 4S2 - S3
    sc0 = x[1] - m1_5[0] + m2_17[0] + m3_58 - m2_10[1] + (x[6] <<< 2) - x[7];
    // c(0)  = S-2 - 5S-1 + 17S0 + 58S1 - 10S2 + 4S3 - S4
    sc1 = x[2] - m2_5[0] + m3_17 + m2_58[1] - m1_10[1] + c1_r;
    a[0] = norm(sa0); a[1] = norm(sa1);
    b[0] = norm(sb0); b[1] = norm(sb1);
    c[0] = norm(sc0); c[1] = norm(sc1);
  end

endmodule
