// Shared types of the HEVC fractional interpolation hardware.
//
// fihw_kind_e names which group of eight fractional pixels an output
// carries, using the HEVC luma position letters (pixel G at the top left):
//   FK_ROW : a, b, c of one row       (horizontal 1/4, 1/2, 3/4)
//   FK_COL : d, h, n of one column    (vertical 1/4, 1/2, 3/4)
//   FK_QA  : e, i, p of one column    (vertical filter over a pixels)
//   FK_QB  : f, j, q of one column    (vertical filter over b pixels)
//   FK_QC  : g, k, r of one column    (vertical filter over c pixels)
// The grouping follows the published processing order (rows, then columns,
// then quarter pixels from the three transpose memories); the encoding is
// this design's choice.
package fihw_pkg;
  typedef enum logic [2:0] {
    FK_ROW = 3'd0,
    FK_COL = 3'd1,
    FK_QA  = 3'd2,
    FK_QB  = 3'd3,
    FK_QC  = 3'd4
  } fihw_kind_e;
endpackage
