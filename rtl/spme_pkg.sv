// Shared constants of the HEVC sub-pixel motion estimation (SPME) hardware.
//
// A sub-pixel search location is addressed by its offset from the best
// integer location in quarter-pixel units, (qx, qy) with qx, qy in -3..3.
// (0,0) is the integer location itself, even offsets are half-pixel
// locations, odd offsets quarter-pixel locations; 48 of the 49 are sub-pixel.
package spme_pkg;

  localparam int SAD_W = 20;    // SAD width, as published

  typedef logic [SAD_W-1:0] sad_t;
  typedef logic signed [2:0] qoff_t;   // quarter-pixel offset -3..3

endpackage
