// rvt_pkg: constants, types and the template geometry shared by the
// retinal-vessel template filter.
//
// The filter bank has sixteen 11x11 direction templates, 22.5 degrees apart.
// Each has 28 non-zero taps: seven of weight +1, seven of +2, seven of -1
// and seven of -2. Templates 8..15 are templates 0..7 with the sign flipped,
// so only eight unique templates are computed in hardware.
//
// Template geometry (this design's own reconstruction of the filter shape):
// a template for direction d (angle d*22.5 deg) is a strip seven pixels long
// along the direction (t = -3..+3) and four pixels across it. The cross
// profile, from the far left to the far right of the vessel direction, is
// -1, -2, (0), +2, +1. The strip is drawn on the pixel grid along the major
// axis of the direction: for d = 0,1,2,6,7 the column offset is t and the
// row offset is round(t*tan) plus the cross offset; for d = 3,4,5 the roles
// of row and column swap and cot is used. This gives exactly 28 distinct
// taps for every direction and keeps all of them inside the 11x11 window
// (the 45-degree strips reach its edge).
//
// tap_pos(d, g, k) returns {row, col} of tap k (0..6, k = t+3) of group g
// of template d, with row 0 at the top of the window (earliest raster line)
// and the target pixel at row 5, col 5. Groups: 0 = +1, 1 = +2, 2 = -1,
// 3 = -2. It is evaluated at elaboration time only, to wire the taps.
package rvt_pkg;

  localparam int unsigned PIX_W       = 12;  // camera pixel width
  localparam int unsigned RESP_W      = 17;  // |response| width: PIX_W + 5
  localparam int unsigned WORD_W      = 64;  // input SRAM word
  localparam int unsigned PIX_PER_WORD = 5;  // five 12-bit pixels per word
  localparam int unsigned WIN         = 11;  // window side
  localparam int unsigned NB_W        = 15;  // neighbourhood width (3 words)
  localparam int unsigned NUNIQ       = 8;   // unique templates
  localparam int unsigned NTAP        = 7;   // taps per coefficient group
  localparam int unsigned OUT_W       = 32;  // output SRAM / result word

  // Latencies of the pipelines, in memory-clock cycles.
  localparam int unsigned RESP_LAT    = 7;   // rvt_response
  localparam int unsigned DIR_LAT     = 1 + RESP_LAT + 3; // input regs, responses, 3 comparator levels

  // One result word as stored in the 32-bit output memory.
  typedef struct packed {
    logic [PIX_W-1:0] pix;   // original grey value of the target pixel
    logic [3:0]       dir;   // direction label 0..15 of the largest response
    logic [15:0]      resp;  // largest |response| with its LSB dropped
  } result_t;

  // Slope of direction d in Q8 along its major axis (tan or cot of the angle).
  function automatic int slope_q8(input int d);
    case (d)
      1, 3:    return 106;   // tan(22.5 deg) * 256
      2:       return 256;
      5, 7:    return -106;
      6:       return -256;
      default: return 0;
    endcase
  endfunction

  // Round a Q8 value to the nearest integer, halves away from zero.
  function automatic int round_q8(input int v);
    if (v >= 0) return (v + 128) / 256;
    else        return -((-v + 128) / 256);
  endfunction

  function automatic logic [7:0] tap_pos(input int d, input int g, input int k);
    int t, m, side, minor, x, y;
    bit xmajor;
    t = k - 3;
    // cross offset to the left of the direction for each coefficient group
    case (g)
      0:       m = -2;   // +1
      1:       m = -1;   // +2
      2:       m =  2;   // -1
      default: m =  1;   // -2
    endcase
    xmajor = (d <= 2) || (d >= 6);
    // +1 when the minor grid axis points to the left of the direction
    side   = (d <= 2) ? 1 : -1;
    minor  = round_q8(t * slope_q8(d)) + side * m;
    if (xmajor) begin x = t;     y = minor; end
    else        begin x = minor; y = t;     end
    return {4'(5 - y), 4'(5 + x)};
  endfunction

  // Coefficient (-2..2) of template d (0..15) at window position (row, col).
  // Used by testbenches as an independent reference model.
  function automatic int coef(input int d, input int row, input int col);
    int s, c;
    logic [7:0] p;
    s = (d >= 8) ? -1 : 1;
    c = 0;
    for (int g = 0; g < 4; g++)
      for (int k = 0; k < 7; k++) begin
        p = tap_pos(d % 8, g, k);
        if (int'(p[7:4]) == row && int'(p[3:0]) == col)
          c = (g == 0) ? 1 : (g == 1) ? 2 : (g == 2) ? -1 : -2;
      end
    return s * c;
  endfunction

endpackage
