// vga_ref_pkg: reference model used by the VGA testbenches.
//
// Works out, from a pixel clock count or a column/row position alone, what
// the scan position, the sync levels and the picture should be.  It is
// written independently of the RTL: positions come from division and
// modulo, the sync pulses from region arithmetic, the letters from a
// bitmap.
package vga_ref_pkg;

  // Region lengths in the scan order visible, front porch, sync, back porch.
  typedef struct {
    int active;
    int front;
    int sync;
    int back;
  } ref_timing_t;

  function automatic int total(ref_timing_t t);
    return t.active + t.front + t.sync + t.back;
  endfunction

  // Active-low sync level at position pos of a line or frame.
  function automatic bit sync_level(ref_timing_t t, int pos);
    return !(pos >= t.active + t.front && pos < t.active + t.front + t.sync);
  endfunction

  function automatic bit visible(ref_timing_t t, int pos);
    return pos < t.active;
  endfunction

  // Border: distance to the nearest edge of the visible area below width.
  function automatic bit border_on(int col, int row, int h_active, int v_active, int width);
    int d;
    if (col >= h_active || row >= v_active) return 0;
    d = col;
    if (row < d) d = row;
    if (h_active - 1 - col < d) d = h_active - 1 - col;
    if (v_active - 1 - row < d) d = v_active - 1 - row;
    return d < width;
  endfunction

  // Letters "CS": 3 x 5 bitmaps placed on a 13 x 9 grid of cells.
  function automatic bit letter_on(int col, int row, int h_active, int v_active);
    bit [2:0] glyph_c [5] = '{3'b111, 3'b100, 3'b100, 3'b100, 3'b111};
    bit [2:0] glyph_s [5] = '{3'b111, 3'b100, 3'b111, 3'b001, 3'b111};
    int cw = h_active / 13;
    int ch = v_active / 9;
    int gx = col / cw;
    int gy = row / ch;
    if (col >= h_active || row >= v_active) return 0;
    if (gy < 2 || gy > 6) return 0;
    if (gx >= 3 && gx <= 5) return glyph_c[gy - 2][2 - (gx - 3)];
    if (gx >= 7 && gx <= 9) return glyph_s[gy - 2][2 - (gx - 7)];
    return 0;
  endfunction

endpackage
