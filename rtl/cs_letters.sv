// cs_letters: colour of two large block letters "CS" in the middle of the screen.
//
// The visible area is divided into a grid of 13 x 9 cells, each
// H_ACTIVE/13 pixels wide and V_ACTIVE/9 lines high (integer division).
// Each letter is 3 cells wide and 5 cells high, drawn with strokes one cell
// thick: "C" fills grid columns 3-5, "S" grid columns 7-9, both grid rows
// 2-6 (cell 0 at the top left).
//
//   C: ###     S: ###
//      #...       #..
//      #...       ###
//      #...       ..#
//      ###        ###
//
// Returns COLOUR on a letter stroke and black elsewhere.  Purely
// combinational; only compares against constants, no division at run time.
// The document asks for two large block letters "CS"; their shape, size,
// position and colour are not given and are this design's choice.
module cs_letters
  import vga_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter rgb_t        COLOUR   = RGB_RED
) (
  input  logic [CNT_W-1:0] column,
  input  logic [CNT_W-1:0] row,
  output rgb_t             rgb
);

  localparam int unsigned CW = H_ACTIVE / 13;  // cell width in pixels
  localparam int unsigned CH = V_ACTIVE / 9;   // cell height in lines

  initial assert (CW > 0 && CH > 0) else $error("cs_letters: screen too small for the grid");

  // Pixel boundary of grid column / grid row n.
  function automatic logic [CNT_W-1:0] gx(int unsigned n);
    return CNT_W'(n * CW);
  endfunction
  function automatic logic [CNT_W-1:0] gy(int unsigned n);
    return CNT_W'(n * CH);
  endfunction

  // True when v lies in grid cells [lo, hi) of the given axis.
  function automatic logic in_x(logic [CNT_W-1:0] v, int unsigned lo, int unsigned hi);
    return (v >= gx(lo)) && (v < gx(hi));
  endfunction
  function automatic logic in_y(logic [CNT_W-1:0] v, int unsigned lo, int unsigned hi);
    return (v >= gy(lo)) && (v < gy(hi));
  endfunction

  logic letter_c, letter_s;

  always_comb begin
    // C: left stroke plus top and bottom bars.
    letter_c = (in_x(column, 3, 4) && in_y(row, 2, 7))
            || (in_x(column, 3, 6) && (in_y(row, 2, 3) || in_y(row, 6, 7)));
    // S: three bars, upper-left stroke, lower-right stroke.
    letter_s = (in_x(column, 7, 10) && (in_y(row, 2, 3) || in_y(row, 4, 5) || in_y(row, 6, 7)))
            || (in_x(column, 7, 8)  && in_y(row, 2, 5))
            || (in_x(column, 9, 10) && in_y(row, 4, 7));
    rgb = (letter_c || letter_s) ? COLOUR : RGB_BLACK;
  end

endmodule
