// border_pattern: colour of a frame drawn around the edge of the screen.
//
// Given the column and row being scanned, returns COLOUR for pixels within
// BORDER pixels of any edge of the H_ACTIVE x V_ACTIVE visible area and
// black elsewhere, including outside the visible area.  Purely
// combinational, so its output belongs to the same cycle as its inputs.
// A red border is what the document asks for; its width is not given and
// BORDER = 8 pixels is this design's choice.
module border_pattern
  import vga_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned BORDER   = 8,
  parameter rgb_t        COLOUR   = RGB_RED
) (
  input  logic [CNT_W-1:0] column,
  input  logic [CNT_W-1:0] row,
  output rgb_t             rgb
);

  initial assert (2 * BORDER <= H_ACTIVE && 2 * BORDER <= V_ACTIVE)
    else $error("border_pattern: border wider than the screen");

  localparam logic [CNT_W-1:0] H_END   = CNT_W'(H_ACTIVE);
  localparam logic [CNT_W-1:0] V_END   = CNT_W'(V_ACTIVE);
  localparam logic [CNT_W-1:0] LEFT    = CNT_W'(BORDER);
  localparam logic [CNT_W-1:0] RIGHT   = CNT_W'(H_ACTIVE - BORDER);
  localparam logic [CNT_W-1:0] TOP     = CNT_W'(BORDER);
  localparam logic [CNT_W-1:0] BOTTOM  = CNT_W'(V_ACTIVE - BORDER);

  logic visible, on_edge;

  always_comb begin
    visible = (column < H_END) && (row < V_END);
    on_edge = (column < LEFT) || (column >= RIGHT) || (row < TOP) || (row >= BOTTOM);
    rgb     = (visible && on_edge) ? COLOUR : RGB_BLACK;
  end

endmodule
