// vga_top: VGA controller driving a red border and, optionally, the letters "CS".
//
// The controller scans the screen and reports the column and row of the
// pixel being drawn; two pattern generators turn that position into a
// colour, which the controller blanks outside the visible area and drives
// onto the monitor's colour lines together with the two sync signals.
//   show_letters = 0 : red border only             (first display exercise)
//   show_letters = 1 : red border plus letters CS  (second display exercise)
// Each colour output is the OR of the two generators' outputs.
//
// Timing: one pixel per clock.  With the default H_25MHZ / V_25MHZ timing
// and a 25.175 MHz clock this is 640 x 480 at 800 x 528 clocks per frame;
// with H_12MHZ / V_12MHZ and a 12 MHz clock it is 305 x 480.  Outputs change
// on the rising clock edge; reset is asynchronous and active high.
// The show_letters select, which lets one build show both exercises, is this
// design's choice.
module vga_top
  import vga_pkg::*;
#(
  parameter region_t     H_TIMING = H_25MHZ,
  parameter region_t     V_TIMING = V_25MHZ,
  parameter int unsigned BORDER   = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             show_letters,
  output logic             h_sync,
  output logic             v_sync,
  output logic             red,
  output logic             green,
  output logic             blue,
  output logic [CNT_W-1:0] column,
  output logic [CNT_W-1:0] row
);

  localparam int unsigned H_ACTIVE = int'(H_TIMING.active);
  localparam int unsigned V_ACTIVE = int'(V_TIMING.active);

  rgb_t border_rgb, letters_rgb, pixel_rgb;

  border_pattern #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BORDER(BORDER), .COLOUR(RGB_RED)
  ) u_border (
    .column(column), .row(row), .rgb(border_rgb)
  );

  cs_letters #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .COLOUR(RGB_RED)
  ) u_letters (
    .column(column), .row(row), .rgb(letters_rgb)
  );

  always_comb pixel_rgb = border_rgb | (show_letters ? letters_rgb : RGB_BLACK);

  vga_controller #(.H_TIMING(H_TIMING), .V_TIMING(V_TIMING)) u_ctrl (
    .clk       (clk),
    .reset     (reset),
    .red       (pixel_rgb.r),
    .green     (pixel_rgb.g),
    .blue      (pixel_rgb.b),
    .h_sync_out(h_sync),
    .v_sync_out(v_sync),
    .red_out   (red),
    .green_out (green),
    .blue_out  (blue),
    .column_out(column),
    .row_out   (row)
  );

endmodule
