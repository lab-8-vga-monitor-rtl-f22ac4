// vga_pkg: types and timing constants shared by the VGA controller blocks.
//
// A scan line and a frame are each split into four regions, in the order the
// counters visit them after reset: the visible (display) region, the front
// porch, the sync pulse and the back porch.  Horizontally these are regions
// D, E, B and C, counted in pixel clocks; vertically they are regions R, S, P
// and Q, counted in scan lines.  The 25.175 MHz numbers are the cycle counts
// of the standard 640 x 480 timing.  The 12 MHz set is the same timing in
// microseconds rescaled to a 12 MHz pixel clock, which gives 305 visible
// columns; its rounding (sync 45, back porch 21, front porch 10, 381 clocks
// per line) is this design's own choice.
package vga_pkg;

  // Width of the column and row counters (0..1023 covers both directions).
  localparam int unsigned CNT_W = 10;

  // One direction of scan timing, region lengths in counter steps.
  typedef struct packed {
    logic [CNT_W-1:0] active;  // D or R: visible pixels or lines
    logic [CNT_W-1:0] front;   // E or S: blank before the sync pulse
    logic [CNT_W-1:0] sync;    // B or P: sync pulse, active low
    logic [CNT_W-1:0] back;    // C or Q: blank after the sync pulse
  } region_t;

  // One pixel colour: each gun fully on or off, eight colours in all.
  typedef struct packed {
    logic r;
    logic g;
    logic b;
  } rgb_t;

  localparam rgb_t RGB_BLACK = '{r: 1'b0, g: 1'b0, b: 1'b0};
  localparam rgb_t RGB_RED   = '{r: 1'b1, g: 1'b0, b: 1'b0};

  // 25.175 MHz pixel clock: 640 + 20 + 95 + 45 = 800 clocks per line,
  // 480 + 14 + 2 + 32 = 528 lines per frame.
  localparam region_t H_25MHZ = '{active: 10'd640, front: 10'd20, sync: 10'd95, back: 10'd45};
  localparam region_t V_25MHZ = '{active: 10'd480, front: 10'd14, sync: 10'd2,  back: 10'd32};

  // 12 MHz pixel clock: 305 + 10 + 45 + 21 = 381 clocks per line; the
  // vertical timing counts lines and is unchanged.
  localparam region_t H_12MHZ = '{active: 10'd305, front: 10'd10, sync: 10'd45, back: 10'd21};
  localparam region_t V_12MHZ = V_25MHZ;

  // Total counter steps of one line or one frame.
  function automatic int unsigned total_of(region_t t);
    return int'(t.active) + int'(t.front) + int'(t.sync) + int'(t.back);
  endfunction

endpackage
