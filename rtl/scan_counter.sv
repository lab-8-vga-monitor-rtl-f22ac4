// scan_counter: the HCount / VCount block of the VGA controller.
//
// A modulo counter that steps through the four regions of one scan direction
// (visible, front porch, sync, back porch) and flags the region boundaries.
// Used with en tied high it is the column counter, stepped by the pixel
// clock; used with en driven by the column counter's roll_over it is the row
// counter, stepped once per line.
//
// Interface: count is the current position (0 .. total-1, 0 being the first
// visible pixel or line).  The four boundary strobes and roll_over are high
// for one enabled step, the last step before the counter enters the region
// the strobe is named after:
//   at_front  - next step enters the front porch   (count = D-1 / R-1)
//   at_sync   - next step enters the sync pulse    (count = D+E-1)
//   at_back   - next step enters the back porch    (count = D+E+B-1)
//   at_active - next step enters the visible area  (count = D+E+B+C-1)
// roll_over equals at_active; it is kept as a separate port because the row
// counter is stepped by it.  Flip-flops set or reset by these strobes
// therefore change on the same clock edge as count, so their outputs line up
// with count.  clear is an asynchronous, active-high reset to count 0.
//
// The region lengths and the equality compares follow the document's
// controller circuit; making the strobes fire one step early, so that the
// flip-flops line up with the count, is this design's choice.
module scan_counter
  import vga_pkg::*;
#(
  parameter region_t TIMING = H_25MHZ
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             en,
  output logic [CNT_W-1:0] count,
  output logic             at_front,
  output logic             at_sync,
  output logic             at_back,
  output logic             at_active,
  output logic             roll_over
);

  localparam int unsigned END_ACTIVE = int'(TIMING.active);
  localparam int unsigned END_FRONT  = END_ACTIVE + int'(TIMING.front);
  localparam int unsigned END_SYNC   = END_FRONT + int'(TIMING.sync);
  localparam int unsigned TOTAL      = END_SYNC + int'(TIMING.back);

  initial begin
    assert (TOTAL <= (1 << CNT_W)) else $error("scan_counter: TOTAL does not fit in CNT_W bits");
    assert (TIMING.active > 0 && TIMING.front > 0 && TIMING.sync > 0 && TIMING.back > 0)
      else $error("scan_counter: every region needs at least one step");
  end

  localparam logic [CNT_W-1:0] LAST_ACTIVE = CNT_W'(END_ACTIVE - 1);
  localparam logic [CNT_W-1:0] LAST_FRONT  = CNT_W'(END_FRONT - 1);
  localparam logic [CNT_W-1:0] LAST_SYNC   = CNT_W'(END_SYNC - 1);
  localparam logic [CNT_W-1:0] LAST_BACK   = CNT_W'(TOTAL - 1);

  always_ff @(posedge clk or posedge clear) begin
    if (clear)
      count <= '0;
    else if (en)
      count <= (count == LAST_BACK) ? '0 : count + 1'b1;
  end

  always_comb begin
    at_front  = en && (count == LAST_ACTIVE);
    at_sync   = en && (count == LAST_FRONT);
    at_back   = en && (count == LAST_SYNC);
    at_active = en && (count == LAST_BACK);
    roll_over = at_active;
  end

endmodule
