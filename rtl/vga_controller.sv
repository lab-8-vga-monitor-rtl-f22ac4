// vga_controller: VGA sync generator with colour blanking.
//
// Two scan_counter instances track the scan position.  HCount steps every
// pixel clock through one line (visible D, front porch E, sync B, back
// porch C); VCount steps once per line, enabled by HCount's roll_over,
// through one frame (visible R, front porch S, sync P, back porch Q).  Four
// set/reset flip-flops turn the counters' boundary strobes into levels:
//   H_Sync    reset entering B, set entering C      -> h_sync_out (active low)
//   H_data_on reset entering E, set entering D
//   V_Sync    reset entering P, set entering Q      -> v_sync_out (active low)
//   V_data_on reset entering S, set entering R
// The colour inputs pass to the outputs only while both data-on flags are
// high (rgb_gate).  column_out and row_out are the raw counter values, so a
// pattern generator can compute the colour of the pixel being scanned from
// them combinationally; they run past the visible area during blanking.
//
// Timing: everything is clocked by the pixel clock.  The flip-flops change
// on the same edge as the counters, so h_sync_out, the blanking and the
// colour outputs belong to the column and row shown in the same cycle.
// reset is asynchronous and active high; it starts the scan at column 0,
// row 0 with both sync outputs high and the data-on flags set.
//
// The structure (two counters with four compares each, four SR flip-flops,
// three AND gates, 10-bit column and row outputs) follows the document's
// controller circuit.  Stepping VCount with an enable on the pixel clock
// instead of clocking it from roll_over, and presetting the flip-flops on
// reset instead of clearing them, are this design's choices.
module vga_controller
  import vga_pkg::*;
#(
  parameter region_t H_TIMING = H_25MHZ,
  parameter region_t V_TIMING = V_25MHZ
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             red,
  input  logic             green,
  input  logic             blue,
  output logic             h_sync_out,
  output logic             v_sync_out,
  output logic             red_out,
  output logic             green_out,
  output logic             blue_out,
  output logic [CNT_W-1:0] column_out,
  output logic [CNT_W-1:0] row_out
);

  logic h_at_front, h_at_sync, h_at_back, h_at_active, h_roll_over;
  logic v_at_front, v_at_sync, v_at_back, v_at_active, v_roll_over;
  logic h_data_on, v_data_on;
  rgb_t rgb_in, rgb_out;

  scan_counter #(.TIMING(H_TIMING)) u_hcount (
    .clk      (clk),
    .clear    (reset),
    .en       (1'b1),
    .count    (column_out),
    .at_front (h_at_front),
    .at_sync  (h_at_sync),
    .at_back  (h_at_back),
    .at_active(h_at_active),
    .roll_over(h_roll_over)
  );

  scan_counter #(.TIMING(V_TIMING)) u_vcount (
    .clk      (clk),
    .clear    (reset),
    .en       (h_roll_over),
    .count    (row_out),
    .at_front (v_at_front),
    .at_sync  (v_at_sync),
    .at_back  (v_at_back),
    .at_active(v_at_active),
    .roll_over(v_roll_over)
  );

  sr_ff #(.CLEAR_VALUE(1'b1)) u_h_sync (
    .clk(clk), .clear(reset), .s(h_at_back), .r(h_at_sync), .q(h_sync_out)
  );

  sr_ff #(.CLEAR_VALUE(1'b1)) u_h_data_on (
    .clk(clk), .clear(reset), .s(h_at_active), .r(h_at_front), .q(h_data_on)
  );

  sr_ff #(.CLEAR_VALUE(1'b1)) u_v_sync (
    .clk(clk), .clear(reset), .s(v_at_back), .r(v_at_sync), .q(v_sync_out)
  );

  sr_ff #(.CLEAR_VALUE(1'b1)) u_v_data_on (
    .clk(clk), .clear(reset), .s(v_at_active), .r(v_at_front), .q(v_data_on)
  );

  assign rgb_in = '{r: red, g: green, b: blue};

  rgb_gate u_rgb_gate (
    .h_data_on(h_data_on),
    .v_data_on(v_data_on),
    .rgb_in   (rgb_in),
    .rgb_out  (rgb_out)
  );

  assign red_out   = rgb_out.r;
  assign green_out = rgb_out.g;
  assign blue_out  = rgb_out.b;

  // The frame-end strobe is not needed: VCount wraps by itself.
  logic unused_v_roll_over;
  assign unused_v_roll_over = v_roll_over;

  // Blanking must follow the counters exactly.
  assert property (@(posedge clk) disable iff (reset)
                   h_data_on == (column_out < H_TIMING.active))
    else $error("vga_controller: H_data_on out of step with the column count");
  assert property (@(posedge clk) disable iff (reset)
                   v_data_on == (row_out < V_TIMING.active))
    else $error("vga_controller: V_data_on out of step with the row count");

endmodule
