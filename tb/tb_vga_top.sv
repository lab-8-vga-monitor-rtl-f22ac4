// tb_vga_top: end-to-end test of the VGA display at its default 640 x 480 timing.
//
// The testbench behaves like a monitor: it looks only at the sync and colour
// lines, never at the column and row outputs.  It finds the picture from the
// sync edges (a pixel row starts BACK clocks after a horizontal sync pulse
// ends, the first picture row is the Q-th line after a vertical sync pulse
// ends), captures four whole frames and compares every visible pixel with a
// reference image: the 8-pixel red border, plus the red letters "CS" once
// show_letters is switched on.  The switch happens during the vertical
// blanking before the third captured frame.  It also checks that all colour
// lines are dark outside the picture, the sync pulse widths and the line and
// frame lengths in clocks.  Each mechanism (horizontal retrace, vertical
// retrace, border pixels, letter pixels, mode switch, blanking) is counted
// and must occur.
module tb_vga_top;
  import vga_pkg::*;
  import vga_ref_pkg::*;

  // Reference timing, written out independently of vga_pkg.
  localparam ref_timing_t HT = '{active: 640, front: 20, sync: 95, back: 45};
  localparam ref_timing_t VT = '{active: 480, front: 14, sync: 2, back: 32};
  localparam int BORDER = 8;
  localparam int FRAMES = 4;

  logic clk = 1'b0;
  logic reset;
  logic show_letters;
  logic h_sync, v_sync, red, green, blue;
  logic [CNT_W-1:0] column, row;
  int checks = 0;
  int failures = 0;

  vga_top dut (
    .clk(clk), .reset(reset), .show_letters(show_letters),
    .h_sync(h_sync), .v_sync(v_sync), .red(red), .green(green), .blue(blue),
    .column(column), .row(row)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Mechanism counters.
  int n_h_retrace, n_v_retrace, n_border, n_letter, n_mode_switch, n_blank;

  int frames_done;
  int t_since_h;       // clocks since the last horizontal sync pulse ended
  int lines_since_v;   // horizontal pulses ended since the vertical pulse ended
  int h_low, v_low_lines, line_clocks, frame_clocks;
  bit locked;
  logic h_prev, v_prev;
  bit mode;

  initial begin
    reset = 1'b1;
    show_letters = 1'b0;
    mode = 1'b0;
    n_h_retrace = 0; n_v_retrace = 0; n_border = 0; n_letter = 0;
    n_mode_switch = 0; n_blank = 0;
    frames_done = -1;
    locked = 1'b0;
    t_since_h = 0; lines_since_v = 0;
    h_low = 0; v_low_lines = 0; line_clocks = -1; frame_clocks = -1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    h_prev = 1'b1;
    v_prev = 1'b1;
    while (frames_done < FRAMES) begin
      int x, y;
      bit in_pic;
      @(posedge clk);
      #1;
      if (line_clocks >= 0) line_clocks++;
      if (frame_clocks >= 0) frame_clocks++;
      t_since_h++;
      // Horizontal sync.
      if (!h_sync) h_low++;
      if (h_prev && !h_sync) begin
        if (line_clocks > 0) check("line length", line_clocks, total(HT));
        line_clocks = 0;
      end
      if (!h_prev && h_sync) begin
        check("h_sync width", h_low, HT.sync);
        h_low = 0;
        t_since_h = 0;
        lines_since_v++;
        n_h_retrace++;
        if (!v_sync) v_low_lines++;
      end
      // Vertical sync.
      if (v_prev && !v_sync) begin
        if (frame_clocks > 0) check("frame length", frame_clocks, total(HT) * total(VT));
        frame_clocks = 0;
        v_low_lines = 0;
      end
      if (!v_prev && v_sync) begin
        check("v_sync width in lines", v_low_lines, VT.sync);
        lines_since_v = 0;
        locked = 1'b1;
        frames_done++;
        n_v_retrace++;
        // Switch to the second display during vertical blanking.
        if (frames_done == 2) begin
          show_letters = 1'b1;
          n_mode_switch++;
        end
        mode = show_letters;
      end
      h_prev = h_sync;
      v_prev = v_sync;
      // Picture position as a monitor would see it.
      x = t_since_h - HT.back;
      y = lines_since_v - VT.back;
      in_pic = locked && x >= 0 && x < HT.active && y >= 0 && y < VT.active;
      if (locked && frames_done < FRAMES) begin
        if (in_pic) begin
          bit b, l;
          b = border_on(x, y, HT.active, VT.active, BORDER);
          l = mode && letter_on(x, y, HT.active, VT.active);
          check("red", red, b || l);
          check("green", green, 0);
          check("blue", blue, 0);
          if (b) n_border++;
          if (l && !b) n_letter++;
        end else begin
          check("blank", {red, green, blue}, 0);
          n_blank++;
        end
      end
    end
    $display("retraces h=%0d v=%0d, border pixels=%0d, letter pixels=%0d, mode switches=%0d, blank clocks=%0d",
             n_h_retrace, n_v_retrace, n_border, n_letter, n_mode_switch, n_blank);
    check("horizontal retrace happened", n_h_retrace > 0, 1);
    check("vertical retrace happened", n_v_retrace > 0, 1);
    check("border drawn", n_border > 0, 1);
    check("letters drawn", n_letter > 0, 1);
    check("mode switched", n_mode_switch, 1);
    check("blanking seen", n_blank > 0, 1);
    check("frames captured", frames_done, FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
