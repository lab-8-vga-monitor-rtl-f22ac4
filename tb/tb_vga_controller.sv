// tb_vga_controller: checks the controller cycle by cycle for two frames.
//
// Runs the default 25.175 MHz timing (800 clocks per line, 528 lines per
// frame) from reset for two whole frames with random colour inputs.  Each
// cycle the column and row outputs, both sync levels and the three gated
// colours are compared with a reference that derives the scan position
// from the number of clocks since reset.  The widths and periods of the
// sync pulses are also measured: 95 clocks low every 800 clocks for
// horizontal sync, 2 lines (1600 clocks) low every 528 lines for vertical
// sync.  Finally reset is applied between clock edges.
module tb_vga_controller;
  import vga_pkg::*;
  import vga_ref_pkg::*;

  localparam ref_timing_t HT = '{active: 640, front: 20, sync: 95, back: 45};
  localparam ref_timing_t VT = '{active: 480, front: 14, sync: 2, back: 32};
  localparam int H_TOTAL = 800;
  localparam int V_TOTAL = 528;
  localparam int FRAME = H_TOTAL * V_TOTAL;

  logic clk = 1'b0;
  logic reset;
  logic red, green, blue;
  logic h_sync, v_sync, red_out, green_out, blue_out;
  logic [CNT_W-1:0] column, row;
  int checks = 0;
  int failures = 0;

  vga_controller dut (
    .clk(clk), .reset(reset), .red(red), .green(green), .blue(blue),
    .h_sync_out(h_sync), .v_sync_out(v_sync),
    .red_out(red_out), .green_out(green_out), .blue_out(blue_out),
    .column_out(column), .row_out(row)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int h_fall, v_fall, h_low_start, v_low_start;
  int h_pulses, v_pulses;
  logic h_prev, v_prev;

  initial begin
    reset = 1'b1;
    {red, green, blue} = 3'b111;
    h_fall = -1; v_fall = -1; h_low_start = -1; v_low_start = -1;
    h_pulses = 0; v_pulses = 0;
    repeat (3) @(posedge clk);
    #1;
    check("reset column", column, 0);
    check("reset row", row, 0);
    check("reset h_sync", h_sync, 1);
    check("reset v_sync", v_sync, 1);
    reset = 1'b0;
    h_prev = 1'b1;
    v_prev = 1'b1;
    for (int k = 0; k < 2 * FRAME + 5000; k++) begin
      int col, rw;
      bit on;
      col = k % H_TOTAL;
      rw = (k / H_TOTAL) % V_TOTAL;
      on = visible(HT, col) && visible(VT, rw);
      {red, green, blue} = 3'($urandom);
      #1;
      check("column", column, col);
      check("row", row, rw);
      check("h_sync", h_sync, sync_level(HT, col));
      check("v_sync", v_sync, sync_level(VT, rw));
      check("rgb", {red_out, green_out, blue_out}, on ? {red, green, blue} : 3'b000);
      // Pulse widths and periods.
      if (h_prev && !h_sync) begin
        if (h_fall >= 0) check("h_sync period", k - h_fall, H_TOTAL);
        h_fall = k;
      end
      if (!h_prev && h_sync) begin
        check("h_sync low width", k - h_fall, 95);
        h_pulses++;
      end
      if (v_prev && !v_sync) begin
        if (v_fall >= 0) check("v_sync period", k - v_fall, FRAME);
        v_fall = k;
      end
      if (!v_prev && v_sync) begin
        check("v_sync low width", k - v_fall, 2 * H_TOTAL);
        v_pulses++;
      end
      h_prev = h_sync;
      v_prev = v_sync;
      @(posedge clk);
      #1;
    end
    // The extra 5000 clocks hold six more line pulses.
    check("h_sync pulses", h_pulses, 2 * V_TOTAL + 6);
    check("v_sync pulses", v_pulses, 2);
    // Asynchronous reset between clock edges.
    #2 reset = 1'b1;
    #1;
    check("async reset column", column, 0);
    check("async reset row", row, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
