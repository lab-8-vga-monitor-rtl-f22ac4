// tb_border_pattern: checks the border generator at every scan position.
//
// Sweeps column 0..799 and row 0..527 (the whole 25.175 MHz frame,
// including blanking) for the default 640 x 480 screen with an 8-pixel
// border, and a sample of positions for a 305 x 480 screen with a 3-pixel
// border.  The reference is the distance from the pixel to the nearest
// edge of the visible area.
module tb_border_pattern;
  import vga_pkg::*;
  import vga_ref_pkg::*;

  logic [CNT_W-1:0] column, row;
  rgb_t rgb_a, rgb_b;
  int checks = 0;
  int failures = 0;
  int lit = 0;

  border_pattern dut_a (.column(column), .row(row), .rgb(rgb_a));
  border_pattern #(.H_ACTIVE(305), .V_ACTIVE(480), .BORDER(3), .COLOUR('{r: 1'b0, g: 1'b1, b: 1'b1}))
    dut_b (.column(column), .row(row), .rgb(rgb_b));

  task automatic check(string what, rgb_t got, rgb_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at col %0d row %0d: got %03b expected %03b", what, column, row, got, exp);
    end
  endtask

  initial begin
    for (int y = 0; y < 528; y++) begin
      for (int x = 0; x < 800; x++) begin
        column = CNT_W'(x);
        row = CNT_W'(y);
        #1;
        check("640x480", rgb_a, border_on(x, y, 640, 480, 8) ? 3'b100 : 3'b000);
        if (border_on(x, y, 640, 480, 8)) lit++;
        if (x < 400 && (y % 7 == 0 || y < 5 || y > 474))
          check("305x480", rgb_b, border_on(x, y, 305, 480, 3) ? 3'b011 : 3'b000);
      end
    end
    // 640*480 - 624*464 pixels lie on the border.
    checks++;
    if (lit != 640 * 480 - 624 * 464) begin
      failures++;
      $display("FAIL border pixel count %0d", lit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
