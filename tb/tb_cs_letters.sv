// tb_cs_letters: checks the "CS" letter generator at every scan position.
//
// Sweeps the whole 800 x 528 frame of positions for the default 640 x 480
// screen and the 381 x 528 frame for a 305 x 480 screen, comparing with a
// 3 x 5 bitmap of each letter looked up by grid cell (column / cell width,
// row / cell height).
module tb_cs_letters;
  import vga_pkg::*;
  import vga_ref_pkg::*;

  logic [CNT_W-1:0] column, row;
  rgb_t rgb_a, rgb_b;
  int checks = 0;
  int failures = 0;
  int lit_a = 0;

  cs_letters dut_a (.column(column), .row(row), .rgb(rgb_a));
  cs_letters #(.H_ACTIVE(305), .V_ACTIVE(480), .COLOUR('{r: 1'b0, g: 1'b1, b: 1'b0}))
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
        check("640x480", rgb_a, letter_on(x, y, 640, 480) ? 3'b100 : 3'b000);
        if (letter_on(x, y, 640, 480)) lit_a++;
        if (x < 381) check("305x480", rgb_b, letter_on(x, y, 305, 480) ? 3'b010 : 3'b000);
      end
    end
    // C has 9 lit cells and S 11, each 49 x 53 pixels.
    checks++;
    if (lit_a != 20 * 49 * 53) begin
      failures++;
      $display("FAIL letter pixel count %0d", lit_a);
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
