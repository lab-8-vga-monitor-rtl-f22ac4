// tb_scan_counter: checks the row/column counter against a reference count.
//
// Two instances: a short timing (3 + 2 + 4 + 5 = 14 steps) driven with a
// random enable and occasional clears, and the 800-step 25.175 MHz line
// timing with the enable held high, whose roll_over period is measured.
// Every cycle the count and all five strobes are compared with values
// worked out from a reference counter kept in the testbench.
module tb_scan_counter;
  import vga_pkg::*;

  localparam region_t SMALL = '{active: 10'd3, front: 10'd2, sync: 10'd4, back: 10'd5};

  logic clk = 1'b0;
  logic clear;
  logic en;
  int checks = 0;
  int failures = 0;

  logic [CNT_W-1:0] cnt_s, cnt_l;
  logic f_s, s_s, b_s, a_s, r_s;
  logic f_l, s_l, b_l, a_l, r_l;

  scan_counter #(.TIMING(SMALL)) dut_small (
    .clk(clk), .clear(clear), .en(en), .count(cnt_s),
    .at_front(f_s), .at_sync(s_s), .at_back(b_s), .at_active(a_s), .roll_over(r_s)
  );

  scan_counter dut_line (
    .clk(clk), .clear(clear), .en(1'b1), .count(cnt_l),
    .at_front(f_l), .at_sync(s_l), .at_back(b_l), .at_active(a_l), .roll_over(r_l)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Strobes expected from a position: the last step before each boundary.
  task automatic check_strobes(string tag, int pos, bit e, int a, int f, int s, int b,
                               logic gf, logic gs, logic gb, logic ga, logic gr);
    check({tag, " at_front"},  gf, e && pos == a - 1);
    check({tag, " at_sync"},   gs, e && pos == a + f - 1);
    check({tag, " at_back"},   gb, e && pos == a + f + s - 1);
    check({tag, " at_active"}, ga, e && pos == a + f + s + b - 1);
    check({tag, " roll_over"}, gr, e && pos == a + f + s + b - 1);
  endtask

  int ref_s, ref_l;
  int roll_count, last_roll;

  initial begin
    clear = 1'b1;
    en = 1'b0;
    ref_s = 0;
    ref_l = 0;
    roll_count = 0;
    last_roll = -1;
    repeat (2) @(posedge clk);
    #1 clear = 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      en = ($urandom_range(0, 3) != 0);
      #1;
      check("small count", cnt_s, ref_s);
      check_strobes("small", ref_s, en, 3, 2, 4, 5, f_s, s_s, b_s, a_s, r_s);
      check("line count", cnt_l, ref_l);
      check_strobes("line", ref_l, 1'b1, 640, 20, 95, 45, f_l, s_l, b_l, a_l, r_l);
      if (r_l) begin
        if (last_roll >= 0) check("line period", cyc - last_roll, 800);
        last_roll = cyc;
        roll_count++;
      end
      @(posedge clk);
      if (en) ref_s = (ref_s + 1) % 14;
      ref_l = (ref_l + 1) % 800;
      #1;
    end
    check("line roll_over seen", roll_count >= 4, 1);
    // Asynchronous clear returns both counters to 0 without a clock edge.
    #2 clear = 1'b1;
    #1;
    check("clear small", cnt_s, 0);
    check("clear line", cnt_l, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
