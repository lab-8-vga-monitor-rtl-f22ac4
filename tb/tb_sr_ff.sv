// tb_sr_ff: checks the set/reset flip-flop against a one-bit reference.
//
// Drives random set and reset (never both, as the controller does) into two
// instances, one clearing to 0 and one to 1, compares q with the reference
// after every edge, and checks that clear acts without a clock edge.
module tb_sr_ff;

  logic clk = 1'b0;
  logic clear;
  logic s, r;
  logic q0, q1;
  int checks = 0;
  int failures = 0;

  sr_ff #(.CLEAR_VALUE(1'b0)) dut0 (.clk(clk), .clear(clear), .s(s), .r(r), .q(q0));
  sr_ff #(.CLEAR_VALUE(1'b1)) dut1 (.clk(clk), .clear(clear), .s(s), .r(r), .q(q1));

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  bit ref0, ref1;
  int sets, resets;

  initial begin
    s = 1'b0;
    r = 1'b0;
    clear = 1'b1;
    #1;
    check("clear to 0", q0, 1'b0);
    check("clear to 1", q1, 1'b1);
    ref0 = 1'b0;
    ref1 = 1'b1;
    sets = 0;
    resets = 0;
    @(posedge clk);
    #1 clear = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(0, 2))
        0: begin s = 1'b1; r = 1'b0; end
        1: begin s = 1'b0; r = 1'b1; end
        default: begin s = 1'b0; r = 1'b0; end
      endcase
      @(posedge clk);
      if (s) begin ref0 = 1'b1; ref1 = 1'b1; sets++; end
      else if (r) begin ref0 = 1'b0; ref1 = 1'b0; resets++; end
      #1;
      check("q0", q0, ref0);
      check("q1", q1, ref1);
    end
    check("sets seen", sets > 100, 1'b1);
    check("resets seen", resets > 100, 1'b1);
    // Set both, then clear between edges.
    s = 1'b1; r = 1'b0;
    @(posedge clk);
    #1;
    check("set", q0, 1'b1);
    s = 1'b0;
    #2 clear = 1'b1;
    #1;
    check("async clear to 0", q0, 1'b0);
    check("async clear to 1", q1, 1'b1);
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
