// tb_rgb_gate: exhaustive check of the colour blanking gate.
//
// Applies all 32 combinations of the two data-on flags and the three colour
// bits; a colour may appear only while both flags are high.
module tb_rgb_gate;
  import vga_pkg::*;

  logic h_on, v_on;
  rgb_t rgb_in, rgb_out;
  int checks = 0;
  int failures = 0;

  rgb_gate dut (.h_data_on(h_on), .v_data_on(v_on), .rgb_in(rgb_in), .rgb_out(rgb_out));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {h_on, v_on, rgb_in} = 5'(i);
      #1;
      checks++;
      if (rgb_out !== ((h_on && v_on) ? rgb_in : 3'b000)) begin
        failures++;
        $display("FAIL h=%0b v=%0b in=%03b out=%03b", h_on, v_on, rgb_in, rgb_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
