// rgb_gate: blanks the three colour signals outside the visible area.
//
// Each colour output is the colour input ANDed with the horizontal and the
// vertical data-on flags, so all guns are off during both retraces, as the
// document requires.  Purely combinational.
module rgb_gate
  import vga_pkg::*;
(
  input  logic h_data_on,
  input  logic v_data_on,
  input  rgb_t rgb_in,
  output rgb_t rgb_out
);

  always_comb begin
    rgb_out.r = rgb_in.r & h_data_on & v_data_on;
    rgb_out.g = rgb_in.g & h_data_on & v_data_on;
    rgb_out.b = rgb_in.b & h_data_on & v_data_on;
  end

endmodule
