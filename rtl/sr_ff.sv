// sr_ff: clocked set/reset flip-flop with an asynchronous clear.
//
// On a rising clock edge q becomes 1 when s is high and 0 when r is high; it
// holds when neither is.  The controller never raises s and r together; if
// that happens, set wins (this design's choice, flagged by an assertion).
// clear forces q to CLEAR_VALUE at once.  The document's circuit clears all
// four flip-flops to 0; CLEAR_VALUE lets the controller start them in the
// state that matches the counters' reset position.
module sr_ff #(
  parameter bit CLEAR_VALUE = 1'b0
) (
  input  logic clk,
  input  logic clear,
  input  logic s,
  input  logic r,
  output logic q
);

  always_ff @(posedge clk or posedge clear) begin
    if (clear)
      q <= CLEAR_VALUE;
    else if (s)
      q <= 1'b1;
    else if (r)
      q <= 1'b0;
  end

  // Set and reset are never asserted together by the controller.
  assert property (@(posedge clk) disable iff (clear) !(s && r))
    else $error("sr_ff: set and reset asserted together");

endmodule
