// c_element: Muller C-element, the control element of a micropipeline stage.
//
// The output follows the inputs when both agree and holds its value while
// they differ, so it acts as an AND gate for transition events. In a
// micropipeline one input is the request from the stage before and the other
// the inverted acknowledge from the stage after (the inversion is done by the
// caller). This is a clocked model of the gate: the inputs are sampled on each
// rising clock edge and the output is registered, so an event on the inputs
// shows on `q` one clock later. Reset drives the output to INIT, matching the
// convention that all control wires start low.
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= INIT;
    else if (a == b) q <= a;
  end
endmodule
