// micropipeline: an elastic self-timed FIFO built from C-elements and
// transition latches, as in the generic micropipeline with no processing
// logic between the stages.
//
// Each stage has one C-element whose inputs are the request from the previous
// stage and the inverted acknowledge from the next stage. When the C-element
// output changes, the stage's latch captures the data from the previous stage;
// the new output level is at once the acknowledge to the previous stage and
// the request to the next one. Both ends use two-phase (transition)
// signalling with bundled data:
//   in_req  toggles when in_data is valid; in_ack toggles when it is taken.
//   out_req toggles when out_data is valid; the consumer toggles out_ack.
// A word is held at the output while out_req != out_ack.
// Timing: the model is clocked; a word moves one stage per clock when the way
// is clear, so an empty FIFO of DEPTH stages shows a new word at the output
// DEPTH clocks after it was offered. As in any micropipeline, a full FIFO in
// steady flow holds a word in every other stage, so it stores DEPTH words when
// the consumer is stalled and passes one word every two clocks when streaming.
// DEPTH and WIDTH are free parameters: the architecture lets any path be
// pipelined to any depth.
module micropipeline #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_req,
  output logic             in_ack,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_req,
  input  logic             out_ack,
  output logic [WIDTH-1:0] out_data
);
  logic [DEPTH-1:0]            ph;     // C-element outputs
  logic [DEPTH-1:0][WIDTH-1:0] latch;

  for (genvar s = 0; s < DEPTH; s++) begin : g_stage
    logic             req_in, ack_next;
    logic [WIDTH-1:0] d_in;
    if (s == 0) begin : g_first
      assign req_in = in_req;
      assign d_in   = in_data;
    end else begin : g_mid
      assign req_in = ph[s-1];
      assign d_in   = latch[s-1];
    end
    if (s == DEPTH-1) begin : g_last
      assign ack_next = out_ack;
    end else begin : g_inner
      assign ack_next = ph[s+1];
    end

    c_element #(.INIT(1'b0)) u_c (
      .clk(clk), .rst_n(rst_n), .a(req_in), .b(~ack_next), .q(ph[s])
    );

    // Transition latch: capture whenever the C-element is about to fire.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) latch[s] <= '0;
      else if (req_in == ~ack_next && req_in != ph[s]) latch[s] <= d_in;
    end
  end

  assign in_ack   = ph[0];
  assign out_req  = ph[DEPTH-1];
  assign out_data = latch[DEPTH-1];

  // Bundled-data rule: the producer keeps in_data still while its request is
  // outstanding.
  logic             pend_q;
  logic [WIDTH-1:0] data_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_q <= 1'b0;
    else        pend_q <= in_req != in_ack;
  end
  always_ff @(posedge clk) data_q <= in_data;
  always_ff @(posedge clk) begin
    if (rst_n && pend_q && in_req != in_ack)
      assert (in_data == data_q) else $error("micropipeline: in_data changed while request pending");
  end
endmodule
