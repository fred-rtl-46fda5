// distributor: pairs each issued instruction with its operands and routes it
// to its functional unit.
//
// Instructions (from Dispatch) and operand sets (from the Register File)
// arrive on two separate FIFO channels, both in program order, so the head of
// one always belongs with the head of the other. When both heads are present
// and the target unit's input channel is free, the Distributor forms a
// fu_req_t, offers it to that unit and takes both heads. Instructions leave in
// program order; they may complete in any order because the units run at
// their own rates. Each unit has its own two-phase input channel, indexed by
// fu_e. Timing: one instruction per two clocks at best (a two-phase
// handshake per hop in this clocked model).
module distributor
  import fred_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      is_req,
  output logic      is_ack,
  input  issue_t    is_data,
  input  logic      op_req,
  output logic      op_ack,
  input  operands_t op_data,
  output logic      fu_req  [NFU],
  input  logic      fu_ack  [NFU],
  output fu_req_t   fu_data [NFU]
);
  wire both = (is_req != is_ack) && (op_req != op_ack);
  wire [2:0] f = is_data.fu;
  wire free = (f < 3'(NFU)) && (fu_req[f] == fu_ack[f]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_ack <= 1'b0; op_ack <= 1'b0;
      for (int k = 0; k < NFU; k++) begin fu_req[k] <= 1'b0; fu_data[k] <= '0; end
    end else if (both && free) begin
      fu_data[f] <= '{tag: is_data.tag, op: is_data.op, rd: is_data.rd, i: is_data.i,
                      report: is_data.report, pc: is_data.pc,
                      a: op_data.a, b: op_data.b, c: op_data.c};
      fu_req[f]  <= ~fu_req[f];
      is_ack     <= ~is_ack;
      op_ack     <= ~op_ack;
    end
  end
endmodule
