// fred_dmem_model: behavioural data memory for simulation.
//
// Takes two-phase requests (dm_req/dm_ack carrying a dmem_req_t: read, write
// or swap, byte address, write data) and answers each with one word on the
// two-phase response channel (dr_req/dr_ack) LAT clocks later: the old
// contents for read and swap, the written word for write.
module fred_dmem_model
  import fred_pkg::*;
#(
  parameter int WORDS = 256,
  parameter int LAT   = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dm_req,
  output logic      dm_ack,
  input  dmem_req_t dm_data,
  output logic      dr_req,
  input  logic      dr_ack,
  output word_t     dr_data
);
  word_t     mem [WORDS];
  int        wait_n;
  logic      busy;
  dmem_req_t q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dm_ack <= 1'b0; dr_req <= 1'b0; dr_data <= '0; busy <= 1'b0; wait_n <= 0; q <= '0;
    end else if (!busy) begin
      if (dm_req != dm_ack && dr_req == dr_ack) begin
        dm_ack <= ~dm_ack; q <= dm_data; wait_n <= LAT; busy <= 1'b1;
      end
    end else if (wait_n > 1) begin
      wait_n <= wait_n - 1;
    end else begin
      dr_data <= (q.op == DM_WRITE) ? q.wdata : mem[(q.addr >> 2) % WORDS];
      if (q.op != DM_READ) mem[(q.addr >> 2) % WORDS] <= q.wdata;
      dr_req  <= ~dr_req;
      busy    <= 1'b0;
    end
  end
endmodule
