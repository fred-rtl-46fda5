// fred_imem_model: behavioural instruction memory for simulation.
//
// Answers each two-phase fetch request (if_req/if_ack, byte address) with the
// addressed word on the two-phase response channel (ir_req/ir_ack) LAT clocks
// later. The contents are a word array `mem` that the testbench fills.
module fred_imem_model #(
  parameter int WORDS = 256,
  parameter int LAT   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        if_req,
  output logic        if_ack,
  input  logic [31:0] if_addr,
  output logic        ir_req,
  input  logic        ir_ack,
  output logic [31:0] ir_data
);
  logic [31:0] mem [WORDS];
  int          wait_n;
  logic        busy;
  logic [31:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_ack <= 1'b0; ir_req <= 1'b0; ir_data <= '0; busy <= 1'b0; wait_n <= 0; addr_q <= '0;
    end else if (!busy) begin
      if (if_req != if_ack && ir_req == ir_ack) begin
        if_ack <= ~if_ack; addr_q <= if_addr; wait_n <= LAT; busy <= 1'b1;
      end
    end else if (wait_n > 1) begin
      wait_n <= wait_n - 1;
    end else begin
      ir_data <= mem[(addr_q >> 2) % WORDS];
      ir_req  <= ~ir_req;
      busy    <= 1'b0;
    end
  end
endmodule
