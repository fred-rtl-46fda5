// memory_unit: the Memory functional unit of Fred.
//
// Executes ld, st and xmem. The effective address is a + b (rs1 plus rs2 or
// the immediate); st and xmem take their store data from operand c (the
// instruction's rd field used as a source), so "st r1,r1,r1" stores the third
// R1 Queue word at the sum of the first two. xmem swaps a register with a
// memory word in one memory request. A word address that is not a multiple
// of four raises an alignment exception and no memory access is made.
// The unit is treated as just another functional unit: results of ld and
// xmem go to the Register File (or, with rd = r1, into the R1 Queue).
// Interface: two-phase input, result and status channels as in the other
// units, plus a two-phase request channel to data memory (dm_req/dm_ack with
// dmem_req_t) and a two-phase response channel (dr_req/dr_ack with the read
// word). The memory answers every request, writes included. One access is
// outstanding at a time; the latency is the memory's own.
module memory_unit
  import fred_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_req,
  output logic      in_ack,
  input  fu_req_t   in_data,
  output logic      res_req,
  input  logic      res_ack,
  output result_t   res_data,
  output logic      st_req,
  input  logic      st_ack,
  output status_t   st_data,
  output logic      dm_req,
  input  logic      dm_ack,
  output dmem_req_t dm_data,
  input  logic      dr_req,
  output logic      dr_ack,
  input  word_t     dr_data
);
  typedef enum logic [1:0] { S_IDLE, S_WAIT, S_SEND } state_e;
  state_e state;
  word_t  rdata;
  exc_e   cause;

  wire   pend   = in_req != in_ack;
  wire   res_ok = res_req == res_ack;
  wire   st_ok  = st_req == st_ack;
  wire   dm_ok  = dm_req == dm_ack;
  word_t addr;
  assign addr = in_data.a + in_data.b;
  wire   writes_reg = in_data.op != OP_ST;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; in_ack <= 1'b0; res_req <= 1'b0; st_req <= 1'b0;
      dm_req <= 1'b0; dr_ack <= 1'b0; res_data <= '0; st_data <= '0;
      dm_data <= '0; rdata <= '0; cause <= EXC_NONE;
    end else begin
      unique case (state)
        S_IDLE: if (pend) begin
          if (addr[1:0] != 2'b00) begin
            cause <= EXC_ALIGN;
            state <= S_SEND;
          end else if (dm_ok) begin
            cause   <= EXC_NONE;
            dm_data <= '{op: (in_data.op == OP_LD) ? DM_READ :
                             (in_data.op == OP_ST) ? DM_WRITE : DM_SWAP,
                         addr: addr, wdata: in_data.c};
            dm_req  <= ~dm_req;
            state   <= S_WAIT;
          end
        end
        S_WAIT: if (dr_req != dr_ack) begin
          rdata  <= dr_data;
          dr_ack <= ~dr_ack;
          state  <= S_SEND;
        end
        S_SEND: if (res_ok && st_ok) begin
          if (cause == EXC_NONE && writes_reg) begin
            res_data <= '{rd: in_data.rd, data: rdata};
            res_req  <= ~res_req;
          end
          if (in_data.report || cause != EXC_NONE) begin
            st_data <= '{tag: in_data.tag, exc: cause != EXC_NONE, cause: cause};
            st_req  <= ~st_req;
          end
          in_ack <= ~in_ack;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
