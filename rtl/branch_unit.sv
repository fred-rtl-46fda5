// branch_unit: the Branch functional unit of Fred, the address-generating
// half of Fred's decoupled branches.
//
// A branch instruction does not change the program counter. The unit works
// out the 32-bit target and a taken bit and pushes them into the Branch
// Queue; the Dispatch unit consumes the entry when it meets the matching
// doit. The same target is offered on the prefetch port (pf_valid for one
// clock, pf_addr) as a hint for an instruction cache; it is only given for
// taken branches and is never speculative.
//   blt ble bne beq bge bgt : compare rs1 (signed) with zero
//   bb0 / bb1               : taken when bit rd[4:0] of rs1 is 0 / 1
//   br                      : always taken
// Target: with the immediate form, pc + 4*imm (relative); with the register
// form, the value of rs2 (absolute). mvpc writes pc + 4*imm to rd.
// Branch instructions never fault; a status is sent only when Dispatch asks.
// Interface: two-phase input, Branch Queue push channel (bq_*), result and
// status channels. Timing: one clock to compute, then waits for the outputs.
module branch_unit
  import fred_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_req,
  output logic      in_ack,
  input  fu_req_t   in_data,
  output logic      bq_req,
  input  logic      bq_ack,
  output bq_entry_t bq_data,
  output logic      res_req,
  input  logic      res_ack,
  output result_t   res_data,
  output logic      st_req,
  input  logic      st_ack,
  output status_t   st_data,
  output logic      pf_valid,
  output word_t     pf_addr
);
  logic  taken;
  word_t target, rel;
  assign rel    = in_data.pc + (in_data.b << 2);
  assign target = in_data.i ? rel : in_data.b;

  always_comb begin
    unique case (in_data.op)
      OP_BLT:  taken = $signed(in_data.a) <  0;
      OP_BLE:  taken = $signed(in_data.a) <= 0;
      OP_BNE:  taken = in_data.a != '0;
      OP_BEQ:  taken = in_data.a == '0;
      OP_BGE:  taken = $signed(in_data.a) >= 0;
      OP_BGT:  taken = $signed(in_data.a) >  0;
      OP_BB0:  taken = !in_data.a[in_data.rd];
      OP_BB1:  taken = in_data.a[in_data.rd];
      default: taken = 1'b1;  // br
    endcase
  end

  wire pend   = in_req != in_ack;
  wire is_mv  = in_data.op == OP_MVPC;
  wire out_ok = (res_req == res_ack) && (st_req == st_ack) && (bq_req == bq_ack);
  logic busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; in_ack <= 1'b0; bq_req <= 1'b0; res_req <= 1'b0; st_req <= 1'b0;
      bq_data <= '0; res_data <= '0; st_data <= '0; pf_valid <= 1'b0; pf_addr <= '0;
    end else begin
      pf_valid <= 1'b0;
      if (!busy) begin
        if (pend && out_ok) begin
          if (is_mv) begin
            res_data <= '{rd: in_data.rd, data: rel};
            res_req  <= ~res_req;
          end else begin
            bq_data  <= '{taken: taken, target: target};
            bq_req   <= ~bq_req;
            pf_valid <= taken;
            pf_addr  <= target;
          end
          if (in_data.report) begin
            st_data <= '{tag: in_data.tag, exc: 1'b0, cause: EXC_NONE};
            st_req  <= ~st_req;
          end
          busy <= 1'b1;
        end
      end else begin
        in_ack <= ~in_ack;
        busy   <= 1'b0;
      end
    end
  end
endmodule
