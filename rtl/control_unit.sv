// control_unit: the Control functional unit of Fred.
//
// Holds the control registers and executes getcr (rd <- cr[imm]), putcr
// (cr[imm] <- rs1), trap (always reports an exception with cause TRAP) and
// sync (reports completion so that Dispatch can release the instructions
// behind it). rte is consumed inside Dispatch and never reaches this unit.
// When Dispatch takes an exception it writes the exception record here in
// one clock (exc_we): cause, the address of the oldest faulted instruction,
// the resume address, the size of the exception set and the set itself, one
// word per instruction {pc[31:2], faulted, valid}, oldest first. A putcr to
// ERESUME is passed on to Dispatch (resume_we/resume_pc) so a handler can
// choose where rte continues. The register map is this implementation's.
// Interface: two-phase input, result and status channels as in the other
// units. Timing: one clock to execute, then waits for the outputs.
module control_unit
  import fred_pkg::*;
#(
  parameter int IW_DEPTH = 8,
  parameter int NCR      = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_req,
  output logic    in_ack,
  input  fu_req_t in_data,
  output logic    res_req,
  input  logic    res_ack,
  output result_t res_data,
  output logic    st_req,
  input  logic    st_ack,
  output status_t st_data,
  // exception record from Dispatch
  input  logic    exc_we,
  input  exc_e    exc_cause,
  input  word_t   exc_epc,
  input  word_t   exc_resume,
  input  word_t   exc_count,
  input  word_t   exc_set [IW_DEPTH],
  // resume address written by putcr
  output logic    resume_we,
  output word_t   resume_pc
);
  word_t cr [NCR];

  wire pend   = in_req != in_ack;
  wire out_ok = (res_req == res_ack) && (st_req == st_ack);
  wire [$clog2(NCR)-1:0] idx = in_data.b[$clog2(NCR)-1:0];
  logic busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; in_ack <= 1'b0; res_req <= 1'b0; st_req <= 1'b0;
      res_data <= '0; st_data <= '0; resume_we <= 1'b0; resume_pc <= '0;
      for (int k = 0; k < NCR; k++) cr[k] <= '0;
    end else begin
      resume_we <= 1'b0;
      if (exc_we) begin
        cr[CR_ECAUSE]  <= word_t'(exc_cause);
        cr[CR_EPC]     <= exc_epc;
        cr[CR_ERESUME] <= exc_resume;
        cr[CR_ECOUNT]  <= exc_count;
        for (int k = 0; k < IW_DEPTH; k++) cr[CR_ESET + k] <= exc_set[k];
      end
      if (!busy) begin
        if (pend && out_ok) begin
          unique case (in_data.op)
            OP_GETCR: begin
              res_data <= '{rd: in_data.rd, data: cr[idx]};
              res_req  <= ~res_req;
            end
            OP_PUTCR: begin
              cr[idx] <= in_data.a;
              if (int'(idx) == CR_ERESUME) begin
                resume_we <= 1'b1;
                resume_pc <= in_data.a;
              end
            end
            default: ;
          endcase
          if (in_data.report || in_data.op == OP_TRAP || in_data.op == OP_SYNC) begin
            st_data <= '{tag: in_data.tag, exc: in_data.op == OP_TRAP,
                         cause: (in_data.op == OP_TRAP) ? EXC_TRAP : EXC_NONE};
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
