// register_file: Fred's 32-entry register file with its R1 Queue ports.
//
// Operand side: Dispatch sends one request per issued instruction (opreq_t,
// through a FIFO) naming up to three sources: rs1 -> a, rs2 or the immediate
// -> b, and rd used as a source -> c. The file answers each request, in the
// order received, with one operands_t word on its operand channel to the
// Distributor. Because requests arrive in program order, no matching is
// needed downstream. r0 reads as zero. A source of r1 is not a register: each
// use pops one word from the R1 Queue, in the order a, b, c, so "add r2,r1,r1"
// takes two consecutive queue words. Operands are gathered one per clock.
// Result side: each functional unit has its own two-phase write channel
// (no shared bus). A result for r2..r31 is written and that register's
// scoreboard bit is cleared (sb_clr, one clock pulse); a result for r1 is
// pushed into the R1 Queue; a result for r0 is dropped. All write channels
// are served in the same clock; the scoreboard guarantees that they name
// different registers. Only one R1 Queue writer can be outstanding (Dispatch
// enforces it), so r1 results never compete.
module register_file
  import fred_pkg::*;
#(
  parameter int NW = NFU
) (
  input  logic      clk,
  input  logic      rst_n,
  // operand requests
  input  logic      rq_req,
  output logic      rq_ack,
  input  opreq_t    rq_data,
  // operands out
  output logic      op_req,
  input  logic      op_ack,
  output operands_t op_data,
  // result write channels
  input  logic      wr_req [NW],
  output logic      wr_ack [NW],
  input  result_t   wr_data [NW],
  // R1 Queue push and pop
  output logic      r1p_req,
  input  logic      r1p_ack,
  output word_t     r1p_data,
  input  logic      r1q_req,
  output logic      r1q_ack,
  input  word_t     r1q_data,
  // scoreboard clear pulses
  output logic [NREGS-1:0] sb_clr
);
  word_t regs [NREGS];

  // ---------------- operand side ----------------
  logic [1:0] step;      // 0: a, 1: b, 2: c, 3: send
  operands_t  acc;

  wire rq_pend = rq_req != rq_ack;
  wire op_free = op_req == op_ack;
  wire r1_have = r1q_req != r1q_ack;

  logic  need;
  reg_t  src;
  always_comb begin
    unique case (step)
      2'd0:    begin need = rq_data.use1; src = rq_data.rs1; end
      2'd1:    begin need = rq_data.use2 && !rq_data.i; src = rq_data.rs2; end
      default: begin need = rq_data.use3; src = rq_data.rs3; end
    endcase
  end
  wire   from_q = need && src == 5'd1;
  word_t val;
  assign val = !need ? ((step == 2'd1 && rq_data.i) ? rq_data.imm : '0) :
               from_q ? r1q_data : regs[src];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0; acc <= '0; rq_ack <= 1'b0; op_req <= 1'b0; op_data <= '0; r1q_ack <= 1'b0;
    end else if (rq_pend) begin
      if (step == 2'd3) begin
        if (op_free) begin
          op_data <= acc;
          op_req  <= ~op_req;
          rq_ack  <= ~rq_ack;
          step    <= '0;
        end
      end else if (!from_q || r1_have) begin
        unique case (step)
          2'd0:    acc.a <= val;
          2'd1:    acc.b <= val;
          default: acc.c <= val;
        endcase
        if (from_q) r1q_ack <= ~r1q_ack;
        step <= step + 2'd1;
      end
    end
  end

  // ---------------- result side ----------------
  logic r1_sel_v;
  int   r1_sel;
  always_comb begin
    r1_sel_v = 1'b0;
    r1_sel   = 0;
    for (int k = NW - 1; k >= 0; k--)
      if (wr_req[k] != wr_ack[k] && wr_data[k].rd == 5'd1) begin
        r1_sel_v = 1'b1;
        r1_sel   = k;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NREGS; k++) regs[k] <= '0;
      for (int k = 0; k < NW; k++) wr_ack[k] <= 1'b0;
      r1p_req <= 1'b0; r1p_data <= '0; sb_clr <= '0;
    end else begin
      sb_clr <= '0;
      for (int k = 0; k < NW; k++) begin
        if (wr_req[k] != wr_ack[k] && wr_data[k].rd != 5'd1) begin
          if (wr_data[k].rd != 5'd0) begin
            regs[wr_data[k].rd]   <= wr_data[k].data;
            sb_clr[wr_data[k].rd] <= 1'b1;
          end
          wr_ack[k] <= ~wr_ack[k];
        end
      end
      if (r1_sel_v && r1p_req == r1p_ack) begin
        r1p_data       <= wr_data[r1_sel].data;
        r1p_req        <= ~r1p_req;
        wr_ack[r1_sel] <= ~wr_ack[r1_sel];
      end
    end
  end
endmodule
