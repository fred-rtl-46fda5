// fred_top: the Fred self-timed decoupled processor.
//
// Dispatch fetches instructions into its Instruction Window and issues them
// in program order; each issue sends an operand request to the Register File
// and the tagged instruction to the Distributor, both through micropipeline
// FIFOs. The Register File answers with operands (through a third FIFO),
// the Distributor pairs instruction and operands and hands them to one of
// five functional units (Logic & Bitfield, Arithmetic, Memory, Branch,
// Control). Units write results back over their own channels; a result for
// r1 is pushed into the R1 Queue, which the Register File pops for each r1
// source. Branch units push {taken, target} into the Branch Queue, which
// Dispatch pops at each doit. Units report completion status by tag to
// Dispatch, so instructions complete out of order.
// Every path is a two-phase request/acknowledge channel with bundled data;
// the FIFO depths are parameters (the architecture allows any depth).
// External interfaces: instruction memory (request if_*, response ir_*),
// data memory (request dm_*, response dr_*), all two-phase; the prefetch hint
// pf_valid/pf_addr gives the target of each taken branch as soon as it is
// computed. Exceptions branch to HANDLER_PC. All sizes not fixed by the
// architecture (queue depths, window size, latencies) are this design's.
module fred_top
  import fred_pkg::*;
#(
  parameter int    IW_DEPTH   = 8,
  parameter int    FIFO_DEPTH = 2,   // Dispatch->EX and RF->EX paths
  parameter int    R1Q_DEPTH  = 8,
  parameter int    BQ_DEPTH   = 4,
  parameter int    MUL_CYCLES = 4,
  parameter word_t RESET_PC   = 32'h0000_0000,
  parameter word_t HANDLER_PC = 32'h0000_0100
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic      if_req,
  input  logic      if_ack,
  output word_t     if_addr,
  input  logic      ir_req,
  output logic      ir_ack,
  input  word_t     ir_data,
  output logic      dm_req,
  input  logic      dm_ack,
  output dmem_req_t dm_data,
  input  logic      dr_req,
  output logic      dr_ack,
  input  word_t     dr_data,
  output logic      pf_valid,
  output word_t     pf_addr
);
  // Dispatch -> issue FIFO -> Distributor
  logic   d_is_req, d_is_ack, x_is_req, x_is_ack;
  issue_t d_is_data, x_is_data;
  // Dispatch -> operand request FIFO -> Register File
  logic   d_rq_req, d_rq_ack, x_rq_req, x_rq_ack;
  opreq_t d_rq_data, x_rq_data;
  // Register File -> operand FIFO -> Distributor
  logic      r_op_req, r_op_ack, x_op_req, x_op_ack;
  operands_t r_op_data, x_op_data;
  // R1 Queue
  logic  r1p_req, r1p_ack, r1q_req, r1q_ack;
  word_t r1p_data, r1q_data;
  // Branch Queue
  logic      bqp_req, bqp_ack, bqq_req, bqq_ack;
  bq_entry_t bqp_data, bqq_data;
  // unit channels
  logic    fu_req [NFU], fu_ack [NFU];
  fu_req_t fu_data [NFU];
  logic    wr_req [NFU], wr_ack [NFU];
  result_t wr_data [NFU];
  logic    st_req [NFU], st_ack [NFU];
  status_t st_data [NFU];
  logic [NREGS-1:0] sb_clr;
  // exception record
  logic  exc_we, resume_we;
  exc_e  exc_cause;
  word_t exc_epc, exc_resume, exc_count, resume_pc;
  word_t exc_set [IW_DEPTH];

  dispatch #(
    .IW_DEPTH(IW_DEPTH), .R1_CAP(R1Q_DEPTH + 2), .RESET_PC(RESET_PC), .HANDLER_PC(HANDLER_PC)
  ) u_dispatch (
    .clk, .rst_n,
    .if_req, .if_ack, .if_addr, .ir_req, .ir_ack, .ir_data,
    .is_req(d_is_req), .is_ack(d_is_ack), .is_data(d_is_data),
    .rq_req(d_rq_req), .rq_ack(d_rq_ack), .rq_data(d_rq_data),
    .st_req, .st_ack, .st_data,
    .bq_req(bqq_req), .bq_ack(bqq_ack), .bq_data(bqq_data),
    .sb_clr,
    .exc_we, .exc_cause, .exc_epc, .exc_resume, .exc_count, .exc_set,
    .resume_we, .resume_pc_in(resume_pc)
  );

  micropipeline #(.WIDTH($bits(issue_t)), .DEPTH(FIFO_DEPTH)) u_issue_fifo (
    .clk, .rst_n, .in_req(d_is_req), .in_ack(d_is_ack), .in_data(d_is_data),
    .out_req(x_is_req), .out_ack(x_is_ack), .out_data(x_is_data)
  );

  micropipeline #(.WIDTH($bits(opreq_t)), .DEPTH(FIFO_DEPTH)) u_opreq_fifo (
    .clk, .rst_n, .in_req(d_rq_req), .in_ack(d_rq_ack), .in_data(d_rq_data),
    .out_req(x_rq_req), .out_ack(x_rq_ack), .out_data(x_rq_data)
  );

  register_file #(.NW(NFU)) u_rf (
    .clk, .rst_n,
    .rq_req(x_rq_req), .rq_ack(x_rq_ack), .rq_data(x_rq_data),
    .op_req(r_op_req), .op_ack(r_op_ack), .op_data(r_op_data),
    .wr_req, .wr_ack, .wr_data,
    .r1p_req, .r1p_ack, .r1p_data, .r1q_req, .r1q_ack, .r1q_data,
    .sb_clr
  );

  micropipeline #(.WIDTH($bits(operands_t)), .DEPTH(FIFO_DEPTH)) u_operand_fifo (
    .clk, .rst_n, .in_req(r_op_req), .in_ack(r_op_ack), .in_data(r_op_data),
    .out_req(x_op_req), .out_ack(x_op_ack), .out_data(x_op_data)
  );

  micropipeline #(.WIDTH(XLEN), .DEPTH(R1Q_DEPTH)) u_r1_queue (
    .clk, .rst_n, .in_req(r1p_req), .in_ack(r1p_ack), .in_data(r1p_data),
    .out_req(r1q_req), .out_ack(r1q_ack), .out_data(r1q_data)
  );

  micropipeline #(.WIDTH($bits(bq_entry_t)), .DEPTH(BQ_DEPTH)) u_branch_queue (
    .clk, .rst_n, .in_req(bqp_req), .in_ack(bqp_ack), .in_data(bqp_data),
    .out_req(bqq_req), .out_ack(bqq_ack), .out_data(bqq_data)
  );

  distributor u_dist (
    .clk, .rst_n,
    .is_req(x_is_req), .is_ack(x_is_ack), .is_data(x_is_data),
    .op_req(x_op_req), .op_ack(x_op_ack), .op_data(x_op_data),
    .fu_req, .fu_ack, .fu_data
  );

  logic_unit u_logic (
    .clk, .rst_n,
    .in_req(fu_req[FU_LOGIC]), .in_ack(fu_ack[FU_LOGIC]), .in_data(fu_data[FU_LOGIC]),
    .res_req(wr_req[FU_LOGIC]), .res_ack(wr_ack[FU_LOGIC]), .res_data(wr_data[FU_LOGIC]),
    .st_req(st_req[FU_LOGIC]), .st_ack(st_ack[FU_LOGIC]), .st_data(st_data[FU_LOGIC])
  );

  arith_unit #(.MUL_CYCLES(MUL_CYCLES)) u_arith (
    .clk, .rst_n,
    .in_req(fu_req[FU_ARITH]), .in_ack(fu_ack[FU_ARITH]), .in_data(fu_data[FU_ARITH]),
    .res_req(wr_req[FU_ARITH]), .res_ack(wr_ack[FU_ARITH]), .res_data(wr_data[FU_ARITH]),
    .st_req(st_req[FU_ARITH]), .st_ack(st_ack[FU_ARITH]), .st_data(st_data[FU_ARITH])
  );

  memory_unit u_mem (
    .clk, .rst_n,
    .in_req(fu_req[FU_MEM]), .in_ack(fu_ack[FU_MEM]), .in_data(fu_data[FU_MEM]),
    .res_req(wr_req[FU_MEM]), .res_ack(wr_ack[FU_MEM]), .res_data(wr_data[FU_MEM]),
    .st_req(st_req[FU_MEM]), .st_ack(st_ack[FU_MEM]), .st_data(st_data[FU_MEM]),
    .dm_req, .dm_ack, .dm_data, .dr_req, .dr_ack, .dr_data
  );

  branch_unit u_branch (
    .clk, .rst_n,
    .in_req(fu_req[FU_BRANCH]), .in_ack(fu_ack[FU_BRANCH]), .in_data(fu_data[FU_BRANCH]),
    .bq_req(bqp_req), .bq_ack(bqp_ack), .bq_data(bqp_data),
    .res_req(wr_req[FU_BRANCH]), .res_ack(wr_ack[FU_BRANCH]), .res_data(wr_data[FU_BRANCH]),
    .st_req(st_req[FU_BRANCH]), .st_ack(st_ack[FU_BRANCH]), .st_data(st_data[FU_BRANCH]),
    .pf_valid, .pf_addr
  );

  control_unit #(.IW_DEPTH(IW_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .in_req(fu_req[FU_CTRL]), .in_ack(fu_ack[FU_CTRL]), .in_data(fu_data[FU_CTRL]),
    .res_req(wr_req[FU_CTRL]), .res_ack(wr_ack[FU_CTRL]), .res_data(wr_data[FU_CTRL]),
    .st_req(st_req[FU_CTRL]), .st_ack(st_ack[FU_CTRL]), .st_data(st_data[FU_CTRL]),
    .exc_we, .exc_cause, .exc_epc, .exc_resume, .exc_count, .exc_set,
    .resume_we, .resume_pc
  );
endmodule
