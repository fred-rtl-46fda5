// tb_dispatch: the Dispatch unit with a behavioural execution side.
//
// A stand-in for the Register File, Distributor and units accepts each
// issue, completes it after a random delay (a long one for div, so later
// instructions finish first), clears the scoreboard bit, reports status
// when asked, and pushes {taken, target} for br into a Branch Queue model.
// The program covers a RAW hazard, an out-of-order completion, a branch with
// an instruction between it and its doit, a doit with no branch (deadlock
// exception; the test moves the resume address past it, as a handler would)
// and a trap, then halts in a br/doit loop. Checks: issue order, no
// instruction issued while a source or destination is still pending,
// the exception causes and addresses, and that nothing is issued twice.
module tb_dispatch;
  import fred_pkg::*;
  localparam int IW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic if_req, if_ack, ir_req, ir_ack, is_req, is_ack = 1'b0, rq_req, rq_ack = 1'b0;
  word_t if_addr, ir_data;
  issue_t is_data;
  opreq_t rq_data;
  logic st_req [NFU], st_ack [NFU];
  status_t st_data [NFU];
  logic bq_req = 1'b0, bq_ack;
  bq_entry_t bq_data = '0;
  logic [31:0] sb_clr = '0;
  logic exc_we, resume_we = 1'b0;
  exc_e exc_cause;
  word_t exc_epc, exc_resume, exc_count, resume_pc_in = '0;
  word_t exc_set [IW];

  dispatch #(.IW_DEPTH(IW)) dut (.*);
  fred_imem_model #(.WORDS(128), .LAT(1)) u_imem (.*);

  function automatic word_t I(input op_e op, input int rd, input int rs1, input int imm);
    return enc(op, reg_t'(rd), reg_t'(rs1), 1'b1, 14'(imm));
  endfunction
  function automatic word_t R(input op_e op, input int rd, input int rs1, input int rs2);
    return enc(op, reg_t'(rd), reg_t'(rs1), 1'b0, 14'(rs2));
  endfunction

  int checks = 0, failures = 0;
  int issued_pc [$];
  int causes [$];
  word_t epcs [$];
  int n_ooo = 0;

  typedef struct { issue_t x; opreq_t q; int due; } job_t;
  job_t jobs [$];
  bq_entry_t bqm [$];
  int pending_w [32];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // execution stand-in
  always @(posedge clk) if (rst_n) begin
    sb_clr <= '0;
    resume_we <= 1'b0;
    if (is_req != is_ack && rq_req != rq_ack) begin
      job_t j;
      instr_t ins;
      ins = to_instr(u_imem.mem[is_data.pc >> 2]);
      // hazard check: nothing this instruction uses may still be pending
      checks++;
      if ((rq_data.use1 && rq_data.rs1 > 1 && pending_w[rq_data.rs1] > 0) ||
          (rq_data.use2 && !rq_data.i && rq_data.rs2 > 1 && pending_w[rq_data.rs2] > 0) ||
          (decode(ins).writes && ins.rd > 1 && pending_w[ins.rd] > 0)) begin
        failures++; $display("FAIL hazard: issued pc %h while a register is pending", is_data.pc);
      end
      if (decode(ins).writes && ins.rd > 1) pending_w[ins.rd]++;
      j.x = is_data; j.q = rq_data;
      j.due = cyc + ((is_data.op == OP_DIV) ? 25 : $urandom_range(4, 1));
      jobs.push_back(j);
      issued_pc.push_back(int'(is_data.pc >> 2));
      is_ack <= ~is_ack; rq_ack <= ~rq_ack;
    end
    for (int k = 0; k < jobs.size(); k++) begin
      if (jobs[k].due <= cyc && (!jobs[k].x.report || st_req[jobs[k].x.fu] == st_ack[jobs[k].x.fu])) begin
        issue_t x;
        x = jobs[k].x;
        if (k != 0) n_ooo++;
        if (x.fu != FU_BRANCH && x.rd > 1 && x.op != OP_TRAP) begin
          sb_clr[x.rd] <= 1'b1; pending_w[x.rd]--;
        end
        if (x.op == OP_BR) bqm.push_back('{taken: 1'b1, target: x.pc + 4 * jobs[k].q.imm});
        if (x.report) begin
          st_data[x.fu] <= '{tag: x.tag, exc: x.op == OP_TRAP, cause: (x.op == OP_TRAP) ? EXC_TRAP : EXC_NONE};
          st_req[x.fu]  <= ~st_req[x.fu];
        end
        jobs.delete(k);
        break;
      end
    end
    if (bq_req == bq_ack && bqm.size() != 0) begin
      bq_data <= bqm.pop_front(); bq_req <= ~bq_req;
    end
    if (exc_we) begin
      causes.push_back(int'(exc_cause)); epcs.push_back(exc_epc);
      if (exc_cause == EXC_BQ_DEAD) begin resume_we <= 1'b1; resume_pc_in <= exc_epc + 4; end
    end
  end

  int halt_n = 0;
  always @(posedge clk) if (rst_n && if_req != if_ack && $past(if_req == if_ack) && if_addr == 11 * 4) halt_n++;

  initial begin
    int exp_seq [10] = '{0, 1, 2, 3, 4, 5, 7, 9, 10, 11};
    int n10;
    for (int k = 0; k < NFU; k++) begin st_req[k] = 1'b0; st_data[k] = '0; end
    for (int k = 0; k < 32; k++) pending_w[k] = 0;
    for (int k = 0; k < 128; k++) u_imem.mem[k] = I(OP_OR, 0, 0, 0);
    u_imem.mem[0]  = I(OP_ADDU, 2, 0, 1);
    u_imem.mem[1]  = I(OP_ADDU, 3, 2, 1);
    u_imem.mem[2]  = R(OP_DIV, 4, 2, 3);
    u_imem.mem[3]  = I(OP_ADDU, 5, 0, 2);
    u_imem.mem[4]  = I(OP_BR, 0, 0, 3);
    u_imem.mem[5]  = I(OP_ADDU, 6, 0, 0);
    u_imem.mem[6]  = I(OP_DOIT, 0, 0, 0);
    u_imem.mem[7]  = I(OP_ADDU, 7, 4, 0);  // waits for the slow div
    u_imem.mem[8]  = I(OP_DOIT, 0, 0, 0);
    u_imem.mem[9]  = I(OP_TRAP, 0, 0, 0);
    u_imem.mem[10] = I(OP_ADDU, 8, 0, 1);
    u_imem.mem[11] = I(OP_BR, 0, 0, 0);
    u_imem.mem[12] = I(OP_DOIT, 0, 0, 0);
    u_imem.mem[64] = I(OP_RTE, 0, 0, 0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (halt_n < 4) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (k >= issued_pc.size() || issued_pc[k] != exp_seq[k]) begin
        failures++; $display("FAIL issue %0d: got %0d expected %0d", k,
                             (k < issued_pc.size()) ? issued_pc[k] : -1, exp_seq[k]);
      end
    end
    n10 = 0;
    foreach (issued_pc[k]) if (issued_pc[k] == 10 || issued_pc[k] == 5) n10++;
    checks++;
    if (n10 != 2) begin failures++; $display("FAIL instructions 5 and 10 issued %0d times in all", n10); end
    checks++;
    if (causes.size() != 2 || causes[0] != EXC_BQ_DEAD || causes[1] != EXC_TRAP ||
        epcs[0] != 8 * 4 || epcs[1] != 9 * 4) begin
      failures++; $display("FAIL exceptions %p %p", causes, epcs);
    end
    checks++;
    if (n_ooo == 0) begin failures++; $display("FAIL no out-of-order completion"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
