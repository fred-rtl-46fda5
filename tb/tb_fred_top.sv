// tb_fred_top: end-to-end test of the Fred processor at its default sizes.
//
// Runs a hand-assembled program through fred_top with behavioural
// instruction and data memories. The program exercises RAW stalls on a
// multi-cycle multiply, out-of-order completion behind a 32-clock divide,
// the R1 Queue (including "st r1,r1,r1"), a decoupled loop with an implicit
// doit, an explicit doit, the branch prefetch hint, a trap, both deadlock
// detections, a signed overflow, an illegal opcode, sync, getcr, xmem,
// mvpc, and an R1 Queue that would overfill. The exception handler at 0x100
// counts exceptions in r28 and, for causes found at fetch (deadlock,
// illegal), moves the resume address past the offending instruction.
// Final registers and memory are compared with
// values worked out by hand; each mechanism must be seen at least once.
module tb_fred_top;
  import fred_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      if_req, if_ack, ir_req, ir_ack, dm_req, dm_ack, dr_req, dr_ack, pf_valid;
  word_t     if_addr, ir_data, dr_data, pf_addr;
  dmem_req_t dm_data;

  fred_top dut (.*);
  fred_imem_model #(.WORDS(128), .LAT(2)) u_imem (.*);
  fred_dmem_model #(.WORDS(256), .LAT(3)) u_dmem (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%08h) expected %0d (0x%08h)", what, got, got, exp, exp);
    end
  endtask

  function automatic word_t I(input op_e op, input int rd, input int rs1, input int imm,
                              input logic d = 1'b0);
    return enc(op, reg_t'(rd), reg_t'(rs1), 1'b1, 14'(imm), d);
  endfunction
  function automatic word_t R(input op_e op, input int rd, input int rs1, input int rs2,
                              input logic d = 1'b0);
    return enc(op, reg_t'(rd), reg_t'(rs1), 1'b0, 14'(rs2), d);
  endfunction

  localparam int HALT = 62;

  initial begin
    for (int k = 0; k < 128; k++) u_imem.mem[k] = I(OP_OR, 0, 0, 0);
    u_imem.mem[0]  = I(OP_ADDU, 2, 0, 10);
    u_imem.mem[1]  = I(OP_ADDU, 3, 0, 3);
    u_imem.mem[2]  = R(OP_MUL, 4, 2, 3);
    u_imem.mem[3]  = I(OP_ADDU, 5, 4, 1);
    u_imem.mem[4]  = R(OP_DIVU, 6, 2, 3);
    u_imem.mem[5]  = I(OP_ADDU, 7, 0, 7);
    u_imem.mem[6]  = R(OP_ADDU, 8, 6, 7);
    u_imem.mem[7]  = I(OP_ST, 5, 0, 'h204);
    u_imem.mem[8]  = I(OP_ADDU, 1, 0, 'h1F0);
    u_imem.mem[9]  = I(OP_ADDU, 1, 0, 'h10);
    u_imem.mem[10] = I(OP_ADDU, 1, 0, 'h55);
    u_imem.mem[11] = R(OP_ST, 1, 1, 1);
    u_imem.mem[12] = I(OP_LD, 1, 0, 'h200);
    u_imem.mem[13] = I(OP_LD, 1, 0, 'h204);
    u_imem.mem[14] = R(OP_ADD, 9, 1, 1);
    u_imem.mem[15] = I(OP_ADDU, 10, 0, 3);
    u_imem.mem[16] = I(OP_ADDU, 11, 0, 0);
    u_imem.mem[17] = I(OP_SUBU, 10, 10, 1);        // Loop:
    u_imem.mem[18] = I(OP_BGT, 0, 10, -1);         //   bgt r10,Loop
    u_imem.mem[19] = I(OP_ADDU, 11, 11, 5);
    u_imem.mem[20] = R(OP_XOR, 12, 11, 10);
    u_imem.mem[21] = I(OP_ADDU, 13, 11, 0, 1'b1);  //   addu.d
    u_imem.mem[22] = I(OP_BR, 0, 0, 3);            // br to 25
    u_imem.mem[23] = I(OP_DOIT, 0, 0, 0);
    u_imem.mem[24] = I(OP_ADDU, 14, 0, 99);        // skipped
    u_imem.mem[25] = I(OP_ADDU, 15, 0, 1);
    u_imem.mem[26] = I(OP_TRAP, 0, 0, 0);
    u_imem.mem[27] = I(OP_ADDU, 16, 16, 1);
    u_imem.mem[28] = I(OP_DOIT, 0, 0, 0);          // no branch: deadlock
    u_imem.mem[29] = R(OP_ADD, 17, 1, 0);          // empty R1 Queue: deadlock
    u_imem.mem[30] = I(OP_ADDU, 19, 0, 1);
    u_imem.mem[31] = I(OP_MAK, 18, 19, (1 << 5) | 31);
    u_imem.mem[32] = R(OP_ADD, 23, 18, 18);        // overflow
    u_imem.mem[33] = I(OP_ADDU, 24, 0, 42);
    u_imem.mem[34] = 32'hFC00_0000;                // illegal opcode; found at fetch while
                                                   // the add at 32 still waits on r18, so
                                                   // it is taken first and 32 is replayed
    u_imem.mem[35] = I(OP_SYNC, 0, 0, 0);
    u_imem.mem[36] = I(OP_GETCR, 29, 0, CR_ECAUSE);
    u_imem.mem[37] = I(OP_ST, 28, 0, 'h208);
    u_imem.mem[38] = I(OP_XMEM, 30, 0, 'h208);
    u_imem.mem[39] = I(OP_LD, 31, 0, 'h208);
    u_imem.mem[40] = I(OP_MVPC, 25, 0, 0);
    // eleven r1 writers ahead of their readers: the eleventh would overfill
    // the R1 Queue (8 words + 2 in transit), so it raises an R1 deadlock
    // exception at fetch and the handler skips it
    for (int k = 0; k < 11; k++) u_imem.mem[41 + k] = I(OP_ADDU, 1, 0, k + 1);
    for (int k = 0; k < 10; k++) u_imem.mem[52 + k] = R(OP_ADDU, 20, 20, 1);
    u_imem.mem[HALT]   = I(OP_BR, 0, 0, 0);
    u_imem.mem[HALT+1] = I(OP_DOIT, 0, 0, 0);
    // exception handler at 0x100
    u_imem.mem[64] = I(OP_GETCR, 27, 0, CR_ECAUSE);
    u_imem.mem[65] = I(OP_GETCR, 26, 0, CR_EPC);
    u_imem.mem[66] = I(OP_ADDU, 28, 28, 1);
    u_imem.mem[67] = I(OP_SUBU, 22, 27, 5);
    u_imem.mem[68] = I(OP_BLT, 0, 22, 4);          // cause < 5: keep resume address
    u_imem.mem[69] = I(OP_DOIT, 0, 0, 0);
    u_imem.mem[70] = I(OP_ADDU, 21, 26, 4);
    u_imem.mem[71] = I(OP_PUTCR, 0, 21, CR_ERESUME);
    u_imem.mem[72] = I(OP_RTE, 0, 0, 0);
    for (int k = 0; k < 256; k++) u_dmem.mem[k] = '0;
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_ooo = 0, n_doit_taken = 0, n_doit_fall = 0, n_implicit = 0;
  int n_r1_push = 0, n_r1_pop = 0, n_exc = 0, n_replay = 0, n_pf = 0, n_sync = 0;
  int n_iw_full = 0, n_dead = 0, n_fault = 0, halt_seen = 0;
  int exc_by_cause [8] = '{default: 0};
  // previous-clock copies for edge detection
  logic p_r1p, p_r1q, p_replay, p_sync, p_if;
  logic [NFU-1:0] p_st;
  exc_e p_fc;

  always_ff @(posedge clk) if (rst_n) begin
    automatic logic any_older_issued = 1'b0;
    if (dut.u_dispatch.slot_st[dut.u_dispatch.iss] == 3'd1 && !dut.u_dispatch.can_issue &&
        !dut.u_dispatch.exc_pending && dut.u_dispatch.sb_busy != '0) n_stall++;
    // a unit reports while an older issued instruction is still in flight
    for (int k = 0; k < NFU; k++)
      if (dut.st_req[k] != dut.st_ack[k] &&
          dut.u_dispatch.slot_st[dut.u_dispatch.head] == 3'd2 &&
          4'(dut.u_dispatch.head) != dut.st_data[k].tag) n_ooo++;
    if (dut.u_dispatch.doit_wait && dut.bqq_req != dut.bqq_ack && !dut.u_dispatch.take_exc) begin
      if (dut.bqq_data.taken) n_doit_taken++; else n_doit_fall++;
    end
    if (dut.u_dispatch.resp && !dut.u_dispatch.exc_pending && dut.u_dispatch.f_in.d) n_implicit++;
    if (dut.r1p_req != dut.r1p_ack && p_r1p) n_r1_push++;
    if (dut.u_rf.r1q_ack != p_r1q) n_r1_pop++;
    if (dut.exc_we) begin n_exc++; exc_by_cause[dut.exc_cause[2:0]]++; $display("exc cause=%0d epc=%0h resume=%0h count=%0d t=%0t", dut.exc_cause, dut.exc_epc, dut.exc_resume, dut.exc_count, $time); end
    if (dut.u_dispatch.replay && !p_replay) n_replay++;
    if (pf_valid) n_pf++;
    if (dut.u_dispatch.sync_out && !p_sync) n_sync++;
    if (int'(dut.u_dispatch.count) == 8) n_iw_full++;
    if (dut.u_dispatch.fetch_cause != EXC_NONE && p_fc == EXC_NONE) n_dead++;
    for (int k = 0; k < NFU; k++)
      if (dut.st_req[k] != dut.st_ack[k] && dut.st_data[k].exc && p_st[k]) n_fault++;
    if (if_req != if_ack && p_if && if_addr == word_t'(HALT * 4)) halt_seen++;
    any_older_issued = any_older_issued;
  end
  always_ff @(posedge clk) begin
    p_r1p <= dut.r1p_req == dut.r1p_ack;
    p_r1q <= dut.u_rf.r1q_ack;
    p_replay <= dut.u_dispatch.replay;
    p_sync <= dut.u_dispatch.sync_out;
    p_fc <= dut.u_dispatch.fetch_cause;
    p_if <= if_req == if_ack;
    for (int k = 0; k < NFU; k++) p_st[k] <= dut.st_req[k] == dut.st_ack[k];
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  int cycles = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (halt_seen < 3 && cycles < 20000) begin @(posedge clk); cycles++; end
    repeat (50) @(posedge clk);
    $display("halted after %0d cycles", cycles);
    check("r2", dut.u_rf.regs[2], 10);
    check("r3", dut.u_rf.regs[3], 3);
    check("r4 mul", dut.u_rf.regs[4], 30);
    check("r5", dut.u_rf.regs[5], 31);
    check("r6 divu", dut.u_rf.regs[6], 3);
    check("r7", dut.u_rf.regs[7], 7);
    check("r8", dut.u_rf.regs[8], 10);
    check("mem[0x200] st r1,r1,r1", u_dmem.mem['h200 >> 2], 'h55);
    check("mem[0x204]", u_dmem.mem['h204 >> 2], 31);
    check("r9 add r1,r1", dut.u_rf.regs[9], 'h55 + 31);
    check("r10 loop count", dut.u_rf.regs[10], 0);
    check("r11 loop sum", dut.u_rf.regs[11], 15);
    check("r12 xor", dut.u_rf.regs[12], 15);
    check("r13 addu.d", dut.u_rf.regs[13], 15);
    check("r14 skipped", dut.u_rf.regs[14], 0);
    check("r15", dut.u_rf.regs[15], 1);
    check("r16 once after trap", dut.u_rf.regs[16], 1);
    check("r17 never written", dut.u_rf.regs[17], 0);
    check("r18 mak", dut.u_rf.regs[18], 32'h8000_0000);
    check("r23 overflow not written", dut.u_rf.regs[23], 0);
    check("r24", dut.u_rf.regs[24], 42);
    check("r28 exceptions", dut.u_rf.regs[28], 6);
    check("r29 last cause (overflow, replayed after the illegal)", dut.u_rf.regs[29], word_t'(EXC_OVERFLOW));
    check("r26 last EPC (the eleventh r1 writer)", dut.u_rf.regs[26], 51 * 4);
    check("r20 sum of the ten queued words", dut.u_rf.regs[20], 55);
    check("r30 xmem old", dut.u_rf.regs[30], 5);
    check("mem[0x208] xmem new", u_dmem.mem['h208 >> 2], 0);
    check("r31 ld", dut.u_rf.regs[31], 0);
    check("r25 mvpc", dut.u_rf.regs[25], 40 * 4);
    check("trap count", exc_by_cause[3'(EXC_TRAP)], 1);
    check("bq deadlock count", exc_by_cause[3'(EXC_BQ_DEAD)], 1);
    check("r1 deadlock count (empty and overfull)", exc_by_cause[3'(EXC_R1_DEAD)], 2);
    check("overflow count", exc_by_cause[3'(EXC_OVERFLOW)], 1);
    check("illegal count", exc_by_cause[3'(EXC_ILLEGAL)], 1);
    need("RAW/WAW stall cycles", n_stall);
    need("out-of-order completions", n_ooo);
    need("doit taken", n_doit_taken);
    need("doit fall-through", n_doit_fall);
    need("implicit doit", n_implicit);
    need("R1 Queue pushes", n_r1_push);
    need("R1 Queue pops", n_r1_pop);
    need("exceptions taken", n_exc);
    need("fault reports", n_fault);
    need("deadlocks found at fetch", n_dead);
    need("rte replays", n_replay);
    need("prefetch hints", n_pf);
    need("sync", n_sync);
    need("window full cycles", n_iw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
