// tb_fred_loop: the reordered loop with an implicit doit, run on fred_top at
// its default sizes.
//
// The loop is the classic example of a decoupled branch:
//
//   Loop: subu   r8,r8,1
//         bgt    r8,Loop        ; computes the target, does not jump
//         addu   r3,r3,3
//         mul    r9,r2,r3
//         addu.d r2,r9,2        ; the d bit is the doit: jump (or not) here
//
// The branch needs only r8, so the Branch unit resolves it while the
// multiply is still running, the implicit doit is consumed at fetch, and
// Dispatch goes on to fetch the next iteration into the Instruction Window
// before the current one has finished: the window works as a prefetch
// buffer that is never wrong. Checked: the final registers against a model
// of the loop; the number of taken and fall-through doits; that the first
// instruction of a later iteration was fetched while instructions of the
// iteration before were still waiting in the window (prefetch across the
// loop branch); that fetch waited at a doit for the branch at least once; and
// that a prefetch hint to Loop went out for every taken loop branch.
module tb_fred_loop;
  import fred_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      if_req, if_ack, ir_req, ir_ack, dm_req, dm_ack, dr_req, dr_ack, pf_valid;
  word_t     if_addr, ir_data, dr_data, pf_addr;
  dmem_req_t dm_data;

  fred_top dut (.*);
  fred_imem_model #(.WORDS(64), .LAT(2)) u_imem (.*);
  fred_dmem_model #(.WORDS(16), .LAT(3)) u_dmem (.*);

  localparam int N    = 6;   // loop trip count
  localparam int LOOP = 3;   // word address of Loop
  localparam int HALT = 8;

  int checks = 0, failures = 0;
  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%08h) expected %0d (0x%08h)", what, got, got, exp, exp);
    end
  endtask
  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-40s %0d", what, n);
  endtask

  function automatic word_t I(input op_e op, input int rd, input int rs1, input int imm,
                              input logic d = 1'b0);
    return enc(op, reg_t'(rd), reg_t'(rs1), 1'b1, 14'(imm), d);
  endfunction
  function automatic word_t R(input op_e op, input int rd, input int rs1, input int rs2,
                              input logic d = 1'b0);
    return enc(op, reg_t'(rd), reg_t'(rs1), 1'b0, 14'(rs2), d);
  endfunction

  initial begin
    for (int k = 0; k < 64; k++) u_imem.mem[k] = I(OP_OR, 0, 0, 0);
    u_imem.mem[0] = I(OP_ADDU, 8, 0, N);
    u_imem.mem[1] = I(OP_ADDU, 2, 0, 1);
    u_imem.mem[2] = I(OP_ADDU, 3, 0, 0);
    u_imem.mem[LOOP]     = I(OP_SUBU, 8, 8, 1);
    u_imem.mem[LOOP + 1] = I(OP_BGT, 0, 8, -1);        // target = Loop
    u_imem.mem[LOOP + 2] = I(OP_ADDU, 3, 3, 3);
    u_imem.mem[LOOP + 3] = R(OP_MUL, 9, 2, 3);
    u_imem.mem[LOOP + 4] = I(OP_ADDU, 2, 9, 2, 1'b1);  // addu.d
    u_imem.mem[HALT]     = I(OP_BR, 0, 0, 0);
    u_imem.mem[HALT + 1] = I(OP_DOIT, 0, 0, 0);
    for (int k = 0; k < 16; k++) u_dmem.mem[k] = '0;
  end

  // ---------------- observation ----------------
  int n_taken = 0, n_fall = 0, n_prefetch = 0, n_doit_wait = 0, n_pf = 0, halt_seen = 0;
  int loop_fetches = 0;
  logic p_if, p_wait;
  always_ff @(posedge clk) begin
    p_if   <= if_req == if_ack;
    p_wait <= dut.u_dispatch.doit_wait;
  end
  always_ff @(posedge clk) if (rst_n) begin
    if (dut.u_dispatch.doit_wait && dut.bqq_req != dut.bqq_ack) begin
      if (dut.bqq_data.taken && dut.bqq_data.target == word_t'(LOOP * 4)) n_taken++;
      if (!dut.bqq_data.taken) n_fall++;
    end
    if (dut.u_dispatch.doit_wait && !p_wait) n_doit_wait++;
    if (pf_valid && pf_addr == word_t'(LOOP * 4)) n_pf++;
    if (if_req != if_ack && p_if) begin
      if (if_addr == word_t'(LOOP * 4)) begin
        loop_fetches++;
        // a new iteration is fetched while instructions of the previous
        // one are still in the window, not yet issued or not yet complete
        if (loop_fetches > 1 && dut.u_dispatch.count != '0) n_prefetch++;
      end
      if (if_addr == word_t'(HALT * 4)) halt_seen++;
    end
  end

  int cycles = 0;
  initial begin
    int r2, r3, r8, r9;
    r2 = 1; r3 = 0; r8 = N; r9 = 0;
    do begin
      r8 = r8 - 1; r3 = r3 + 3; r9 = r2 * r3; r2 = r9 + 2;
    end while (r8 > 0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (halt_seen < 3 && cycles < 5000) begin @(posedge clk); cycles++; end
    repeat (40) @(posedge clk);
    checks++;
    if (halt_seen < 3) begin failures++; $display("FAIL loop never reached the halt"); end
    $display("loop of %0d iterations finished after %0d cycles", N, cycles);
    check("r2", dut.u_rf.regs[2], word_t'(r2));
    check("r3", dut.u_rf.regs[3], word_t'(r3));
    check("r8", dut.u_rf.regs[8], word_t'(r8));
    check("r9", dut.u_rf.regs[9], word_t'(r9));
    check("iterations fetched", word_t'(loop_fetches), word_t'(N));
    check("doits taken back to Loop", word_t'(n_taken), word_t'(N - 1));
    checks++;
    if (n_fall < 1) begin failures++; $display("FAIL loop exit never fell through"); end
    need("iteration fetched before the previous finished", n_prefetch);
    need("fetch waited at a doit", n_doit_wait);
    checks++;
    if (n_pf != N - 1) begin
      failures++; $display("FAIL %0d prefetch hints to Loop for %0d taken branches", n_pf, N - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
