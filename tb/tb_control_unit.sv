// tb_control_unit: putcr/getcr round trips, the ERESUME forward to
// Dispatch, trap and sync statuses and loading of the exception record.
module tb_control_unit;
  import fred_pkg::*;
  localparam int IW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_req = 1'b0, in_ack, res_req, res_ack = 1'b0, st_req, st_ack = 1'b0;
  fu_req_t in_data = '0;
  result_t res_data;
  status_t st_data;
  logic exc_we = 1'b0, resume_we;
  exc_e exc_cause = EXC_NONE;
  word_t exc_epc = '0, exc_resume = '0, exc_count = '0, resume_pc;
  word_t exc_set [IW];
  control_unit #(.IW_DEPTH(IW)) dut (.*);

  int checks = 0, failures = 0, nres = 0;
  result_t rq [$];
  status_t sq [$];
  always @(posedge clk) if (rst_n && res_req != res_ack) begin rq.push_back(res_data); res_ack <= ~res_ack; end
  always @(posedge clk) if (rst_n && st_req != st_ack) begin sq.push_back(st_data); st_ack <= ~st_ack; end
  always @(posedge clk) if (rst_n && resume_we) nres++;

  task automatic op(input op_e o, input int idx, input word_t a, input int rd);
    fu_req_t x;
    x = '0; x.op = o; x.b = word_t'(idx); x.a = a; x.rd = reg_t'(rd); x.tag = 4'(rd);
    while (in_req != in_ack) @(posedge clk);
    in_data <= x; in_req <= ~in_req;
    @(posedge clk);
    while (in_req != in_ack) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic expect_get(input int idx, input word_t v);
    op(OP_GETCR, idx, '0, 9);
    checks++;
    if (rq.size() == 0 || rq[0].data !== v || rq[0].rd !== 9) begin
      failures++; $display("FAIL getcr %0d exp %h", idx, v);
    end
    rq.delete();
  endtask

  word_t vals [32];
  initial begin
    for (int k = 0; k < IW; k++) exc_set[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 32; k++) begin vals[k] = $urandom; op(OP_PUTCR, k, vals[k], 0); end
    for (int k = 31; k >= 0; k--) expect_get(k, vals[k]);
    checks++;
    if (nres != 1 || resume_pc !== vals[CR_ERESUME]) begin failures++; $display("FAIL resume forward"); end
    // exception record
    @(negedge clk);
    exc_we = 1'b1; exc_cause = EXC_DIVZERO; exc_epc = 32'h40; exc_resume = 32'h48; exc_count = 2;
    for (int k = 0; k < IW; k++) exc_set[k] = word_t'(k * 16 + 3);
    @(negedge clk); exc_we = 1'b0;
    expect_get(CR_ECAUSE, EXC_DIVZERO);
    expect_get(CR_EPC, 32'h40);
    expect_get(CR_ERESUME, 32'h48);
    expect_get(CR_ECOUNT, 2);
    for (int k = 0; k < IW; k++) expect_get(CR_ESET + k, word_t'(k * 16 + 3));
    // trap and sync
    sq.delete();
    op(OP_TRAP, 0, '0, 5);
    checks++;
    if (sq.size() != 1 || !sq[0].exc || sq[0].cause !== EXC_TRAP || sq[0].tag !== 5) begin
      failures++; $display("FAIL trap status");
    end
    sq.delete();
    op(OP_SYNC, 0, '0, 6);
    checks++;
    if (sq.size() != 1 || sq[0].exc || sq[0].tag !== 6) begin failures++; $display("FAIL sync status"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
