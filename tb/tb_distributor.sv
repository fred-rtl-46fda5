// tb_distributor: feeds random instructions and operand sets, with random
// stalls on each unit, and checks that each unit receives its own
// instructions, in program order, with the right operands attached.
module tb_distributor;
  import fred_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic is_req = 1'b0, is_ack, op_req = 1'b0, op_ack;
  issue_t is_data = '0;
  operands_t op_data = '0;
  logic fu_req [NFU], fu_ack [NFU];
  fu_req_t fu_data [NFU];
  distributor dut (.*);

  int checks = 0, failures = 0, ndone = 0;
  fu_req_t expq [NFU][$];
  for (genvar g = 0; g < NFU; g++) begin : g_sink
    initial fu_ack[g] = 1'b0;
    always @(posedge clk) if (rst_n && fu_req[g] != fu_ack[g] && $urandom_range(3) == 0) begin
      checks++;
      if (expq[g].size() == 0 || fu_data[g] !== expq[g][0]) begin
        failures++; $display("FAIL unit %0d got %p", g, fu_data[g]);
      end
      if (expq[g].size() != 0) void'(expq[g].pop_front());
      fu_ack[g] <= ~fu_ack[g];
      ndone++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      issue_t x;
      operands_t o;
      fu_req_t e;
      x = '0; x.tag = 4'(n); x.op = OP_ADD; x.fu = fu_e'($urandom_range(NFU - 1));
      x.rd = reg_t'(n); x.pc = word_t'(n * 4); x.report = n[0]; x.i = n[1];
      o.a = $urandom; o.b = $urandom; o.c = $urandom;
      e = '{tag: x.tag, op: x.op, rd: x.rd, i: x.i, report: x.report, pc: x.pc, a: o.a, b: o.b, c: o.c};
      expq[x.fu].push_back(e);
      while (is_req != is_ack || op_req != op_ack) @(posedge clk);
      is_data <= x; is_req <= ~is_req;
      repeat ($urandom_range(2)) @(posedge clk);
      op_data <= o; op_req <= ~op_req;
      @(posedge clk);
    end
    repeat (200) @(posedge clk);
    checks++;
    if (ndone != 500) begin failures++; $display("FAIL delivered %0d", ndone); end
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
