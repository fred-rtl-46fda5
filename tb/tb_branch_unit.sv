// tb_branch_unit: every branch condition on random and edge values, both
// target forms, mvpc, the Branch Queue entry and the prefetch hint.
module tb_branch_unit;
  import fred_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_req = 1'b0, in_ack, bq_req, bq_ack = 1'b0, res_req, res_ack = 1'b0;
  logic st_req, st_ack = 1'b0, pf_valid;
  fu_req_t in_data = '0;
  bq_entry_t bq_data;
  result_t res_data;
  status_t st_data;
  word_t pf_addr;
  branch_unit dut (.*);

  int checks = 0, failures = 0, npf = 0;
  bq_entry_t bqq [$];
  result_t rq [$];
  word_t pfq [$];
  always @(posedge clk) if (rst_n && bq_req != bq_ack) begin bqq.push_back(bq_data); bq_ack <= ~bq_ack; end
  always @(posedge clk) if (rst_n && res_req != res_ack) begin rq.push_back(res_data); res_ack <= ~res_ack; end
  always @(posedge clk) if (rst_n && st_req != st_ack) st_ack <= ~st_ack;
  always @(posedge clk) if (rst_n && pf_valid) pfq.push_back(pf_addr);

  op_e ops [10] = '{OP_BLT, OP_BLE, OP_BNE, OP_BEQ, OP_BGE, OP_BGT, OP_BB0, OP_BB1, OP_BR, OP_MVPC};
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      fu_req_t x;
      logic tk;
      word_t tg;
      int sa;
      x = '0;
      x.op = ops[n % 10];
      x.a = ((n / 10) % 4 == 0) ? 32'h0 : ((n / 10) % 4 == 1) ? 32'hFFFF_FFF0 : $urandom;
      x.i = n[4];
      x.b = x.i ? word_t'($signed(14'($urandom))) : ($urandom & ~32'h3);
      x.pc = $urandom & ~32'h3;
      x.rd = reg_t'($urandom);
      sa = $signed(x.a);
      case (x.op)
        OP_BLT: tk = sa < 0;   OP_BLE: tk = sa <= 0;  OP_BNE: tk = sa != 0;
        OP_BEQ: tk = sa == 0;  OP_BGE: tk = sa >= 0;  OP_BGT: tk = sa > 0;
        OP_BB0: tk = !x.a[x.rd]; OP_BB1: tk = x.a[x.rd];
        default: tk = 1'b1;
      endcase
      tg = x.i ? x.pc + 4 * x.b : x.b;
      while (in_req != in_ack) @(posedge clk);
      in_data <= x; in_req <= ~in_req;
      @(posedge clk);
      while (bqq.size() == 0 && rq.size() == 0) @(posedge clk);
      @(posedge clk);
      checks++;
      if (x.op == OP_MVPC) begin
        result_t r;
        r = rq.pop_front();
        if (r.data !== x.pc + 4 * x.b || r.rd !== x.rd || bqq.size() != 0) begin
          failures++; $display("FAIL mvpc %h", r.data);
        end
      end else begin
        bq_entry_t e;
        e = bqq.pop_front();
        if (e.taken !== tk || e.target !== tg) begin
          failures++; $display("FAIL %s a=%h got %p exp %b %h", x.op.name(), x.a, e, tk, tg);
        end
        checks++;
        if (tk) begin
          if (pfq.size() != 1 || pfq[0] !== tg) begin failures++; $display("FAIL prefetch hint"); end
          else npf++;
        end else if (pfq.size() != 0) begin failures++; $display("FAIL hint on not-taken"); end
        pfq.delete();
      end
    end
    checks++;
    if (npf == 0) failures++;
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
