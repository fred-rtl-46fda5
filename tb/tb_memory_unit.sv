// tb_memory_unit: random ld/st/xmem traffic (with misaligned addresses)
// through the Memory unit into a behavioural data memory, compared with a
// shadow memory; checks results, exception statuses and that a misaligned
// access never reaches memory.
module tb_memory_unit;
  import fred_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_req = 1'b0, in_ack, res_req, res_ack = 1'b0, st_req, st_ack = 1'b0;
  logic dm_req, dm_ack, dr_req, dr_ack;
  fu_req_t in_data = '0;
  result_t res_data;
  status_t st_data;
  dmem_req_t dm_data;
  word_t dr_data;
  memory_unit dut (.*);
  fred_dmem_model #(.WORDS(64), .LAT(2)) u_mem (.*);

  int checks = 0, failures = 0, nreq = 0;
  result_t rq [$];
  status_t sq [$];
  word_t shadow [64];
  always @(posedge clk) if (rst_n && res_req != res_ack) begin rq.push_back(res_data); res_ack <= ~res_ack; end
  always @(posedge clk) if (rst_n && st_req != st_ack) begin sq.push_back(st_data); st_ack <= ~st_ack; end
  always @(posedge clk) if (rst_n && dm_req != dm_ack && $past(dm_req == dm_ack)) nreq++;

  initial begin
    int nbefore;
    for (int k = 0; k < 64; k++) begin u_mem.mem[k] = word_t'(k * 3); shadow[k] = word_t'(k * 3); end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      fu_req_t x;
      logic mis;
      int idx;
      x = '0;
      x.op = (n % 3 == 0) ? OP_LD : (n % 3 == 1) ? OP_ST : OP_XMEM;
      x.a = word_t'($urandom_range(31) * 4);
      x.b = word_t'($urandom_range(31) * 4) + ((n % 10 == 0) ? word_t'($urandom_range(3, 1)) : 0);
      x.c = $urandom;
      x.rd = reg_t'(n); x.tag = 4'(n); x.report = 1'b1;
      mis = (x.a + x.b) % 4 != 0;
      idx = int'((x.a + x.b) >> 2) % 64;
      nbefore = nreq;
      while (in_req != in_ack) @(posedge clk);
      in_data <= x; in_req <= ~in_req;
      @(posedge clk);
      while (sq.size() == 0) @(posedge clk);
      @(posedge clk);
      checks++;
      begin
        status_t s;
        s = sq.pop_front();
        if (s.exc !== mis || (mis && s.cause !== EXC_ALIGN) || s.tag !== x.tag) begin
          failures++; $display("FAIL status %p for addr %h", s, x.a + x.b);
        end
      end
      checks++;
      if (mis) begin
        if (nreq != nbefore || rq.size() != 0) begin failures++; $display("FAIL misaligned access went out"); end
      end else if (x.op == OP_ST) begin
        shadow[idx] = x.c;
        if (rq.size() != 0) begin failures++; $display("FAIL st wrote a register"); end
      end else begin
        result_t r;
        if (rq.size() == 0) begin failures++; $display("FAIL no result"); end
        else begin
          r = rq.pop_front();
          if (r.data !== shadow[idx] || r.rd !== x.rd) begin
            failures++; $display("FAIL %s got %h exp %h", x.op.name(), r.data, shadow[idx]);
          end
        end
        if (x.op == OP_XMEM) shadow[idx] = x.c;
      end
    end
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (u_mem.mem[k] !== shadow[k]) begin failures++; $display("FAIL mem[%0d]", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
