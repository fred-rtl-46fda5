// tb_arith_unit: random and corner operands for every arithmetic
// instruction against a reference model, including overflow and divide-by-
// zero exceptions. Also checks the latencies: mul takes MUL_CYCLES clocks,
// a divide about 32 clocks, add one clock.
module tb_arith_unit;
  import fred_pkg::*;
  localparam int MC = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_req = 1'b0, in_ack, res_req, res_ack = 1'b0, st_req, st_ack = 1'b0;
  fu_req_t in_data = '0;
  result_t res_data;
  status_t st_data;
  arith_unit #(.MUL_CYCLES(MC)) dut (.*);

  int checks = 0, failures = 0;
  result_t rq [$];
  status_t sq [$];
  always @(posedge clk) if (rst_n && res_req != res_ack) begin rq.push_back(res_data); res_ack <= ~res_ack; end
  always @(posedge clk) if (rst_n && st_req != st_ack) begin sq.push_back(st_data); st_ack <= ~st_ack; end

  task automatic ref_model(input op_e op, input word_t a, input word_t b,
                           output word_t y, output exc_e c);
    longint sa, sb, s;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    c = EXC_NONE; y = '0;
    case (op)
      OP_ADD:  begin s = sa + sb; y = word_t'(s); if (s > 64'sd2147483647 || s < -64'sd2147483648) c = EXC_OVERFLOW; end
      OP_SUB:  begin s = sa - sb; y = word_t'(s); if (s > 64'sd2147483647 || s < -64'sd2147483648) c = EXC_OVERFLOW; end
      OP_ADDU: y = a + b;
      OP_SUBU: y = a - b;
      OP_MUL:  y = word_t'(longint'(a) * longint'(b));
      OP_DIVU: if (b == 0) c = EXC_DIVZERO; else y = a / b;
      OP_DIV:  if (b == 0) c = EXC_DIVZERO; else y = word_t'(sa / sb);
      OP_CMP:  begin
        y[2] = a == b; y[3] = a != b; y[4] = sa > sb; y[5] = sa <= sb; y[6] = sa < sb;
        y[7] = sa >= sb; y[8] = a > b; y[9] = a <= b; y[10] = a < b; y[11] = a >= b;
      end
      default: ;
    endcase
  endtask

  op_e ops [8] = '{OP_ADD, OP_ADDU, OP_SUB, OP_SUBU, OP_CMP, OP_MUL, OP_DIV, OP_DIVU};
  word_t corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h0000_0007};
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      fu_req_t x;
      word_t y; exc_e c;
      int t;
      x = '0;
      x.op = ops[n % 8];
      x.a = (n % 3 == 0) ? corner[$urandom_range(5)] : $urandom;
      x.b = (n % 4 == 0) ? corner[$urandom_range(5)] : (n % 5 == 0) ? word_t'($urandom_range(9)) : $urandom;
      if (x.op == OP_DIV && x.a == 32'h8000_0000 && x.b == 32'hFFFF_FFFF) x.b = 32'h3;
      x.rd = reg_t'(n); x.tag = 4'(n); x.report = 1'b1;
      ref_model(x.op, x.a, x.b, y, c);
      while (in_req != in_ack) @(posedge clk);
      in_data <= x; in_req <= ~in_req;
      @(posedge clk);
      t = 0;
      while (sq.size() == 0) begin @(posedge clk); t++; end
      @(posedge clk);
      checks++;
      begin
        status_t s;
        s = sq.pop_front();
        if (s.tag !== x.tag || s.exc !== (c != EXC_NONE) || s.cause !== c) begin
          failures++; $display("FAIL status %s a=%h b=%h got %p exp cause %0d", x.op.name(), x.a, x.b, s, c);
        end
      end
      checks++;
      if (c == EXC_NONE) begin
        result_t r;
        if (rq.size() == 0) begin failures++; $display("FAIL no result %s", x.op.name()); end
        else begin
          r = rq.pop_front();
          if (r.data !== y || r.rd !== x.rd) begin
            failures++; $display("FAIL %s a=%h b=%h got %h exp %h", x.op.name(), x.a, x.b, r.data, y);
          end
        end
      end else if (rq.size() != 0) begin
        failures++; $display("FAIL result written on exception"); void'(rq.pop_front());
      end
      // latency, counted from the clock after the request: one clock to
      // accept, the working clocks, one to send, one for the status to show
      checks++;
      if ((x.op == OP_MUL && t != MC + 2) ||
          ((x.op == OP_DIV || x.op == OP_DIVU) && c == EXC_NONE && t != 32 + 4) ||
          (x.op == OP_ADD && t != 3)) begin
        failures++; $display("FAIL latency %s %0d", x.op.name(), t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
