// tb_logic_unit: random operands for every Logic & Bitfield instruction,
// compared with a bit-by-bit reference model; also checks that a status is
// sent exactly when `report` is set.
module tb_logic_unit;
  import fred_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_req = 1'b0, in_ack, res_req, res_ack = 1'b0, st_req, st_ack = 1'b0;
  fu_req_t in_data = '0;
  result_t res_data;
  status_t st_data;
  logic_unit dut (.*);

  int checks = 0, failures = 0, nst = 0;
  result_t rq [$];
  always @(posedge clk) if (rst_n && res_req != res_ack) begin rq.push_back(res_data); res_ack <= ~res_ack; end
  always @(posedge clk) if (rst_n && st_req != st_ack) begin nst++; st_ack <= ~st_ack; end

  function automatic word_t ref_model(input op_e op, input word_t a, input word_t b);
    int w, o;
    word_t r;
    w = int'(b[9:5]); o = int'(b[4:0]);
    if (w == 0) w = 32;
    r = '0;
    case (op)
      OP_AND:  r = a & b;
      OP_MASK: r = a & (b & 32'hFFFF);
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_CLR:  begin r = a; for (int k = o; k < o + w && k < 32; k++) r[k] = 1'b0; end
      OP_SET:  begin r = a; for (int k = o; k < o + w && k < 32; k++) r[k] = 1'b1; end
      OP_EXTU: for (int k = 0; k < w && k + o < 32; k++) r[k] = a[k + o];
      OP_EXT:  begin
        int top;
        top = (o + w > 32) ? 31 : o + w - 1;
        for (int k = 0; k < 32; k++) r[k] = (k + o <= top) ? a[k + o] : a[top];
      end
      OP_MAK:  for (int k = o; k < o + w && k < 32; k++) r[k] = a[k - o];
      OP_ROT:  for (int k = 0; k < 32; k++) r[k] = a[(k + o) % 32];
      OP_FF1:  begin r = 32; for (int k = 0; k < 32; k++) if (a[k]) r = k; end
      OP_FF0:  begin r = 32; for (int k = 0; k < 32; k++) if (!a[k]) r = k; end
      default: r = '0;
    endcase
    return r;
  endfunction

  op_e ops [12] = '{OP_AND, OP_MASK, OP_OR, OP_XOR, OP_CLR, OP_SET, OP_EXTU, OP_EXT,
                    OP_MAK, OP_ROT, OP_FF1, OP_FF0};
  initial begin
    int nrep;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    nrep = 0;
    for (int n = 0; n < 600; n++) begin
      fu_req_t x;
      x = '0;
      x.op = ops[n % 12];
      x.a  = (n % 5 == 0) ? 32'h0 : (n % 7 == 0) ? 32'hFFFF_FFFF : $urandom;
      x.b  = $urandom;
      // keep bit fields inside the word (o + w <= 32)
      if (x.op inside {OP_CLR, OP_SET, OP_EXTU, OP_EXT, OP_MAK}) begin
        int w, o;
        w = $urandom_range(32, 1); o = $urandom_range(32 - w, 0);
        x.b = {22'h0, 5'(w), 5'(o)};
      end
      x.rd = reg_t'(n); x.tag = 4'(n); x.report = (n % 4 == 0);
      if (x.report) nrep++;
      while (in_req != in_ack) @(posedge clk);
      in_data <= x; in_req <= ~in_req;
      @(posedge clk);
      while (rq.size() == 0) @(posedge clk);
      checks++;
      begin
        result_t r;
        r = rq.pop_front();
        if (r.data !== ref_model(x.op, x.a, x.b) || r.rd !== x.rd) begin
          failures++;
          $display("FAIL %s a=%h b=%h got %h exp %h", x.op.name(), x.a, x.b, r.data,
                   ref_model(x.op, x.a, x.b));
        end
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (nst != nrep) begin failures++; $display("FAIL statuses %0d expected %0d", nst, nrep); end
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
