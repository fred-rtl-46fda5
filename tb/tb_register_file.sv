// tb_register_file: writes through all five result channels at once, checks
// the scoreboard-clear pulses, reads operands back (registers, r0, the
// immediate), and pushes words into an R1 Queue (a micropipeline) through
// r1 results, then pops them in a, b, c order with r1 sources.
module tb_register_file;
  import fred_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rq_req = 1'b0, rq_ack, op_req, op_ack = 1'b0;
  opreq_t rq_data = '0;
  operands_t op_data;
  logic wr_req [NFU], wr_ack [NFU];
  result_t wr_data [NFU];
  logic r1p_req, r1p_ack, r1q_req, r1q_ack;
  word_t r1p_data, r1q_data;
  logic [31:0] sb_clr;
  register_file dut (.*);
  micropipeline #(.WIDTH(32), .DEPTH(8)) u_r1q (
    .clk, .rst_n, .in_req(r1p_req), .in_ack(r1p_ack), .in_data(r1p_data),
    .out_req(r1q_req), .out_ack(r1q_ack), .out_data(r1q_data));

  int checks = 0, failures = 0;
  word_t model [32];
  logic [31:0] clr_seen;
  always @(posedge clk) if (rst_n) clr_seen <= clr_seen | sb_clr;

  task automatic wr(input int ch, input int rd, input word_t v);
    while (wr_req[ch] != wr_ack[ch]) @(posedge clk);
    wr_data[ch] <= '{rd: reg_t'(rd), data: v};
    wr_req[ch]  <= ~wr_req[ch];
  endtask

  task automatic rd3(input opreq_t q, output operands_t o);
    while (rq_req != rq_ack) @(posedge clk);
    rq_data <= q; rq_req <= ~rq_req;
    @(posedge clk);
    while (op_req == op_ack) @(posedge clk);
    o = op_data;
    op_ack <= ~op_ack;
    @(posedge clk);
  endtask

  initial begin
    operands_t o;
    opreq_t q;
    for (int k = 0; k < NFU; k++) begin wr_req[k] = 1'b0; wr_data[k] = '0; end
    for (int k = 0; k < 32; k++) model[k] = '0;
    clr_seen = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // five registers per clock, one per channel
    for (int base = 2; base < 32; base += NFU) begin
      for (int ch = 0; ch < NFU; ch++) if (base + ch < 32) begin
        model[base + ch] = $urandom;
        wr(ch, base + ch, model[base + ch]);
      end
      @(posedge clk);
    end
    wr(0, 0, 32'hDEAD);   // r0 stays zero
    repeat (4) @(posedge clk);
    checks++;
    if (clr_seen !== 32'hFFFF_FFFC) begin failures++; $display("FAIL sb_clr %h", clr_seen); end
    for (int n = 0; n < 200; n++) begin
      q = '0;
      q.rs1 = reg_t'($urandom_range(31, 2)); q.rs2 = reg_t'($urandom); q.rs3 = reg_t'($urandom_range(31, 2));
      if (q.rs2 == 1) q.rs2 = 0;
      q.use1 = 1'b1; q.use2 = n[0]; q.use3 = n[1]; q.i = n[2]; q.imm = $urandom;
      rd3(q, o);
      checks++;
      if (o.a !== model[q.rs1] ||
          o.b !== (q.i ? q.imm : q.use2 ? model[q.rs2] : 32'h0) ||
          o.c !== (q.use3 ? model[q.rs3] : 32'h0)) begin
        failures++; $display("FAIL operands %p for %p", o, q);
      end
    end
    // R1 Queue: three pushes through different channels, then one read of
    // r1 as a, b and c
    wr(1, 1, 32'h111); repeat (3) @(posedge clk);
    wr(3, 1, 32'h222); repeat (3) @(posedge clk);
    wr(2, 1, 32'h333); repeat (12) @(posedge clk);
    q = '0; q.rs1 = 1; q.rs2 = 1; q.rs3 = 1; q.use1 = 1; q.use2 = 1; q.use3 = 1;
    rd3(q, o);
    checks++;
    if (o.a !== 32'h111 || o.b !== 32'h222 || o.c !== 32'h333) begin
      failures++; $display("FAIL r1 pops %p", o);
    end
    checks++;
    if (model[1] !== 0 || dut.regs[1] !== 0) begin failures++; $display("FAIL r1 is not a register"); end
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
