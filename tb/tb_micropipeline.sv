// tb_micropipeline: streams random words through a micropipeline with a
// randomly stalling producer and consumer and checks order and contents.
// Also checks the latency of an empty pipeline (DEPTH clocks), that a
// stalled pipeline holds DEPTH words, and the two-clock streaming rate.
module tb_micropipeline;
  localparam int W = 16, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_req = 1'b0, in_ack, out_req, out_ack = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  micropipeline #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] exp_q [$];
  bit   rx_en = 1'b0, tx_en = 1'b0;
  int   rx_prob = 50, tx_prob = 50, nsent = 0, nrecv = 0;

  // producer
  always @(posedge clk) if (rst_n && tx_en && in_req == in_ack && $urandom_range(99) < tx_prob) begin
    in_data <= W'($urandom);
    in_req  <= ~in_req;
  end
  always @(posedge clk) if (rst_n && tx_en && in_req != in_ack && $past(in_req == in_ack)) begin
    exp_q.push_back(in_data); nsent++;
  end
  // consumer
  always @(posedge clk) if (rst_n && rx_en && out_req != out_ack && $urandom_range(99) < rx_prob) begin
    checks++;
    if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
      failures++; $display("FAIL got %h", out_data);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    out_ack <= ~out_ack;
    nrecv++;
  end

  initial begin
    int t0, n;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // latency of an empty pipeline
    in_data <= 16'hBEEF; in_req <= ~in_req;
    t0 = 0;
    do begin @(posedge clk); t0++; end while (out_req == out_ack);
    checks++;
    // counted from the edge that raised the request: D stage firings + 1
    if (t0 != D + 1 || out_data !== 16'hBEEF) begin failures++; $display("FAIL latency %0d", t0); end
    out_ack <= ~out_ack;
    @(posedge clk);
    // capacity with the consumer stalled
    n = 0;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk);
      if (in_req == in_ack) begin in_data <= W'(n); in_req <= ~in_req; n++; end
    end
    checks++;
    if (n != D + 1) begin failures++; $display("FAIL capacity: accepted %0d (want %0d incl. one pending)", n, D + 1); end
    // drain them
    for (int k = 0; k < D; k++) begin
      while (out_req == out_ack) @(posedge clk);
      checks++;
      if (out_data !== W'(k)) begin failures++; $display("FAIL drain %0d got %0d", k, out_data); end
      out_ack <= ~out_ack; @(posedge clk);
    end
    while (out_req == out_ack) @(posedge clk);
    out_ack <= ~out_ack;
    repeat (3 * D) @(posedge clk);
    // random streaming
    tx_en = 1'b1; rx_en = 1'b1;
    repeat (3000) @(posedge clk);
    // full-rate streaming: one word per two clocks
    tx_prob = 100; rx_prob = 100; n = nrecv;
    repeat (200) @(posedge clk);
    checks++;
    if (nrecv - n < 95) begin failures++; $display("FAIL rate %0d words in 200 clocks", nrecv - n); end
    tx_en = 1'b0;
    repeat (50) @(posedge clk);
    checks++;
    if (nsent != nrecv) begin failures++; $display("FAIL sent %0d received %0d", nsent, nrecv); end
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
