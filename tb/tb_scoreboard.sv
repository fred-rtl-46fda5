// tb_scoreboard: random set/clear traffic against a bit-vector model
// (set wins over clear, r0 never busy).
module tb_scoreboard;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] set_vec = '0, clr_vec = '0, busy, model = '0;
  scoreboard dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      set_vec = (n % 3 == 0) ? $urandom : (32'd1 << $urandom_range(31));
      clr_vec = $urandom;
      model = ((model & ~clr_vec) | set_vec) & ~32'd1;
      @(posedge clk); #1;
      checks++;
      if (busy !== model) begin failures++; $display("FAIL busy %h exp %h", busy, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
