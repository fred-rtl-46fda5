// tb_c_element: random test of the clocked C-element against its rule:
// the output takes the common value when both inputs agree, else holds.
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, q;
  always #5 clk = ~clk;
  c_element dut (.*);
  int checks = 0, failures = 0;
  logic model;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1; model = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk); #1;
      if (a == b) model = a;
      checks++;
      if (q !== model) begin failures++; $display("FAIL a=%b b=%b q=%b exp=%b", a, b, q, model); end
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
