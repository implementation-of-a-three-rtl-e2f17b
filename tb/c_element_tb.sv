// Testbench for c_element: random inputs every cycle, output compared with
// a reference model of the C-element (rise on both high, fall on both low,
// hold otherwise), one cycle of delay.
module c_element_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a = 1'b0, b = 1'b0, q;
  logic ref_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  c_element dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .q(q));

  initial begin
    ref_q = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      @(posedge clk);
      if (a && b) ref_q = 1'b1;
      else if (!a && !b) ref_q = 1'b0;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d: a=%b b=%b q=%b expected %b", i, a, b, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
