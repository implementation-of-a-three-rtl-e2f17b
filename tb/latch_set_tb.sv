// Testbench for latch_set: random enable and data every cycle, q and done
// compared with a reference model (q takes d while en, holds otherwise;
// done is en one cycle late). Also checks the INIT reset value.
module latch_set_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0;
  logic [7:0] d = '0, q, ref_q;
  logic done, ref_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  latch_set #(.W(8), .INIT(8'hA5)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q), .done(done));

  initial begin
    ref_q = 8'hA5;
    ref_done = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (q !== 8'hA5) begin failures++; $display("FAIL reset value %h", q); end
    for (int i = 0; i < 400; i++) begin
      en = ($urandom % 3) == 0;
      d  = 8'($urandom);
      @(posedge clk);
      if (en) ref_q = d;
      ref_done = en;
      #1;
      checks++;
      if (q !== ref_q || done !== ref_done) begin
        failures++;
        $display("FAIL cycle %0d: q=%h done=%b expected %h %b", i, q, done, ref_q, ref_done);
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
