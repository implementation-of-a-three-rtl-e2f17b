// Testbench for sync_arbiter: for random levels of rbar, held stable, raises
// ck0 and checks that exactly the matching output rises (rbar_1 when rbar is
// high, rbar_0 when low) within two cycles and stays while ck0 is high, and
// that both outputs are low within two cycles of ck0 falling and while ck0
// is low. Also covers rbar rising in the same cycle as ck0.
module sync_arbiter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rbar = 1'b0, ck0 = 1'b0, rbar_1, rbar_0;
  int checks = 0, failures = 0;
  int n1 = 0, n0 = 0;

  always #5 clk = ~clk;

  sync_arbiter dut (.clk(clk), .rst_n(rst_n), .rbar(rbar), .ck0(ck0), .rbar_1(rbar_1), .rbar_0(rbar_0));

  task automatic step(); @(posedge clk); #1; endtask
  task automatic expect2(string what, logic e1, logic e0);
    checks++;
    if (rbar_1 !== e1 || rbar_0 !== e0) begin
      failures++;
      $display("FAIL %s: rbar_1=%b rbar_0=%b expected %b %b (rbar=%b)", what, rbar_1, rbar_0, e1, e0, rbar);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic v;
      v = 1'($urandom);
      if (i % 10 == 9) begin
        rbar = v; ck0 = 1'b1;        // simultaneous arrival, rbar stable after
      end else begin
        rbar = v;
        repeat (1 + $urandom % 3) step();
        expect2("ck0 low", 0, 0);
        ck0 = 1'b1;
      end
      step(); step();
      expect2("sampled", v, !v);
      if (v) n1++; else n0++;
      repeat ($urandom % 4) step();
      expect2("held", v, !v);
      ck0 = 1'b0;
      step(); step();
      expect2("released", 0, 0);
    end
    checks++;
    if (n1 == 0 || n0 == 0) begin failures++; $display("FAIL one outcome never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
