// Testbench for mutex: directed cases with exact grant timing (one cycle
// from request to grant, release one cycle after the request falls, the
// waiting side granted the cycle after), the alternating tie-break, and a
// random run checking mutual exclusion, that a grant only follows its own
// request, that a held request keeps its grant, and that no waiting request
// waits longer than the other side's hold (at most five cycles here) plus a few cycles.
module mutex_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req1 = 1'b0, req2 = 1'b0, gnt1, gnt2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mutex dut (.clk(clk), .rst_n(rst_n), .req1(req1), .req2(req2), .gnt1(gnt1), .gnt2(gnt2));

  task automatic step(); @(posedge clk); #1; endtask
  task automatic expect2(string what, logic e1, logic e2);
    checks++;
    if (gnt1 !== e1 || gnt2 !== e2) begin
      failures++;
      $display("FAIL %s: gnt=%b%b expected %b%b", what, gnt1, gnt2, e1, e2);
    end
  endtask

  int wait1, wait2, hold1, hold2;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    step(); expect2("idle", 0, 0);
    req1 = 1;
    step(); expect2("req1 granted", 1, 0);
    req2 = 1;
    step(); step(); expect2("req2 waits", 1, 0);
    req1 = 0;
    step(); expect2("gnt1 released", 0, 0);
    step(); expect2("req2 granted", 0, 1);
    req2 = 0;
    step(); expect2("gnt2 released", 0, 0);
    // tie: side 2 won last, so side 1 wins now, then side 2
    req1 = 1; req2 = 1;
    step(); expect2("tie -> side 1", 1, 0);
    req1 = 0;
    step(); step(); expect2("then side 2", 0, 1);
    req2 = 0; step(); step();
    req1 = 1; req2 = 1;
    step(); expect2("tie after side 2 -> side 1", 1, 0);
    req1 = 0; req2 = 0; step(); step();
    req1 = 1; step(); req1 = 0; step(); step();
    req1 = 1; req2 = 1;
    step(); expect2("tie after side 1 -> side 2", 0, 1);
    req1 = 0; req2 = 0; step(); step();

    // random 4-phase clients
    wait1 = 0; wait2 = 0; hold1 = 0; hold2 = 0;
    for (int i = 0; i < 2000; i++) begin
      logic p1, p2, pg1, pg2;
      pg1 = gnt1; pg2 = gnt2;
      if (!req1 && !gnt1 && ($urandom % 4 == 0)) req1 = 1;
      else if (req1 && gnt1 && ($urandom % 3 == 0 || hold1 >= 5)) req1 = 0;
      if (!req2 && !gnt2 && ($urandom % 4 == 0)) req2 = 1;
      else if (req2 && gnt2 && ($urandom % 3 == 0 || hold2 >= 5)) req2 = 0;
      p1 = req1; p2 = req2;
      step();
      checks++;
      if (gnt1 && gnt2) begin failures++; $display("FAIL both granted at %0d", i); end
      checks++;
      if ((gnt1 && !pg1 && !p1) || (gnt2 && !pg2 && !p2)) begin
        failures++; $display("FAIL grant without request at %0d", i);
      end
      checks++;
      if ((pg1 && p1 && !gnt1) || (pg2 && p2 && !gnt2)) begin
        failures++; $display("FAIL grant lost under request at %0d", i);
      end
      hold1 = gnt1 ? hold1 + 1 : 0;
      hold2 = gnt2 ? hold2 + 1 : 0;
      wait1 = (req1 && !gnt1) ? wait1 + 1 : 0;
      wait2 = (req2 && !gnt2) ? wait2 + 1 : 0;
      checks++;
      if (wait1 > 12 || wait2 > 12) begin failures++; $display("FAIL starvation at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
