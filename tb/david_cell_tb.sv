// Testbench for david_cell: drives one cell through the full handshake of
// its transition order, as predecessor and successor, and checks every
// output change against the unit-delay timing worked out from the node
// equations (each of x, xb, outr one cycle). Also checks that a marked cell
// holds its token while the successor does not acknowledge, and that the
// INIT_TOKEN=1 variant starts marked.
module david_cell_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic inr = 1'b1, outa = 1'b1;
  logic ina, outr, token;
  logic ina1, outr1, token1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  david_cell dut (.clk(clk), .rst_n(rst_n), .inr(inr), .ina(ina), .outr(outr), .outa(outa), .token(token));
  david_cell #(.INIT_TOKEN(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .inr(1'b1), .ina(ina1), .outr(outr1),
                                        .outa(1'b1), .token(token1));

  task automatic expect3(string what, logic t, logic a, logic r);
    checks++;
    if (token !== t || ina !== a || outr !== r) begin
      failures++;
      $display("FAIL %s: token=%b ina=%b outr=%b, expected %b %b %b", what, token, ina, outr, t, a, r);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    step();
    expect3("empty after reset", 0, 1, 1);
    checks++;
    if (token1 !== 1'b1 || ina1 !== 1'b0 || outr1 !== 1'b0) begin
      failures++; $display("FAIL marked cell: token=%b ina=%b outr=%b", token1, ina1, outr1);
    end
    // predecessor requests
    inr = 1'b0;
    step(); expect3("inr- -> x+", 1, 1, 1);
    step(); expect3("x+ -> xb- (ina-)", 1, 0, 1);
    step(); expect3("outr held while inr low", 1, 0, 1);
    // predecessor withdraws its request
    inr = 1'b1;
    step(); expect3("inr+ -> outr-", 1, 0, 0);
    repeat (5) step();
    expect3("token held without outa", 1, 0, 0);
    // successor acknowledges
    outa = 1'b0;
    step(); expect3("outa- -> xb+ (ina+)", 1, 1, 0);
    step(); expect3("xb+ -> x-", 0, 1, 0);
    step(); expect3("x- -> outr+", 0, 1, 1);
    outa = 1'b1;
    step(); expect3("outa+ leaves cell empty", 0, 1, 1);
    // a second token
    inr = 1'b0;
    step(); step(); expect3("second token taken", 1, 0, 1);
    inr = 1'b1;
    step(); expect3("second request out", 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
