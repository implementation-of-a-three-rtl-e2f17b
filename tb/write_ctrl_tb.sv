// Testbench for write_ctrl on its own. The testbench plays the writer
// (4-phase write_start/write_done), the data path (wr_done follows wr_start
// one cycle later), the shared mutex (grants after a random delay, so the
// writer also meets a busy mutex) and the reader's r (changed at random
// between write cycles, never to the slot the writer will write next).
// Expected slots come from the reference differ() of the package:
//  - each write opens exactly the expected slot w (starting from slot 1);
//  - when write_done rises, l equals the slot just written;
//  - the next w is differ(l, r), so never l and never r;
//  - l changes only while the mutex is granted to the writer;
//  - a write cycle finishes within a fixed bound beyond the mutex delay.
module write_ctrl_tb;
  import acm3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic write_start = 1'b0, write_done;
  slot_t wr_start, wr_done, l, r;
  logic mx_req, mx_gnt;
  int checks = 0, failures = 0;
  int gnt_delay = 0, n_eq = 0, n_ne = 0;
  slot_t w_exp, prev_l;

  always #5 clk = ~clk;

  write_ctrl dut (.clk(clk), .rst_n(rst_n), .write_start(write_start), .write_done(write_done),
    .wr_start(wr_start), .wr_done(wr_done), .mx_req(mx_req), .mx_gnt(mx_gnt), .l(l), .r(r));

  // data path model
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wr_done <= '0; else wr_done <= wr_start;

  // mutex model: grant after gnt_delay cycles, drop when the request drops
  int gcount;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin mx_gnt <= 1'b0; gcount <= 0; end
    else if (!mx_req) begin mx_gnt <= 1'b0; gcount <= 0; end
    else if (gcount >= gnt_delay) mx_gnt <= 1'b1;
    else gcount <= gcount + 1;

  // l may change only under the writer's grant
  always @(posedge clk) if (rst_n) begin
    if (l != prev_l && !mx_gnt) begin
      failures++; $display("FAIL l changed without the mutex");
    end
    prev_l = l;
  end

  task automatic fail(string msg); failures++; $display("FAIL %s", msg); endtask

  initial begin
    r = SLOT2;
    prev_l = SLOT2;
    w_exp = SLOT1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (l != SLOT2) fail("l reset value");
    for (int i = 0; i < 300; i++) begin
      int t0, lat;
      bit seen;
      slot_t cand;
      // reader moves r to any slot but the next w
      if ($urandom % 2) begin
        do cand = slot_t'(3'b1 << ($urandom % 3)); while (cand == w_exp);
        r = cand;
      end
      gnt_delay = (i % 4 == 0) ? int'($urandom % 10) : 0;
      repeat ($urandom % 5) @(posedge clk);
      write_start <= 1'b1;
      t0 = i;
      seen = 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
        if (wr_start != '0) begin
          seen = 1;
          if (wr_start != w_exp) fail($sformatf("write %0d opened slot %0d, expected %0d", i,
                                                slot_num(wr_start), slot_num(w_exp)));
        end
      end while (!write_done);
      checks++;
      if (!seen) fail("no slot opened");
      checks++;
      if (l != w_exp) fail($sformatf("write %0d: l=%0d, expected %0d", i, slot_num(l), slot_num(w_exp)));
      checks++;
      if (lat > 30 + gnt_delay) fail($sformatf("write %0d took %0d cycles", i, lat));
      if ((l == SLOT1 && r == SLOT3) || (l == SLOT2 && r == SLOT1) || (l == SLOT3 && r == SLOT2))
        n_eq++;
      else n_ne++;
      w_exp = differ(l, r);
      write_start <= 1'b0;
      do @(posedge clk); while (write_done);
      checks++;
      if (wr_start != '0) fail("slot still open after the cycle");
    end
    checks++;
    if (n_eq == 0 || n_ne == 0) fail("both SYNC outcomes not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
