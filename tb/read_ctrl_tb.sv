// Testbench for read_ctrl on its own. The testbench plays the reader
// (4-phase read_start/read_done), the data path (rd_done follows rd_start
// one cycle later), the shared mutex (grants after a random delay) and the
// writer's l, which it moves to a slot other than r at random times, only
// while the reader does not hold the mutex. Checks:
//  - a read started while l == r is not answered until l changes (no
//    re-reading), and is answered within a bound once it has;
//  - the read opens exactly the slot l held when the mutex was granted, and
//    r equals that slot afterwards;
//  - r changes only while the mutex is granted to the reader.
module read_ctrl_tb;
  import acm3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic read_start = 1'b0, read_done;
  slot_t rd_start, rd_done, r, l;
  logic mx_req, mx_gnt;
  int checks = 0, failures = 0;
  int gnt_delay = 0, n_wait = 0;
  slot_t prev_r;

  always #5 clk = ~clk;

  read_ctrl dut (.clk(clk), .rst_n(rst_n), .read_start(read_start), .read_done(read_done),
    .rd_start(rd_start), .rd_done(rd_done), .mx_req(mx_req), .mx_gnt(mx_gnt), .r(r), .l(l));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd_done <= '0; else rd_done <= rd_start;

  int gcount;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin mx_gnt <= 1'b0; gcount <= 0; end
    else if (!mx_req) begin mx_gnt <= 1'b0; gcount <= 0; end
    else if (gcount >= gnt_delay) mx_gnt <= 1'b1;
    else gcount <= gcount + 1;

  always @(posedge clk) if (rst_n) begin
    if (r != prev_r && !mx_gnt) begin
      failures++; $display("FAIL r changed without the mutex");
    end
    prev_r = r;
  end

  task automatic fail(string msg); failures++; $display("FAIL %s", msg); endtask

  // the writer moves l to a new slot (not r) while the reader holds no grant
  task automatic new_item();
    slot_t cand;
    while (mx_gnt) @(posedge clk);
    do cand = slot_t'(3'b1 << ($urandom % 3)); while (cand == r);
    l <= cand;
  endtask

  initial begin
    l = SLOT2;
    prev_r = SLOT2;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (r != SLOT2) fail("r reset value");
    for (int i = 0; i < 300; i++) begin
      int lat;
      slot_t l_at;
      bit must_wait;
      gnt_delay = (i % 3 == 0) ? int'($urandom % 8) : 0;
      must_wait = ($urandom % 3 == 0);
      if (!must_wait) new_item();
      repeat (1 + $urandom % 4) @(posedge clk);
      read_start <= 1'b1;
      if (must_wait) begin
        repeat (60) @(posedge clk);
        checks++;
        if (read_done) fail("read answered without new data");
        n_wait++;
        new_item();
      end
      lat = 0;
      l_at = '0;
      do begin
        @(posedge clk);
        lat++;
        if (mx_gnt) l_at = l;
        if (rd_start != '0 && rd_start != l) fail("opened slot is not l");
      end while (!read_done);
      checks++;
      if (r != l) fail($sformatf("read %0d: r=%0d, l=%0d", i, slot_num(r), slot_num(l)));
      checks++;
      if (l_at != l) fail("l sampled outside the grant");
      checks++;
      if (lat > 30 + gnt_delay) fail($sformatf("read %0d took %0d cycles", i, lat));
      read_start <= 1'b0;
      do @(posedge clk); while (read_done);
    end
    checks++;
    if (n_wait == 0) fail("no waiting read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
