// End-to-end testbench for acm3_signal at its default parameters.
//
// A writer and a reader process run with independent, exponentially
// distributed idle times between accesses, as in the random-timing
// simulation the design was evaluated with. The writer sends an item
// counter (item n carries the byte 8'h38 + n, so the first items are
// 39, 3A, 3B, ...). Three phases change the balance: equal mean idle times,
// a fast writer (overwriting), and a fast reader (reader waiting).
//
// Checks, against a reference built only from the handshakes:
//  - coherence and no re-reading: every item read is a written item, newer
//    than the previous item read, and no newer than the last write started;
//  - freshness: an item read is at least as new as the last item whose
//    write had completed when the read request was raised;
//  - liveness: a pending read completes within a bound once a newer item
//    has been completed; a write always completes within a bound (the
//    writer never waits for the reader);
//  - write_done/read_done only answer their own requests;
//  - every cycle a slot is open for writing, it is neither r nor the slot
//    being read.
// Mechanisms that must each occur at least once (else a failure):
//  reader waiting for new data, overwriting (items never read), mutex
//  contention between writer and reader, both outcomes of the writer's SYNC
//  arbiters, and every slot written and read.
module acm3_signal_tb;
  import acm3_pkg::*;

  localparam int NWRITES      = 3000;
  localparam int WRITE_BOUND  = 80;    // cycles from write_start to write_done
  localparam int LIVE_BOUND   = 120;   // cycles a read may pend once new data exists

  logic clk = 1'b0, rst_n = 1'b0;
  logic write_start = 1'b0, write_done;
  logic read_start = 1'b0, read_done;
  logic [7:0] data_in = '0, data_out;
  slot_t slot_l, slot_r;

  int checks = 0, failures = 0;
  int started = 0, completed = 0, last_read = 0, nreads = 0;
  int n_wait = 0, n_overwritten = 0, n_contention = 0, n_sync_ne = 0, n_sync_eq = 0;
  int wr_slot_cnt [3], rd_slot_cnt [3];
  int mean_w = 40, mean_r = 40;
  bit writer_finished = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  acm3_signal dut (
    .clk(clk), .rst_n(rst_n),
    .write_start(write_start), .write_done(write_done), .data_in(data_in),
    .read_start(read_start), .read_done(read_done), .data_out(data_out),
    .slot_l(slot_l), .slot_r(slot_r));

  function automatic int exp_delay(int mean);
    real u;
    u = real'($urandom % 100000 + 1) / 100000.0;
    return int'(-real'(mean) * $ln(u));
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // writer
  task automatic writer();
    for (int n = 1; n <= NWRITES; n++) begin
      int t0;
      if (n == NWRITES / 3)     begin mean_w = 4;  mean_r = 60; end   // fast writer
      if (n == 2 * NWRITES / 3) begin mean_w = 80; mean_r = 2;  end   // fast reader
      repeat (exp_delay(mean_w)) @(posedge clk);
      data_in <= 8'(8'h38 + n);
      write_start <= 1'b1;
      started = n;
      t0 = int'(cycle);
      do @(posedge clk); while (!write_done);
      completed = n;
      if (int'(cycle) - t0 > max_wr_lat) max_wr_lat = int'(cycle) - t0;
      checks++;
      if (int'(cycle) - t0 > WRITE_BOUND) fail($sformatf("write %0d took %0d cycles", n, int'(cycle) - t0));
      write_start <= 1'b0;
      do @(posedge clk); while (write_done);
    end
    writer_finished = 1;
  endtask

  // reader
  task automatic reader();
    forever begin
      int at_start, idx;
      logic [7:0] diff;
      repeat (exp_delay(mean_r)) @(posedge clk);
      if (writer_finished) break;
      at_start = completed;
      if (at_start == last_read) n_wait++;
      read_start <= 1'b1;
      do @(posedge clk); while (!read_done);
      diff = data_out - 8'(8'h38 + last_read);
      idx  = last_read + int'(diff);
      checks++;
      if (diff == 0) fail($sformatf("item %0d read again", last_read));
      else if (idx > started) fail($sformatf("read byte %h not written yet (started %0d)", data_out, started));
      else if (idx < at_start) fail($sformatf("stale read: item %0d, but %0d was complete", idx, at_start));
      n_overwritten += idx - last_read - 1;
      last_read = idx;
      nreads++;
      read_start <= 1'b0;
      do @(posedge clk); while (read_done);
    end
  endtask

  // monitors (edges found against last cycle's values)
  int pend;
  slot_t prev_ne, prev_eq, prev_wr, prev_rd;
  logic prev_wd, prev_rdn;
  int max_wr_lat = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mutex.req1 && dut.u_mutex.req2) n_contention++;
    if (dut.wr_start != '0) begin
      checks++;
      if ((dut.wr_start & (slot_r | dut.rd_start)) != '0) fail("writer opened the slot the reader holds");
    end
    pend = (read_start && !read_done && completed > last_read) ? pend + 1 : 0;
    if (pend == LIVE_BOUND) fail("read not answered although new data is complete");
    if (write_done && !prev_wd && !write_start) fail("write_done without request");
    if (read_done && !prev_rdn && !read_start) fail("read_done without request");
    for (int k = 0; k < 3; k++) begin
      if (dut.u_write_ctrl.sync_ne[k] && !prev_ne[k]) n_sync_ne++;
      if (dut.u_write_ctrl.sync_eq[k] && !prev_eq[k]) n_sync_eq++;
      if (dut.wr_start[k] && !prev_wr[k]) wr_slot_cnt[k]++;
      if (dut.rd_start[k] && !prev_rd[k]) rd_slot_cnt[k]++;
    end
    prev_ne  = dut.u_write_ctrl.sync_ne;
    prev_eq  = dut.u_write_ctrl.sync_eq;
    prev_wr  = dut.wr_start;
    prev_rd  = dut.rd_start;
    prev_wd  = write_done;
    prev_rdn = read_done;
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) fail($sformatf("mechanism never happened: %s", what));
  endtask

  initial begin
    pend = 0;
    prev_ne = '0; prev_eq = '0; prev_wr = '0; prev_rd = '0; prev_wd = 0; prev_rdn = 0;
    for (int k = 0; k < 3; k++) begin wr_slot_cnt[k] = 0; rd_slot_cnt[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (slot_l != SLOT2 || slot_r != SLOT2) fail("reset values of l and r");
    fork
      writer();
      reader();
    join_any
    repeat (400) @(posedge clk);
    // a read still pending must be a legitimate wait for new data
    checks++;
    if (read_start && !read_done && completed != last_read) fail("final read stuck");
    checks++;
    if (slot_l == slot_r && completed != last_read) fail("l == r but newest item unread");
    $display("writes %0d, reads %0d, longest write %0d cycles", completed, nreads, max_wr_lat);
    need("reader waited for new data", n_wait);
    need("items overwritten", n_overwritten);
    need("mutex contention cycles", n_contention);
    need("SYNC r != slot outcomes", n_sync_ne);
    need("SYNC r == slot outcomes", n_sync_eq);
    for (int k = 0; k < 3; k++) begin
      need($sformatf("slot %0d written", k + 1), wr_slot_cnt[k]);
      need($sformatf("slot %0d read", k + 1), rd_slot_cnt[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
