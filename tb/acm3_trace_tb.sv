// Directed trace for acm3_signal: the item sequence 39 .. 44 (hex) with a
// writer that is sometimes faster and sometimes slower than the reader.
// Each step is a complete write or read; two reads are raised before new
// data exists and must wait until the next write completes. Expected read
// values follow from the Signal rules alone (newest complete item, never
// the same item twice):
//   39 read, 3A read (after waiting), 3B overwritten by 3C, 3C read,
//   3D read, 3E and 3F overwritten by 40, 40 read, 41 read, 42 read,
//   a waiting read answered by 43, and 44 left unread.
// The first write and the first read, both uncontended, are also timed.
module acm3_trace_tb;
  import acm3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic write_start = 1'b0, write_done;
  logic read_start = 1'b0, read_done;
  logic [7:0] data_in = '0, data_out;
  slot_t slot_l, slot_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acm3_signal dut (
    .clk(clk), .rst_n(rst_n),
    .write_start(write_start), .write_done(write_done), .data_in(data_in),
    .read_start(read_start), .read_done(read_done), .data_out(data_out),
    .slot_l(slot_l), .slot_r(slot_r));

  int up, down;

  task automatic write_item(logic [7:0] v);
    data_in <= v;
    write_start <= 1'b1;
    up = 0;
    do begin @(posedge clk); up++; end while (!write_done);
    write_start <= 1'b0;
    down = 0;
    do begin @(posedge clk); down++; end while (write_done);
    repeat (3) @(posedge clk);
  endtask

  task automatic finish_read(logic [7:0] expected);
    up = 0;
    do begin @(posedge clk); up++; end while (!read_done);
    checks++;
    if (data_out !== expected) begin
      failures++;
      $display("FAIL read %h, expected %h", data_out, expected);
    end
    read_start <= 1'b0;
    down = 0;
    do begin @(posedge clk); down++; end while (read_done);
    repeat (3) @(posedge clk);
  endtask

  task automatic read_item(logic [7:0] expected);
    read_start <= 1'b1;
    finish_read(expected);
  endtask

  // raise a read with no new data: it must wait, then the write answers it
  task automatic waiting_read(logic [7:0] v);
    read_start <= 1'b1;
    repeat (100) @(posedge clk);
    checks++;
    if (read_done) begin failures++; $display("FAIL read answered without new data"); end
    fork
      write_item(v);
      finish_read(v);
    join
  endtask

  // uncontended handshake latency of this implementation: 14 cycles up, 8 down
  task automatic check_latency(string what);
    checks++;
    if (up != 14 || down != 8) begin
      failures++;
      $display("FAIL %s latency %0d/%0d cycles, expected 14/8", what, up, down);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    write_item(8'h39);
    check_latency("first write");
    read_item(8'h39);
    check_latency("first read");
    waiting_read(8'h3A);
    write_item(8'h3B);
    write_item(8'h3C);
    read_item(8'h3C);
    write_item(8'h3D);
    read_item(8'h3D);
    write_item(8'h3E);
    write_item(8'h3F);
    write_item(8'h40);
    read_item(8'h40);
    write_item(8'h41);
    read_item(8'h41);
    write_item(8'h42);
    read_item(8'h42);
    waiting_read(8'h43);
    write_item(8'h44);
    checks++;
    if (data_out !== 8'h43) begin failures++; $display("FAIL data_out not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
