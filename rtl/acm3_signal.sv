// Three-slot Signal ACM (asynchronous communication mechanism).
//
// Passes a stream of data items from a writer to a reader that run with no
// common rhythm. Neither side ever waits for the other to finish an access:
// the writer may overwrite items the reader never saw (Signal semantics
// permit overwriting), and the reader always gets the newest complete item
// but never the same item twice (no re-reading: a read waits for new data).
// Three slots suffice: the writer always writes the slot that is neither the
// last one written (l) nor the one being read (r); the reader takes l.
//
// Structure: write_ctrl and read_ctrl are David-cell implementations of the
// writer's and reader's Petri nets; one mutex makes the accesses to the
// shared control variable l atomic (the writer's l := w with its choice of
// the next slot, and the reader's test l != r with r := l); data_path holds
// the three slots and the output register.
//
// Interface: two 4-phase handshakes. Writer: raise write_start with data_in
// stable, wait for write_done, lower write_start, wait for write_done low.
// Reader: raise read_start, wait for read_done, take data_out (held until
// the next read), lower read_start, wait for read_done low. slot_l and
// slot_r show the control variables (one-hot) for observation.
//
// Timing: cycle-based model of the self-timed circuit; every gate and
// storage element costs one cycle of clk. All inputs are synchronous to clk.
// Reset: w = slot 1, l = r = slot 2, all slots and data_out 0, so the first
// read waits for the first write.
module acm3_signal
  import acm3_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              write_start,
  output logic              write_done,
  input  logic [DATA_W-1:0] data_in,
  input  logic              read_start,
  output logic              read_done,
  output logic [DATA_W-1:0] data_out,
  output slot_t             slot_l,
  output slot_t             slot_r
);

  slot_t wr_start, wr_done, rd_start, rd_done;
  slot_t l, r;
  logic  w_req, w_gnt, r_req, r_gnt;

  write_ctrl u_write_ctrl (
    .clk(clk), .rst_n(rst_n),
    .write_start(write_start), .write_done(write_done),
    .wr_start(wr_start), .wr_done(wr_done),
    .mx_req(w_req), .mx_gnt(w_gnt), .l(l), .r(r));

  read_ctrl u_read_ctrl (
    .clk(clk), .rst_n(rst_n),
    .read_start(read_start), .read_done(read_done),
    .rd_start(rd_start), .rd_done(rd_done),
    .mx_req(r_req), .mx_gnt(r_gnt), .r(r), .l(l));

  mutex u_mutex (
    .clk(clk), .rst_n(rst_n),
    .req1(w_req), .req2(r_req), .gnt1(w_gnt), .gnt2(r_gnt));

  data_path #(.DATA_W(DATA_W)) u_data_path (
    .clk(clk), .rst_n(rst_n),
    .wr_start(wr_start), .data_in(data_in), .wr_done(wr_done),
    .rd_start(rd_start), .rd_done(rd_done), .data_out(data_out));

  assign slot_l = l;
  assign slot_r = r;

  // Data coherence: a slot is never written while it is being read
  assert property (@(posedge clk) disable iff (!rst_n) (wr_start & rd_start) == '0)
    else $error("acm3_signal: slot written while read");

endmodule
