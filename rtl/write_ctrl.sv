// Writer-side control of the three-slot Signal ACM.
//
// Runs the writer's algorithm: write slot w; then l := w; then
// w := differ(l, r), the slot that is neither l nor r. Its Petri net has one
// branch per slot k, and each place is a David cell:
//   IDLE[k]   w = k, waiting for write_start            (initially IDLE[slot 1])
//   WRITE[k]  slot k being written (wr_start[k] to the data path)
//   UPD[k]    slot k written: request the mutex, latch l := k, then ask
//             SYNC arbiter k whether r differs from slot sync_slot(k)
//   DONE[j]   next w = j chosen, write_done high until write_start falls
// Transitions and their guards:
//   IDLE[k]  -> WRITE[k]  write_start
//   WRITE[k] -> UPD[k]    wr_done[k] from the data path
//   UPD[k]   -> DONE[s]   SYNC k says r != s      (s = sync_slot(k))
//   UPD[k]   -> DONE[a]   SYNC k says r == s      (a = alt_slot(k))
//   DONE[j]  -> IDLE[j]   write_start low
// That is the differ table: after l=1, w=3 unless r=3 (then 2); after l=2,
// w=1 unless r=1 (then 3); after l=3, w=2 unless r=2 (then 1).
//
// A guarded transition drives the successor's request low only while the
// predecessor requests and the guard holds. A place with two successors
// takes either one's acknowledge; a place with two predecessors accepts
// either one's request. The single token makes this safe.
//
// Interface: 4-phase handshake with the writer (write_start up, write_done
// up, write_start down, write_done down); data_in must be stable from
// write_start up to write_done up. mx_req/mx_gnt go to the mutex shared with
// the reader; l is the one-hot control variable, r comes from the reader.
// l resets to slot 2 and the reader's r to slot 2, matching w = 1 at start.
//
// Timing: cycle-based, every gate one clock cycle (see david_cell). With a
// free mutex and r != sync_slot (the common SYNC outcome) write_done rises
// 14 cycles after write_start and falls 8 cycles after write_start falls;
// the writer never waits for the reader, only for the mutex.
module write_ctrl
  import acm3_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  write_start,
  output logic  write_done,
  output slot_t wr_start,   // to data path
  input  slot_t wr_done,    // from data path
  output logic  mx_req,
  input  logic  mx_gnt,
  output slot_t l,
  input  slot_t r
);

  // David-cell wires, one per branch; all handshakes active low.
  slot_t idle_inr, idle_ina, idle_outr, idle_outa, idle_tok;
  slot_t wr_inr,   wr_ina,   wr_outr,   wr_outa,   wr_tok;
  slot_t upd_inr,  upd_ina,  upd_outr,  upd_outa,  upd_tok;
  slot_t dn_inr,   dn_ina,   dn_outr,   dn_outa,   dn_tok;

  slot_t ck0, sync_ne, sync_eq;
  logic  l_en, l_done;

  for (genvar k = 0; k < 3; k++) begin : g_branch
    localparam int unsigned S  = (k + 2) % 3;   // sync_slot(k)
    localparam int unsigned A  = (k + 1) % 3;   // alt_slot(k)
    localparam int unsigned PS = (k + 1) % 3;   // branch whose sync_slot is k
    localparam int unsigned PA = (k + 2) % 3;   // branch whose alt_slot is k

    // IDLE[k]: from DONE[k] once write_start is low
    assign idle_inr[k]  = dn_outr[k] | write_start;
    assign idle_outa[k] = wr_ina[k];
    david_cell #(.INIT_TOKEN(k == 0)) u_idle (
      .clk(clk), .rst_n(rst_n), .inr(idle_inr[k]), .ina(idle_ina[k]),
      .outr(idle_outr[k]), .outa(idle_outa[k]), .token(idle_tok[k]));

    // WRITE[k]: from IDLE[k] on write_start
    assign wr_inr[k]  = idle_outr[k] | ~write_start;
    assign wr_outa[k] = upd_ina[k];
    david_cell u_write (
      .clk(clk), .rst_n(rst_n), .inr(wr_inr[k]), .ina(wr_ina[k]),
      .outr(wr_outr[k]), .outa(wr_outa[k]), .token(wr_tok[k]));

    // UPD[k]: from WRITE[k] when the slot reports done
    assign upd_inr[k]  = wr_outr[k] | ~wr_done[k];
    assign upd_outa[k] = dn_ina[S] & dn_ina[A];
    david_cell u_upd (
      .clk(clk), .rst_n(rst_n), .inr(upd_inr[k]), .ina(upd_ina[k]),
      .outr(upd_outr[k]), .outa(upd_outa[k]), .token(upd_tok[k]));

    // SYNC arbiter k: strobed once l holds k, asks whether r != slot S
    assign ck0[k] = l_done & upd_tok[k];
    sync_arbiter u_sync (
      .clk(clk), .rst_n(rst_n), .rbar(~r[S]), .ck0(ck0[k]),
      .rbar_1(sync_ne[k]), .rbar_0(sync_eq[k]));

    // DONE[k]: from UPD[PS] when r != k, or from UPD[PA] when r == sync_slot(PA)
    assign dn_inr[k]  = (upd_outr[PS] | ~sync_ne[PS]) & (upd_outr[PA] | ~sync_eq[PA]);
    assign dn_outa[k] = idle_ina[k];
    david_cell u_done (
      .clk(clk), .rst_n(rst_n), .inr(dn_inr[k]), .ina(dn_ina[k]),
      .outr(dn_outr[k]), .outa(dn_outa[k]), .token(dn_tok[k]));
  end

  // Mutex request while a slot has been written and l is not yet updated
  assign mx_req = |upd_tok;

  // l := w under the mutex
  assign l_en = mx_gnt & mx_req;
  latch_set #(.W(3), .INIT(SLOT2)) u_l (
    .clk(clk), .rst_n(rst_n), .en(l_en), .d(upd_tok), .q(l), .done(l_done));

  assign wr_start   = wr_tok;
  assign write_done = |dn_tok;

  // One token in the writer's net: at most one place of each kind marked
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(idle_tok) && $onehot0(wr_tok) && $onehot0(upd_tok))
    else $error("write_ctrl: more than one slot active");

endmodule
