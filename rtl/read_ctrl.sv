// Reader-side control of the three-slot Signal ACM.
//
// Runs the reader's algorithm: wait until r != l, then r := l; read slot r.
// Waiting is what makes this a Signal (no re-reading): a read request is
// not answered until the writer has completed an item newer than the last
// one read. The Petri net has one branch per slot j, each place a David cell:
//   IDLE[j]  r = j, waiting for read_start             (initially IDLE[slot 2])
//   WAIT[j]  read requested; the request and the comparison l != r meet in
//            a C-element whose output requests the mutex; the grant opens
//            the r latch (r := l) and its completion selects the branch
//   READ[m]  r = m, slot m read into the output register (rd_start[m])
//   DONE[m]  read_done high until read_start falls
// Transitions and their guards:
//   IDLE[j] -> WAIT[j]  read_start
//   WAIT[j] -> READ[m]  r latch done and r = m   (m != j, since l != r)
//   READ[m] -> DONE[m]  rd_done[m] from the data path
//   DONE[m] -> IDLE[m]  read_start low
//
// Interface: 4-phase handshake with the reader (read_start up, read_done up,
// read_start down, read_done down); data_out of the data path is valid from
// read_done up until the next read. mx_req/mx_gnt go to the mutex shared
// with the writer; r is the one-hot control variable, l comes from the
// writer. r resets to slot 2.
//
// Timing: cycle-based, every gate one clock cycle (see david_cell). A read
// that finds new data and a free mutex raises read_done 14 cycles after
// read_start; read_done falls 8 cycles after read_start falls.
module read_ctrl
  import acm3_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  read_start,
  output logic  read_done,
  output slot_t rd_start,   // to data path
  input  slot_t rd_done,    // from data path
  output logic  mx_req,
  input  logic  mx_gnt,
  output slot_t r,
  input  slot_t l
);

  slot_t idle_inr, idle_ina, idle_outr, idle_outa, idle_tok;
  slot_t wt_inr,   wt_ina,   wt_outr,   wt_outa,   wt_tok;
  slot_t rd_inr,   rd_ina,   rd_outr,   rd_outa,   rd_tok;
  slot_t dn_inr,   dn_ina,   dn_outr,   dn_outa,   dn_tok;

  logic  differs, c_out, r_en, r_done;
  slot_t sel;

  for (genvar j = 0; j < 3; j++) begin : g_branch
    localparam int unsigned N1 = (j + 1) % 3;   // the two other slots
    localparam int unsigned N2 = (j + 2) % 3;

    // IDLE[j]: from DONE[j] once read_start is low
    assign idle_inr[j]  = dn_outr[j] | read_start;
    assign idle_outa[j] = wt_ina[j];
    david_cell #(.INIT_TOKEN(j == 1)) u_idle (
      .clk(clk), .rst_n(rst_n), .inr(idle_inr[j]), .ina(idle_ina[j]),
      .outr(idle_outr[j]), .outa(idle_outa[j]), .token(idle_tok[j]));

    // WAIT[j]: from IDLE[j] on read_start
    assign wt_inr[j]  = idle_outr[j] | ~read_start;
    assign wt_outa[j] = rd_ina[N1] & rd_ina[N2];
    david_cell u_wait (
      .clk(clk), .rst_n(rst_n), .inr(wt_inr[j]), .ina(wt_ina[j]),
      .outr(wt_outr[j]), .outa(wt_outa[j]), .token(wt_tok[j]));

    // READ[j]: from WAIT of either other slot once r has been latched as j
    assign sel[j]     = r_done & r[j];
    assign rd_inr[j]  = (wt_outr[N1] | ~sel[j]) & (wt_outr[N2] | ~sel[j]);
    assign rd_outa[j] = dn_ina[j];
    david_cell u_read (
      .clk(clk), .rst_n(rst_n), .inr(rd_inr[j]), .ina(rd_ina[j]),
      .outr(rd_outr[j]), .outa(rd_outa[j]), .token(rd_tok[j]));

    // DONE[j]: from READ[j] when the output register reports done
    assign dn_inr[j]  = rd_outr[j] | ~rd_done[j];
    assign dn_outa[j] = idle_ina[j];
    david_cell u_done (
      .clk(clk), .rst_n(rst_n), .inr(dn_inr[j]), .ina(dn_ina[j]),
      .outr(dn_outr[j]), .outa(dn_outa[j]), .token(dn_tok[j]));
  end

  // Comparator and C-element: request the mutex once a read waits and l != r
  assign differs = (l != r);
  c_element u_c (.clk(clk), .rst_n(rst_n), .a(|wt_tok), .b(differs), .q(c_out));
  assign mx_req = c_out;

  // r := l under the mutex
  assign r_en = mx_gnt & c_out;
  latch_set #(.W(3), .INIT(SLOT2)) u_r (
    .clk(clk), .rst_n(rst_n), .en(r_en), .d(l), .q(r), .done(r_done));

  assign rd_start  = rd_tok;
  assign read_done = |dn_tok;

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(idle_tok) && $onehot0(wt_tok) && $onehot0(rd_tok))
    else $error("read_ctrl: more than one slot active");

endmodule
