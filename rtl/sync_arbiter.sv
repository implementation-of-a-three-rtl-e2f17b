// SYNC arbiter: samples a level rbar when the strobe ck0 rises.
//
// Built, as in the design it follows, from a mutex and one AND gate. rbar is
// the mutex's first request and ck0 its second. If rbar is high when ck0
// rises, the mutex already grants (or grants first) the rbar side and the AND
// of that grant with ck0 drives rbar_1. If rbar is low, the ck0 side is
// granted and drives rbar_0. With ck0 low both outputs are low. In the
// writer's control rbar is "r differs from slot s", so rbar_1 means r != s
// and rbar_0 means r == s.
//
// Timing: rbar_1 follows ck0 in the same cycle when rbar was already
// granted; rbar_0 comes one cycle after ck0 (mutex decision). Both fall
// within a cycle of ck0 falling. The caller keeps rbar stable while ck0 is
// high.
module sync_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic rbar,
  input  logic ck0,
  output logic rbar_1,
  output logic rbar_0
);

  logic g_rbar, g_ck0;

  mutex u_mutex (
    .clk  (clk),
    .rst_n(rst_n),
    .req1 (rbar),
    .req2 (ck0),
    .gnt1 (g_rbar),
    .gnt2 (g_ck0)
  );

  assign rbar_1 = g_rbar & ck0;
  assign rbar_0 = g_ck0;

endmodule
