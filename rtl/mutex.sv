// Mutual exclusion element: two requests, two grants, never both granted.
//
// A grant, once given, is held until its request falls; the grant then drops
// one cycle later and the element is free again the cycle after. When both
// requests arrive together at a free element, the one that lost the last
// contest wins, so neither side can be starved.
//
// Timing: cycle-based model. A request seen at a clock edge is granted at
// that edge if the element is free (one cycle from request to grant). A
// real mutex is an analog latch with a metastability filter and can take
// unbounded time to decide; here the decision is made in one cycle and
// metastability is not modelled. Inputs must be synchronous to clk.
module mutex (
  input  logic clk,
  input  logic rst_n,
  input  logic req1,
  input  logic req2,
  output logic gnt1,
  output logic gnt2
);

  logic last2;  // 1 when side 2 won the last grant

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt1  <= 1'b0;
      gnt2  <= 1'b0;
      last2 <= 1'b0;
    end else if (gnt1) begin
      gnt1 <= req1;
    end else if (gnt2) begin
      gnt2 <= req2;
    end else if (req1 && (!req2 || last2)) begin
      gnt1  <= 1'b1;
      last2 <= 1'b0;
    end else if (req2) begin
      gnt2  <= 1'b1;
      last2 <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(gnt1 && gnt2))
    else $error("mutex: both grants high");

endmodule
