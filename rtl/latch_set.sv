// Latch set: W D latches sharing one enable, with a completion signal.
//
// While en is high the set is transparent (q follows d, one cycle later);
// when en falls q holds. done is en delayed by one cycle, so done is high
// exactly when q holds the value of d that was present under en; it is the
// completion signal passed on to the next stage of the handshake. Used for
// the three data slots and the output register of the data path (W = data
// width) and for the control variables l and r (W = 3, one-hot slot).
//
// Timing: cycle-based model of a level-sensitive latch; q and done are
// registers. INIT is the reset value of q.
module latch_set #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= INIT;
      done <= 1'b0;
    end else begin
      if (en) q <= d;
      done <= en;
    end
  end

endmodule
