// David cell: one place of a Petri net, holding at most one token.
//
// The cell is an SR flip-flop (nodes x and xb) plus a request gate. A marked
// place has x=1, xb=0 (state "10"); an empty place has x=0, xb=1 ("01").
// The four handshake wires keep their usual names and are all active low:
//   inr  request from the predecessor cell ("put a token here")
//   ina  acknowledge to the predecessor ("token taken"), equal to xb
//   outr request to the successor, low while the cell is marked and its
//        own request from the predecessor has been withdrawn
//   outa acknowledge from the successor; low clears the cell
// Node equations, read from the cell's signal transition order
// (inr- -> x+ -> xb- -> ina- -> inr+ -> outr- -> outa- -> xb+ -> x- -> outr+,
// with outa+ -> xb-):
//   x = ~(inr & xb)   xb = ~(x & outa)   outr = ~(inr & x)   ina = xb
//
// Timing: this is a cycle-based model of the self-timed cell. Every gate
// output (x, xb, outr) is a register, so each gate costs exactly one clock
// cycle. A speed-independent circuit behaves the same under any gate delays,
// unit delays included, so the cell keeps its handshake order while the
// whole design stays synchronous and free of combinational loops. A token
// moves from one cell to the next in four cycles of handshake.
// INIT_TOKEN gives the initial marking, loaded by the asynchronous reset.
module david_cell #(
  parameter bit INIT_TOKEN = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic inr,     // active low
  output logic ina,     // active low
  output logic outr,    // active low
  input  logic outa,    // active low
  output logic token    // 1 while the place is marked (node x)
);

  logic x, xb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x    <= INIT_TOKEN;
      xb   <= !INIT_TOKEN;
      outr <= 1'b1;
    end else begin
      x    <= ~(inr & xb);
      xb   <= ~(x & outa);
      outr <= ~(inr & x);
    end
  end

  assign ina   = xb;
  assign token = x;

endmodule
