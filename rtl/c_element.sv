// Muller C-element: the output rises when both inputs are high, falls when
// both are low, and otherwise holds. In the reader's control it joins the
// read request with the "l differs from r" comparison before the mutex.
//
// Timing: cycle-based model, one clock cycle from input change to output
// change, reset to 0.
module c_element (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= 1'b0;
    else if (a && b)     q <= 1'b1;
    else if (!a && !b)   q <= 1'b0;
  end

endmodule
