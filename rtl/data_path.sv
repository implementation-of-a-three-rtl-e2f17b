// Data path of the three-slot ACM: three slot registers, a slot multiplexer
// and an output register, each slot and the output a DATA_W-bit latch set.
//
// Write: wr_start[k] (one-hot, from the writer's control) opens slot k; the
// slot takes data_in and wr_done[k] answers one cycle later. The slot holds
// its value after wr_start[k] falls, and wr_done[k] falls a cycle after it.
// Read: rd_start[k] (one-hot, from the reader's control) steers slot k
// through the multiplexer into the output latch set; rd_done[k] answers one
// cycle later. data_out holds the last item read until the next read, so
// the reader's environment can take it at leisure.
//
// The writer's and reader's controls never open the same slot at once, so a
// slot is never written while it is being read. Slots and output reset to 0.
module data_path #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        wr_start,
  input  logic [DATA_W-1:0] data_in,
  output logic [2:0]        wr_done,
  input  logic [2:0]        rd_start,
  output logic [2:0]        rd_done,
  output logic [DATA_W-1:0] data_out
);

  logic [DATA_W-1:0] slot_q [3];
  logic [DATA_W-1:0] mux_out;
  logic              out_done;

  for (genvar k = 0; k < 3; k++) begin : g_slot
    latch_set #(.W(DATA_W)) u_slot (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (wr_start[k]),
      .d    (data_in),
      .q    (slot_q[k]),
      .done (wr_done[k])
    );
  end

  always_comb begin
    mux_out = '0;
    for (int k = 0; k < 3; k++)
      if (rd_start[k]) mux_out = mux_out | slot_q[k];
  end

  latch_set #(.W(DATA_W)) u_out (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (|rd_start),
    .d    (mux_out),
    .q    (data_out),
    .done (out_done)
  );

  assign rd_done = rd_start & {3{out_done}};

endmodule
