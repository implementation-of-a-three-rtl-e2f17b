// Testbench for data_path: writes random bytes into random slots through the
// wr_start/wr_done handshake and reads random slots through rd_start/rd_done,
// comparing data_out with a reference copy of the three slots. Checks that
// done answers exactly one cycle after start, that done falls one cycle
// after start falls, and that data_out holds between reads.
module data_path_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] wr_start = '0, wr_done, rd_start = '0, rd_done;
  logic [7:0] data_in = '0, data_out;
  logic [7:0] ref_slot [3];
  logic [7:0] last_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_path #(.DATA_W(8)) dut (.clk(clk), .rst_n(rst_n), .wr_start(wr_start), .data_in(data_in),
    .wr_done(wr_done), .rd_start(rd_start), .rd_done(rd_done), .data_out(data_out));

  task automatic step(); @(posedge clk); #1; endtask
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) ref_slot[k] = '0;
    last_out = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom % 3;
      if ($urandom % 2) begin
        data_in = 8'($urandom);
        wr_start[k] = 1'b1;
        step();
        check("wr_done after one cycle", wr_done == (3'b1 << k));
        ref_slot[k] = data_in;
        wr_start = '0;
        data_in = 8'($urandom);   // data may change once the write is done
        step();
        check("wr_done falls", wr_done == '0);
      end else begin
        rd_start[k] = 1'b1;
        check("data_out holds", data_out == last_out);
        step();
        check("rd_done after one cycle", rd_done == (3'b1 << k));
        check($sformatf("read slot %0d", k + 1), data_out == ref_slot[k]);
        last_out = ref_slot[k];
        rd_start = '0;
        step();
        check("rd_done falls", rd_done == '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
