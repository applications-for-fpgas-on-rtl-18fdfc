// tb_sync_fifo: random writes and reads against a queue model on a small
// FIFO (depth 8). Checks data order, empty/full flags every cycle, that
// writes while full are dropped (not stored) and counted, and simultaneous
// read and write.
// Reference: a queue model. Dropping on full is this design's choice,
// since the camera cannot be paused.
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0, empty, full;
  logic [9:0] wd = 0, rdat;
  logic [15:0] drops;
  int checks = 0, failures = 0, ndrops = 0, fulls = 0;
  logic [9:0] q[$];
  sync_fifo #(.WIDTH(10), .DEPTH(D)) dut (.clk, .rst_n, .wr_en_i(wr), .wr_data_i(wd), .rd_en_i(rd),
                                         .rd_data_o(rdat), .empty_o(empty), .full_o(full), .drops_o(drops));
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;   // alternate fill and drain phases
      wr = ($urandom % 100) < bias; wd = 10'($urandom);
      rd = ($urandom % 100) < 100 - bias;
      #1;
      checks += 3;
      if (empty !== (q.size() == 0)) failures++;
      if (full !== (q.size() == D)) failures++;
      if (!empty && rdat !== q[0]) begin failures++; $display("data %h exp %h", rdat, q[0]); end
      if (full) fulls++;
      @(posedge clk);
      // flags are those before the edge: a write while full is dropped
      // even if a read happens in the same clock
      begin
        int sz;
        sz = q.size();
        if (rd && sz > 0) void'(q.pop_front());
        if (wr && sz == D) ndrops++;
        else if (wr) q.push_back(wd);
      end
      @(negedge clk);
    end
    checks += 2;
    if (drops != 16'(ndrops)) begin failures++; $display("drops %0d exp %0d", drops, ndrops); end
    if (ndrops == 0 || fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
