// tb_async_fifo: dual-clock FIFO with unrelated write (16.384 MHz) and read
// (100 MHz) clocks. Phase 1: the writer offers data only when not full and
// the reader reads at random; every word must come out once, in order.
// Phase 2: the reader stops, the writer keeps writing: the FIFO must fill
// (exactly DEPTH words stored) and raise the overflow flag.
// Reference: a queue model in the testbench. The FIFO depth and the
// clock ratios are test choices; the 3-stage synchronizer follows the design.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wen = 0, ren = 0, full, ovf, empty;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  byte unsigned sent [$];
  bit stop_rd = 0;

  async_fifo #(.WIDTH(8), .DEPTH(4), .SYNC_STAGES(3)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en_i(wen), .wr_data_i(wdata), .wr_full_o(full),
    .wr_overflow_o(ovf), .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en_i(ren), .rd_data_o(rdata),
    .rd_empty_o(empty));

  always #30.517 wclk = ~wclk;
  always #5 rclk = ~rclk;

  // reader
  always @(negedge rclk) begin
    if (rrst_n && !stop_rd) ren <= ($urandom % 3) != 0; else ren <= 0;
  end
  always @(posedge rclk) begin
    if (rrst_n && ren && !empty) begin
      checks++;
      if (sent.size() == 0 || rdata != sent[0]) begin
        failures++;
        $display("read %h expected %h", rdata, sent.size() ? sent[0] : 8'hxx);
      end
      if (sent.size()) void'(sent.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge wclk);
      if (!full && ($urandom % 4) != 0) begin
        wen = 1; wdata = 8'($urandom);
      end else wen = 0;
      @(posedge wclk);
      if (wen && !full) sent.push_back(wdata);
    end
    @(negedge wclk); wen = 0;
    repeat (20) @(posedge wclk);
    checks++;
    if (sent.size() != 0 || ovf) failures++;
    // phase 2: overflow
    stop_rd = 1;
    repeat (10) @(posedge wclk);
    for (int i = 0; i < 8; i++) begin
      @(negedge wclk); wen = 1; wdata = 8'(i + 100);
      @(posedge wclk); if (!full) sent.push_back(wdata);
    end
    @(negedge wclk); wen = 0;
    checks += 2;
    if (sent.size() != 4) begin failures++; $display("stored %0d", sent.size()); end
    if (!ovf) failures++;
    stop_rd = 0;
    repeat (30) @(posedge wclk);
    checks++;
    if (sent.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
