// tb_gps_data_acq_avalon: data acquisition with its FIFO and Avalon ports,
// frontend at 16.384 MHz, system clock 100 MHz, memory with random wait
// states. The processor side is driven through the slave registers.
// Checks: base address register reads back; a single acquisition writes
// one buffer whose bytes are a contiguous, in-order run of the frontend's
// I/Q samples (+1/-1); continuous mode alternates buffers (buf_done pulses,
// second buffer at base + buffer size) and stops when enable is cleared;
// no overflow occurs while the memory keeps up; holding waitrequest high
// for a long time sets the overflow bit.
// The register layout checked here is this design's; buffer sizes are
// reduced test sizes.
module tb_gps_data_acq_avalon;
  import gps_pkg::*;
  localparam int SPB = 64;
  logic clk = 0, rst_n = 0, fe_clk = 0, fe_rst_n = 0, fe_i = 0, fe_q = 0;
  logic aaddr = 0, ard = 0, awr = 0;
  logic [31:0] awdata = 0, ardata;
  avm_req_t req;
  avm_rsp_t rsp;
  logic buf_done;
  int checks = 0, failures = 0;
  logic [31:0] mem [int];
  logic [1:0] hist [200000];
  int nfe = 0;
  bit stall = 0;

  gps_data_acq_avalon #(.SAMPLES_PER_BUF(SPB)) dut (
    .clk, .rst_n, .fe_clk, .fe_rst_n, .fe_i, .fe_q, .avs_address(aaddr), .avs_read(ard),
    .avs_write(awr), .avs_writedata(awdata), .avs_readdata(ardata), .avm_req(req), .avm_rsp(rsp),
    .buf_done_o(buf_done));

  always #5 clk = ~clk;
  always #30.518 fe_clk = ~fe_clk;
  always @(negedge fe_clk) begin
    fe_i <= 1'($urandom); fe_q <= 1'($urandom);
  end
  always @(posedge fe_clk) if (fe_rst_n) begin hist[nfe] = {fe_i, fe_q}; nfe++; end

  always @(negedge clk) rsp.waitrequest <= stall ? 1'b1 : (($urandom % 4) == 0);
  always @(posedge clk) if (req.write && !rsp.waitrequest) mem[int'(req.address)] = req.writedata;

  int nbuf = 0;
  always @(posedge clk) if (buf_done) nbuf++;

  task automatic wreg(logic a, logic [31:0] d);
    @(negedge clk); aaddr = a; awdata = d; awr = 1; @(negedge clk); awr = 0;
  endtask
  task automatic rreg(logic a, output logic [31:0] d);
    @(negedge clk); aaddr = a; ard = 1; #1 d = ardata; @(negedge clk); ard = 0;
  endtask

  // Does the buffer at byte address b hold a contiguous run of the stream?
  task automatic check_buffer(int b);
    int found;
    found = -1;
    for (int k = 0; k < nfe - SPB && found < 0; k++) begin
      bit ok;
      ok = 1;
      for (int n = 0; n < SPB && ok; n++) begin
        logic [31:0] w;
        logic [7:0] bi, bq;
        w  = mem.exists(b + 4 * (n / 2)) ? mem[b + 4 * (n / 2)] : 32'h0;
        bi = (n % 2) ? w[23:16] : w[7:0];
        bq = (n % 2) ? w[31:24] : w[15:8];
        if (bi != (hist[k+n][1] ? 8'h01 : 8'hFF) || bq != (hist[k+n][0] ? 8'h01 : 8'hFF)) ok = 0;
      end
      if (ok) found = k;
    end
    checks++;
    if (found < 0) begin failures++; $display("buffer at %h does not match the stream", b); end
  endtask

  initial begin
    logic [31:0] st;
    int t;
    rsp = '0;
    repeat (5) @(posedge fe_clk);
    rst_n = 1; fe_rst_n = 1;
    wreg(1, 32'h0010_0000);
    rreg(1, st);
    checks++; if (st != 32'h0010_0000) failures++;
    // single buffer
    wreg(0, 32'h1);
    t = 0;
    do begin rreg(0, st); t++; end while (!st[9] && t < 5000);
    rreg(0, st);   // enable clears one clock after done rises
    checks++; if (!st[9] || st[8] || st[0]) begin failures++; $display("single: status %h at %t", st, $time); end
    check_buffer(32'h0010_0000);
    // continuous: run until 3 buffers are done, then stop
    mem.delete(); nbuf = 0;
    wreg(0, 32'h3);
    t = 0;
    while (nbuf < 2 && t < 20000) begin @(negedge clk); t++; end
    wreg(0, 32'h2);
    t = 0;
    do begin rreg(0, st); t++; end while (!st[9] && t < 5000);
    checks += 2;
    if (nbuf != 3) begin failures++; $display("continuous: %0d buffers", nbuf); end
    if (st[10] !== 1'b0 || st[11]) begin failures++; $display("continuous: status %h at %t", st, $time); end
    check_buffer(32'h0010_0000);
    check_buffer(32'h0010_0000 + SPB * 2);
    // overflow: memory stalls for a long time
    wreg(0, 32'h1);
    repeat (20) @(negedge clk);
    stall = 1;
    repeat (300) @(negedge clk);
    stall = 0;
    t = 0;
    do begin rreg(0, st); t++; end while (!st[9] && t < 5000);
    checks++; if (!st[11]) begin failures++; $display("no overflow flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
