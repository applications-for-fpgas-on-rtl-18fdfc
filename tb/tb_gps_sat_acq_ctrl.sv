// tb_gps_sat_acq_ctrl: sequencing of the satellite acquisition state
// machine with a small record (8 samples) and 3 code phases, against a
// memory model with random wait states and read latency.
// Checks: for every code phase the samples come from base, base+4, ... in
// order (in-phase byte sign of each sample), exactly 8 per phase; the C/A
// generators are reloaded and then skipped p chips before phase p; power
// and compare follow each integration; done after the last phase. With a
// zero-wait memory the rate must be 2 clocks per sample.
// The state sequence follows the design; the expected cycle count
// (2 clocks per sample with a ready memory) is this design's timing.
module tb_gps_sat_acq_ctrl;
  import gps_pkg::*;
  localparam int NS = 8, NPH = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] base = 32'h200;
  avm_req_t req;
  avm_rsp_t rsp;
  logic sen, smp, aclr, nclr, cload, skip, pen, cen, bclr, busy, done;
  logic [3:0] cp;
  int checks = 0, failures = 0;
  logic [31:0] mem [64];
  bit slow = 1;

  gps_sat_acq_ctrl #(.INT_SAMPLES(NS), .CODE_PHASES(NPH), .CP_W(4)) dut (
    .clk, .rst_n, .start_i(start), .base_i(base), .avm_req(req), .avm_rsp(rsp),
    .sample_en_o(sen), .sample_o(smp), .acc_clear_o(aclr), .nco_clear_o(nclr),
    .ca_load_o(cload), .chip_skip_o(skip), .power_en_o(pen), .compare_en_o(cen),
    .best_clear_o(bclr), .code_phase_o(cp), .busy_o(busy), .done_o(done));
  always #5 clk = ~clk;

  // memory: waitrequest random, data returned 1..3 cycles after acceptance
  int lat = 0; logic [31:0] pend_addr; bit pending = 0;
  always @(negedge clk) begin
    rsp.readdatavalid <= 0;
    rsp.waitrequest <= slow ? (($urandom % 2) == 0) : 1'b0;
    if (pending) begin
      if (lat == 0) begin
        rsp.readdatavalid <= 1; rsp.readdata <= mem[(pend_addr - base) / 4]; pending = 0;
      end else lat--;
    end
  end
  always @(posedge clk) if (req.read && !rsp.waitrequest) begin
    pend_addr = req.address; pending = 1; lat = slow ? $urandom % 3 : 0;
  end

  int nsamp, nskip, npow, ncmp, phase_seen;
  always @(posedge clk) if (rst_n) begin
    if (sen) begin
      logic e;
      e = (nsamp % 2) ? ~mem[nsamp/2][23] : ~mem[nsamp/2][7];
      checks++;
      if (smp !== e || cp !== 4'(phase_seen)) begin failures++; $display("sample %0d phase %0d", nsamp, phase_seen); end
      nsamp++;
    end
    if (skip) nskip++;
    if (cload) begin
      checks++;
      if (nsamp != 0 && nsamp != NS) begin failures++; $display("reload after %0d samples", nsamp); end
      if (nsamp == NS) phase_seen++;
      nsamp = 0; nskip = 0;
    end
    if (pen) begin npow++; checks++; if (nsamp != NS || nskip != phase_seen) begin failures++; $display("power: %0d samples %0d skips", nsamp, nskip); end end
    if (cen) ncmp++;
  end

  task automatic run(output int cycles);
    nsamp = 0; nskip = 0; npow = 0; ncmp = 0; phase_seen = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 10000) begin @(negedge clk); cycles++; end
    checks++;
    if (npow != NPH || ncmp != NPH) begin failures++; $display("power %0d compare %0d", npow, ncmp); end
  endtask

  initial begin
    int cyc, cyc_sum;
    for (int i = 0; i < 64; i++)
      mem[i] = {8'($urandom % 2 ? 1 : -1), 8'($urandom % 2 ? 1 : -1), 8'($urandom % 2 ? 1 : -1), 8'($urandom % 2 ? 1 : -1)};
    rsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(cyc);
    slow = 0;
    run(cyc);
    // per phase: NS/2 words x 4 clocks, power, compare, incr, skip p+1 clocks
    cyc_sum = 1;
    for (int p = 0; p < NPH; p++) cyc_sum += NS * 2 + 2 + ((p < NPH - 1) ? 1 + (p + 2) : 0);
    checks++;
    if (cyc != cyc_sum) begin failures++; $display("cycles %0d expected %0d", cyc, cyc_sum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
