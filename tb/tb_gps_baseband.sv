// tb_gps_baseband: GPS baseband end to end, frontend to acquisition result.
// A synthetic frontend (16.384 MHz) sends 1-bit samples of PRN 5 at code
// phase 2 chips on Doppler bin 15 (IF + 2500 Hz) with 10% noise. The
// processor side is modelled by register accesses: record 1 ms into
// buffer A (single mode), then start a continuous recording into buffer B
// and, at the same time, search buffer A for PRN bank 0 over 8 code phases.
// The memory model adds random wait states and one cycle of read latency.
// Checks: the record is a contiguous run of the frontend stream; PRN 5
// (channel 4) is found on bin 15 at the code phase implied by where the
// record starts (+/-1 chip); the other channels are much weaker; both
// masters really competed for the bus and the continuous recording
// switched buffers.
// The Doppler bins, 500 Hz spacing and 16.384 MHz sampling follow the
// design; the reduced code-phase count and buffer length are test sizes.
module tb_gps_baseband;
  import gps_pkg::*;
  localparam int SPB = 16384, NPH = 8, PHASE = 2, BIN = 15, DELAY = 17;
  localparam int A = 32'h0001_0000, B = 32'h0008_0000;
  logic clk = 0, rst_n = 0, fe_clk = 0, fe_rst_n = 0, fe_i = 0, fe_q = 0;
  logic aaddr = 0, ard = 0, awr = 0;
  logic [1:0] saddr = 0;
  logic srd = 0, swr = 0;
  logic [31:0] awdata = 0, ardata, swdata = 0, srdata;
  avm_req_t req;
  avm_rsp_t rsp;
  logic buf_done, sat_done, conflict;
  int checks = 0, failures = 0;
  logic [31:0] mem [int];
  bit hist [100000];
  int nfe = 0, nconf = 0, nbuf = 0, nwait = 0;

  gps_baseband #(.SAMPLES_PER_BUF(SPB), .INT_SAMPLES(SPB), .CODE_PHASES(NPH)) dut (
    .clk, .rst_n, .fe_clk, .fe_rst_n, .fe_i, .fe_q,
    .acq_address(aaddr), .acq_read(ard), .acq_write(awr), .acq_writedata(awdata), .acq_readdata(ardata),
    .sat_address(saddr), .sat_read(srd), .sat_write(swr), .sat_writedata(swdata), .sat_readdata(srdata),
    .avm_req(req), .avm_rsp(rsp), .acq_buf_done_o(buf_done), .sat_done_o(sat_done),
    .bus_conflict_o(conflict));

  always #10 clk = ~clk;          // 50 MHz
  always #30.5176 fe_clk = ~fe_clk; // 16.384 MHz

  bit g1 [1023], g2 [1023];
  initial begin
    bit r1 [1:10], r2 [1:10];
    bit f1, f2;
    for (int k = 1; k <= 10; k++) begin r1[k] = 1; r2[k] = 1; end
    for (int n = 0; n < 1023; n++) begin
      g1[n] = r1[10]; g2[n] = r2[10];
      f1 = r1[3] ^ r1[10];
      f2 = r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10];
      for (int k = 10; k > 1; k--) begin r1[k] = r1[k-1]; r2[k] = r2[k-1]; end
      r1[1] = f1; r2[1] = f2;
    end
  end

  int m = 0;
  always @(negedge fe_clk) begin
    int chip;
    bit c, car, s;
    chip = ((longint'(m) * 1023 / 16384) + PHASE) % 1023;
    c = g1[chip] ^ g2[(chip + 1023 - DELAY) % 1023];
    car = $cos(2.0 * 3.14159265358979 * (real'(IF_HZ) + real'(BIN - 10) * 500.0) * real'(m) / real'(FS_HZ) + 1.1) >= 0.0;
    s = car ~^ c;
    if (($urandom % 10) == 0) s = ~s;
    fe_i <= s; fe_q <= 1'($urandom);
    m++;
  end
  // sample index as seen by the FIFO write at the next rising edge
  always @(posedge fe_clk) if (fe_rst_n) begin hist[nfe] = fe_i; nfe++; end
  int hist_base = 0;
  initial begin
    @(posedge fe_rst_n);
    @(posedge fe_clk);
    hist_base = m - 1;   // stream index of hist[0]
  end

  // memory
  bit pend = 0; logic [31:0] pdata;
  always @(posedge clk) begin
    rsp.readdatavalid <= pend;
    rsp.readdata      <= pdata;
    pend = 0;
    if (!rsp.waitrequest) begin
      if (req.write) mem[int'(req.address)] = req.writedata;
      if (req.read) begin pend = 1; pdata = mem.exists(int'(req.address)) ? mem[int'(req.address)] : 32'h0; end
    end
    if (rst_n && rsp.waitrequest && (req.read || req.write)) nwait++;
    if (rst_n && conflict) nconf++;
    if (buf_done) nbuf++;
    rsp.waitrequest <= ($urandom % 10) == 0;
  end

  task automatic awreg(logic a, logic [31:0] d);
    @(negedge clk); aaddr = a; awdata = d; awr = 1; @(negedge clk); awr = 0;
  endtask
  task automatic arreg(logic a, output logic [31:0] d);
    @(negedge clk); aaddr = a; ard = 1; #1 d = ardata; @(negedge clk); ard = 0;
  endtask
  task automatic swreg(logic [1:0] a, logic [31:0] d);
    @(negedge clk); saddr = a; swdata = d; swr = 1; @(negedge clk); swr = 0;
  endtask
  task automatic srreg(logic [1:0] a, output logic [31:0] d);
    @(negedge clk); saddr = a; srd = 1; #1 d = srdata; @(negedge clk); srd = 0;
  endtask

  initial begin
    logic [31:0] st, pw, pk;
    logic [31:0] pws [8];
    int t, k0, exp_phase;
    rsp = '0;
    repeat (5) @(posedge fe_clk);
    rst_n = 1; fe_rst_n = 1;
    // 1. record 1 ms into buffer A
    awreg(1, A);
    awreg(0, 32'h1);
    t = 0;
    do begin arreg(0, st); t++; end while (!st[9] && t < 100000);
    checks++; if (!st[9] || st[11]) begin failures++; $display("record: status %h", st); end
    // locate the record in the stream
    k0 = -1;
    for (int k = 0; k < nfe - SPB && k0 < 0; k++) begin
      bit ok;
      ok = 1;
      for (int n = 0; n < SPB && ok; n++) begin
        logic [31:0] w;
        w = mem.exists(A + 4 * (n / 2)) ? mem[A + 4 * (n / 2)] : 32'h0;
        if (((n % 2) ? w[23:16] : w[7:0]) != (hist[k + n] ? 8'h01 : 8'hFF)) ok = 0;
      end
      if (ok) k0 = k;
    end
    checks++;
    if (k0 < 0) begin failures++; $display("record is not a run of the stream"); k0 = 0; end
    exp_phase = PHASE + int'((real'(hist_base + k0) * 1023.0 / 16384.0) + 0.5);
    // 2. continuous recording into B while searching A
    awreg(1, B);
    awreg(0, 32'h3);
    swreg(1, A);
    swreg(0, 32'h1);
    t = 0;
    do begin srreg(0, st); t++; end while (!st[2] && t < 1000000);
    awreg(0, 32'h0);
    checks++; if (!st[2]) begin failures++; $display("search did not finish"); end
    for (int c = 0; c < 8; c++) begin
      swreg(0, 32'(c << 8));
      srreg(2, pw); srreg(3, pk);
      pws[c] = pw;
      if (c == 4) begin
        int d;
        d = int'(pk[9:0]) - exp_phase;
        checks++;
        if (pk[20:16] != BIN || d < -1 || d > 1) begin
          failures++; $display("PRN 5: phase %0d bin %0d, expected %0d %0d", pk[9:0], pk[20:16], exp_phase, BIN);
        end
      end
    end
    for (int c = 0; c < 8; c++) if (c != 4) begin
      checks++;
      if (pws[c] * 4 > pws[4]) begin failures++; $display("ch %0d power %0d vs %0d", c, pws[c], pws[4]); end
    end
    do begin arreg(0, st); end while (st[8]);
    checks += 3;
    if (nconf == 0) begin failures++; $display("masters never competed"); end
    if (nbuf < 2)   begin failures++; $display("continuous recording did not switch buffers"); end
    if (nwait == 0) begin failures++; $display("no wait states seen"); end
    $display("record start %0d, expected phase %0d, conflicts %0d, buffers %0d, waits %0d", hist_base + k0, exp_phase, nconf, nbuf, nwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
