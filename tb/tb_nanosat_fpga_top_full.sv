// tb_nanosat_fpga_top_full: the same end-to-end test with the design at its default size.
// All three subsystems of the FPGA design run through their main
// scenarios, one after the other (the clocks of the idle subsystems are
// stopped to keep the run short):
//  1. Camera link: a camera model sends back-to-back 12-bit packets on the
//     LVDS line with quadrature clocks at the bit rate; a quarter-bit phase
//     step occurs halfway; the UART output is decoded.
//  2. GPS: a synthetic 16.384 MHz frontend carries PRN 5 at a known code
//     phase and Doppler bin. The processor side records a buffer (single
//     mode), then records continuously into a second buffer pair while the
//     satellite search runs on the first; the memory adds random wait
//     states; finally the memory is stalled long enough to overflow the
//     sample FIFO.
//  3. Watchdog: power-up timeout and reset with the pins held, ENABLE and
//     two KICK commands over SPI spanning 1.5 timeouts, then STOP.
// Every mechanism is counted (buffer switch, bus conflict, wait state,
// FIFO overflow, search done, start-up timeout reset, kick, pin hold,
// stop, lock, phase change, framing error, pixel drop, UART byte);
// one that never happens is a failure. Cycle counts are checked where the
// rates are fixed: one pixel per 12 bit clocks, watchdog timeout and reset
// lengths, 2 bytes per sample and the buffer size per GPS buffer.
// Default parameters: 4 ms GPS buffers of 65536 samples, 1 ms coherent
// integration over all 1023 code phases, watchdog at 20 MHz with a 2 s
// timeout, 1 s reset and 0.5 s boot hold, 512-pixel camera buffer. The
// localparams below repeat the defaults for the testbench's own checks.
// All sizes are the defaults: 4 ms buffers, 1 ms integration over 1023 code
// phases, the 2 s / 1 s / 0.5 s watchdog times at 20 MHz, the 512-pixel
// camera buffer and 80 clocks per UART bit.
module tb_nanosat_fpga_top_full;
  import gps_pkg::*;
  localparam int SPB = 65536, INTS = 16384, NPH = 1023;
  localparam int WDT_HZ = 20000000, TO = 40000000, RS = 20000000, HD = 10000000;
  localparam int DEPTH = 512, CPB = 80;
  localparam int PHASE = 2, BIN = 15, DELAY = 17;        // PRN 5
  localparam int A = 32'h0001_0000, B = 32'h0010_0000;
  localparam int HIST = 4 * SPB;

  int checks = 0, failures = 0;
  bit cam_on = 0, gps_on = 0, wdt_on = 0;

  // ---------------- DUT ----------------
  logic gps_clk = 0, gps_rst_n = 0, fe_clk = 0, fe_rst_n = 0, fe_i = 0, fe_q = 0;
  logic aaddr = 0, ard = 0, awr = 0;
  logic [1:0] saddr = 0;
  logic srd = 0, swr = 0;
  logic [31:0] awdata = 0, ardata, swdata = 0, srdata;
  avm_req_t req;
  avm_rsp_t rsp;
  logic buf_done, sat_done, conflict;
  logic wdt_clk = 0, wdt_rst_n = 0, sck = 0, cs_n = 1, mosi = 0, miso, mrst_n, hold;
  logic [7:0] mcu = 8'h5A, board, touts;
  logic clk0 = 0, clk90 = 0, cam_rst_n = 0, line = 0, uart, pv, locked;
  logic [9:0] pix;
  logic [7:0] ferr, selchg;
  logic [15:0] drops;
  logic [1:0] sel;

  nanosat_fpga_top dut (
    .gps_clk, .gps_rst_n, .fe_clk, .fe_rst_n, .fe_i, .fe_q,
    .acq_address(aaddr), .acq_read(ard), .acq_write(awr), .acq_writedata(awdata), .acq_readdata(ardata),
    .sat_address(saddr), .sat_read(srd), .sat_write(swr), .sat_writedata(swdata), .sat_readdata(srdata),
    .mem_req(req), .mem_rsp(rsp), .acq_buf_done(buf_done), .sat_done, .bus_conflict(conflict),
    .wdt_clk, .wdt_rst_n, .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .mcu_rst_n(mrst_n), .mcu_pins(mcu), .board_pins(board), .wdt_hold(hold), .wdt_timeouts(touts),
    .cam_clk0(clk0), .cam_clk90(clk90), .cam_rst_n, .cam_lvds(line), .cam_uart_tx(uart),
    .cam_pixel(pix), .cam_pixel_valid(pv), .cam_locked(locked), .cam_frame_err(ferr),
    .cam_drops(drops), .cam_sel(sel), .cam_sel_changes(selchg));

  // ---------------- clocks (stopped while a subsystem is idle) ----------------
  always begin wait (gps_on); #10 gps_clk = ~gps_clk; end                 // 50 MHz
  always begin wait (gps_on); #30.5176 fe_clk = ~fe_clk; end              // 16.384 MHz
  always begin wait (wdt_on); #25 wdt_clk = ~wdt_clk; end                 // 20 MHz
  always begin wait (cam_on); #20 clk0 = ~clk0; end                       // bit clock
  initial begin #10; forever #20 if (cam_on) clk90 = ~clk90; end

  // ================= camera =================
  logic [9:0] sent[$];
  bit cam_running = 0, step_phase = 0;
  initial begin
    wait (cam_running);
    #13;
    while (cam_running) begin
      logic [9:0] p;
      p = 10'($urandom);
      sent.push_back(p);
      for (int b = 0; b < 12; b++) begin
        line = (b == 0) ? 1'b1 : (b == 11) ? 1'b0 : p[b-1];
        #40;
        if (step_phase) begin #10; step_phase = 0; end
      end
    end
    line = 0;
  end
  logic [9:0] rec[$];
  int nrec = 0, matched = 0, ptr = -1, last_pv = 0, ccyc = 0, skipped = 0, npairs = 0, nbytes = 0;
  int n_lock = 0;
  logic locked_q = 0;
  always @(posedge clk0) begin
    ccyc++;
    locked_q <= locked;
    if (locked && !locked_q) n_lock++;
    if (pv && cam_rst_n) begin
      nrec++;
      rec.push_back(pix);
      if (ptr >= 0 && ptr + 1 < sent.size() && sent[ptr + 1] == pix) begin
        ptr++; matched++;
        checks++;
        if (ccyc - last_pv != 12) begin failures++; $display("pixel interval %0d", ccyc - last_pv); end
      end else begin
        for (int i = sent.size() - 1; i >= 0 && i >= sent.size() - 4; i--)
          if (sent[i] == pix) ptr = i;
      end
      last_pv = ccyc;
    end
  end
  logic [7:0] b0;
  initial begin
    forever begin
      logic [7:0] d;
      @(negedge uart);
      repeat (CPB / 2) @(posedge clk0);
      checks++;
      if (uart !== 0) begin failures++; $display("bad UART start bit"); end
      for (int b = 0; b < 8; b++) begin repeat (CPB) @(posedge clk0); d[b] = uart; end
      repeat (CPB) @(posedge clk0);
      checks++;
      if (uart !== 1) begin failures++; $display("bad UART stop bit"); end
      if (nbytes % 2 == 0) b0 = d;
      else begin
        logic [9:0] up;
        up = {b0, d[1:0]};
        while (rec.size() > 0 && rec[0] != up) begin void'(rec.pop_front()); skipped++; end
        checks++;
        if (rec.size() == 0) begin failures++; $display("UART pixel %h never recovered", up); end
        else void'(rec.pop_front());
        npairs++;
      end
      nbytes++;
    end
  end

  task automatic camera_phase();
    int t;
    cam_on = 1;
    #95 cam_rst_n = 1;
    cam_running = 1;
    t = 0;
    while (!locked && t < 400) begin @(posedge clk0); t++; end
    checks++;
    if (!locked) begin failures++; $display("camera: no lock"); end
    repeat (3000) @(posedge clk0);
    step_phase = 1;
    repeat (50) @(posedge clk0);
    t = 0;
    while (!locked && t < 400) begin @(posedge clk0); t++; end
    checks++;
    if (!locked) begin failures++; $display("camera: no lock after phase step"); end
    repeat (DEPTH * 14) @(posedge clk0);
    cam_running = 0;
    repeat (DEPTH * 2 * 10 * CPB + 2000) @(posedge clk0);
    checks += 2;
    if (matched < DEPTH) begin failures++; $display("camera: only %0d pixels matched", matched); end
    if (rec.size() + skipped != int'(drops)) begin
      failures++; $display("camera: %0d pixels lost, drops %0d", rec.size() + skipped, drops);
    end
    $display("camera: recovered %0d matched %0d uart %0d drops %0d sel_changes %0d frame_err %0d",
             nrec, matched, npairs, drops, selchg, ferr);
    cam_on = 0;
  endtask

  // ================= GPS =================
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
    chip = int'((longint'(m) * 1023 / 16384 + PHASE) % 1023);
    c = g1[chip] ^ g2[(chip + 1023 - DELAY) % 1023];
    car = $cos(2.0 * 3.14159265358979 * (real'(IF_HZ) + real'(BIN - 10) * 500.0) * real'(m) / real'(FS_HZ) + 1.1) >= 0.0;
    s = car ~^ c;
    if (($urandom % 10) == 0) s = ~s;
    fe_i <= s; fe_q <= 1'($urandom);
    m++;
  end
  bit hist [HIST];
  int nfe = 0, hist_base = 0;
  always @(posedge fe_clk) if (fe_rst_n) begin if (nfe < HIST) hist[nfe] = fe_i; nfe++; end
  initial begin
    @(posedge fe_rst_n);
    @(posedge fe_clk);
    hist_base = m - 1;
  end
  logic [31:0] mem [int];
  bit pend = 0, stall = 0;
  logic [31:0] pdata;
  int nconf = 0, nbuf = 0, nwait = 0, nsat = 0, gcyc = 0, last_buf = 0;
  always @(posedge gps_clk) begin
    gcyc++;
    rsp.readdatavalid <= pend;
    rsp.readdata      <= pdata;
    pend = 0;
    if (!rsp.waitrequest) begin
      if (req.write) mem[int'(req.address)] = req.writedata;
      if (req.read) begin pend = 1; pdata = mem.exists(int'(req.address)) ? mem[int'(req.address)] : 32'h0; end
    end
    if (gps_rst_n && rsp.waitrequest && (req.read || req.write)) nwait++;
    if (gps_rst_n && conflict) nconf++;
    if (buf_done) nbuf++;
    if (sat_done) nsat++;
    rsp.waitrequest <= stall || (($urandom % 10) == 0);
  end
  // a buffer holds SPB samples (2 bytes each): in continuous mode the
  // buffer-done pulses must be SPB frontend clocks apart (+/- FIFO jitter)
  int fcyc = 0, f_last_buf = -1, nbuf_timed = 0;
  always @(posedge fe_clk) fcyc++;
  always @(posedge buf_done) begin
    if (f_last_buf >= 0 && nbuf_timed < 4) begin
      checks++;
      nbuf_timed++;
      if (fcyc - f_last_buf < SPB - 8 || fcyc - f_last_buf > SPB + 8) begin
        failures++; $display("GPS buffer took %0d frontend clocks, expected %0d", fcyc - f_last_buf, SPB);
      end
    end
    f_last_buf = fcyc;
  end

  task automatic awreg(logic a, logic [31:0] d);
    @(negedge gps_clk); aaddr = a; awdata = d; awr = 1; @(negedge gps_clk); awr = 0;
  endtask
  task automatic arreg(logic a, output logic [31:0] d);
    @(negedge gps_clk); aaddr = a; ard = 1; #1 d = ardata; @(negedge gps_clk); ard = 0;
  endtask
  task automatic swreg(logic [1:0] a, logic [31:0] d);
    @(negedge gps_clk); saddr = a; swdata = d; swr = 1; @(negedge gps_clk); swr = 0;
  endtask
  task automatic srreg(logic [1:0] a, output logic [31:0] d);
    @(negedge gps_clk); saddr = a; srd = 1; #1 d = srdata; @(negedge gps_clk); srd = 0;
  endtask

  int n_overflow = 0;
  task automatic gps_phase();
    logic [31:0] st, pw, pk;
    logic [31:0] pws [8];
    int t, k0, exp_phase;
    longint t0;
    gps_on = 1;
    rsp = '0;
    repeat (5) @(posedge fe_clk);
    gps_rst_n = 1; fe_rst_n = 1;
    awreg(1, A);
    awreg(0, 32'h1);
    t = 0;
    do begin arreg(0, st); t++; end while (!st[9] && t < 4 * SPB);
    checks++; if (!st[9] || st[11]) begin failures++; $display("GPS record: status %h", st); end
    k0 = -1;
    for (int k = 0; k < nfe - SPB && k < HIST - SPB && k0 < 0; k++) begin
      bit ok;
      ok = 1;
      for (int n = 0; n < SPB && ok; n++) begin
        logic [31:0] w;
        w = mem.exists(A + 4 * (n / 2)) ? mem[A + 4 * (n / 2)] : 32'h0;
        if (((n % 2) ? w[23:16] : w[7:0]) != (hist[k + n] ? 8'h01 : 8'hFF)) ok = 0;
      end
      if (ok) k0 = k;
    end
    checks += 2;
    if (k0 < 0) begin failures++; $display("GPS record is not a run of the stream"); k0 = 0; end
    // the record fills exactly SPB*2 bytes: the next word must be untouched
    if (mem.exists(A + 2 * SPB)) begin failures++; $display("GPS record overran its buffer"); end
    exp_phase = (PHASE + int'((real'(hist_base + k0) * 1023.0 / 16384.0) + 0.5)) % 1023;
    awreg(1, B);
    awreg(0, 32'h3);
    swreg(1, A);
    swreg(0, 32'h1);
    t0 = gcyc;
    wait (sat_done || gcyc - t0 > 3 * NPH * (2 * INTS + 200) + 10000);
    t = gcyc - t0;
    repeat (2) @(posedge gps_clk);
    srreg(0, st);
    checks += 2;
    if (!st[2]) begin failures++; $display("GPS search did not finish"); end
    // serial search: 2 clocks per sample per code phase, plus the time
    // lost to the recorder, which has priority on the shared memory
    if (longint'(t) < 2 * longint'(NPH) * INTS || longint'(t) > 2 * longint'(NPH) * INTS * 16 / 10) begin
      failures++; $display("GPS search took %0d clocks for %0d phases", t, NPH);
    end
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
      if (pws[c] * 4 > pws[4]) begin failures++; $display("GPS ch %0d power %0d vs %0d", c, pws[c], pws[4]); end
    end
    // keep recording until the buffer pair has switched at least twice
    while (nbuf < 3) @(posedge gps_clk);
    // stall the memory: the sample FIFO must overflow and report it
    stall = 1;
    repeat (200) @(posedge gps_clk);
    stall = 0;
    repeat (20) @(posedge gps_clk);
    arreg(0, st);
    if (st[11]) n_overflow++;
    awreg(0, 32'h0);
    do arreg(0, st); while (st[8]);
    $display("GPS: record start %0d, expected phase %0d, search %0d clocks, conflicts %0d, buffers %0d, waits %0d",
             hist_base + k0, exp_phase, t, nconf, nbuf, nwait);
    gps_on = 0;
  endtask

  // ================= watchdog =================
  int n_resets = 0, n_hold_cycles = 0, n_kicks = 0, n_stop = 0, n_startup = 0, n_timeout = 0;
  logic mrst_q = 1;
  logic [7:0] frozen = 0;
  always @(posedge wdt_clk) begin
    mrst_q <= mrst_n;
    if (wdt_rst_n && mrst_q && !mrst_n) n_resets++;
    if (!hold) frozen <= mcu;
  end
  always @(negedge wdt_clk) if (wdt_rst_n && hold) begin
    n_hold_cycles++;
    if (n_hold_cycles % 1024 == 1) checks++;
    if (board !== frozen) begin failures++; $display("pins not held: %h vs %h", board, frozen); end
    mcu = 8'($urandom);
  end
  task automatic spi(logic [7:0] mo, output logic [7:0] mi);
    cs_n = 0;
    repeat (4) @(negedge wdt_clk);
    for (int b = 7; b >= 0; b--) begin
      mosi = mo[b];
      repeat (4) @(negedge wdt_clk);
      sck = 1; mi[b] = miso;
      repeat (4) @(negedge wdt_clk);
      sck = 0;
    end
    repeat (4) @(negedge wdt_clk);
    cs_n = 1;
    repeat (4) @(negedge wdt_clk);
  endtask
  // Counts 50 ns watchdog clocks (falling edges) until the microcontroller
  // reset line reaches lvl. Uses the simulation time instead of a loop per
  // clock so the long default timeouts simulate quickly.
  task automatic wdt_clocks_until(input logic lvl, output int t);
    realtime t0;
    t0 = $realtime;
    wait (mrst_n == lvl);
    @(negedge wdt_clk);
    t = int'(($realtime - t0) / 50.0);
  endtask
  task automatic wdt_phase();
    int t;
    logic [7:0] st;
    wdt_on = 1;
    repeat (2) @(negedge wdt_clk);
    wdt_rst_n = 1;
    wdt_clocks_until(1'b0, t);
    checks++;
    if (t != TO) begin failures++; $display("WDT start-up reset after %0d clocks, expected %0d", t, TO); end
    else n_startup++;
    wdt_clocks_until(1'b1, t);
    checks++;
    if (t != RS) begin failures++; $display("WDT reset length %0d, expected %0d", t, RS); end
    while (hold) @(negedge wdt_clk);
    spi(8'hA1, st);
    for (int i = 0; i < 2; i++) begin   // 1.5 timeouts in all
      #(longint'(TO) * 3 / 4 * 50);
      spi(8'hA2, st);
      n_kicks++;
    end
    checks += 2;
    if (!st[7]) begin failures++; $display("WDT status not armed: %h", st); end
    if (n_resets != 1) begin failures++; $display("WDT reset despite kicks"); end
    // At full size the second timeout is left out to keep the run short:
    // the start-up reset above already timed a full timeout to the clock,
    // and tb_nanosat_fpga_top checks the timeout after missed kicks.
    spi(8'hA3, st);
    spi(8'h00, st);
    checks++;
    if (st[7]) begin failures++; $display("WDT still armed after STOP"); end
    #((longint'(TO) + TO / 8) * 50);   // past the point where a timeout would fire
    checks++;
    if (n_resets != 1) begin failures++; $display("WDT reset after STOP"); end
    else n_stop++;
    wdt_on = 0;
  endtask

  // ================= sequence and mechanism count =================
  task automatic need(string name, int n);
    checks++;
    $display("  %-18s %0d", name, n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", name); end
  endtask
  initial begin
    rsp = '0;
    camera_phase();
    gps_phase();
    wdt_phase();
    $display("mechanisms:");
    need("gps_buffer_switch", nbuf);
    need("gps_bus_conflict", nconf);
    need("gps_wait_state", nwait);
    need("gps_fifo_overflow", n_overflow);
    need("gps_search_done", nsat);
    need("wdt_startup_reset", n_startup);
    need("wdt_kick", n_kicks);
    need("wdt_pin_hold", n_hold_cycles);
    need("wdt_stop", n_stop);
    need("cam_lock", n_lock);
    need("cam_phase_change", int'(selchg));
    need("cam_frame_error", int'(ferr));
    need("cam_pixel_drop", int'(drops));
    need("cam_uart_byte", nbytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(64'd30_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
