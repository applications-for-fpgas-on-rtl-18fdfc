// tb_camera_if: the camera link end to end, with real quadrature clocks.
// clk0/clk90 run at the bit rate (period 40, clk90 a quarter period later);
// the line carries back-to-back 12-bit packets (start 1, ten pixel bits LSB
// first, stop 0) with its bit edges at an arbitrary offset from clk0.
// Halfway the line is delayed by a quarter bit once (a phase step).
// The UART (CLKS_PER_BIT = 8 for speed) is decoded by the testbench.
// Checks:
//  - lock is found after start-up and again after the phase step, and the
//    chosen phase keeps the sample away from the bit edges (sel changes);
//  - recovered pixels follow the sent sequence, one per 12 clocks;
//  - UART frames are well formed, byte pairs decode to recovered pixels in
//    order, and every recovered pixel is either sent on the UART or counted
//    as dropped (the small buffer, depth 16, overflows because the UART is
//    much slower than the camera).
module tb_camera_if;
  localparam int CPB = 8, DEPTH = 16;
  logic clk0 = 0, clk90 = 0, rst_n = 0, line = 0;
  logic uart;
  logic [9:0] pix;
  logic pv, locked;
  logic [7:0] ferr, selchg;
  logic [15:0] drops;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  camera_if #(.FIFO_DEPTH(DEPTH), .CLKS_PER_BIT(CPB)) dut (
    .clk0, .clk90, .rst_n, .lvds_i(line), .uart_tx_o(uart), .pixel_o(pix), .pixel_valid_o(pv),
    .locked_o(locked), .frame_err_o(ferr), .drops_o(drops), .sel_o(sel), .sel_changes_o(selchg));

  always #20 clk0 = ~clk0;
  initial begin #10; forever #20 clk90 = ~clk90; end

  // ---- camera model ----
  logic [9:0] sent[$];
  logic       running = 1, step_phase = 0;
  initial begin
    #13;                                  // bit edges 13 units after clk0 rises
    while (running) begin
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

  // ---- recovered pixels ----
  logic [9:0] rec[$];                   // recovered, waiting for the UART
  int nrec = 0, matched = 0, ptr = -1, last_pv = 0, cyc = 0, skipped = 0;
  always @(posedge clk0) begin
    cyc++;
    if (pv) begin
      nrec++;
      rec.push_back(pix);
      if (ptr >= 0 && ptr + 1 < sent.size() && sent[ptr + 1] == pix) begin
        ptr++; matched++;
        checks++;
        if (cyc - last_pv != 12) begin failures++; $display("pixel interval %0d", cyc - last_pv); end
      end else begin
        // (re)synchronise the model pointer on the most recent packets
        for (int i = sent.size() - 1; i >= 0 && i >= sent.size() - 4; i--)
          if (sent[i] == pix) ptr = i;
      end
      last_pv = cyc;
    end
  end

  // ---- UART receiver ----
  int nbytes = 0, npairs = 0;
  logic [7:0] b0;
  initial begin
    forever begin
      logic [7:0] d;
      @(negedge uart);
      repeat (CPB / 2) @(posedge clk0);
      checks++;
      if (uart !== 0) begin failures++; $display("bad start bit"); end
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk0);
        d[b] = uart;
      end
      repeat (CPB) @(posedge clk0);
      checks++;
      if (uart !== 1) begin failures++; $display("bad stop bit"); end
      if (nbytes % 2 == 0) b0 = d;
      else begin
        logic [9:0] up;
        up = {b0, d[1:0]};
        checks += 2;
        if (d[7:2] != 0) begin failures++; $display("second byte %h", d); end
        // the pixel must be among the recovered ones, in order; those
        // passed over were dropped by the full buffer
        while (rec.size() > 0 && rec[0] != up) begin void'(rec.pop_front()); skipped++; end
        if (rec.size() == 0) begin failures++; $display("uart pixel %h never recovered", up); end
        else void'(rec.pop_front());
        npairs++;
      end
      nbytes++;
    end
  end

  initial begin
    int t;
    #95 rst_n = 1;
    t = 0;
    while (!locked && t < 200) begin @(posedge clk0); t++; end
    checks++;
    if (!locked) begin failures++; $display("no lock at start-up"); end
    repeat (2000) @(posedge clk0);
    step_phase = 1;
    repeat (50) @(posedge clk0);
    t = 0;
    while (!locked && t < 200) begin @(posedge clk0); t++; end
    checks += 2;
    if (!locked) begin failures++; $display("no lock after phase step"); end
    if (selchg < 1) begin failures++; $display("phase never re-chosen"); end
    repeat (2000) @(posedge clk0);
    running = 0;
    repeat (DEPTH * 2 * 10 * CPB + 2000) @(posedge clk0);
    checks += 4;
    if (matched < 300) begin failures++; $display("only %0d pixels matched", matched); end
    if (drops == 0) begin failures++; $display("buffer never overflowed"); end
    if (rec.size() + skipped != int'(drops)) begin
      failures++; $display("recovered %0d, sent %0d, lost %0d, drops %0d", nrec, npairs, rec.size() + skipped, drops);
    end
    if (npairs < DEPTH) begin failures++; $display("only %0d pixels on the UART", npairs); end
    $display("recovered %0d matched %0d uart %0d drops %0d sel_changes %0d frame_err %0d",
             nrec, matched, npairs, drops, selchg, ferr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
