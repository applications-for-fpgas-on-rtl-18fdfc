// tb_lvds_deserializer: feeds the oversampled stream of 12-bit packets
// (start 1, ten pixel bits LSB first, stop 0) with bit boundaries at sample
// phase phi and the matching phase selection sel = (phi + 2) mod 4.
// Checks: lock within a bounded time after random lead-in bits; recovered
// pixels equal the sent pixels in order with none missing; exactly one
// pixel per 12 clocks (one packet per 12 bit times, the camera's 12 bits per
// pixel clock); a lock on a wrong boundary ends within ten packets; a
// corrupted stop bit counts a framing error, drops the lock,
// and the framing is found again.
// The 48-sample register and stop-to-start framing follow the design;
// the pixel bit order and the two-packet lock are this design's.
module tb_lvds_deserializer;
  logic clk = 0, rst_n = 0;
  logic [3:0] samp = 0;
  logic [1:0] sel;
  logic [9:0] pix;
  logic       pv, locked;
  logic [7:0] ferr;
  int checks = 0, failures = 0;
  lvds_deserializer dut (.clk, .rst_n, .samp_i(samp), .sel_i(sel), .pixel_o(pix), .pixel_valid_o(pv),
                         .locked_o(locked), .frame_err_o(ferr));
  always #5 clk = ~clk;

  // bit queue and sent pixel list
  logic bits[$];
  logic [9:0] sent[$];
  int phi = 1;
  logic cur = 0;
  task automatic add_packet(logic [9:0] p, logic bad_stop);
    bits.push_back(1'b1);
    for (int b = 0; b < 10; b++) bits.push_back(p[b]);
    bits.push_back(bad_stop);
    sent.push_back(p);
  endtask
  // one clock: four samples, a new bit starts at sample phi
  task automatic step();
    for (int k = 0; k < 4; k++) begin
      if (k == phi) cur = (bits.size() > 0) ? bits.pop_front() : 1'b0;
      samp[k] = cur;
    end
    @(negedge clk);
  endtask

  // A lock can land on a wrong boundary when pixel bits imitate a start/stop
  // pair; such a lock must end within a few packets (framing error). After a
  // lock, the first pixels are matched against the sent list; once ten match
  // in a row the lock is trusted and every later pixel must be exact.
  int got = 0, ptr = -1, last_pv = -1, cyc = 0, relocks = 0, false_locks = 0;
  int good_cyc = 0, lim;
  int run = 0;           // pixels matched in a row since the lock
  int bad_run = 0;       // pixels delivered on a false lock
  logic locked_q = 0, trusted = 0, bogus = 0;
  always @(posedge clk) begin
    cyc++;
    locked_q <= locked;
    if (pv) begin
      checks++;
      if (!locked_q) begin
        int i;
        relocks++;
        trusted = 0; bogus = 0; run = 0; bad_run = 0;
        // search only as far as the packets that can have passed since the
        // last good pixel, so a random value cannot match far ahead
        lim = ptr + 3 + (cyc - good_cyc) / 12;
        for (i = ptr + 1; i < sent.size() && i <= lim && sent[i] != pix; i++);
        if (i >= sent.size() || i > lim) begin bogus = 1; false_locks++; end
        else begin ptr = i; run = 1; good_cyc = cyc; end
      end else if (bogus) begin
        bad_run++;
        if (bad_run > 10) begin failures++; $display("false lock persists"); end
      end else begin
        checks++;
        if (cyc - last_pv != 12) begin failures++; $display("pixel interval %0d", cyc - last_pv); end
        if (ptr + 1 < sent.size() && sent[ptr + 1] === pix) begin
          ptr++; run++; good_cyc = cyc;
          if (run >= 10) trusted = 1;
        end else if (trusted) begin
          failures++; $display("pixel %h exp %h", pix, sent[ptr + 1]);
        end else begin
          bogus = 1; false_locks++;
        end
      end
      last_pv = cyc;
      got++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      int t0;
      phi = r;
      sel = 2'(phi + 2);
      repeat ($urandom % 30) bits.push_back(1'($urandom));
      for (int i = 0; i < 200; i++) add_packet(10'($urandom), 1'b0);
      t0 = cyc;
      while (!locked && cyc - t0 < 400) step();
      checks++;
      if (!locked) begin failures++; $display("no lock for phi %0d", phi); end
      while (bits.size() > 12 * 20) step();
      // corrupt one stop bit
      add_packet(10'($urandom), 1'b1);
      for (int i = 0; i < 20; i++) add_packet(10'($urandom), 1'b0);
      while (bits.size() > 0) step();
      repeat (4) step();
      checks++;
      if (ferr < 8'(r + 1)) begin failures++; $display("frame errors %0d", ferr); end
    end
    checks++;
    if (got < 700) begin failures++; $display("only %0d pixels", got); end
    $display("pixels %0d relocks %0d false locks %0d frame errors %0d", got, relocks, false_locks, ferr);
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
