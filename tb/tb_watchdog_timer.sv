// tb_watchdog_timer: timeouts and pulse lengths, cycle exact, with small
// parameters (timeout 50, reset 20, hold 10 clocks).
// Checks: the power-up reset arrives exactly TIMEOUT cycles after reset
// release, lasts RESET cycles (active low), hold covers reset plus the boot
// time and rises no later than the reset; then the timer is idle. Once
// armed, kicks every 40 clocks keep the reset away; after the kicks stop,
// the reset follows TIMEOUT clocks after the last kick; a disarmed timer
// never fires; the timeout counter counts.
module tb_watchdog_timer;
  localparam int TO = 50, RS = 20, HD = 10;
  logic clk = 0, rst_n = 0, arm = 0, kick = 0, disarm = 0;
  logic mrst_n, hold, armed;
  logic [7:0] touts;
  int checks = 0, failures = 0;

  watchdog_timer #(.CLK_HZ(100), .TIMEOUT_CYCLES(TO), .RESET_CYCLES(RS), .HOLD_CYCLES(HD)) dut (
    .clk, .rst_n, .arm_i(arm), .kick_i(kick), .disarm_i(disarm), .mcu_rst_n_o(mrst_n),
    .hold_o(hold), .armed_o(armed), .timeouts_o(touts));
  always #5 clk = ~clk;

  // measure a reset event starting now: returns cycles until reset, length, hold length
  task automatic measure(output int t_rst, output int l_rst, output int l_hold);
    t_rst = 0; l_rst = 0; l_hold = 0;
    while (mrst_n && t_rst < 1000) begin @(negedge clk); t_rst++; end
    while (!mrst_n) begin
      checks++; if (!hold) failures++;
      @(negedge clk); l_rst++; l_hold++;
    end
    while (hold) begin @(negedge clk); l_hold++; end
  endtask

  initial begin
    int t, l, h;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    measure(t, l, h);
    checks += 4;
    if (t != TO) begin failures++; $display("power-up timeout after %0d", t); end
    if (l != RS) begin failures++; $display("reset length %0d", l); end
    if (h != RS + HD) begin failures++; $display("hold length %0d", h); end
    if (armed) failures++;
    // idle: nothing for a long time
    measure(t, l, h);
    checks++; if (t < 1000) begin failures++; $display("idle timer fired"); end
    // armed and kicked
    arm = 1; @(negedge clk); arm = 0;
    for (int i = 0; i < 10; i++) begin
      repeat (39) begin @(negedge clk); checks++; if (!mrst_n) failures++; end
      kick = 1; @(negedge clk); kick = 0;
    end
    measure(t, l, h);
    checks += 2;
    if (t != TO) begin failures++; $display("timeout after last kick: %0d", t); end
    if (touts != 2) begin failures++; $display("timeouts %0d", touts); end
    // disarm
    arm = 1; @(negedge clk); arm = 0;
    repeat (20) @(negedge clk);
    disarm = 1; @(negedge clk); disarm = 0;
    measure(t, l, h);
    checks++; if (t < 1000) begin failures++; $display("disarmed timer fired"); end
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
