// tb_wdt_fpga: the watchdog board controller end to end over SPI, with
// small timing parameters (timeout 400, reset 100, boot hold 60 clocks).
// Scenario: the power-up reset comes after exactly the timeout; the
// microcontroller then sends ENABLE (0xA1) and KICK (0xA2) commands over SPI
// (SCK = clk/8, mode 0); while kicks keep coming no reset happens; after the
// kicks stop, a reset of RESET clocks follows; during reset and boot hold
// the board pins keep the value from before the reset while the
// microcontroller's pins toggle; STOP (0xA3) disarms; the status byte
// returned during a transfer shows the armed flag.
module tb_wdt_fpga;
  localparam int TO = 400, RS = 100, HD = 60;
  logic clk = 0, rst_n = 0, sck = 0, cs_n = 1, mosi = 0, miso, mrst_n, hold;
  logic [7:0] mcu = 8'h5A, board, touts;
  int checks = 0, failures = 0;

  wdt_fpga #(.CLK_HZ(1000), .NUM_PINS(8), .TIMEOUT_CYCLES(TO), .RESET_CYCLES(RS), .HOLD_CYCLES(HD)) dut (
    .clk, .rst_n, .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .mcu_rst_n_o(mrst_n), .mcu_pins_i(mcu), .board_pins_o(board), .hold_o(hold), .timeouts_o(touts));
  always #5 clk = ~clk;

  // count reset pulses and check pin freezing
  int resets = 0;
  logic mrst_q = 1;
  logic [7:0] frozen = 0;
  always @(posedge clk) begin
    mrst_q <= mrst_n;
    if (mrst_q && !mrst_n) resets++;
    if (!hold) frozen <= mcu;
  end
  always @(negedge clk) if (rst_n && hold) begin
    checks++;
    if (board !== frozen) begin failures++; $display("%t board %h frozen %h", $time, board, frozen); end
  end
  always @(negedge clk) if (hold) mcu = 8'($urandom);

  task automatic spi(logic [7:0] mo, output logic [7:0] mi);
    cs_n = 0;
    repeat (4) @(negedge clk);
    for (int b = 7; b >= 0; b--) begin
      mosi = mo[b];
      repeat (4) @(negedge clk);
      sck = 1; mi[b] = miso;
      repeat (4) @(negedge clk);
      sck = 0;
    end
    repeat (4) @(negedge clk);
    cs_n = 1;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int t;
    logic [7:0] st;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t = 0;
    while (mrst_n) begin @(negedge clk); t++; end
    checks++;
    if (t != TO) begin failures++; $display("power-up reset after %0d", t); end
    t = 0;
    while (!mrst_n) begin @(negedge clk); t++; end
    checks++;
    if (t != RS) begin failures++; $display("reset length %0d", t); end
    while (hold) @(negedge clk);
    // microcontroller has booted: enable and kick
    spi(8'hA1, st);
    spi(8'hA2, st);
    checks++;
    if (!st[7]) begin failures++; $display("status not armed: %h", st); end
    for (int i = 0; i < 10; i++) begin
      repeat (200) @(negedge clk);
      spi(8'hA2, st);
    end
    checks++;
    if (resets != 1) begin failures++; $display("reset despite kicks"); end
    // stop kicking
    t = 0;
    while (mrst_n && t < 2000) begin @(negedge clk); t++; end
    checks++;
    if (t < TO - 120 || t > TO) begin failures++; $display("timeout reset after %0d", t); end
    while (mrst_n == 0 || hold) @(negedge clk);
    checks++;
    if (touts != 2) begin failures++; $display("timeouts %0d", touts); end
    // armed again? power-up only arms once; enable, then stop
    spi(8'hA1, st);
    spi(8'hA3, st);
    spi(8'h00, st);
    checks++;
    if (st[7] || st[3:0] != 4'h3) begin failures++; $display("status after stop %h", st); end
    repeat (3 * TO) @(negedge clk);
    checks++;
    if (resets != 2) begin failures++; $display("resets %0d after stop", resets); end
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
