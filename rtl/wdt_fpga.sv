// wdt_fpga: power board watchdog FPGA.
// The microcontroller talks to the FPGA over SPI (it is the master); the
// command decoder arms, kicks or stops the watchdog timer. When the timer
// expires it raises hold (the pin monitor freezes the control lines it was
// passing through from the microcontroller to the board's ICs), pulses the
// microcontroller's active-low reset, waits for it to boot, and releases
// the lines. After power-up the timer gives one start-up reset pulse.
// Ports: spi_* from the microcontroller, mcu_rst_n_o to its reset pin,
// mcu_pins_i/board_pins_o the monitored control lines.
// From the description: SPI slave, watchdog timer, pin monitoring. The
// command decoder stands in for the soft processor's program.
module wdt_fpga #(
  parameter int unsigned CLK_HZ         = 20_000_000,
  parameter int unsigned NUM_PINS       = 8,
  parameter int unsigned TIMEOUT_CYCLES = 2 * CLK_HZ,
  parameter int unsigned RESET_CYCLES   = CLK_HZ,
  parameter int unsigned HOLD_CYCLES    = CLK_HZ / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                spi_sck,
  input  logic                spi_cs_n,
  input  logic                spi_mosi,
  output logic                spi_miso,
  output logic                mcu_rst_n_o,
  input  logic [NUM_PINS-1:0] mcu_pins_i,
  output logic [NUM_PINS-1:0] board_pins_o,
  output logic                hold_o,
  output logic [7:0]          timeouts_o
);
  logic [7:0] rx_data, tx_data, bad_cmds;
  logic       rx_valid, arm, kick, disarm, armed, hold;
  logic [NUM_PINS-1:0] stored;

  spi_slave u_spi (
    .clk, .rst_n, .sck_i(spi_sck), .cs_n_i(spi_cs_n), .mosi_i(spi_mosi), .miso_o(spi_miso),
    .tx_data_i(tx_data), .rx_data_o(rx_data), .rx_valid_o(rx_valid)
  );

  wdt_cmd_decoder u_cmd (
    .clk, .rst_n, .rx_data_i(rx_data), .rx_valid_i(rx_valid), .armed_i(armed), .hold_i(hold),
    .arm_o(arm), .kick_o(kick), .disarm_o(disarm), .tx_data_o(tx_data), .bad_cmds_o(bad_cmds)
  );

  watchdog_timer #(.CLK_HZ(CLK_HZ), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                   .RESET_CYCLES(RESET_CYCLES), .HOLD_CYCLES(HOLD_CYCLES)) u_wdt (
    .clk, .rst_n, .arm_i(arm), .kick_i(kick), .disarm_i(disarm),
    .mcu_rst_n_o, .hold_o(hold), .armed_o(armed), .timeouts_o
  );

  pin_monitor #(.NUM_PINS(NUM_PINS)) u_pins (
    .clk, .rst_n, .hold_i(hold), .mcu_pins_i, .board_pins_o, .stored_o(stored)
  );

  assign hold_o = hold;

  logic unused;
  assign unused = ^{bad_cmds, stored};
endmodule
