// nanosat_fpga_top: the three nanosatellite FPGA designs side by side.
//  * gps_baseband - GPS data acquisition and satellite acquisition with a
//    shared external memory port (system clock gps_clk, frontend clock
//    fe_clk). The processor's register accesses and the memory come in and
//    go out as plain Avalon-MM ports.
//  * wdt_fpga     - power board watchdog with control-line hold (wdt_clk).
//  * camera_if    - 4x oversampled LVDS camera receiver with UART output
//    (cam_clk0/cam_clk90, the PLL outputs).
// The designs share no logic and no clock; each has its own reset.
// Placing the three designs in one device is this design's choice, made so
// they can be built and tested together; each keeps the ports it would have on
// its own board.
module nanosat_fpga_top
  import gps_pkg::*;
#(
  parameter int unsigned GPS_SAMPLES_PER_BUF = 65536,
  parameter int unsigned GPS_INT_SAMPLES     = 16384,
  parameter int unsigned GPS_CODE_PHASES     = 1023,
  parameter int unsigned WDT_CLK_HZ          = 20_000_000,
  parameter int unsigned WDT_NUM_PINS        = 8,
  parameter int unsigned WDT_TIMEOUT_CYCLES  = 2 * WDT_CLK_HZ,
  parameter int unsigned WDT_RESET_CYCLES    = WDT_CLK_HZ,
  parameter int unsigned WDT_HOLD_CYCLES     = WDT_CLK_HZ / 2,
  parameter int unsigned CAM_FIFO_DEPTH      = 512,
  parameter int unsigned CAM_CLKS_PER_BIT    = 80
) (
  // ---------------- GPS baseband
  input  logic        gps_clk,
  input  logic        gps_rst_n,
  input  logic        fe_clk,
  input  logic        fe_rst_n,
  input  logic        fe_i,
  input  logic        fe_q,
  input  logic        acq_address,
  input  logic        acq_read,
  input  logic        acq_write,
  input  logic [31:0] acq_writedata,
  output logic [31:0] acq_readdata,
  input  logic [1:0]  sat_address,
  input  logic        sat_read,
  input  logic        sat_write,
  input  logic [31:0] sat_writedata,
  output logic [31:0] sat_readdata,
  output avm_req_t    mem_req,
  input  avm_rsp_t    mem_rsp,
  output logic        acq_buf_done,
  output logic        sat_done,
  output logic        bus_conflict,
  // ---------------- watchdog
  input  logic                    wdt_clk,
  input  logic                    wdt_rst_n,
  input  logic                    spi_sck,
  input  logic                    spi_cs_n,
  input  logic                    spi_mosi,
  output logic                    spi_miso,
  output logic                    mcu_rst_n,
  input  logic [WDT_NUM_PINS-1:0] mcu_pins,
  output logic [WDT_NUM_PINS-1:0] board_pins,
  output logic                    wdt_hold,
  output logic [7:0]              wdt_timeouts,
  // ---------------- camera
  input  logic        cam_clk0,
  input  logic        cam_clk90,
  input  logic        cam_rst_n,
  input  logic        cam_lvds,
  output logic        cam_uart_tx,
  output logic [9:0]  cam_pixel,
  output logic        cam_pixel_valid,
  output logic        cam_locked,
  output logic [7:0]  cam_frame_err,
  output logic [15:0] cam_drops,
  output logic [1:0]  cam_sel,
  output logic [7:0]  cam_sel_changes
);
  gps_baseband #(
    .SAMPLES_PER_BUF(GPS_SAMPLES_PER_BUF), .INT_SAMPLES(GPS_INT_SAMPLES),
    .CODE_PHASES(GPS_CODE_PHASES)
  ) u_gps (
    .clk(gps_clk), .rst_n(gps_rst_n), .fe_clk, .fe_rst_n, .fe_i, .fe_q,
    .acq_address, .acq_read, .acq_write, .acq_writedata, .acq_readdata,
    .sat_address, .sat_read, .sat_write, .sat_writedata, .sat_readdata,
    .avm_req(mem_req), .avm_rsp(mem_rsp), .acq_buf_done_o(acq_buf_done),
    .sat_done_o(sat_done), .bus_conflict_o(bus_conflict)
  );

  wdt_fpga #(
    .CLK_HZ(WDT_CLK_HZ), .NUM_PINS(WDT_NUM_PINS), .TIMEOUT_CYCLES(WDT_TIMEOUT_CYCLES),
    .RESET_CYCLES(WDT_RESET_CYCLES), .HOLD_CYCLES(WDT_HOLD_CYCLES)
  ) u_wdt (
    .clk(wdt_clk), .rst_n(wdt_rst_n), .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso,
    .mcu_rst_n_o(mcu_rst_n), .mcu_pins_i(mcu_pins), .board_pins_o(board_pins),
    .hold_o(wdt_hold), .timeouts_o(wdt_timeouts)
  );

  camera_if #(.FIFO_DEPTH(CAM_FIFO_DEPTH), .CLKS_PER_BIT(CAM_CLKS_PER_BIT)) u_cam (
    .clk0(cam_clk0), .clk90(cam_clk90), .rst_n(cam_rst_n), .lvds_i(cam_lvds),
    .uart_tx_o(cam_uart_tx), .pixel_o(cam_pixel), .pixel_valid_o(cam_pixel_valid),
    .locked_o(cam_locked), .frame_err_o(cam_frame_err), .drops_o(cam_drops),
    .sel_o(cam_sel), .sel_changes_o(cam_sel_changes)
  );
endmodule
