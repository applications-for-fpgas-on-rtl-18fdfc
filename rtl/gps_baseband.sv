// gps_baseband: hardware part of the GPS baseband processor.
// The data acquisition module records the frontend's 1-bit I/Q samples into
// two alternating 4 ms buffers in external memory; the satellite acquisition
// module reads a recorded buffer back and searches it for 8 PRNs at a time.
// Both reach the memory through one Avalon-MM master port (avm_*) via a
// fixed-priority arbiter (recording has priority). The processor that
// drives both through their Avalon slaves, the memory controller and the
// clock PLL are outside this block; their signals are ports.
// One system clock (clk) runs both modules; the frontend clock (fe_clk)
// runs only the write side of the clock-crossing FIFO.
// acq_* : data acquisition slave, 2 registers; sat_* : satellite
// acquisition slave, 4 registers (see the two modules for the maps).
// From the description: the two modules, their Avalon slave and master
// interfaces and the shared memory. The arbiter and its priority order are
// this design's.
module gps_baseband
  import gps_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BUF = 65536,
  parameter int unsigned INT_SAMPLES     = 16384,
  parameter int unsigned CODE_PHASES     = 1023
) (
  input  logic        clk,
  input  logic        rst_n,
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
  output avm_req_t    avm_req,
  input  avm_rsp_t    avm_rsp,
  output logic        acq_buf_done_o,
  output logic        sat_done_o,
  output logic        bus_conflict_o
);
  avm_req_t acq_req, sat_req;
  avm_rsp_t acq_rsp, sat_rsp;

  gps_data_acq_avalon #(.SAMPLES_PER_BUF(SAMPLES_PER_BUF)) u_acq (
    .clk, .rst_n, .fe_clk, .fe_rst_n, .fe_i, .fe_q,
    .avs_address(acq_address), .avs_read(acq_read), .avs_write(acq_write),
    .avs_writedata(acq_writedata), .avs_readdata(acq_readdata),
    .avm_req(acq_req), .avm_rsp(acq_rsp), .buf_done_o(acq_buf_done_o)
  );

  gps_sat_acq #(.INT_SAMPLES(INT_SAMPLES), .CODE_PHASES(CODE_PHASES)) u_sat (
    .clk, .rst_n,
    .avs_address(sat_address), .avs_read(sat_read), .avs_write(sat_write),
    .avs_writedata(sat_writedata), .avs_readdata(sat_readdata),
    .avm_req(sat_req), .avm_rsp(sat_rsp), .done_o(sat_done_o)
  );

  avalon_arbiter #(.MAX_PENDING(4)) u_arb (
    .clk, .rst_n, .m0_req(acq_req), .m0_rsp(acq_rsp), .m1_req(sat_req), .m1_rsp(sat_rsp),
    .s_req(avm_req), .s_rsp(avm_rsp), .conflict_o(bus_conflict_o)
  );
endmodule
