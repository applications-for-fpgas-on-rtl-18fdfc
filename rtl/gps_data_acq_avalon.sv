// gps_data_acq_avalon: data acquisition module with its Avalon interfaces.
// Frontend side: the 1-bit I and Q samples and their 16.384 MHz clock
// enter a dual-clock FIFO (3-stage synchronizers) and are read in the
// system clock domain by gps_data_acq. The FIFO is 8 deep: the writer sees
// the reader's progress only after the 3-stage synchronizer, i.e. about
// three frontend clocks late, so a 4-deep FIFO written on every frontend
// clock would report full and drop samples even with an idle bus.
// Avalon-MM slave (word registers, read latency 0):
//   0  configuration/status  W: [0] enable (0->1 starts), [1] continuous
//                            R: [0] enable, [1] continuous, [8] busy, [9] done,
//                               [10] last completed buffer, [11] overflow
//   1  base address of the two sample buffers (byte address)
// Avalon-MM master: writes the 32-bit sample words, holding each request
// while waitrequest is high.
// The overflow bit is set when the frontend writes into a full FIFO (the
// bus stalled too long); it is synchronized into the system domain and
// cleared only by reset.
// From the description: two slave registers (configuration, start address),
// a write master for direct memory access, the small FIFO between the clock
// domains. Register bit positions and the overflow bit are this design's.
module gps_data_acq_avalon
  import gps_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BUF = 65536,
  parameter int unsigned FIFO_DEPTH      = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // frontend
  input  logic        fe_clk,
  input  logic        fe_rst_n,
  input  logic        fe_i,
  input  logic        fe_q,
  // Avalon slave
  input  logic        avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // Avalon master
  output avm_req_t    avm_req,
  input  avm_rsp_t    avm_rsp,
  output logic        buf_done_o
);
  logic        cfg_en_q, cfg_cont_q, start_q;
  logic [31:0] base_q;
  logic        fifo_empty, fifo_rd, fifo_full, ovf_fe;
  logic [1:0]  fifo_data;
  logic [2:0]  ovf_sync_q;
  logic        wr_req, busy, done, last_buf;
  logic [31:0] wr_addr, wr_data;
  logic        fifo_rd_acq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_en_q   <= 1'b0;
      cfg_cont_q <= 1'b0;
      start_q    <= 1'b0;
      base_q     <= '0;
    end else begin
      start_q <= 1'b0;
      if (avs_write) begin
        if (avs_address == 1'b0) begin
          cfg_en_q   <= avs_writedata[0];
          cfg_cont_q <= avs_writedata[1];
          start_q    <= avs_writedata[0] & ~cfg_en_q;
        end else begin
          base_q <= avs_writedata;
        end
      end else if (done && !start_q) begin
        cfg_en_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ovf_sync_q <= '0;
    else        ovf_sync_q <= {ovf_sync_q[1:0], ovf_fe};
  end

  always_comb begin
    avs_readdata = '0;
    if (avs_address == 1'b0)
      avs_readdata[11:0] = {ovf_sync_q[2], last_buf, done, busy, 6'b0, cfg_cont_q, cfg_en_q};
    else
      avs_readdata = base_q;
  end

  async_fifo #(.WIDTH(2), .DEPTH(FIFO_DEPTH), .SYNC_STAGES(3)) u_fifo (
    .wr_clk(fe_clk), .wr_rst_n(fe_rst_n), .wr_en_i(1'b1), .wr_data_i({fe_i, fe_q}),
    .wr_full_o(fifo_full), .wr_overflow_o(ovf_fe),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en_i(fifo_rd), .rd_data_o(fifo_data),
    .rd_empty_o(fifo_empty)
  );

  // While idle the stream is discarded so that acquisition starts on fresh data.
  logic drain;
  assign drain = !busy && !fifo_empty;

  gps_data_acq #(.SAMPLES_PER_BUF(SAMPLES_PER_BUF)) u_acq (
    .clk, .rst_n, .start_i(start_q), .enable_i(cfg_en_q), .continuous_i(cfg_cont_q),
    .base_i(base_q), .fifo_empty_i(fifo_empty), .fifo_data_i(fifo_data),
    .fifo_rd_o(fifo_rd_acq), .wr_req_o(wr_req), .wr_addr_o(wr_addr), .wr_data_o(wr_data),
    .wr_ack_i(!avm_rsp.waitrequest), .busy_o(busy), .done_o(done),
    .buf_done_o(buf_done_o), .last_buf_o(last_buf)
  );
  assign fifo_rd = fifo_rd_acq | drain;

  assign avm_req.read      = 1'b0;
  assign avm_req.write     = wr_req;
  assign avm_req.address   = wr_addr;
  assign avm_req.writedata = wr_data;

  logic unused;
  assign unused = fifo_full ^ avm_rsp.readdatavalid ^ (^avm_rsp.readdata);
endmodule
