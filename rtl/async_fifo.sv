// async_fifo: dual-clock FIFO that moves frontend samples into the system
// clock domain.
// The write side runs on the frontend sample clock, the read side on the
// system clock. Read and write pointers are kept in binary and Gray code;
// each Gray pointer crosses to the other domain through a chain of
// SYNC_STAGES flip-flops, so only one bit changes per step and a metastable
// capture can cost at most one position. Depth is a power of two.
// Write: wr_en_i with wr_full_o low stores wr_data_i. A write while full is
// dropped and raises the sticky wr_overflow_o flag (cleared by wr_rst_n).
// Read: show-ahead; rd_data_o is valid while rd_empty_o is low, rd_en_i
// consumes it. Full and empty are pessimistic by the synchronizer latency.
// From the description: a small FIFO of depth 4 between the two clocks and a
// 3-stage synchronizer. The Gray-pointer structure and overflow flag are
// this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH       = 2,
  parameter int unsigned DEPTH       = 4,
  parameter int unsigned SYNC_STAGES = 3
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en_i,
  input  logic [WIDTH-1:0] wr_data_i,
  output logic             wr_full_o,
  output logic             wr_overflow_o,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             rd_empty_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_sync [SYNC_STAGES];
  logic [AW:0] wgray_sync [SYNC_STAGES];
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_nx   = wbin_q + (AW+1)'(1);
  assign wr_full_o = (wgray_q == {~rgray_sync[SYNC_STAGES-1][AW:AW-1],
                                   rgray_sync[SYNC_STAGES-1][AW-2:0]});

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin_q        <= '0;
      wgray_q       <= '0;
      wr_overflow_o <= 1'b0;
    end else if (wr_en_i) begin
      if (!wr_full_o) begin
        wbin_q  <= wbin_nx;
        wgray_q <= bin2gray(wbin_nx);
      end else begin
        wr_overflow_o <= 1'b1;
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en_i && !wr_full_o) mem[wbin_q[AW-1:0]] <= wr_data_i;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) rgray_sync[i] <= '0;
    end else begin
      rgray_sync[0] <= rgray_q;
      for (int i = 1; i < SYNC_STAGES; i++) rgray_sync[i] <= rgray_sync[i-1];
    end
  end

  // read domain
  assign rbin_nx    = rbin_q + (AW+1)'(1);
  assign rd_empty_o = (rgray_q == wgray_sync[SYNC_STAGES-1]);
  assign rd_data_o  = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin_q  <= '0;
      rgray_q <= '0;
    end else if (rd_en_i && !rd_empty_o) begin
      rbin_q  <= rbin_nx;
      rgray_q <= bin2gray(rbin_nx);
    end
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) wgray_sync[i] <= '0;
    end else begin
      wgray_sync[0] <= wgray_q;
      for (int i = 1; i < SYNC_STAGES; i++) wgray_sync[i] <= wgray_sync[i-1];
    end
  end

endmodule
