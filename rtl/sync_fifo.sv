// sync_fifo: single-clock FIFO used as the pixel buffer of the camera
// interface.
// Memory array with binary read/write pointers and an occupancy count.
// Write: wr_en_i stores wr_data_i unless full; a write while full is
// dropped and counted in drops_o (saturating), since the camera cannot be
// paused. Read: show-ahead, rd_data_o is valid while empty_o is low and
// rd_en_i consumes the entry. Both may happen in the same clock.
// The description asks for buffering between the fast camera and the slow
// microcontroller without giving a size; the depth is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en_i,
  input  logic [WIDTH-1:0] wr_data_i,
  input  logic             rd_en_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             empty_o,
  output logic             full_o,
  output logic [15:0]      drops_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp_q, rp_q;
  logic [AW:0]      cnt_q;
  logic             do_wr, do_rd;

  assign empty_o = (cnt_q == '0);
  assign full_o  = (cnt_q == (AW+1)'(DEPTH));
  assign do_wr   = wr_en_i && !full_o;
  assign do_rd   = rd_en_i && !empty_o;
  assign rd_data_o = mem[rp_q];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_q] <= wr_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q    <= '0;
      rp_q    <= '0;
      cnt_q   <= '0;
      drops_o <= '0;
    end else begin
      if (do_wr) wp_q <= (wp_q == AW'(DEPTH - 1)) ? '0 : wp_q + 1'b1;
      if (do_rd) rp_q <= (rp_q == AW'(DEPTH - 1)) ? '0 : rp_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en_i && full_o && drops_o != 16'hFFFF) drops_o <= drops_o + 1'b1;
    end
  end
endmodule
