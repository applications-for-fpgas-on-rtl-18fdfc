// lvds_deserializer: recovers the 12-bit camera packets from the
// oversampled stream.
// The camera frames each 10-bit pixel with a start bit (high) and a stop
// bit (low), data least significant bit first (start, d0..d9, stop), packets
// back to back. Four samples per bit enter a 48-bit register (12 bits x 4).
// The bit value is the sample at the selected phase (sel_i), giving a
// 12-bit window of recovered bits, oldest first. A window whose oldest bit
// is a start bit and newest is a stop bit is a packet candidate. Hunting:
// a candidate starts a 12-bit count; a second candidate exactly 12 bits
// later locks the framing. Locked: every 12th window is a packet; it is
// output as pixel_o with pixel_valid_o for one clock. A locked window
// without start/stop bits counts a framing error and drops back to hunting.
// From the description: the 48-bit register of oversampled bits, finding
// the stop-to-start transition for the packet start, start high / stop low.
// Bit order inside the packet and the two-packet lock rule are this
// design's choices.
module lvds_deserializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] samp_i,
  input  logic [1:0] sel_i,
  output logic [9:0] pixel_o,
  output logic       pixel_valid_o,
  output logic       locked_o,
  output logic [7:0] frame_err_o
);
  logic [47:0] raw_q;       // newest samples at [3:0]
  logic [11:0] win;         // win[11] oldest bit, win[0] newest
  logic [3:0]  cnt_q;
  logic        hunt_q;      // one candidate seen while unlocked
  logic        cand;

  always_comb begin
    for (int j = 0; j < 12; j++) win[j] = raw_q[4*j + int'(sel_i)];
  end
  assign cand = win[11] & ~win[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_q         <= '0;
      cnt_q         <= '0;
      hunt_q        <= 1'b0;
      locked_o      <= 1'b0;
      pixel_o       <= '0;
      pixel_valid_o <= 1'b0;
      frame_err_o   <= '0;
    end else begin
      raw_q         <= {raw_q[43:0], samp_i};
      pixel_valid_o <= 1'b0;
      cnt_q         <= (cnt_q == 4'd11) ? 4'd0 : cnt_q + 1'b1;
      if (locked_o) begin
        if (cnt_q == 4'd11) begin
          if (cand) begin
            for (int b = 0; b < 10; b++) pixel_o[b] <= win[10-b];
            pixel_valid_o <= 1'b1;
          end else begin
            locked_o <= 1'b0;
            hunt_q   <= 1'b0;
            if (frame_err_o != 8'hFF) frame_err_o <= frame_err_o + 1'b1;
          end
        end
      end else if (cand && (!hunt_q || cnt_q == 4'd11)) begin
        cnt_q <= '0;
        if (hunt_q) begin
          locked_o <= 1'b1;
          for (int b = 0; b < 10; b++) pixel_o[b] <= win[10-b];
          pixel_valid_o <= 1'b1;
        end
        hunt_q <= 1'b1;
      end else if (hunt_q && cnt_q == 4'd11) begin
        hunt_q <= 1'b0;
      end
    end
  end
endmodule
