// lvds_edge_detect: finds the bit transitions in the oversampled stream and
// picks the sampling phase farthest from them.
// Each sample is compared with its delayed counterpart (the sample one
// quarter bit earlier; for samp_i[0] that is samp_i[3] of the previous
// cycle). A difference is an edge pulse, edge_o[i] meaning the line changed
// between sample i-1 and sample i. The middle of the bit lies two samples
// after an edge, so on an edge the selected phase becomes (i + 2) mod 4.
// The selection only moves after the same edge position is seen twice in a
// row, so a single noisy edge does not disturb it. The delayed samples
// (samp_d_o) and the selection (sel_o) are registered together so that
// the next stage sees matching data and phase.
// From the description: comparing a signal with its delayed copy, edge
// pulses choosing one of the four clocks. The two-edge confirmation is this
// design's choice.
module lvds_edge_detect (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] samp_i,
  output logic [3:0] edge_o,
  output logic [3:0] samp_d_o,
  output logic [1:0] sel_o,
  output logic       sel_change_o
);
  logic [3:0] edges;
  logic       last_q;
  logic [1:0] cand_q;
  logic       cand_vld_q;
  logic [1:0] first_pos;
  logic       any_edge;

  assign edges = samp_i ^ {samp_i[2:0], last_q};

  always_comb begin
    first_pos = '0;
    any_edge  = 1'b0;
    for (int i = 3; i >= 0; i--) begin
      if (edges[i]) begin
        first_pos = 2'(i);
        any_edge  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q       <= 1'b0;
      edge_o       <= '0;
      samp_d_o     <= '0;
      sel_o        <= 2'd2;
      cand_q       <= '0;
      cand_vld_q   <= 1'b0;
      sel_change_o <= 1'b0;
    end else begin
      last_q       <= samp_i[3];
      edge_o       <= edges;
      samp_d_o     <= samp_i;
      sel_change_o <= 1'b0;
      if (any_edge) begin
        cand_q     <= first_pos;
        cand_vld_q <= 1'b1;
        if (cand_vld_q && cand_q == first_pos && sel_o != first_pos + 2'd2) begin
          sel_o        <= first_pos + 2'd2;
          sel_change_o <= 1'b1;
        end
      end
    end
  end
endmodule
