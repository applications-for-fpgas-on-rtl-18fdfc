// lvds_oversampler: 4x oversampling of a serial line with two quadrature
// clocks.
// clk0 and clk90 run at the bit rate, 90 degrees apart. The line is
// captured on the rising and falling edges of both, i.e. at 0, 90, 180 and
// 270 degrees of each bit period, and the four captures are moved into the
// clk0 domain on the next rising edge of clk0. Each clk0 cycle therefore
// delivers samp_o[3:0], four samples of one bit period in time order
// (samp_o[0] earliest, taken at 0 degrees).
// Timing: samp_o lags the line by one to two clk0 periods. The 270-degree
// capture reaches the clk0 flop a quarter period later; a real device needs
// placement constraints for that path (or extra retiming stages).
// From the description: two PLL clocks 90 degrees apart sample each bit
// four times. The single retiming stage is this design's simplification.
module lvds_oversampler (
  input  logic       clk0,
  input  logic       clk90,
  input  logic       rst_n,
  input  logic       din_i,
  output logic [3:0] samp_o
);
  logic s0_q, s90_q, s180_q, s270_q;

  always_ff @(posedge clk0  or negedge rst_n) if (!rst_n) s0_q   <= 1'b0; else s0_q   <= din_i;
  always_ff @(posedge clk90 or negedge rst_n) if (!rst_n) s90_q  <= 1'b0; else s90_q  <= din_i;
  always_ff @(negedge clk0  or negedge rst_n) if (!rst_n) s180_q <= 1'b0; else s180_q <= din_i;
  always_ff @(negedge clk90 or negedge rst_n) if (!rst_n) s270_q <= 1'b0; else s270_q <= din_i;

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) samp_o <= '0;
    else        samp_o <= {s270_q, s180_q, s90_q, s0_q};
  end
endmodule
