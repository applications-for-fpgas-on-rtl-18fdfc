// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop.
// Standard polarity, which the microcontroller's UART expects: idle high,
// start bit low, data least significant bit first, stop bit high. Each bit
// lasts CLKS_PER_BIT clocks. A byte is taken when valid_i and ready_o are
// both high; ready_o is high only while idle, so a frame takes
// 10 * CLKS_PER_BIT clocks from acceptance to the end of the stop bit.
// The description sends the camera data to the microcontroller over its
// UART; baud rate and frame format are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 80
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data_i,
  input  logic       valid_i,
  output logic       ready_o,
  output logic       tx_o
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);
  logic [9:0]    sh_q;      // {stop, data, start}, sent from bit 0
  logic [3:0]    nbit_q;    // bits still to send
  logic [CW-1:0] div_q;

  assign ready_o = (nbit_q == '0);
  assign tx_o    = ready_o ? 1'b1 : sh_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '1;
      nbit_q <= '0;
      div_q  <= '0;
    end else if (ready_o) begin
      if (valid_i) begin
        sh_q   <= {1'b1, data_i, 1'b0};
        nbit_q <= 4'd10;
        div_q  <= '0;
      end
    end else if (div_q == CW'(CLKS_PER_BIT - 1)) begin
      div_q  <= '0;
      sh_q   <= {1'b1, sh_q[9:1]};
      nbit_q <= nbit_q - 1'b1;
    end else begin
      div_q <= div_q + 1'b1;
    end
  end
endmodule
