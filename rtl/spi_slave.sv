// spi_slave: 8-bit SPI slave (mode 0, MSB first) sampled in the system clock.
// SPI is a shift register shared between master and slave: each SCK rising
// edge shifts MOSI into the receive register while the transmit register
// is shifted out on MISO (changed on the falling edge). After 8 bits with
// chip select low, rx_valid_o pulses for one clock with the byte in
// rx_data_o, and the next transmit byte (tx_data_i) is loaded.
// SCK, MOSI and CS_N come from the other chip and pass through two-stage
// synchronizers, so SCK must be slower than clk / 4.
// From the description: the microcontroller is the master, the FPGA the
// slave, 8 bits per transaction. Mode 0, MSB first and oversampling in the
// system clock are this design's choices; the original used a vendor core.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sck_i,
  input  logic       cs_n_i,
  input  logic       mosi_i,
  output logic       miso_o,
  input  logic [7:0] tx_data_i,
  output logic [7:0] rx_data_o,
  output logic       rx_valid_o
);
  logic [2:0] sck_s, cs_s;
  logic [1:0] mosi_s;
  logic [7:0] rx_sr_q, tx_sr_q;
  logic [2:0] bit_q;
  logic       sck_rise, sck_fall, cs_act, cs_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s  <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], sck_i};
      cs_s   <= {cs_s[1:0], cs_n_i};
      mosi_s <= {mosi_s[0], mosi_i};
    end
  end

  assign sck_rise = sck_s[1] & ~sck_s[2];
  assign sck_fall = ~sck_s[1] & sck_s[2];
  assign cs_act   = ~cs_s[1];
  assign cs_start = ~cs_s[1] & cs_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr_q    <= '0;
      tx_sr_q    <= '0;
      bit_q      <= '0;
      rx_data_o  <= '0;
      rx_valid_o <= 1'b0;
    end else begin
      rx_valid_o <= 1'b0;
      if (!cs_act) begin
        bit_q <= '0;
      end else if (cs_start) begin
        bit_q   <= '0;
        tx_sr_q <= tx_data_i;
      end else if (sck_rise) begin
        rx_sr_q <= {rx_sr_q[6:0], mosi_s[1]};
        bit_q   <= bit_q + 1'b1;
        if (bit_q == 3'd7) begin
          rx_data_o  <= {rx_sr_q[6:0], mosi_s[1]};
          rx_valid_o <= 1'b1;
        end
      end else if (sck_fall) begin
        if (bit_q == 3'd0) tx_sr_q <= tx_data_i;
        else               tx_sr_q <= {tx_sr_q[6:0], 1'b0};
      end
    end
  end

  assign miso_o = tx_sr_q[7];
endmodule
