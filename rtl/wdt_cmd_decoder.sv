// wdt_cmd_decoder: turns SPI command bytes into watchdog actions.
// Commands (one byte each):
//   8'hA1 ENABLE  arm the watchdog (clears the count)
//   8'hA2 KICK    clear the count (the periodic "still alive" message)
//   8'hA3 STOP    disarm the watchdog
// Any other byte is counted in bad_cmds_o and ignored. The byte returned on
// the next SPI transfer is a status byte: {armed, hold, 2'b0, last command
// nibble}. Outputs are one-clock pulses in the cycle after rx_valid_i.
// The description leaves the command set to the soft processor's program,
// which is not given; the codes and the status byte are this design's.
module wdt_cmd_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data_i,
  input  logic       rx_valid_i,
  input  logic       armed_i,
  input  logic       hold_i,
  output logic       arm_o,
  output logic       kick_o,
  output logic       disarm_o,
  output logic [7:0] tx_data_o,
  output logic [7:0] bad_cmds_o
);
  typedef enum logic [7:0] {
    CMD_ENABLE = 8'hA1,
    CMD_KICK   = 8'hA2,
    CMD_STOP   = 8'hA3
  } cmd_t;

  logic [3:0] last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arm_o      <= 1'b0;
      kick_o     <= 1'b0;
      disarm_o   <= 1'b0;
      last_q     <= '0;
      bad_cmds_o <= '0;
    end else begin
      arm_o    <= 1'b0;
      kick_o   <= 1'b0;
      disarm_o <= 1'b0;
      if (rx_valid_i) begin
        last_q <= rx_data_i[3:0];
        unique case (rx_data_i)
          CMD_ENABLE: arm_o    <= 1'b1;
          CMD_KICK:   kick_o   <= 1'b1;
          CMD_STOP:   disarm_o <= 1'b1;
          default:    if (bad_cmds_o != 8'hFF) bad_cmds_o <= bad_cmds_o + 1'b1;
        endcase
      end
    end
  end

  assign tx_data_o = {armed_i, hold_i, 2'b00, last_q};
endmodule
