// pin_monitor: keeps the power board's control lines steady while the
// microcontroller is being reset.
// Every clock the microcontroller's outputs (mcu_pins_i) are stored in a
// register, as long as hold_i is low; the board sees them directly
// (board_pins_o = mcu_pins_i). While hold_i is high the register is frozen
// and drives board_pins_o, so the regulators and chargers see no glitch as
// the microcontroller's pins float during reset and boot.
// Interface timing: board_pins_o switches to the stored value in the same
// cycle hold_i rises; the stored value is the pins of the previous clock.
// From the description: sampling on each rising clock edge into a register
// and driving the stored value when the watchdog signals. Pass-through
// when not holding is how the description's "takes over" is read.
module pin_monitor #(
  parameter int unsigned NUM_PINS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hold_i,
  input  logic [NUM_PINS-1:0] mcu_pins_i,
  output logic [NUM_PINS-1:0] board_pins_o,
  output logic [NUM_PINS-1:0] stored_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       stored_o <= '0;
    else if (!hold_i) stored_o <= mcu_pins_i;
  end

  assign board_pins_o = hold_i ? stored_o : mcu_pins_i;
endmodule
