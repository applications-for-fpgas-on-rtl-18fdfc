// watchdog_timer: counter-based watchdog with a timed reset pulse.
// While armed the counter increments every clock; a kick clears it. When it
// reaches TIMEOUT_CYCLES the timer first raises hold_o (so the pin monitor
// freezes the microcontroller's control lines), then drives the active-low
// reset mcu_rst_n_o for RESET_CYCLES clocks, keeps hold_o for HOLD_CYCLES
// more while the microcontroller boots, and returns to idle (disarmed).
// After power-up the timer is armed once by itself, so the microcontroller
// gets one reset pulse at start-up, as described for the board.
// States: IDLE (disarmed), COUNT, RESET, BOOT.
// Interface: arm_i arms (and clears the count), kick_i clears the count,
// disarm_i stops. timeouts_o counts expirations (saturating).
// From the description: self-incrementing counter, periodic clearing by the
// microcontroller, timeout resets the microcontroller with an active-low
// pulse of about 1 s, the pin monitor is told before the reset, return to
// idle afterwards. The 2 s timeout, the boot hold time and the power-up arming
// are this design's choices (the board test only shows the timeout < 10 s).
module watchdog_timer #(
  parameter int unsigned CLK_HZ         = 20_000_000,
  parameter int unsigned TIMEOUT_CYCLES = 2 * CLK_HZ,
  parameter int unsigned RESET_CYCLES   = CLK_HZ,
  parameter int unsigned HOLD_CYCLES    = CLK_HZ / 2,
  parameter bit          ARM_AT_RESET   = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       arm_i,
  input  logic       kick_i,
  input  logic       disarm_i,
  output logic       mcu_rst_n_o,
  output logic       hold_o,
  output logic       armed_o,
  output logic [7:0] timeouts_o
);
  localparam int unsigned CW = $clog2(TIMEOUT_CYCLES + RESET_CYCLES + HOLD_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_COUNT, S_RESET, S_BOOT} state_t;
  state_t        state_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ARM_AT_RESET ? S_COUNT : S_IDLE;
      cnt_q      <= '0;
      timeouts_o <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (arm_i) begin
          cnt_q   <= '0;
          state_q <= S_COUNT;
        end
        S_COUNT: begin
          if (disarm_i) begin
            state_q <= S_IDLE;
          end else if (arm_i || kick_i) begin
            cnt_q <= '0;
          end else if (cnt_q == CW'(TIMEOUT_CYCLES - 1)) begin
            cnt_q      <= '0;
            state_q    <= S_RESET;
            if (timeouts_o != 8'hFF) timeouts_o <= timeouts_o + 1'b1;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_RESET: begin
          if (cnt_q == CW'(RESET_CYCLES - 1)) begin
            cnt_q   <= '0;
            state_q <= S_BOOT;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_BOOT: begin
          if (cnt_q == CW'(HOLD_CYCLES - 1)) begin
            cnt_q   <= '0;
            state_q <= S_IDLE;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign mcu_rst_n_o = (state_q != S_RESET);
  assign hold_o      = (state_q == S_RESET) || (state_q == S_BOOT);
  assign armed_o     = (state_q == S_COUNT);
endmodule
