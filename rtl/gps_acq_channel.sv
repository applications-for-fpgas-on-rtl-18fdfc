// gps_acq_channel: one satellite acquisition channel (one PRN, all carriers).
// For every sample (sum_en_i) and every replica carrier k the channel forms
//   I_k += (s XNOR cos_k XNOR ca),  Q_k += (s XNOR sin_k XNOR ca)
// where each XNOR is a 1-bit multiplication of +/-1 values (1 = +1) and the
// accumulators add +1 or -1. After the integration period the controller
// pulses power_en_i: P_k = I_k^2 + Q_k^2 for all carriers at once (two
// multipliers per carrier; no square root). compare_en_i then takes the
// largest P_k (lowest k on a tie) and, if it beats the stored best, records
// power, code phase and carrier index. acc_clear_i zeroes the accumulators
// (Increment state); best_clear_i zeroes the best values (new search).
// Timing: accumulators update on the clock edge of sum_en_i; power one clock
// after power_en_i; best values one clock after compare_en_i.
// From the description: XNOR multiplication, I/Q integration over 1 ms,
// 2 multipliers per carrier, keeping the best power and its code phase and
// Doppler. The single-cycle maximum search over carriers is this design's.
module gps_acq_channel #(
  parameter int unsigned NUM_CARRIERS = 20,
  parameter int unsigned ACC_W        = 16,
  parameter int unsigned CP_W         = 10
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            sum_en_i,
  input  logic                            sample_i,
  input  logic                            ca_i,
  input  logic [NUM_CARRIERS-1:0]         cos_i,
  input  logic [NUM_CARRIERS-1:0]         sin_i,
  input  logic                            acc_clear_i,
  input  logic                            power_en_i,
  input  logic                            compare_en_i,
  input  logic                            best_clear_i,
  input  logic [CP_W-1:0]                 code_phase_i,
  output logic [2*ACC_W-1:0]              best_power_o,
  output logic [CP_W-1:0]                 best_phase_o,
  output logic [$clog2(NUM_CARRIERS)-1:0] best_carrier_o
);
  localparam int unsigned PW = 2 * ACC_W;
  localparam int unsigned KW = $clog2(NUM_CARRIERS);

  logic signed [ACC_W-1:0] acc_i_q [NUM_CARRIERS];
  logic signed [ACC_W-1:0] acc_q_q [NUM_CARRIERS];
  logic        [PW-1:0]    pwr_q   [NUM_CARRIERS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_CARRIERS; k++) begin
        acc_i_q[k] <= '0;
        acc_q_q[k] <= '0;
      end
    end else if (acc_clear_i) begin
      for (int k = 0; k < NUM_CARRIERS; k++) begin
        acc_i_q[k] <= '0;
        acc_q_q[k] <= '0;
      end
    end else if (sum_en_i) begin
      for (int k = 0; k < NUM_CARRIERS; k++) begin
        acc_i_q[k] <= acc_i_q[k] + ((sample_i ~^ cos_i[k] ~^ ca_i) ? ACC_W'(1) : '1);
        acc_q_q[k] <= acc_q_q[k] + ((sample_i ~^ sin_i[k] ~^ ca_i) ? ACC_W'(1) : '1);
      end
    end
  end

  function automatic logic [PW-1:0] square(logic signed [ACC_W-1:0] a);
    logic signed [PW-1:0] e;
    e = PW'(a);
    return e * e;
  endfunction

  // 2 * NUM_CARRIERS multipliers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_CARRIERS; k++) pwr_q[k] <= '0;
    end else if (power_en_i) begin
      for (int k = 0; k < NUM_CARRIERS; k++)
        pwr_q[k] <= square(acc_i_q[k]) + square(acc_q_q[k]);
    end
  end

  logic [PW-1:0] max_p;
  logic [KW-1:0] max_k;
  always_comb begin
    max_p = pwr_q[0];
    max_k = '0;
    for (int k = 1; k < NUM_CARRIERS; k++) begin
      if (pwr_q[k] > max_p) begin
        max_p = pwr_q[k];
        max_k = KW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_power_o   <= '0;
      best_phase_o   <= '0;
      best_carrier_o <= '0;
    end else if (best_clear_i) begin
      best_power_o   <= '0;
      best_phase_o   <= '0;
      best_carrier_o <= '0;
    end else if (compare_en_i && max_p > best_power_o) begin
      best_power_o   <= max_p;
      best_phase_o   <= code_phase_i;
      best_carrier_o <= max_k;
    end
  end
endmodule
