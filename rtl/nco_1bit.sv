// nco_1bit: 1-bit numerically controlled oscillator.
// A phase accumulator of N bits adds the phase increment on every enabled
// clock (one enable per frontend sample, so the frequency scale is the
// sample rate, not the system clock). No sine table is used: the 1-bit sine
// and cosine are read straight from the two top accumulator bits with simple
// gates. Output encoding follows the sample encoding: 1 means +1, 0 means -1.
//   sin_o = 1 for phase in [0, pi)            -> ~acc[N-1]
//   cos_o = 1 for phase in [-pi/2, pi/2)      -> acc[N-1] == acc[N-2]
// wrap_o pulses (combinationally, with en_i) when the accumulator overflows;
// it is used as the 1.023 MHz chip enable of the C/A code generators.
// clear_i returns the phase to zero. Timing: outputs are registered state,
// they change one clock after an enabled cycle.
// Follows the description: 16-bit accumulator, increment = f*2^N/fclk, no
// lookup table. The exact gate mapping of sin/cos and the clear are this
// design's choices.
module nco_1bit #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_i,
  input  logic         clear_i,
  input  logic [N-1:0] incr_i,
  output logic         sin_o,
  output logic         cos_o,
  output logic         wrap_o
);
  logic [N-1:0] acc_q;
  logic [N:0]   sum;

  assign sum = {1'b0, acc_q} + {1'b0, incr_i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc_q <= '0;
    else if (clear_i) acc_q <= '0;
    else if (en_i)    acc_q <= sum[N-1:0];
  end

  assign sin_o  = ~acc_q[N-1];
  assign cos_o  = ~(acc_q[N-1] ^ acc_q[N-2]);
  assign wrap_o = en_i & ~clear_i & sum[N];
endmodule
