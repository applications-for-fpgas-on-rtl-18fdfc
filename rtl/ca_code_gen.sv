// ca_code_gen: GPS coarse/acquisition (Gold) code generator for one PRN.
// Two 10-stage LFSRs: G1 = 1 + x^3 + x^10 and G2 = 1 + x^2 + x^3 + x^6 +
// x^8 + x^9 + x^10, both starting from all ones. The chip is
// G1[10] xor (G2[S1] xor G2[S2]); S1/S2 are the PRN's phase-selector taps
// (parameters, from gps_pkg::g2_taps). The registers advance one chip on
// every cycle with chip_en_i high (driven by the 1.023 MHz NCO, or by the
// Skip state to slip the code phase). load_i reloads all ones. The code
// repeats after 1023 chips; epoch_o is high while the generator sits at its
// first chip. chip_o is the raw code bit; the correlators multiply with
// XNOR, so a 1 stands for +1 and a 0 for -1.
// The description names the LFSR and S1/S2 parameters; polynomials and taps
// come from the public GPS signal specification.
module ca_code_gen #(
  parameter int unsigned S1 = 2,
  parameter int unsigned S2 = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load_i,
  input  logic chip_en_i,
  output logic chip_o,
  output logic epoch_o
);
  // bit index i holds stage i+1
  logic [9:0] g1_q, g2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1_q <= '1;
      g2_q <= '1;
    end else if (load_i) begin
      g1_q <= '1;
      g2_q <= '1;
    end else if (chip_en_i) begin
      g1_q <= {g1_q[8:0], g1_q[2] ^ g1_q[9]};
      g2_q <= {g2_q[8:0], g2_q[1] ^ g2_q[2] ^ g2_q[5] ^ g2_q[7] ^ g2_q[8] ^ g2_q[9]};
    end
  end

  assign chip_o  = g1_q[9] ^ g2_q[S1-1] ^ g2_q[S2-1];
  assign epoch_o = (g1_q == 10'h3FF);
endmodule
