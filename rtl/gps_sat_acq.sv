// gps_sat_acq: GPS satellite signal acquisition (parallel serial search).
// Searches recorded samples for NUM_CH PRNs at once over NUM_CARRIERS
// Doppler bins and all code phases, and reports per PRN the highest
// correlation power with its code phase and Doppler bin.
// Structure: NUM_CARRIERS 1-bit NCOs make the replica carriers
// (IF + (k - NUM_CARRIERS/2) * 500 Hz, k = 0 .. NUM_CARRIERS-1); one more
// NCO makes the 1.023 MHz chip enable; NUM_PRN C/A code generators (one per
// PRN) run side by side; NUM_CH channels correlate. The bank field selects
// which group of NUM_CH PRNs feeds the channels (PRN = bank*NUM_CH + ch + 1).
// All NCOs step once per processed sample, so their frequency scale is the
// frontend sample rate whatever the system clock. gps_sat_acq_ctrl
// sequences the search and reads the samples through the Avalon master.
// Avalon-MM slave registers (read latency 0):
//   0 configuration/status W: [0] start, [5:4] PRN bank, [10:8] channel
//                          shown in registers 2 and 3
//                          R: [1] busy, [2] done, [5:4] bank, [10:8] channel
//   1 memory base address of the recorded samples
//   2 best power of the shown channel
//   3 [CP_W-1:0] code phase (chips), [20:16] Doppler bin k of that channel
// From the description: 20 carrier generators at 500 Hz spacing, 32 C/A
// generators, 8 channels, 16-bit NCOs, the four registers. Register bit
// positions, the carrier centre (frontend IF, 4.092 MHz assumed) and the
// bank selection are this design's choices.
module gps_sat_acq
  import gps_pkg::*;
#(
  parameter int unsigned NUM_CH       = 8,
  parameter int unsigned NUM_CARRIERS = 20,
  parameter int unsigned STEP_HZ      = 500,
  parameter int unsigned INT_SAMPLES  = 16384,
  parameter int unsigned CODE_PHASES  = 1023
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output avm_req_t    avm_req,
  input  avm_rsp_t    avm_rsp,
  output logic        done_o
);
  localparam int unsigned CP_W  = $clog2(CODE_PHASES);
  localparam int unsigned ACC_W = $clog2(INT_SAMPLES) + 2;
  localparam int unsigned KW    = $clog2(NUM_CARRIERS);
  localparam int unsigned NBANK = NUM_PRN / NUM_CH;
  localparam int unsigned BW    = (NBANK > 1) ? $clog2(NBANK) : 1;
  localparam int unsigned CHW   = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  // ---------------- registers
  logic            start_q;
  logic [BW-1:0]   bank_q;
  logic [CHW-1:0]  chsel_q;
  logic [31:0]     base_q;
  logic            done_q;
  logic            busy;

  logic [2*ACC_W-1:0] best_pwr [NUM_CH];
  logic [CP_W-1:0]    best_cp  [NUM_CH];
  logic [KW-1:0]      best_k   [NUM_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      bank_q  <= '0;
      chsel_q <= '0;
      base_q  <= '0;
      done_q  <= 1'b0;
    end else begin
      start_q <= 1'b0;
      if (done_o) done_q <= 1'b1;
      if (avs_write) begin
        unique case (avs_address)
          2'd0: begin
            chsel_q <= avs_writedata[8 +: CHW];
            if (!busy) bank_q <= avs_writedata[4 +: BW];
            if (avs_writedata[0] && !busy) begin
              start_q <= 1'b1;
              done_q  <= 1'b0;
            end
          end
          2'd1: base_q <= avs_writedata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    avs_readdata = '0;
    unique case (avs_address)
      2'd0: begin
        avs_readdata[1]          = busy;
        avs_readdata[2]          = done_q;
        avs_readdata[4 +: BW]    = bank_q;
        avs_readdata[8 +: CHW]   = chsel_q;
      end
      2'd1: avs_readdata = base_q;
      2'd2: avs_readdata = 32'(best_pwr[chsel_q]);
      default: begin
        avs_readdata[CP_W-1:0] = best_cp[chsel_q];
        avs_readdata[16 +: KW] = best_k[chsel_q];
      end
    endcase
  end

  // ---------------- control
  logic sample_en, sample, acc_clear, nco_clear, ca_load, chip_skip;
  logic power_en, compare_en, best_clear;
  logic [CP_W-1:0] code_phase;

  gps_sat_acq_ctrl #(.INT_SAMPLES(INT_SAMPLES), .CODE_PHASES(CODE_PHASES), .CP_W(CP_W)) u_ctrl (
    .clk, .rst_n, .start_i(start_q), .base_i(base_q), .avm_req, .avm_rsp,
    .sample_en_o(sample_en), .sample_o(sample), .acc_clear_o(acc_clear),
    .nco_clear_o(nco_clear), .ca_load_o(ca_load), .chip_skip_o(chip_skip),
    .power_en_o(power_en), .compare_en_o(compare_en), .best_clear_o(best_clear),
    .code_phase_o(code_phase), .busy_o(busy), .done_o(done_o)
  );

  // ---------------- replica carriers
  logic [NUM_CARRIERS-1:0] cos_w, sin_w;
  for (genvar k = 0; k < NUM_CARRIERS; k++) begin : g_car
    localparam longint F = longint'(IF_HZ) + (longint'(k) - longint'(NUM_CARRIERS) / 2) * longint'(STEP_HZ);
    logic wrap_unused;
    nco_1bit #(.N(NCO_BITS)) u_nco (
      .clk, .rst_n, .en_i(sample_en), .clear_i(nco_clear),
      .incr_i(nco_incr(longint'(F), longint'(FS_HZ))), .sin_o(sin_w[k]), .cos_o(cos_w[k]), .wrap_o(wrap_unused)
    );
  end

  // ---------------- 1.023 MHz chip clock and C/A codes
  logic chip_tick, code_sin_unused, code_cos_unused, chip_en;
  nco_1bit #(.N(NCO_BITS)) u_code_nco (
    .clk, .rst_n, .en_i(sample_en), .clear_i(nco_clear),
    .incr_i(nco_incr(longint'(CHIP_HZ), longint'(FS_HZ))), .sin_o(code_sin_unused), .cos_o(code_cos_unused),
    .wrap_o(chip_tick)
  );
  // A chip boundary inside a sample takes effect for the next sample.
  assign chip_en = chip_tick | chip_skip;

  logic [NUM_PRN-1:0] ca_w, epoch_unused;
  for (genvar p = 0; p < NUM_PRN; p++) begin : g_prn
    localparam logic [7:0] T = g2_taps(p + 1);
    ca_code_gen #(.S1(int'(T[7:4])), .S2(int'(T[3:0]))) u_ca (
      .clk, .rst_n, .load_i(ca_load), .chip_en_i(chip_en),
      .chip_o(ca_w[p]), .epoch_o(epoch_unused[p])
    );
  end

  // ---------------- channels
  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic ca_sel;
    assign ca_sel = ca_w[int'(bank_q) * NUM_CH + c];
    gps_acq_channel #(.NUM_CARRIERS(NUM_CARRIERS), .ACC_W(ACC_W), .CP_W(CP_W)) u_ch (
      .clk, .rst_n, .sum_en_i(sample_en), .sample_i(sample), .ca_i(ca_sel),
      .cos_i(cos_w), .sin_i(sin_w), .acc_clear_i(acc_clear), .power_en_i(power_en),
      .compare_en_i(compare_en), .best_clear_i(best_clear), .code_phase_i(code_phase),
      .best_power_o(best_pwr[c]), .best_phase_o(best_cp[c]), .best_carrier_o(best_k[c])
    );
  end

  logic unused;
  assign unused = avs_read ^ code_sin_unused ^ code_cos_unused ^ (^epoch_unused);
endmodule
