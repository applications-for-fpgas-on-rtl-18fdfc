// gps_sat_acq_ctrl: state machine of the satellite acquisition module.
// For each code phase p = 0 .. CODE_PHASES-1 it streams one integration
// period (INT_SAMPLES samples, 1 ms at 16.384 MHz) of recorded samples from
// memory through the channels, then has them compute and compare power.
// States:
//   IDLE      wait for start_i
//   READ      Avalon read of one 32-bit word (held while waitrequest)
//   WAIT      wait for readdatavalid, keep the word
//   SUM       one sample per clock into the accumulators (sample_en_o);
//             NCOs and the code NCO advance with each sample
//   POWER     I^2 + Q^2 in all channels
//   COMPARE   update best power / code phase / carrier
//   INCREMENT clear accumulators and NCOs, reload the C/A generators
//   SKIP      advance the C/A generators one chip per clock until they are
//             p+1 chips ahead, then READ from the start of the record
//   DONE      pulse done_o, back to IDLE
// Memory layout (as written by the data acquisition module): bytes
// I(n), Q(n), I(n+1), Q(n+1) per word, each +1 or -1. The in-phase byte of
// each sample is used; its sign bit gives the 1-bit sample (1 = +1).
// Throughput with a zero-wait memory: 4 clocks per word, 2 clocks per sample.
// From the description: the Sum/Power/Compare/Increment/Skip sequence, the
// skipping of chips to reach the next code phase and the memory base
// address. The read/wait split and the use of the in-phase byte are this
// design's choices.
module gps_sat_acq_ctrl
  import gps_pkg::*;
#(
  parameter int unsigned INT_SAMPLES = 16384,
  parameter int unsigned CODE_PHASES = 1023,
  parameter int unsigned CP_W        = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,
  input  logic [31:0]     base_i,
  output avm_req_t        avm_req,
  input  avm_rsp_t        avm_rsp,
  // datapath control
  output logic            sample_en_o,
  output logic            sample_o,
  output logic            acc_clear_o,
  output logic            nco_clear_o,
  output logic            ca_load_o,
  output logic            chip_skip_o,
  output logic            power_en_o,
  output logic            compare_en_o,
  output logic            best_clear_o,
  output logic [CP_W-1:0] code_phase_o,
  output logic            busy_o,
  output logic            done_o
);
  localparam int unsigned SPW = 2;                 // samples per word
  localparam int unsigned SCW = $clog2(INT_SAMPLES + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_READ, S_WAIT, S_SUM, S_POWER, S_COMPARE, S_INCR, S_SKIP, S_DONE
  } state_t;
  state_t state_q;

  logic [31:0]     addr_q;
  logic [31:0]     word_q;
  logic [SCW-1:0]  scnt_q;     // samples integrated so far
  logic            sidx_q;     // sample within the word
  logic [CP_W-1:0] phase_q;
  logic [CP_W:0]   skip_q;     // chips still to skip

  assign avm_req.read      = (state_q == S_READ);
  assign avm_req.write     = 1'b0;
  assign avm_req.address   = addr_q;
  assign avm_req.writedata = '0;

  assign sample_en_o  = (state_q == S_SUM);
  assign sample_o     = sidx_q ? ~word_q[23] : ~word_q[7];
  assign power_en_o   = (state_q == S_POWER);
  assign compare_en_o = (state_q == S_COMPARE);
  assign acc_clear_o  = (state_q == S_INCR) || (state_q == S_IDLE && start_i);
  assign nco_clear_o  = acc_clear_o;
  assign ca_load_o    = acc_clear_o;
  assign best_clear_o = (state_q == S_IDLE && start_i);
  assign chip_skip_o  = (state_q == S_SKIP) && (skip_q != '0);
  assign code_phase_o = phase_q;
  assign busy_o       = (state_q != S_IDLE);
  assign done_o       = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      word_q  <= '0;
      scnt_q  <= '0;
      sidx_q  <= 1'b0;
      phase_q <= '0;
      skip_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_i) begin
          addr_q  <= base_i;
          scnt_q  <= '0;
          sidx_q  <= 1'b0;
          phase_q <= '0;
          skip_q  <= '0;
          state_q <= S_READ;
        end
        S_READ: if (!avm_rsp.waitrequest) state_q <= S_WAIT;
        S_WAIT: if (avm_rsp.readdatavalid) begin
          word_q  <= avm_rsp.readdata;
          sidx_q  <= 1'b0;
          state_q <= S_SUM;
        end
        S_SUM: begin
          scnt_q <= scnt_q + 1'b1;
          sidx_q <= ~sidx_q;
          if (scnt_q == SCW'(INT_SAMPLES - 1)) begin
            state_q <= S_POWER;
          end else if (sidx_q == 1'b1) begin
            addr_q  <= addr_q + 32'd4;
            state_q <= S_READ;
          end
        end
        S_POWER:   state_q <= S_COMPARE;
        S_COMPARE: begin
          if (phase_q == CP_W'(CODE_PHASES - 1)) begin
            state_q <= S_DONE;
          end else begin
            state_q <= S_INCR;
          end
        end
        S_INCR: begin
          phase_q <= phase_q + 1'b1;
          skip_q  <= {1'b0, phase_q} + 1'b1;
          addr_q  <= base_i;
          scnt_q  <= '0;
          state_q <= S_SKIP;
        end
        S_SKIP: begin
          if (skip_q == '0) state_q <= S_READ;
          else              skip_q  <= skip_q - 1'b1;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The read request stays up until the bus accepts it.
  a_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              avm_req.read && avm_rsp.waitrequest |=> avm_req.read && $stable(avm_req.address));

  logic unused;
  assign unused = ^{word_q[31:24], word_q[22:8], word_q[6:0], SPW[0]};
endmodule
