// gps_data_acq: GPS data acquisition module (frontend samples -> memory words).
// A Moore state machine pulls {I,Q} bit pairs out of the clock-crossing FIFO
// into a 4-bit shift register (two samples). Each bit of the register is
// expanded to a signed byte (bit 1 -> +1 = 8'h01, bit 0 -> -1 = 8'hFF) and
// the four bytes are written as one 32-bit word. Byte order in the word,
// lowest address first: I(n), Q(n), I(n+1), Q(n+1).
// Words go to one of two equal buffers laid out back to back from base_i:
// buffer 0 at base_i, buffer 1 at base_i + BUF_BYTES. One buffer holds 4 ms
// of samples. In single mode the module fills buffer 0 and stops; in
// continuous mode it alternates between the buffers until enable_i drops,
// so software can read one buffer while the other is being filled.
// States: IDLE, SHIFT (take bits from FIFO), COPY (write the word, held
// until the bus accepts it), INCREMENT (address += 4), SWITCH (jump to the
// other buffer), DONE (flag completion, back to IDLE).
// Interface: start_i pulse starts; wr_* is a request/accept write port
// (held while wr_ack_i is low). buf_done_o pulses when a buffer is full,
// last_buf_o says which one. FIFO data is show-ahead.
// From the description: the states, the 1-bit to signed 8-bit conversion,
// 32-bit words, two 4 ms buffers. Byte order, the single/continuous modes
// and the buffer layout are this design's choices.
module gps_data_acq #(
  parameter int unsigned SAMPLES_PER_BUF = 65536  // 4 ms at 16.384 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        enable_i,
  input  logic        continuous_i,
  input  logic [31:0] base_i,
  // FIFO read side
  input  logic        fifo_empty_i,
  input  logic [1:0]  fifo_data_i,   // {I, Q}
  output logic        fifo_rd_o,
  // memory write port
  output logic        wr_req_o,
  output logic [31:0] wr_addr_o,
  output logic [31:0] wr_data_o,
  input  logic        wr_ack_i,
  // status
  output logic        busy_o,
  output logic        done_o,
  output logic        buf_done_o,
  output logic        last_buf_o
);
  localparam int unsigned WORDS_PER_BUF = SAMPLES_PER_BUF / 2;
  localparam int unsigned BUF_BYTES     = WORDS_PER_BUF * 4;
  localparam int unsigned WCW           = $clog2(WORDS_PER_BUF);

  typedef enum logic [2:0] {S_IDLE, S_SHIFT, S_COPY, S_INCR, S_SWITCH, S_DONE} state_t;
  state_t state_q;

  logic [3:0]     sr_q;       // {I(n), Q(n), I(n+1), Q(n+1)}
  logic           half_q;     // one sample held in the register
  logic [31:0]    addr_q;
  logic [WCW-1:0] wcnt_q;
  logic           buf_q;

  function automatic logic [7:0] to_s8(logic b);
    return b ? 8'sh01 : 8'shFF;
  endfunction

  assign fifo_rd_o  = (state_q == S_SHIFT) && !fifo_empty_i;
  assign wr_req_o   = (state_q == S_COPY);
  assign wr_addr_o  = addr_q;
  assign wr_data_o  = {to_s8(sr_q[0]), to_s8(sr_q[1]), to_s8(sr_q[2]), to_s8(sr_q[3])};
  assign busy_o     = (state_q != S_IDLE);
  assign buf_done_o = (state_q == S_SWITCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      sr_q       <= '0;
      half_q     <= 1'b0;
      addr_q     <= '0;
      wcnt_q     <= '0;
      buf_q      <= 1'b0;
      done_o     <= 1'b0;
      last_buf_o <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_i) begin
          addr_q  <= base_i;
          wcnt_q  <= '0;
          buf_q   <= 1'b0;
          half_q  <= 1'b0;
          done_o  <= 1'b0;
          state_q <= S_SHIFT;
        end
        S_SHIFT: if (!fifo_empty_i) begin
          sr_q   <= {sr_q[1:0], fifo_data_i};
          half_q <= ~half_q;
          if (half_q) state_q <= S_COPY;
        end
        S_COPY: if (wr_ack_i) state_q <= S_INCR;
        S_INCR: begin
          addr_q <= addr_q + 32'd4;
          wcnt_q <= wcnt_q + 1'b1;
          state_q <= (wcnt_q == WCW'(WORDS_PER_BUF - 1)) ? S_SWITCH : S_SHIFT;
        end
        S_SWITCH: begin
          last_buf_o <= buf_q;
          wcnt_q     <= '0;
          if (continuous_i && enable_i) begin
            buf_q   <= ~buf_q;
            addr_q  <= buf_q ? base_i : base_i + BUF_BYTES;
            state_q <= S_SHIFT;
          end else begin
            state_q <= S_DONE;
          end
        end
        S_DONE: begin
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A write request is held until the bus accepts it.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           wr_req_o && !wr_ack_i |=> wr_req_o && $stable(wr_data_o) && $stable(wr_addr_o));
endmodule
