// tb_gps_data_acq: acquisition state machine with a modelled FIFO and a
// memory port that accepts writes after random delays.
// Single mode: exactly one buffer (SAMPLES_PER_BUF samples) is written at
// base, word n holding bytes (+/-1) of samples 2n and 2n+1 in the order
// I, Q, I, Q; then done. Continuous mode: buffers alternate (base, base +
// buffer size, base, ...) until enable drops; buf_done reports each one.
// The cycle count of a buffer with an always-ready FIFO and memory is
// checked: 4 clocks per word (2 shift, copy, increment) plus the switch.
// The byte encoding (+1 -> 0x01, -1 -> 0xFF) and the state sequence follow
// the design; buffer sizes are reduced test sizes.
module tb_gps_data_acq;
  localparam int SPB = 16;                 // samples per buffer
  localparam int WPB = SPB / 2;
  logic clk = 0, rst_n = 0, start = 0, enable = 0, cont = 0;
  logic [31:0] base = 32'h0000_1000;
  logic fifo_empty, fifo_rd, wr_req, wr_ack, busy, done, buf_done, last_buf;
  logic [1:0] fifo_data;
  logic [31:0] wr_addr, wr_data;
  int checks = 0, failures = 0;
  int stream [$];
  bit first_pending = 0;
  int nsent = 0, fifo_gap = 0, slow_mem = 1;
  logic [1:0] src [4096];

  gps_data_acq #(.SAMPLES_PER_BUF(SPB)) dut (
    .clk, .rst_n, .start_i(start), .enable_i(enable), .continuous_i(cont), .base_i(base),
    .fifo_empty_i(fifo_empty), .fifo_data_i(fifo_data), .fifo_rd_o(fifo_rd),
    .wr_req_o(wr_req), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .wr_ack_i(wr_ack),
    .busy_o(busy), .done_o(done), .buf_done_o(buf_done), .last_buf_o(last_buf));

  always #5 clk = ~clk;

  assign fifo_empty = (stream.size() == 0);
  assign fifo_data  = stream.size() ? src[stream[0] % 4096] : 2'b00;
  bit pend = 0;
  always @(negedge clk) pend = fifo_rd && !fifo_empty;
  always @(posedge clk) begin
    #1;
    if (pend && stream.size()) begin
      if (first_pending) begin first_sample = stream[0]; first_pending = 0; end
      void'(stream.pop_front());
    end
    if (fifo_gap == 0 || ($urandom % 3) == 0) begin
      stream.push_back(nsent);
      nsent++;
    end
  end
  always @(negedge clk) wr_ack <= slow_mem ? (($urandom % 3) == 0) : 1'b1;

  function automatic logic [7:0] s8(logic b); return b ? 8'h01 : 8'hFF; endfunction

  int words = 0, bufs = 0, first_sample = 0;
  always @(posedge clk) begin
    if (wr_req && wr_ack) begin
      int n, b, w;
      logic [31:0] exp_addr, exp_data;
      n = first_sample + 2 * words;
      b = words / WPB; w = words % WPB;
      exp_addr = base + ((b % 2) ? SPB * 2 : 0) + 4 * w;
      exp_data = {s8(src[(n+1)%4096][0]), s8(src[(n+1)%4096][1]), s8(src[n%4096][0]), s8(src[n%4096][1])};
      checks++;
      if (wr_addr !== exp_addr || wr_data !== exp_data) begin
        failures++;
        if (failures < 6) $display("word %0d addr %h/%h data %h/%h", words, wr_addr, exp_addr, wr_data, exp_data);
      end
      words++;
    end
    if (buf_done) bufs++;
  end

  task automatic run(bit c, int nbufs, output int cycles);
    @(negedge clk);
    stream.delete();
    first_pending = 1;
    words = 0; bufs = 0;
    enable = 1; cont = c; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!(c ? bufs >= nbufs : done)) begin
      @(negedge clk); cycles++;
      if (c && bufs == nbufs - 1) enable = 0;
      if (cycles > 100000) break;
    end
    while (busy) @(negedge clk);
    enable = 0;
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 4096; i++) src[i] = 2'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single mode, random memory delays
    run(0, 1, cyc);
    checks += 2;
    if (words != WPB) begin failures++; $display("single: %0d words", words); end
    if (!done || last_buf !== 0) failures++;
    // continuous mode: 3 buffers
    run(1, 3, cyc);
    checks += 2;
    if (words != 3 * WPB) begin failures++; $display("cont: %0d words", words); end
    if (last_buf !== 0) failures++;          // buffers 0,1,0
    // rate: memory always ready, FIFO never empty
    slow_mem = 0;
    run(0, 1, cyc);
    checks++;
    if (cyc < 4 * WPB || cyc > 4 * WPB + 4) begin failures++; $display("cycles %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
