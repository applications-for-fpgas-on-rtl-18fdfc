// camera_if: serial camera to microcontroller bridge.
// The camera sends 12-bit packets (start bit high, 10 pixel bits, stop bit
// low) at about 320 Mbit/s on one LVDS pair with no separate clock. Two
// clocks at the bit rate, 90 degrees apart (from a PLL outside this block),
// sample every bit four times (lvds_oversampler). The edge detector picks
// the sample farthest from the transitions (lvds_edge_detect), the
// deserializer finds the packet boundaries and outputs pixels
// (lvds_deserializer). Pixels are buffered (sync_fifo), split into byte
// pairs (pixel_byte_encoder) and sent on a standard UART (uart_tx) that the
// microcontroller can receive. Everything after the first capture flops
// runs on clk0.
// Status outputs: locked_o (packet framing found), frame_err_o, drops_o
// (pixels lost because the buffer was full), sel_o (chosen phase),
// sel_changes_o (how often the phase was re-chosen), pixel_* (recovered
// pixels, before the buffer).
module camera_if #(
  parameter int unsigned FIFO_DEPTH   = 512,
  parameter int unsigned CLKS_PER_BIT = 80
) (
  input  logic        clk0,
  input  logic        clk90,
  input  logic        rst_n,
  input  logic        lvds_i,
  output logic        uart_tx_o,
  output logic [9:0]  pixel_o,
  output logic        pixel_valid_o,
  output logic        locked_o,
  output logic [7:0]  frame_err_o,
  output logic [15:0] drops_o,
  output logic [1:0]  sel_o,
  output logic [7:0]  sel_changes_o
);
  logic [3:0] samp, samp_d, edges;
  logic       sel_change;
  logic [9:0] fifo_data;
  logic       fifo_empty, fifo_full, fifo_rd;
  logic [7:0] byte_d;
  logic       byte_valid, byte_ready;

  lvds_oversampler u_os (.clk0, .clk90, .rst_n, .din_i(lvds_i), .samp_o(samp));

  lvds_edge_detect u_ed (
    .clk(clk0), .rst_n, .samp_i(samp), .edge_o(edges), .samp_d_o(samp_d),
    .sel_o, .sel_change_o(sel_change)
  );

  lvds_deserializer u_des (
    .clk(clk0), .rst_n, .samp_i(samp_d), .sel_i(sel_o), .pixel_o, .pixel_valid_o,
    .locked_o, .frame_err_o
  );

  sync_fifo #(.WIDTH(10), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk(clk0), .rst_n, .wr_en_i(pixel_valid_o), .wr_data_i(pixel_o),
    .rd_en_i(fifo_rd), .rd_data_o(fifo_data), .empty_o(fifo_empty), .full_o(fifo_full),
    .drops_o
  );

  pixel_byte_encoder u_enc (
    .clk(clk0), .rst_n, .pixel_i(fifo_data), .pixel_valid_i(!fifo_empty),
    .pixel_ready_o(fifo_rd), .byte_o(byte_d), .byte_valid_o(byte_valid),
    .byte_ready_i(byte_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(clk0), .rst_n, .data_i(byte_d), .valid_i(byte_valid), .ready_o(byte_ready),
    .tx_o(uart_tx_o)
  );

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n)                                  sel_changes_o <= '0;
    else if (sel_change && sel_changes_o != '1)  sel_changes_o <= sel_changes_o + 1'b1;
  end

  logic unused;
  assign unused = ^{edges, fifo_full};
endmodule
