// tb_spi_slave: SPI mode 0 master model (SCK = clk/8) sends random bytes;
// each must appear on rx_data_o with one rx_valid_o pulse, and the slave's
// transmit byte (loaded at chip select) must arrive MSB first on MISO.
// SPI with 8 bits per transfer follows the design; mode 0 and the SCK
// ratio are this design's.
module tb_spi_slave;
  logic clk = 0, rst_n = 0, sck = 0, cs_n = 1, mosi = 0, miso, rxv;
  logic [7:0] tx = 0, rx;
  int checks = 0, failures = 0, pulses = 0;

  spi_slave dut (.clk, .rst_n, .sck_i(sck), .cs_n_i(cs_n), .mosi_i(mosi), .miso_o(miso),
                 .tx_data_i(tx), .rx_data_o(rx), .rx_valid_o(rxv));
  always #5 clk = ~clk;
  logic [7:0] last_rx;
  always @(posedge clk) if (rxv) begin pulses++; last_rx = rx; end

  task automatic xfer(logic [7:0] mo, output logic [7:0] mi);
    cs_n = 0;
    repeat (8) @(negedge clk);
    for (int b = 7; b >= 0; b--) begin
      mosi = mo[b];
      repeat (4) @(negedge clk);
      sck = 1; mi[b] = miso;
      repeat (4) @(negedge clk);
      sck = 0;
    end
    repeat (8) @(negedge clk);
    cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    logic [7:0] mi, mo;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      mo = 8'($urandom); tx = 8'($urandom);
      pulses = 0;
      xfer(mo, mi);
      checks += 3;
      if (pulses != 1) begin failures++; $display("pulses %0d", pulses); end
      if (last_rx !== mo) begin failures++; $display("rx %h exp %h", last_rx, mo); end
      if (mi !== tx) begin failures++; $display("miso %h exp %h", mi, tx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
