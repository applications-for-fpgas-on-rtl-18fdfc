// tb_uart_tx: sends random bytes back to back (CLKS_PER_BIT = 8) and
// decodes the line cycle by cycle. Checks the idle level, start bit, LSB
// first data, stop bit, that every bit lasts exactly CLKS_PER_BIT clocks
// and that a frame occupies exactly 10 bit times.
// The 8N1 format is this design's choice for the microcontroller's UART;
// the short bit time is a test size.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, valid = 0, ready, tx;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data_i(data), .valid_i(valid), .ready_o(ready), .tx_o(tx));
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    checks++; if (tx !== 1) failures++;
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [7:0] d;
      logic [9:0] frame;
      int gap;
      d = 8'($urandom);
      gap = $urandom % 3;
      repeat (gap) begin @(negedge clk); checks++; if (tx !== 1 || !ready) failures++; end
      data = d; valid = 1;
      @(negedge clk);
      valid = 0; data = 8'($urandom);
      // the frame starts on the accepted clock edge
      for (int bit_i = 0; bit_i < 10; bit_i++) begin
        frame[bit_i] = tx;
        for (int c = 0; c < CPB; c++) begin
          checks++;
          if (tx !== frame[bit_i]) begin failures++; $display("bit %0d changed within its time", bit_i); end
          if (ready) begin failures++; $display("ready during frame"); end
          if (!(bit_i == 9 && c == CPB - 1)) @(negedge clk);
        end
      end
      @(negedge clk);
      checks += 2;
      if (frame !== {1'b1, d, 1'b0}) begin failures++; $display("frame %b for %h", frame, d); end
      if (!ready) begin failures++; $display("not ready after 10 bits"); end
    end
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
