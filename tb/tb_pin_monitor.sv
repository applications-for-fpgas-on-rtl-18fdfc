// tb_pin_monitor: random pin activity with hold windows. Outside hold the
// board pins follow the microcontroller; during hold they must keep the
// value the pins had on the clock before hold rose, whatever the
// microcontroller's pins do.
// The sample-every-clock and hold behaviour follow the design.
module tb_pin_monitor;
  logic clk = 0, rst_n = 0, hold = 0;
  logic [7:0] mcu = 0, board, stored;
  int checks = 0, failures = 0;
  pin_monitor #(.NUM_PINS(8)) dut (.clk, .rst_n, .hold_i(hold), .mcu_pins_i(mcu),
                                   .board_pins_o(board), .stored_o(stored));
  always #5 clk = ~clk;
  initial begin
    logic [7:0] frozen, prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      prev = mcu;
      if (!hold && ($urandom % 40) == 0) begin hold = 1; frozen = prev; end
      else if (hold && ($urandom % 10) == 0) hold = 0;
      mcu = 8'($urandom);
      #1;
      checks++;
      if (board !== (hold ? frozen : mcu)) begin failures++; $display("cycle %0d board %h", i, board); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
