// tb_wdt_cmd_decoder: every command byte produces exactly its one action
// pulse, one clock after rx_valid; unknown bytes produce none and are
// counted; the status byte reflects armed/hold and the last command.
// The command codes and status byte are this design's.
module tb_wdt_cmd_decoder;
  logic clk = 0, rst_n = 0, rxv = 0, armed = 0, hold = 0;
  logic [7:0] rx = 0, tx, bad;
  logic arm, kick, dis;
  int checks = 0, failures = 0;
  wdt_cmd_decoder dut (.clk, .rst_n, .rx_data_i(rx), .rx_valid_i(rxv), .armed_i(armed), .hold_i(hold),
                       .arm_o(arm), .kick_o(kick), .disarm_o(dis), .tx_data_o(tx), .bad_cmds_o(bad));
  always #5 clk = ~clk;
  initial begin
    int nbad;
    nbad = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [7:0] c;
      case ($urandom % 4)
        0: c = 8'hA1; 1: c = 8'hA2; 2: c = 8'hA3; default: c = 8'($urandom);
      endcase
      if (c != 8'hA1 && c != 8'hA2 && c != 8'hA3) nbad++;
      armed = 1'($urandom); hold = 1'($urandom);
      rx = c; rxv = 1;
      @(negedge clk);
      rxv = 0; rx = 8'($urandom);
      checks += 2;
      if ({arm, kick, dis} !== {c == 8'hA1, c == 8'hA2, c == 8'hA3}) begin failures++; $display("cmd %h -> %b%b%b", c, arm, kick, dis); end
      if (tx !== {armed, hold, 2'b00, c[3:0]}) failures++;
      @(negedge clk);
      checks++;
      if (arm | kick | dis) failures++;
    end
    checks++;
    if (bad != 8'(nbad)) begin failures++; $display("bad %0d exp %0d", bad, nbad); end
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
