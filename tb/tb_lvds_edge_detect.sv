// tb_lvds_edge_detect: feeds oversampled random data (4 samples per bit,
// bit boundaries at sample phase phi) directly as samp_i.
// Checks: edge_o matches a reference (sample differs from the sample one
// quarter bit earlier), samp_d_o is samp_i delayed one clock, sel_o settles
// on (phi + 2) mod 4 within a few edges for every phi, the phase follows a
// change of phi, sel_change_o pulses once per change, and a single flipped
// sample (a glitch) never moves the selection.
module tb_lvds_edge_detect;
  logic clk = 0, rst_n = 0;
  logic [3:0] samp = 0, edges, samp_d;
  logic [1:0] sel;
  logic       chg;
  int checks = 0, failures = 0, changes = 0;
  lvds_edge_detect dut (.clk, .rst_n, .samp_i(samp), .edge_o(edges), .samp_d_o(samp_d), .sel_o(sel), .sel_change_o(chg));
  always #5 clk = ~clk;
  always @(posedge clk) if (chg) changes++;

  logic cur_bit = 0;
  logic last_s = 0;
  logic [3:0] prev_samp = 0;
  // one clock of samples with bit boundaries at phase phi; glitch flips sample g (g<4)
  task automatic step(int phi, int g);
    logic [3:0] s;
    for (int k = 0; k < 4; k++) begin
      if (k == phi) cur_bit = 1'($urandom);
      s[k] = cur_bit;
    end
    if (g < 4) s[g] = ~s[g];
    samp = s;
    @(negedge clk);
    checks += 2;
    if (edges !== (s ^ {s[2:0], last_s})) begin failures++; $display("edges %b for %b", edges, s); end
    if (samp_d !== s) failures++;
    last_s = s[3];
  endtask

  initial begin
    int n0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      int phi;
      phi = r % 4;
      n0 = changes;
      repeat (40) step(phi, 4);
      checks += 2;
      if (sel !== 2'(phi + 2)) begin failures++; $display("phi %0d sel %0d", phi, sel); end
      // the reset phase (2) already suits phi = 0; every later phi is new
      if (changes - n0 != (r == 0 ? 0 : 1)) begin
        failures++; $display("phi %0d changes %0d", phi, changes - n0);
      end
      // isolated glitches, 20 clocks apart, at a sample not adjacent to the real edge
      n0 = changes;
      for (int gl = 0; gl < 5; gl++) begin
        step(phi, (phi + 2) % 4);
        repeat (20) step(phi, 4);
      end
      checks += 2;
      if (changes != n0) begin failures++; $display("glitch moved phase (phi %0d)", phi); end
      if (sel !== 2'(phi + 2)) failures++;
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
