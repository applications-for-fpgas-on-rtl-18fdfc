// tb_ca_code_gen: checks C/A codes of several PRNs.
// Reference: the Gold code built from the G1 and G2 sequences generated
// here with the textbook recursions, G2 delayed per PRN (G2 delay table of
// the GPS interface specification, independent of the tap pairs used by
// the generator). Also checks the published first ten chips of PRN 1 and
// PRN 2 (octal 1440 and 1620), the 1023-chip period and that chips only
// advance on chip_en_i.
// The code definition follows the public GPS signal specification.
module tb_ca_code_gen;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  int checks = 0, failures = 0;
  localparam int NP = 4;
  localparam int PRNS [NP]   = '{1, 2, 7, 32};
  localparam int S1S [NP]    = '{2, 3, 1, 4};
  localparam int S2S [NP]    = '{6, 7, 8, 9};
  localparam int DELAY [NP]  = '{5, 6, 139, 862};  // G2 code delays in chips
  logic [NP-1:0] chip, epoch;

  for (genvar i = 0; i < NP; i++) begin : g
    ca_code_gen #(.S1(S1S[i]), .S2(S2S[i])) dut (.clk, .rst_n, .load_i(load), .chip_en_i(en),
                                                .chip_o(chip[i]), .epoch_o(epoch[i]));
  end
  always #5 clk = ~clk;

  bit g1 [1023], g2 [1023];
  initial begin
    bit r1 [1:10], r2 [1:10];
    bit f1, f2;
    for (int k = 1; k <= 10; k++) begin r1[k] = 1; r2[k] = 1; end
    for (int n = 0; n < 1023; n++) begin
      g1[n] = r1[10];
      g2[n] = r2[10];
      f1 = r1[3] ^ r1[10];
      f2 = r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10];
      for (int k = 10; k > 1; k--) begin r1[k] = r1[k-1]; r2[k] = r2[k-1]; end
      r1[1] = f1; r2[1] = f2;
    end
  end

  initial begin
    int first10 [NP];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NP; i++) first10[i] = 0;
    for (int n = 0; n < 2046 + 3; n++) begin
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        bit e;
        e = g1[n % 1023] ^ g2[(n + 1023 - DELAY[i]) % 1023];
        checks++;
        if (chip[i] !== e) begin
          failures++;
          if (failures < 6) $display("PRN %0d chip %0d got %b exp %b", PRNS[i], n, chip[i], e);
        end
        if (n < 10) first10[i] = (first10[i] << 1) | int'(chip[i]);
        checks++;
        if (epoch[i] !== ((n % 1023) == 0)) failures++;
      end
      // advance one chip over two clocks: first clock idle
      en = 0;
      @(negedge clk);
      checks++;
      if (chip[0] !== (g1[n % 1023] ^ g2[(n + 1023 - DELAY[0]) % 1023])) failures++;
      en = 1;
      @(negedge clk);
      en = 0;
    end
    checks += 2;
    if (first10[0] != 'o1440) begin failures++; $display("PRN1 first chips %o", first10[0]); end
    if (first10[1] != 'o1620) begin failures++; $display("PRN2 first chips %o", first10[1]); end
    // load returns to the first chip
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    checks++;
    if (epoch !== '1) failures++;
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
