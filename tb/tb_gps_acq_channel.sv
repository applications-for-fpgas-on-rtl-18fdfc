// tb_gps_acq_channel: one acquisition channel with 4 carriers, random
// samples, code and carriers. A reference model accumulates the +/-1
// products, squares and sums them, and tracks the best (power, code phase,
// carrier) over several integration periods, including one where nothing
// beats the stored best. Checks after every compare and after best_clear.
// Reference: a behavioural model of the integrate / power / compare steps.
// The carrier count and integration length are reduced test sizes.
module tb_gps_acq_channel;
  localparam int NC = 4, AW = 8, CPW = 6;
  logic clk = 0, rst_n = 0;
  logic sum_en = 0, sample = 0, ca = 0, acc_clear = 0, power_en = 0, compare_en = 0, best_clear = 0;
  logic [NC-1:0] cosv = 0, sinv = 0;
  logic [CPW-1:0] cp = 0;
  logic [2*AW-1:0] bp;
  logic [CPW-1:0] bcp;
  logic [1:0] bk;
  int checks = 0, failures = 0;

  gps_acq_channel #(.NUM_CARRIERS(NC), .ACC_W(AW), .CP_W(CPW)) dut (
    .clk, .rst_n, .sum_en_i(sum_en), .sample_i(sample), .ca_i(ca), .cos_i(cosv), .sin_i(sinv),
    .acc_clear_i(acc_clear), .power_en_i(power_en), .compare_en_i(compare_en),
    .best_clear_i(best_clear), .code_phase_i(cp), .best_power_o(bp), .best_phase_o(bcp),
    .best_carrier_o(bk));
  always #5 clk = ~clk;

  int acc_i [NC], acc_q [NC];
  int best_p = 0, best_cp = 0, best_k = 0;

  task automatic integrate(int n, int bias);
    for (int k = 0; k < NC; k++) begin acc_i[k] = 0; acc_q[k] = 0; end
    @(negedge clk); acc_clear = 1; @(negedge clk); acc_clear = 0;
    for (int i = 0; i < n; i++) begin
      sample = 1'($urandom); ca = 1'($urandom);
      cosv = NC'($urandom); sinv = NC'($urandom);
      // carrier 'bias' correlates strongly with the sample
      if (bias >= 0) begin cosv[bias] = sample ~^ ca; sinv[bias] = (i % 3 == 0) ? sample ~^ ca : ~(sample ~^ ca); end
      sum_en = ($urandom % 5) != 0;
      if (sum_en)
        for (int k = 0; k < NC; k++) begin
          acc_i[k] += (sample ~^ cosv[k] ~^ ca) ? 1 : -1;
          acc_q[k] += (sample ~^ sinv[k] ~^ ca) ? 1 : -1;
        end
      @(negedge clk);
    end
    sum_en = 0;
  endtask

  task automatic power_compare(int phase);
    int mp, mk;
    mp = -1; mk = 0;
    for (int k = 0; k < NC; k++) begin
      int p;
      p = acc_i[k] * acc_i[k] + acc_q[k] * acc_q[k];
      if (p > mp) begin mp = p; mk = k; end
    end
    if (mp > best_p) begin best_p = mp; best_cp = phase; best_k = mk; end
    cp = CPW'(phase);
    power_en = 1; @(negedge clk); power_en = 0;
    compare_en = 1; @(negedge clk); compare_en = 0;
    checks++;
    if (bp !== 16'(best_p) || bcp !== CPW'(best_cp) || bk !== 2'(best_k)) begin
      failures++;
      $display("phase %0d: got p=%0d cp=%0d k=%0d exp p=%0d cp=%0d k=%0d", phase, bp, bcp, bk, best_p, best_cp, best_k);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    integrate(100, -1); power_compare(3);
    integrate(100, 2);  power_compare(17);
    integrate(100, -1); power_compare(18);   // weaker: best must stay
    integrate(110, 1);  power_compare(40);
    integrate(60, -1);  power_compare(41);
    @(negedge clk); best_clear = 1; @(negedge clk); best_clear = 0;
    checks++;
    if (bp !== 0) failures++;
    best_p = 0;
    integrate(50, 3); power_compare(5);
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
