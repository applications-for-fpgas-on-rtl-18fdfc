// tb_lvds_oversampler: clk0 and clk90 run at the bit rate (period 40,
// clk90 delayed by 10). The line changes at random times away from the
// sampling edges. A model records the line at 0, 90, 180 and 270 degrees of
// every clk0 period; samp_o after the next clk0 rising edge must equal those
// four values in time order. Also checks the one-period latency.
// The two quadrature clocks and four samples per bit follow the design.
module tb_lvds_oversampler;
  logic clk0 = 0, clk90 = 0, rst_n = 0, din = 0;
  logic [3:0] samp;
  int checks = 0, failures = 0;
  lvds_oversampler dut (.clk0, .clk90, .rst_n, .din_i(din), .samp_o(samp));
  always #20 clk0 = ~clk0;
  initial begin #10; forever #20 clk90 = ~clk90; end
  // line changes 5 units after each quarter edge, randomly
  initial forever begin #5; din = 1'($urandom); #5; end

  logic [3:0] rec, prev_rec;
  initial begin
    rec = 0; prev_rec = 0;
    #3 rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(posedge clk0); rec[0] = din;
      #1;
      if (c > 1) begin
        checks++;
        if (samp !== prev_rec) begin failures++; $display("cycle %0d samp %b exp %b", c, samp, prev_rec); end
      end
      @(posedge clk90); rec[1] = din;
      @(negedge clk0);  rec[2] = din;
      @(negedge clk90); rec[3] = din;
      prev_rec = rec;
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
