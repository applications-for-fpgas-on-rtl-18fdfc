// tb_nco_1bit: checks the 1-bit NCO against a reference phase accumulator.
// Random enables, clears and increments; sine/cosine signs and the wrap
// pulse are compared every cycle. A run with the C/A chip increment (4092)
// over 16384 enabled cycles must give exactly 1023 wraps (1.023 MHz at a
// 16.384 MHz sample rate).
// The 16-bit accumulator and 16.384 MHz rate follow the design; the tested
// frequencies are the carrier bins and the code rate.
module tb_nco_1bit;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [15:0] incr = 0;
  logic s, c, w;
  int checks = 0, failures = 0;
  longint ref_acc = 0;

  nco_1bit #(.N(16)) dut (.clk, .rst_n, .en_i(en), .clear_i(clr), .incr_i(incr),
                          .sin_o(s), .cos_o(c), .wrap_o(w));
  always #5 clk = ~clk;

  task automatic check_out();
    logic es, ec;
    // sign of sin/cos of 2*pi*acc/2^16, quadrant by quadrant
    es = (ref_acc < 32768);
    ec = (ref_acc < 16384) || (ref_acc >= 49152);
    checks++;
    if (s !== es || c !== ec) begin
      failures++;
      if (failures < 5) $display("acc=%0d sin=%b/%b cos=%b/%b", ref_acc, s, es, c, ec);
    end
  endtask

  initial begin
    int wraps;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check_out();
      en   = ($urandom % 4) != 0;
      clr  = ($urandom % 200) == 0;
      if (i % 500 == 0) incr = 16'($urandom);
      #1;
      checks++;
      if (w !== (en && !clr && (ref_acc + incr >= 65536))) failures++;
      @(posedge clk);
      if (clr) ref_acc = 0;
      else if (en) ref_acc = (ref_acc + incr) % 65536;
    end
    // chip clock: 1.023 MHz from 16.384 MHz
    @(negedge clk);
    en = 0; clr = 1; incr = 16'd4092;
    @(negedge clk);
    clr = 0; en = 1;
    wraps = 0;
    for (int i = 0; i < 16384; i++) begin
      #1;
      if (w) wraps++;
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (wraps != 1023) begin failures++; $display("wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
