// tb_pixel_byte_encoder: random pixel supply and random byte acceptance.
// Every pixel accepted must come out as exactly two bytes, pixel[9:2] and
// then {000000, pixel[1:0]}, in order, with none lost or repeated.
// Sending each pixel as two bytes follows the design; the byte split
// checked here is this design's.
module tb_pixel_byte_encoder;
  logic clk = 0, rst_n = 0, pv = 0, pr, bv, br = 0;
  logic [9:0] pix = 0;
  logic [7:0] b;
  logic [7:0] exp_q[$];
  int checks = 0, failures = 0, npix = 0;
  logic took = 0;
  pixel_byte_encoder dut (.clk, .rst_n, .pixel_i(pix), .pixel_valid_i(pv), .pixel_ready_o(pr),
                          .byte_o(b), .byte_valid_o(bv), .byte_ready_i(br));
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      if (!pv || took) begin pv = 1'($urandom); pix = 10'($urandom); end
      took = 0;
      br = 1'($urandom);
      #1;
      // handshakes are evaluated before the clock edge
      if (bv && br) begin
        checks++;
        if (exp_q.size() == 0 || b !== exp_q[0]) begin failures++; $display("byte %h", b); end
        else void'(exp_q.pop_front());
      end
      if (pv && pr) begin exp_q.push_back(pix[9:2]); exp_q.push_back({6'b0, pix[1:0]}); npix++; took = 1; end
      @(negedge clk);

    end
    checks += 2;
    if (exp_q.size() > 2) failures++;
    if (npix < 300) failures++;
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
