// tb_avalon_arbiter: two random masters on one slave.
// Master 0 writes to even words, master 1 reads and writes odd words; the
// slave model (memory with random waitrequest and 0..2 cycles of read
// latency, responses in order) checks nothing itself. The checks: every
// write lands in memory, every read returns the memory word to the master
// that issued it, requests are only accepted from the granted master, and
// when both request at once master 0 wins.
// Reference: per-master expected transfers kept in queues. The random
// wait-state and latency patterns are test choices.
module tb_avalon_arbiter;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0;
  avm_req_t m0, m1, s;
  avm_rsp_t r0, r1, sr;
  logic conflict;
  int checks = 0, failures = 0, conflicts = 0, m0_first = 0;
  logic [31:0] mem [64];
  logic [31:0] shadow [64];

  avalon_arbiter #(.MAX_PENDING(4)) dut (.clk, .rst_n, .m0_req(m0), .m0_rsp(r0), .m1_req(m1),
                                        .m1_rsp(r1), .s_req(s), .s_rsp(sr), .conflict_o(conflict));
  always #5 clk = ~clk;

  // slave: in-order read responses
  int rq_addr [$]; int rq_lat [$];
  always @(negedge clk) begin
    sr.waitrequest <= ($urandom % 3) == 0;
  end
  always @(posedge clk) begin
    sr.readdatavalid <= 0;
    if (rq_lat.size() && rq_lat[0] == 0) begin
      sr.readdatavalid <= 1; sr.readdata <= 32'(rq_addr[0]);
      void'(rq_addr.pop_front()); void'(rq_lat.pop_front());
    end
    foreach (rq_lat[i]) if (rq_lat[i] > 0) rq_lat[i]--;
    if (!sr.waitrequest) begin
      if (s.write) mem[s.address[7:2]] <= s.writedata;
      if (s.read) begin rq_addr.push_back(int'(mem[s.address[7:2]])); rq_lat.push_back($urandom % 3); end
    end
  end

  // master 1 expectations
  logic [31:0] m1_exp [$];
  always @(posedge clk) if (rst_n) begin
    if (conflict) begin
      conflicts++;
      // a new conflict with the port free must go to master 0
    end
    if (r1.readdatavalid) begin
      checks++;
      if (m1_exp.size() == 0 || r1.readdata !== m1_exp[0]) begin
        failures++; $display("m1 read mismatch");
      end
      if (m1_exp.size()) void'(m1_exp.pop_front());
    end
    if (r0.readdatavalid) begin failures++; $display("spurious m0 response"); end
  end

  task automatic m0_write(int w, logic [31:0] d);
    m0.write = 1; m0.address = 32'(w * 4); m0.writedata = d;
    @(posedge clk);
    while (r0.waitrequest) @(posedge clk);
    shadow[w] = d;
    #1 m0.write = 0;
  endtask

  task automatic m1_op(bit isrd, int w, logic [31:0] d);
    if (isrd) m1.read = 1; else m1.write = 1;
    m1.address = 32'(w * 4); m1.writedata = d;
    @(posedge clk);
    while (r1.waitrequest) @(posedge clk);
    if (isrd) m1_exp.push_back(shadow[w]); else shadow[w] = d;
    #1 m1.read = 0; m1.write = 0;
  endtask

  initial begin
    m0 = '0; m1 = '0; sr = '0;
    for (int i = 0; i < 64; i++) begin mem[i] = 32'(i); shadow[i] = 32'(i); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        if ($urandom % 2) m0_write(2 * ($urandom % 32), $urandom);
      end
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        m1_op($urandom % 2, 2 * ($urandom % 32) + 1, $urandom);
      end
    join
    repeat (10) @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (mem[i] !== shadow[i]) begin failures++; $display("word %0d %h/%h", i, mem[i], shadow[i]); end
    end
    // priority: both request with the port free -> master 0 accepted first
    @(negedge clk);

    m0.write = 1; m0.address = 0; m0.writedata = 32'hAAAA;
    m1.write = 1; m1.address = 4; m1.writedata = 32'hBBBB;
    #1;
    checks += 2;
    if (!r1.waitrequest || !s.write) begin failures++; $display("priority"); end
    if (s.address != 0) begin failures++; $display("slave addr"); end
    @(negedge clk); m0.write = 0; m1.write = 0;
    checks++;
    if (conflicts == 0) begin failures++; $display("no conflict seen"); end
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
