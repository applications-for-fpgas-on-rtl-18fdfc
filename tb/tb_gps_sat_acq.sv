// tb_gps_sat_acq: satellite acquisition on a synthetic 1 ms record.
// The record (16384 one-bit samples at 16.384 MHz, stored as signed bytes
// the way the data acquisition module writes them) holds PRN 3 at code
// phase 4 chips on carrier bin 13 (IF + 1500 Hz), with 10% of the samples
// flipped as noise. The code reference is computed here from the G1/G2
// sequences with the PRN's G2 delay; the carrier is a sampled cosine.
// The search covers 6 code phases (reduced from 1023 to keep the run short).
// Checks, through the Avalon slave registers: busy/done, channel 2 (PRN 3)
// reports phase 4 and bin 13 with the largest power, the other channels
// report far less. A second search with bank 1 and PRN 11 in the record
// (phase 2, bin 6) checks the PRN bank selection.
// The search structure (20 carriers, 8 channels, XNOR correlation) follows
// the design; the number of code phases and the integration length are
// reduced test sizes.
module tb_gps_sat_acq;
  import gps_pkg::*;
  localparam int NS = 16384, NPH = 6;
  logic clk = 0, rst_n = 0;
  logic [1:0] addr = 0;
  logic rd = 0, wr = 0;
  logic [31:0] wdata = 0, rdata;
  avm_req_t req;
  avm_rsp_t rsp;
  logic done;
  int checks = 0, failures = 0;
  logic [31:0] mem [NS/2];

  gps_sat_acq #(.INT_SAMPLES(NS), .CODE_PHASES(NPH)) dut (
    .clk, .rst_n, .avs_address(addr), .avs_read(rd), .avs_write(wr), .avs_writedata(wdata),
    .avs_readdata(rdata), .avm_req(req), .avm_rsp(rsp), .done_o(done));
  always #10 clk = ~clk;   // 50 MHz

  // memory with one-cycle read latency and occasional wait states
  bit pend = 0; int paddr;
  always @(posedge clk) begin
    rsp.readdatavalid <= pend;
    rsp.readdata      <= mem[paddr];
    pend = 0;
    if (req.read && !rsp.waitrequest) begin pend = 1; paddr = (req.address - 32'h4000) / 4; end
    rsp.waitrequest <= ($urandom % 8) == 0;
  end

  bit g1 [1023], g2 [1023];
  initial begin
    bit r1 [1:10], r2 [1:10];
    bit f1, f2;
    for (int k = 1; k <= 10; k++) begin r1[k] = 1; r2[k] = 1; end
    for (int n = 0; n < 1023; n++) begin
      g1[n] = r1[10]; g2[n] = r2[10];
      f1 = r1[3] ^ r1[10];
      f2 = r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10];
      for (int k = 10; k > 1; k--) begin r1[k] = r1[k-1]; r2[k] = r2[k-1]; end
      r1[1] = f1; r2[1] = f2;
    end
  end

  task automatic make_record(int delay, int phase, int bin);
    real f;
    f = real'(IF_HZ) + real'(bin - 10) * 500.0;
    for (int n = 0; n < NS; n++) begin
      int chip;
      bit c, car, s;
      chip = (((n * 1023) / 16384) + phase) % 1023;
      c = g1[chip] ^ g2[(chip + 1023 - delay) % 1023];
      car = $cos(2.0 * 3.14159265358979 * f * real'(n) / real'(FS_HZ) + 0.7) >= 0.0;
      s = car ~^ c;
      if (($urandom % 10) == 0) s = ~s;
      if (n % 2 == 0) mem[n/2][15:0]  = {8'($urandom % 2 ? 1 : -1), s ? 8'h01 : 8'hFF};
      else            mem[n/2][31:16] = {8'($urandom % 2 ? 1 : -1), s ? 8'h01 : 8'hFF};
    end
  endtask

  task automatic wreg(logic [1:0] a, logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic rreg(logic [1:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1; #1 d = rdata; @(negedge clk); rd = 0;
  endtask

  task automatic search(int bank, int ch_sig, int phase, int bin);
    logic [31:0] st, pw, pk;
    logic [31:0] pws [8];
    int cyc;
    wreg(1, 32'h4000);
    wreg(0, 32'(bank << 4) | 1);
    rreg(0, st);
    checks++; if (!st[1]) begin failures++; $display("not busy"); end
    cyc = 0;
    do begin rreg(0, st); cyc++; end while (!st[2] && cyc < 200000);
    checks++; if (!st[2] || st[1]) begin failures++; $display("no done"); end
    for (int c = 0; c < 8; c++) begin
      wreg(0, 32'(bank << 4) | 32'(c << 8));
      rreg(2, pw); rreg(3, pk);
      pws[c] = pw;
      if (c == ch_sig) begin
        checks++;
        if (pk[9:0] != 10'(phase) || pk[20:16] != 5'(bin)) begin
          failures++; $display("ch %0d: phase %0d bin %0d, expected %0d %0d", c, pk[9:0], pk[20:16], phase, bin);
        end
      end
    end
    for (int c = 0; c < 8; c++) if (c != ch_sig) begin
      checks++;
      if (pws[c] * 4 > pws[ch_sig]) begin failures++; $display("ch %0d power %0d vs %0d", c, pws[c], pws[ch_sig]); end
    end
  endtask

  initial begin
    rsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    make_record(7, 4, 13);        // PRN 3, G2 delay 7
    search(0, 2, 4, 13);
    make_record(252, 2, 6);       // PRN 11, G2 delay 252
    search(1, 2, 2, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
