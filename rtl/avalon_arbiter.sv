// avalon_arbiter: two Avalon-MM masters sharing one memory slave port.
// Master 0 has fixed priority: in this design it is the data acquisition
// writer, which must keep pace with the frontend, while master 1 (the
// satellite acquisition reader) can wait. A grant is taken when the port is
// free and held until the granted request is accepted (waitrequest low),
// so a master's signals stay stable for the whole transfer as Avalon
// requires. The losing master sees waitrequest high.
// Read responses (readdatavalid) return in request order; a small queue
// records which master issued each accepted read and routes the response.
// Up to MAX_PENDING reads may be outstanding; beyond that reads wait.
// The description only names the bus fabric that connects the processor
// and the peripherals; this arbiter is the simplest fabric that lets the
// two acquisition masters share the memory.
module avalon_arbiter
  import gps_pkg::*;
#(
  parameter int unsigned MAX_PENDING = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  avm_req_t m0_req,
  output avm_rsp_t m0_rsp,
  input  avm_req_t m1_req,
  output avm_rsp_t m1_rsp,
  output avm_req_t s_req,
  input  avm_rsp_t s_rsp,
  output logic     conflict_o   // both masters requested in the same cycle
);
  localparam int unsigned PW = $clog2(MAX_PENDING + 1);

  logic m0_act, m1_act, lock_q, owner_q, sel;
  logic [MAX_PENDING-1:0] rq_q;     // owners of pending reads, oldest at bit 0
  logic [PW-1:0]          rcnt_q;
  logic                   rd_full, accept, rd_issue;

  assign m0_act  = m0_req.read | m0_req.write;
  assign m1_act  = m1_req.read | m1_req.write;
  assign rd_full = (rcnt_q == PW'(MAX_PENDING));
  assign sel     = lock_q ? owner_q : !m0_act;

  always_comb begin
    s_req = sel ? m1_req : m0_req;
    if (s_req.read && rd_full) s_req.read = 1'b0;
  end

  assign accept   = (s_req.read | s_req.write) && !s_rsp.waitrequest;
  assign rd_issue = s_req.read && !s_rsp.waitrequest;

  always_comb begin
    m0_rsp.readdata      = s_rsp.readdata;
    m1_rsp.readdata      = s_rsp.readdata;
    m0_rsp.readdatavalid = s_rsp.readdatavalid && (rq_q[0] == 1'b0);
    m1_rsp.readdatavalid = s_rsp.readdatavalid && (rq_q[0] == 1'b1);
    m0_rsp.waitrequest   = sel  || s_rsp.waitrequest || (m0_req.read && rd_full);
    m1_rsp.waitrequest   = !sel || s_rsp.waitrequest || (m1_req.read && rd_full);
  end

  assign conflict_o = m0_act && m1_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q  <= 1'b0;
      owner_q <= 1'b0;
    end else if ((s_req.read || s_req.write || (sel ? m1_act : m0_act)) && !accept) begin
      lock_q  <= 1'b1;
      owner_q <= sel;
    end else begin
      lock_q  <= 1'b0;
    end
  end

  // response owner queue: next state worked out combinationally
  logic [MAX_PENDING-1:0] rq_nx;
  logic [PW-1:0]          rcnt_nx;
  always_comb begin
    rq_nx   = rq_q;
    rcnt_nx = rcnt_q;
    if (s_rsp.readdatavalid && rcnt_nx != '0) begin
      rq_nx   = rq_nx >> 1;
      rcnt_nx = rcnt_nx - 1'b1;
    end
    if (rd_issue) begin
      rq_nx[rcnt_nx[$clog2(MAX_PENDING)-1:0]] = sel;
      rcnt_nx = rcnt_nx + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_q   <= '0;
      rcnt_q <= '0;
    end else begin
      rq_q   <= rq_nx;
      rcnt_q <= rcnt_nx;
    end
  end

  a_no_orphan: assert property (@(posedge clk) disable iff (!rst_n)
                                s_rsp.readdatavalid |-> rcnt_q != '0);
endmodule
