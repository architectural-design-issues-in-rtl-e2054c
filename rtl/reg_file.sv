// reg_file: the register file (RF) block with per-register locks.
//
// 25 separate 32-bit registers (R0..R15 and the nine special registers,
// RSR first and RER last), each with its own lock bit. A lock bit is set
// while an instruction that will write the register is in flight and is
// cleared by that write, so a reader can tell whether a value is current
// without any knowledge of pipeline timing.
// All reads of one instruction arrive as a single request on one merged
// read channel: up to four source registers plus the set of destination
// registers to lock. The request is held until every source and every
// destination is unlocked (the lock stall); then the sources are read onto
// the four response ports (RD_Resp_0..3, sent as one bundle to DE2) and the
// destinations are locked, in the same cycle. Three write channels from the
// memory stage (result, high word of a product, stack pointer) write any
// registers at once; each register has its own small write/lock arbiter,
// so different registers never wait for one another. Individual registers,
// lock bits, one merged read channel and three write channels follow the
// enhanced register file of the design description. Waiting for locked
// destinations (write-after-write) and the valid/ready timing are this
// design's choices.
// Timing: a request accepted at one edge is answered at the next edge at
// the earliest; a write clears its lock at the edge where it is written.
module reg_file
  import althea_pkg::*;
#(
  parameter int NREGS = NUM_REGS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  rf_req_t req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output rf_rsp_t rsp,
  input  rf_wr_t  wr [3],
  output logic    any_locked,
  output logic    lock_stall
);
  word_t      data_q [NREGS];
  logic [NREGS-1:0] lock_q;

  logic    pend_q;
  rf_req_t pend_r;
  rf_rsp_t rsp_q;
  logic    rsp_v_q;
  logic    deps_ok, grant;

  // sources and destinations of the held request must all be unlocked
  always_comb begin
    deps_ok = ((pend_r.lock & NUM_REGS'(lock_q)) == '0);
    for (int p = 0; p < 4; p++)
      if (pend_r.rd_en[p] && (int'(pend_r.rd_addr[p]) >= NREGS || lock_q[pend_r.rd_addr[p]]))
        deps_ok = 1'b0;
  end

  assign grant      = pend_q && deps_ok && (!rsp_v_q || rsp_ready);
  assign req_ready  = !pend_q || grant;
  assign lock_stall = pend_q && !deps_ok;
  assign any_locked = |lock_q;
  assign rsp_valid  = rsp_v_q;
  assign rsp        = rsp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q  <= 1'b0;
      pend_r  <= '0;
      rsp_v_q <= 1'b0;
      rsp_q   <= '0;
    end else begin
      if (req_valid && req_ready) begin
        pend_q <= 1'b1;
        pend_r <= req;
      end else if (grant) begin
        pend_q <= 1'b0;
      end
      if (grant) begin
        rsp_v_q <= 1'b1;
        for (int p = 0; p < 4; p++) begin
          rsp_q.valid[p] <= pend_r.rd_en[p];
          // only the requested ports change (on-demand response channels)
          if (pend_r.rd_en[p]) rsp_q.data[p] <= data_q[pend_r.rd_addr[p]];
        end
      end else if (rsp_ready) begin
        rsp_v_q <= 1'b0;
      end
    end
  end

  // one register, its lock bit and its write/lock arbiter per index
  for (genvar r = 0; r < NREGS; r++) begin : g_reg
    logic       wr_hit;
    logic [1:0] wr_sel;
    always_comb begin
      wr_hit = 1'b0;
      wr_sel = '0;
      for (int w = 0; w < 3; w++)
        if (wr[w].en && int'(wr[w].addr) == r) begin
          wr_hit = 1'b1;
          wr_sel = 2'(w);
        end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        data_q[r] <= '0;
        lock_q[r] <= 1'b0;
      end else begin
        if (wr_hit) data_q[r] <= wr[wr_sel].data;
        if (grant && pend_r.lock[r]) lock_q[r] <= 1'b1;
        else if (wr_hit)             lock_q[r] <= 1'b0;
      end
    end
  end

  a_grant_unlocked: assert property (@(posedge clk) disable iff (!rst_n)
                                     grant |-> ((pend_r.lock & NUM_REGS'(lock_q)) == '0));
endmodule
