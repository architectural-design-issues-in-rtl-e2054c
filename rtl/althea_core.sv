// althea_core: ALTHEA, a 32-bit processor with a 16-bit instruction set,
// built as a seven-stage pipeline of self-timed blocks.
//
// Stages: IF (prefetch, predecode, LERI folding, instruction queue) -> ID
// (PUSH/POP segmentation) -> DE1 (decode, register request, branch
// resolution) -> DE2 (register fetch, operand generation) -> EX -> ME ->
// write back into the register file RF. RF sits beside DE1/DE2: DE1 sends
// it the read/lock request of an instruction and DE2 takes the response, so
// register access overlaps two stages. Data hazards are resolved only by
// the per-register locks of RF (there is no forwarding); conditional
// branches wait in DE1 for EX's status channel. Every connection between
// blocks is a handshake channel; here each is a clocked valid/ready channel
// standing in for the four-phase bundled-data channels of the clockless
// original, so the timing in cycles is this design's, not the original's.
// Harvard memory interfaces: a 32-bit instruction port (two instructions per
// word) and a 32-bit data port with byte enables, each with a request
// channel and a response one cycle or more later. The coprocessor is outside: its request and
// response channels are ports. halted goes high once HALT has been decoded
// and every instruction before it has written back.
module althea_core
  import althea_pkg::*;
#(
  parameter word_t RESET_PC = '0,
  parameter int    IQ_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // instruction memory
  output logic    imem_req_valid,
  input  logic    imem_req_ready,
  output word_t   imem_req_addr,
  input  logic    imem_rsp_valid,
  input  word_t   imem_rsp_data,
  // data memory
  output logic    dmem_req_valid,
  input  logic    dmem_req_ready,
  output logic    dmem_req_we,
  output logic [3:0] dmem_req_be,
  output word_t   dmem_req_addr,
  output word_t   dmem_req_wdata,
  input  logic    dmem_rsp_valid,
  input  word_t   dmem_rsp_data,
  // coprocessor
  output logic    cp_req_valid,
  input  logic    cp_req_ready,
  output cp_req_t cp_req,
  input  logic    cp_rsp_valid,
  input  word_t   cp_rsp_data,
  output logic    halted,
  // one-cycle event strobes, for performance counting
  output logic    ev_leri_folded,   // a LERI was folded away
  output logic    ev_queue_full,    // the instruction queue is full
  output logic    ev_segment,       // ID issued a further PUSH/POP micro-op
  output logic    ev_id_bypass,     // an instruction bypassed the ID stage
  output logic    ev_lock_stall,    // RF holds a request on a locked register
  output logic    ev_status_stall,  // DE1 holds a branch for the status flags
  output logic    ev_redirect       // fetch redirected by a branch or jump
);
  logic     redirect, de1_redirect, jr_redirect;
  word_t    redirect_pc, de1_pc, jr_pc;
  logic     de1_halted, jr_done;

  logic     if_valid, if_ready;
  fetched_t if_data;
  logic     leri_folded, queue_full;
  logic     id_valid, id_ready;
  idinst_t  id_data;
  logic     segmenting, id_bypassed;
  logic     rq_valid, rq_ready;
  rf_req_t  rq;
  logic     rs_valid, rs_ready;
  rf_rsp_t  rs;
  logic     ctl_valid, ctl_ready;
  de_ctl_t  ctl;
  logic     ex_in_valid, ex_in_ready;
  ex_in_t   ex_in;
  logic     me_in_valid, me_in_ready;
  ex_out_t  me_in;
  logic     st_valid;
  flags_t   st_flags;
  rf_wr_t   wr [3];
  logic     any_locked, lock_stall, status_stall, me_busy;

  // DE1 (branch, JAL) and DE2 (JR) never redirect in the same cycle: DE1
  // accepts nothing while a JR is pending.
  assign redirect    = de1_redirect || jr_redirect;
  assign redirect_pc = jr_redirect ? jr_pc : de1_pc;

  if_stage #(.RESET_PC(RESET_PC), .IQ_DEPTH(IQ_DEPTH)) u_if (
    .clk, .rst_n, .halt(de1_halted), .redirect, .redirect_pc,
    .imem_req_valid, .imem_req_ready, .imem_req_addr,
    .imem_rsp_valid, .imem_rsp_data,
    .out_valid(if_valid), .out_ready(if_ready), .out_data(if_data),
    .leri_folded, .queue_full
  );

  id_stage u_id (
    .clk, .rst_n, .flush(redirect),
    .in_valid(if_valid), .in_ready(if_ready), .in_data(if_data),
    .out_valid(id_valid), .out_ready(id_ready), .out_data(id_data),
    .segmenting, .bypassed(id_bypassed)
  );

  de1_stage u_de1 (
    .clk, .rst_n,
    .in_valid(id_valid), .in_ready(id_ready), .in_data(id_data),
    .rf_req_valid(rq_valid), .rf_req_ready(rq_ready), .rf_req(rq),
    .ctl_valid, .ctl_ready, .ctl,
    .st_valid, .st_flags, .jr_done,
    .redirect(de1_redirect), .redirect_pc(de1_pc),
    .halted(de1_halted), .status_stall
  );

  reg_file u_rf (
    .clk, .rst_n,
    .req_valid(rq_valid), .req_ready(rq_ready), .req(rq),
    .rsp_valid(rs_valid), .rsp_ready(rs_ready), .rsp(rs),
    .wr, .any_locked, .lock_stall
  );

  de2_stage u_de2 (
    .clk, .rst_n,
    .ctl_valid, .ctl_ready, .ctl,
    .rsp_valid(rs_valid), .rsp_ready(rs_ready), .rsp(rs),
    .out_valid(ex_in_valid), .out_ready(ex_in_ready), .out_data(ex_in),
    .jr_redirect, .jr_pc, .jr_done
  );

  ex_stage u_ex (
    .clk, .rst_n,
    .in_valid(ex_in_valid), .in_ready(ex_in_ready), .in_data(ex_in),
    .out_valid(me_in_valid), .out_ready(me_in_ready), .out_data(me_in),
    .st_valid, .st_flags,
    .cp_req_valid, .cp_req_ready, .cp_req, .cp_rsp_valid, .cp_rsp_data
  );

  me_stage u_me (
    .clk, .rst_n,
    .in_valid(me_in_valid), .in_ready(me_in_ready), .in_data(me_in),
    .dmem_req_valid, .dmem_req_ready, .dmem_req_we, .dmem_req_be, .dmem_req_addr,
    .dmem_req_wdata, .dmem_rsp_valid, .dmem_rsp_data,
    .wr, .busy(me_busy)
  );

  assign ev_leri_folded  = leri_folded;
  assign ev_queue_full   = queue_full;
  assign ev_segment      = segmenting;
  assign ev_id_bypass    = id_bypassed;
  assign ev_lock_stall   = lock_stall;
  assign ev_status_stall = status_stall;
  assign ev_redirect     = redirect;

  assign halted = de1_halted && !ctl_valid && !ex_in_valid && !me_in_valid
                  && !me_busy && !any_locked && !rq_valid && !rs_valid
                  && !wr[0].en && !wr[1].en && !wr[2].en;
endmodule
