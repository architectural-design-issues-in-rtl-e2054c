// if_stage: the instruction fetch (IF) block.
//
// Prefetcher (instruction memory interface, program counter, predecoder),
// LERI folder and a four-entry instruction queue in a row. Fetching runs
// ahead of decoding until the queue is full; each queue entry is a folded,
// predecoded instruction with its address. A redirect from the decode
// stages (branch target) flushes all three units and restarts fetching at
// the target; halt stops new fetches. This structure follows the enhanced
// fetch block of the design description; the handshakes are clocked
// valid/ready channels.
// Timing: with a memory that answers in one cycle the first instruction
// reaches the queue output three cycles after reset or a redirect.
module if_stage
  import althea_pkg::*;
#(
  parameter word_t RESET_PC = '0,
  parameter int    IQ_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     halt,
  input  logic     redirect,
  input  word_t    redirect_pc,
  output logic     imem_req_valid,
  input  logic     imem_req_ready,
  output word_t    imem_req_addr,
  input  logic     imem_rsp_valid,
  input  word_t    imem_rsp_data,
  output logic     out_valid,
  input  logic     out_ready,
  output fetched_t out_data,
  output logic     leri_folded,
  output logic     queue_full
);
  logic     pf_valid, pf_ready;
  inst_t    pf_inst;
  word_t    pf_pc;
  group_e   pf_group;
  logic     fo_valid, fo_ready;
  fetched_t fo_data;

  prefetcher #(.RESET_PC(RESET_PC)) u_prefetch (
    .clk, .rst_n, .halt, .redirect, .redirect_pc,
    .imem_req_valid, .imem_req_ready, .imem_req_addr,
    .imem_rsp_valid, .imem_rsp_data,
    .out_valid(pf_valid), .out_ready(pf_ready), .out_inst(pf_inst),
    .out_pc(pf_pc), .out_group(pf_group)
  );

  leri_folder u_fold (
    .clk, .rst_n, .flush(redirect),
    .in_valid(pf_valid), .in_ready(pf_ready), .in_inst(pf_inst),
    .in_pc(pf_pc), .in_group(pf_group),
    .out_valid(fo_valid), .out_ready(fo_ready), .out_data(fo_data),
    .folded(leri_folded)
  );

  logic [$bits(fetched_t)-1:0] q_out;
  instr_queue #(.W($bits(fetched_t)), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n, .flush(redirect),
    .in_valid(fo_valid), .in_ready(fo_ready), .in_data(fo_data),
    .out_valid, .out_ready, .out_data(q_out), .full(queue_full)
  );
  assign out_data = fetched_t'(q_out);
endmodule
