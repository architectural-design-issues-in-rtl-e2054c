// prefetcher: instruction memory interface, program counter and predecoder
// of the IF block.
//
// The instruction memory is 32 bits wide while instructions are 16 bits, so
// each fetch brings two instructions; the prefetcher splits the word into
// halfwords (the lower halfword is the instruction at the lower address) and
// tags each with its address and its instruction group, worked out by the
// predecoder. Halfwords wait in a four-entry buffer until the LERI folder
// takes them, one per cycle. A new word is requested only while the buffer
// has room for both of its halfwords, so the prefetcher runs ahead of the
// pipeline until it is full.
// A redirect (taken branch or jump) loads the program counter, empties the
// buffer and discards a fetch still in flight; if the target is the upper
// halfword of a word, the lower one is skipped. While halt is high no new
// fetch is started.
// Memory interface: a request (valid/ready, word address) and a response
// that arrives one or more cycles later (valid, data); one fetch is in
// flight at a time. The buffer depth, the one-outstanding-fetch rule and the
// halfword order are this design's choices.
module prefetcher
  import althea_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   halt,
  input  logic   redirect,
  input  word_t  redirect_pc,
  output logic   imem_req_valid,
  input  logic   imem_req_ready,
  output word_t  imem_req_addr,
  input  logic   imem_rsp_valid,
  input  word_t  imem_rsp_data,
  output logic   out_valid,
  input  logic   out_ready,
  output inst_t  out_inst,
  output word_t  out_pc,
  output group_e out_group
);
  typedef struct packed {
    inst_t inst;
    word_t pc;
  } hw_t;

  hw_t        buf_q [4];
  logic [2:0] count_q;
  word_t      fetch_pc_q;      // halfword address of the next instruction to fetch
  logic       busy_q;          // a fetch is in flight
  logic       drop_q;          // the fetch in flight is to be discarded

  logic       pop;
  logic       rsp_take;
  hw_t        nbuf [4];
  logic [2:0] ncount;

  assign out_valid     = (count_q != 3'd0);
  assign out_inst      = buf_q[0].inst;
  assign out_pc        = buf_q[0].pc;
  assign out_group     = predecode(buf_q[0].inst);
  assign pop           = out_valid && out_ready;

  assign imem_req_valid = !busy_q && !halt && !redirect && (count_q <= 3'd2);
  assign imem_req_addr  = {fetch_pc_q[31:2], 2'b00};
  assign rsp_take       = imem_rsp_valid && busy_q && !drop_q && !redirect;

  // Buffer after this cycle's pop and push
  always_comb begin
    logic [2:0] c;
    for (int i = 0; i < 4; i++) nbuf[i] = buf_q[i];
    c = count_q;
    if (pop) begin
      for (int i = 0; i < 3; i++) nbuf[i] = buf_q[i+1];
      c = c - 3'd1;
    end
    if (rsp_take) begin
      if (fetch_pc_q[1]) begin
        nbuf[c[1:0]] = '{inst: imem_rsp_data[31:16], pc: {fetch_pc_q[31:2], 2'b10}};
        c = c + 3'd1;
      end else begin
        nbuf[c[1:0]]        = '{inst: imem_rsp_data[15:0],  pc: {fetch_pc_q[31:2], 2'b00}};
        nbuf[c[1:0] + 2'd1] = '{inst: imem_rsp_data[31:16], pc: {fetch_pc_q[31:2], 2'b10}};
        c = c + 3'd2;
      end
    end
    ncount = c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q    <= '0;
      fetch_pc_q <= RESET_PC;
      busy_q     <= 1'b0;
      drop_q     <= 1'b0;
      for (int i = 0; i < 4; i++) buf_q[i] <= '0;
    end else if (redirect) begin
      count_q    <= '0;
      fetch_pc_q <= {redirect_pc[31:1], 1'b0};
      // a fetch in flight whose response is not arriving now must be dropped
      drop_q     <= busy_q && !imem_rsp_valid;
      busy_q     <= busy_q && !imem_rsp_valid;
    end else begin
      for (int i = 0; i < 4; i++) buf_q[i] <= nbuf[i];
      count_q <= ncount;
      if (imem_req_valid && imem_req_ready) busy_q <= 1'b1;
      if (imem_rsp_valid && busy_q) begin
        busy_q <= 1'b0;
        drop_q <= 1'b0;
      end
      if (rsp_take) fetch_pc_q <= {fetch_pc_q[31:2] + 30'd1, 2'b00};
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) count_q <= 3'd4);
endmodule
