// me_stage: the memory (ME) block and the write-back port selector.
//
// ME performs the data-memory access of loads, stores and the single
// register PUSH/POP micro-ops made by the ID stage, and its stack-pointer
// unit computes their addresses and the new stack pointer. For a list of n
// registers, micro-op k (k = 0 .. n-1 in ascending register order) uses
//   PUSH: SP - 4*(k+1)        POP: SP + 4*(n-1-k)
// with SP the value before the instruction, so a POP with the same list
// restores what the PUSH saved; the last micro-op writes SP -/+ 4*n. All
// other instructions pass through. The port selector then drives the three
// write channels of the register file: port 0 the result or loaded word,
// port 1 the high word of a product, port 2 the stack pointer.
// Data align: word accesses ignore the two low address bits. A byte or
// halfword store sets the byte enables of its lanes and repeats the data
// across the word; a byte or halfword load picks its lanes out of the
// returned word and zero-extends them (little-endian; halfwords use
// address bit 1 only).
// Memory interface: request (valid/ready, write enable, byte enables, word
// address, data) and a read response (valid, data) one or more cycles later.
// Timing: the write channels are registered (the write-back stage); a
// non-memory instruction takes one cycle, a store one cycle plus memory
// ready, a load until its response arrives.
// The stack-pointer unit, the data-align unit, the three write channels and
// the port selector are the description's; the address formula and the
// lane rules are this design's choices.
module me_stage
  import althea_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ex_out_t in_data,
  output logic    dmem_req_valid,
  input  logic    dmem_req_ready,
  output logic    dmem_req_we,
  output logic [3:0] dmem_req_be,
  output word_t   dmem_req_addr,
  output word_t   dmem_req_wdata,
  input  logic    dmem_rsp_valid,
  input  word_t   dmem_rsp_data,
  output rf_wr_t  wr [3],
  output logic    busy
);
  logic  wait_q;               // load/pop request sent, waiting for data
  logic  is_mem, is_rd, done;
  word_t addr, sp_new;
  word_t k4, n4;

  assign k4 = {26'd0, in_data.seg.index, 2'b00};
  assign n4 = {26'd0, in_data.seg.count, 2'b00};

  always_comb begin
    unique case (in_data.mem)
      MEM_PUSH: begin addr = in_data.res_lo - k4 - 32'd4;  sp_new = in_data.res_lo - n4; end
      MEM_POP:  begin addr = in_data.res_lo + n4 - k4 - 32'd4; sp_new = in_data.res_lo + n4; end
      default:  begin addr = in_data.res_lo; sp_new = in_data.res_lo; end
    endcase
  end

  assign is_mem = (in_data.mem != MEM_NONE);
  assign is_rd  = (in_data.mem == MEM_LOAD || in_data.mem == MEM_POP ||
                   in_data.mem == MEM_LDB || in_data.mem == MEM_LDH);
  assign dmem_req_valid = in_valid && is_mem && !wait_q;
  assign dmem_req_we    = !is_rd;
  assign dmem_req_addr  = {addr[31:2], 2'b00};
  // data align: byte lanes of stores, extraction of loaded bytes/halfwords
  // (the request stays on the input while a load waits, so addr is stable)
  word_t ld_data;
  always_comb begin
    dmem_req_be    = 4'b1111;
    dmem_req_wdata = in_data.sdata;
    unique case (in_data.mem)
      MEM_STB: begin
        dmem_req_be    = 4'b0001 << addr[1:0];
        dmem_req_wdata = {4{in_data.sdata[7:0]}};
      end
      MEM_STH: begin
        dmem_req_be    = addr[1] ? 4'b1100 : 4'b0011;
        dmem_req_wdata = {2{in_data.sdata[15:0]}};
      end
      default: ;
    endcase
    unique case (in_data.mem)
      MEM_LDB: ld_data = {24'd0, dmem_rsp_data[{addr[1:0], 3'b000} +: 8]};
      MEM_LDH: ld_data = {16'd0, dmem_rsp_data[{addr[1], 4'b0000} +: 16]};
      default: ld_data = dmem_rsp_data;
    endcase
  end
  assign done     = !is_mem ? 1'b1
                  : is_rd   ? (wait_q && dmem_rsp_valid)
                            : dmem_req_ready;
  assign in_ready = done;
  assign busy     = wait_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q <= 1'b0;
      for (int w = 0; w < 3; w++) wr[w] <= '0;
    end else begin
      if (dmem_req_valid && dmem_req_ready && is_rd) wait_q <= 1'b1;
      else if (wait_q && dmem_rsp_valid)             wait_q <= 1'b0;
      // port selector
      wr[0].en   <= in_valid && done && in_data.wb_en[0];
      wr[0].addr <= in_data.wb_addr[0];
      wr[0].data <= is_rd ? ld_data : in_data.res_lo;
      wr[1].en   <= in_valid && done && in_data.wb_en[1];
      wr[1].addr <= in_data.wb_addr[1];
      wr[1].data <= in_data.res_hi;
      wr[2].en   <= in_valid && done && in_data.wb_en[2];
      wr[2].addr <= in_data.wb_addr[2];
      wr[2].data <= sp_new;
    end
  end
endmodule
