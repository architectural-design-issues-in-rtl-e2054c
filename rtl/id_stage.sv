// id_stage: the IF/DE inter-pipe (ID) stage, CISC check and segmentation.
//
// PUSH and POP name a list of registers and would need a multi-cycle state
// machine in the decoder. The ID stage checks each instruction from the
// fetch queue; an ordinary instruction goes on unchanged, while a PUSH or
// POP with a register list is cut into one single-register micro-op per
// listed register, tagged first / middle / last with its index and the
// total count, so the stack-pointer unit in the memory stage can place each
// word and update the stack pointer once. Micro-ops are issued in ascending
// register order for both PUSH and POP, as in the segmentation example of
// the design description. The 12-bit register mask (R0..R11) in the
// instruction is this design's encoding.
// Instructions that are not PUSH/POP bypass the stage: when the stage is
// empty such an instruction is offered to DE1 in the same cycle it arrives,
// and it is registered only if DE1 cannot take it at once. That bypass is
// the description's; doing it with a combinational path is this design's.
// Interface: folded instructions in (valid/ready), single-operand
// instructions out (valid/ready). A list of n registers occupies the stage
// for n cycles, the first micro-op one cycle after the list arrives; other
// instructions take no cycle when bypassed. flush discards the instruction
// being segmented and the output register.
module id_stage
  import althea_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flush,
  input  logic     in_valid,
  output logic     in_ready,
  input  fetched_t in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output idinst_t  out_data,
  output logic     segmenting,    // a micro-op after the first is issued this cycle
  output logic     bypassed       // an instruction went through without a cycle here
);
  idinst_t     out_q;
  logic        out_v_q;
  logic        busy_q;            // more micro-ops of cur_q remain
  fetched_t    cur_q;
  logic [11:0] rem_q;
  logic [3:0]  idx_q, cnt_q;

  function automatic logic [3:0] lowest(logic [11:0] m);
    for (int i = 0; i < 12; i++) if (m[i]) return 4'(i);
    return 4'd0;
  endfunction

  function automatic logic [3:0] popc(logic [11:0] m);
    logic [3:0] c = '0;
    for (int i = 0; i < 12; i++) c += 4'(m[i]);
    return c;
  endfunction

  logic slot_free, take, is_list, bypass;
  idinst_t pass;
  logic [11:0] in_mask;
  logic [3:0]  in_cnt;
  assign slot_free  = !out_v_q || out_ready;
  assign in_ready   = !busy_q && slot_free;
  assign take       = in_valid && in_ready && !flush;
  assign in_mask    = in_data.inst[11:0];
  assign in_cnt     = popc(in_mask);
  assign is_list    = (in_data.group == G_PUSH || in_data.group == G_POP);
  assign segmenting = busy_q && slot_free && !flush;
  // an ordinary instruction arriving at an empty stage goes straight on
  assign bypass     = !out_v_q && !busy_q && in_valid && !is_list;
  assign pass       = '{f: in_data, seg: '{first: 1'b1, last: 1'b1, index: 4'd0, count: 4'd1},
                        sreg: '0};
  assign out_valid  = out_v_q || bypass;
  assign out_data   = out_v_q ? out_q : pass;
  assign bypassed   = bypass && out_ready && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_v_q <= 1'b0;
      busy_q  <= 1'b0;
      out_q   <= '0;
      cur_q   <= '0;
      rem_q   <= '0;
      idx_q   <= '0;
      cnt_q   <= '0;
    end else if (flush) begin
      out_v_q <= 1'b0;
      busy_q  <= 1'b0;
    end else if (segmenting) begin
      // next micro-op of the list being segmented
      out_v_q        <= 1'b1;
      out_q.f        <= cur_q;
      out_q.sreg     <= {1'b0, lowest(rem_q)};
      out_q.seg      <= '{first: 1'b0, last: (idx_q + 4'd1 == cnt_q),
                          index: idx_q, count: cnt_q};
      rem_q          <= rem_q & (rem_q - 12'd1);
      idx_q          <= idx_q + 4'd1;
      busy_q         <= (idx_q + 4'd1 != cnt_q);
    end else if (take && !(bypass && out_ready)) begin
      out_v_q    <= 1'b1;
      out_q.f    <= in_data;
      if (is_list) begin
        out_q.sreg <= {1'b0, lowest(in_mask)};
        out_q.seg  <= '{first: 1'b1, last: (in_cnt <= 4'd1), index: 4'd0, count: in_cnt};
        cur_q      <= in_data;
        rem_q      <= in_mask & (in_mask - 12'd1);
        idx_q      <= 4'd1;
        cnt_q      <= in_cnt;
        busy_q     <= (in_cnt > 4'd1);
      end else begin
        out_q.sreg <= '0;
        out_q.seg  <= '{first: 1'b1, last: 1'b1, index: 4'd0, count: 4'd1};
      end
    end else if (out_ready) begin
      out_v_q <= 1'b0;
    end
  end
endmodule
