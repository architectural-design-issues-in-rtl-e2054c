// leri_folder: folds LERI instructions into the instruction that follows.
//
// LERI (load extension register immediate, 2-bit opcode 11 and a 14-bit
// immediate) builds a long immediate for the next instruction; up to three
// consecutive LERIs make a 32-bit value. The folder absorbs each LERI into
// its extension register ER instead of passing it on: the first LERI of a
// run loads ER with its immediate sign-extended, each further one shifts ER
// left by 14 bits and inserts its immediate. The next non-LERI instruction
// leaves the folder carrying ER and a flag that says ER is valid, so no
// later stage ever sees a LERI. That folding in the fetch block is the
// design description's; the sign extension of the first LERI is this
// design's choice.
// Interface: halfword stream in (valid/ready) and folded instructions out
// (valid/ready); a LERI is taken in one cycle without an output, any other
// instruction passes straight through in the cycle the output accepts it.
// flush clears ER (used on a redirect).
module leri_folder
  import althea_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flush,
  input  logic     in_valid,
  output logic     in_ready,
  input  inst_t    in_inst,
  input  word_t    in_pc,
  input  group_e   in_group,
  output logic     out_valid,
  input  logic     out_ready,
  output fetched_t out_data,
  output logic     folded      // a LERI was absorbed this cycle
);
  word_t er_q;
  logic  er_valid_q;
  logic  leri;

  assign leri      = is_leri(in_inst);
  assign out_valid = in_valid && !leri && !flush;
  assign in_ready  = leri || out_ready;
  assign folded    = in_valid && leri && !flush;
  assign out_data  = '{inst: in_inst, pc: in_pc, ext_valid: er_valid_q,
                       ext: er_q, group: in_group};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      er_q       <= '0;
      er_valid_q <= 1'b0;
    end else if (flush) begin
      er_q       <= '0;
      er_valid_q <= 1'b0;
    end else if (folded) begin
      er_q       <= er_valid_q ? {er_q[17:0], in_inst[13:0]}
                               : {{18{in_inst[13]}}, in_inst[13:0]};
      er_valid_q <= 1'b1;
    end else if (out_valid && out_ready) begin
      er_valid_q <= 1'b0;
      er_q       <= '0;
    end
  end
endmodule
