// de2_stage: second decode stage (DE2): register fetcher and operand
// generation.
//
// DE2 pairs each control bundle from DE1 with the register-file response
// that belongs to it (when DE1 made a request) and builds the operands for
// EX: operand n is the immediate where DE1 selected it, else the value of
// read port n. Only the operand channels an instruction needs are driven
// and marked active; the others keep their previous value, so an unused
// channel neither toggles nor carries a transfer (the on-demand channels of
// the design description, as opposed to sending every channel with a valid
// bit). A register jump (JR) ends here: DE2 redirects fetch to the register
// value and tells DE1 the jump is done; it is not passed on.
// Interface: control channel and response channel in, operand channel out,
// all valid/ready; one instruction per cycle when both inputs are ready.
// The split of decoding between DE1 and DE2 is the description's; JR in DE2
// is this design's choice.
module de2_stage
  import althea_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ctl_valid,
  output logic    ctl_ready,
  input  de_ctl_t ctl,
  input  logic    rsp_valid,
  output logic    rsp_ready,
  input  rf_rsp_t rsp,
  output logic    out_valid,
  input  logic    out_ready,
  output ex_in_t  out_data,
  output logic    jr_redirect,
  output word_t   jr_pc,
  output logic    jr_done
);
  ex_in_t out_q;
  logic   out_v_q;
  logic   have_ops, slot_free, take;
  word_t  ops [4];

  assign have_ops  = !ctl.need_rf || rsp_valid;
  assign slot_free = !out_v_q || out_ready || ctl.jr;
  assign take      = ctl_valid && have_ops && slot_free;
  assign ctl_ready = have_ops && slot_free;
  assign rsp_ready = ctl_valid && ctl.need_rf && slot_free;

  always_comb begin
    for (int p = 0; p < 4; p++)
      ops[p] = ctl.opsel_imm[p] ? ctl.imm : rsp.data[p];
  end

  assign jr_redirect = take && ctl.jr;
  assign jr_pc       = ops[0];
  assign jr_done     = jr_redirect;
  assign out_valid   = out_v_q;
  assign out_data    = out_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_v_q <= 1'b0;
      out_q   <= '0;
    end else if (take && !ctl.jr) begin
      out_v_q        <= 1'b1;
      out_q.unit     <= ctl.unit;
      out_q.func     <= ctl.func;
      out_q.opv      <= ctl.opsel_imm | ctl.rd_en;
      out_q.setflags <= ctl.setflags;
      out_q.mem      <= ctl.mem;
      out_q.seg      <= ctl.seg;
      out_q.wb_en    <= ctl.wb_en;
      out_q.wb_addr  <= ctl.wb_addr;
      out_q.cpreg    <= ctl.cpreg;
      if (ctl.opsel_imm[0] || ctl.rd_en[0]) out_q.a <= ops[0];
      if (ctl.opsel_imm[1] || ctl.rd_en[1]) out_q.b <= ops[1];
      if (ctl.opsel_imm[2] || ctl.rd_en[2]) out_q.c <= ops[2];
      if (ctl.opsel_imm[3] || ctl.rd_en[3]) out_q.d <= ops[3];
    end else if (out_ready) begin
      out_v_q <= 1'b0;
    end
  end

  a_rsp_matches: assert property (@(posedge clk) disable iff (!rst_n)
                                  (take && ctl.need_rf) |-> (rsp.valid == ctl.rd_en));
endmodule
