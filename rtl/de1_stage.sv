// de1_stage: first decode stage (DE1): decoder, register request and
// branch resolution.
//
// DE1 takes one single-operand instruction per cycle from the ID stage and
// decodes it: it works out which registers are read (at most four, on the
// four read ports), which are written and must therefore be locked, the
// immediate, the execution unit and the memory operation. It sends the read
// and lock request to the register file on the merged read channel and the
// decoded control to DE2, so that the register file works for this
// instruction while DE2 is still busy with the previous one. Instructions
// that need no register access send no request, and branches, NOPs and
// HALT send nothing downstream (on-demand channels).
// Branch resolution: conditional branches use the status flags that EX
// returns on its status channel after every flag-setting instruction. DE1
// counts flag-setting instructions still in flight and holds a conditional
// branch until that count is zero (the status stall). A taken branch or JAL
// redirects fetch in the cycle the branch is accepted, which also flushes
// the fetch block and ID. JR needs a register value, so it is resolved in
// DE2; DE1 accepts nothing after a JR until DE2 reports it done. HALT stops
// DE1 and fetching.
// The division of decoding into DE1 and DE2 and the branch resolution in
// DE1 follow the enhanced pipeline of the design description; the status
// counting, the JR handling and all encodings are this design's choices.
module de1_stage
  import althea_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  idinst_t in_data,
  output logic    rf_req_valid,
  input  logic    rf_req_ready,
  output rf_req_t rf_req,
  output logic    ctl_valid,
  input  logic    ctl_ready,
  output de_ctl_t ctl,
  input  logic    st_valid,
  input  flags_t  st_flags,
  input  logic    jr_done,
  output logic    redirect,
  output word_t   redirect_pc,
  output logic    halted,
  output logic    status_stall
);
  de_ctl_t   ctl_q;
  logic      ctl_v_q;
  flags_t    flags_q;
  logic [3:0] flag_pend_q;
  logic      jr_wait_q, halted_q;

  // ---------------- decoder ----------------
  inst_t   i;
  reg_t    f_rd, f_rs;
  word_t   imm4, disp8, target;
  de_ctl_t d;
  rf_req_t r;
  logic    send, need_flags, taken, do_halt;

  assign i     = in_data.f.inst;
  assign f_rd  = {1'b0, i[11:8]};
  assign f_rs  = {1'b0, i[7:4]};
  assign imm4  = in_data.f.ext_valid ? {in_data.f.ext[27:0], i[3:0]} : {28'd0, i[3:0]};
  assign disp8 = in_data.f.ext_valid ? {in_data.f.ext[23:0], i[7:0]} : {{24{i[7]}}, i[7:0]};

  always_comb begin
    d          = '0;
    r          = '0;
    d.group    = in_data.f.group;
    d.pc       = in_data.f.pc;
    d.seg      = in_data.seg;
    send       = 1'b1;
    need_flags = 1'b0;
    taken      = 1'b0;
    do_halt    = 1'b0;
    target     = in_data.f.pc + 32'd2 + {disp8[30:0], 1'b0};
    unique case (in_data.f.group)
      G_ALURR: begin
        d.unit = EU_ALU; d.func = i[3:0]; d.setflags = 1'b1;
        r.rd_en = 4'b0011; r.rd_addr[0] = f_rd; r.rd_addr[1] = f_rs;
        d.wb_en[0] = (i[3:0] != ALU_CMP); d.wb_addr[0] = f_rd;
      end
      G_ALURI: begin
        d.unit = EU_ALU; d.func = i[7:4]; d.setflags = (i[7:4] != ALU_LDI);
        r.rd_en[0] = (i[7:4] != ALU_LDI); r.rd_addr[0] = f_rd;
        d.opsel_imm = 4'b0010; d.imm = imm4;
        d.wb_en[0] = (i[7:4] != ALU_CMP); d.wb_addr[0] = f_rd;
      end
      G_SHIFT: begin
        d.unit = EU_SHIFT; d.func = i[3:0]; d.setflags = 1'b1;
        r.rd_en[0] = 1'b1; r.rd_addr[0] = f_rd;
        if (i[2]) begin
          d.opsel_imm = 4'b0010; d.imm = {28'd0, i[7:4]};
        end else begin
          r.rd_en[1] = 1'b1; r.rd_addr[1] = f_rs;
        end
        d.wb_en[0] = 1'b1; d.wb_addr[0] = f_rd;
      end
      G_MUL: begin
        // MAC reads four operands: ra, rb, ML and MH; both write ML and MH
        d.unit = EU_MUL; d.func = i[3:0];
        r.rd_en = i[0] ? 4'b1111 : 4'b0011;
        r.rd_addr[0] = f_rd; r.rd_addr[1] = f_rs;
        r.rd_addr[2] = R_ML; r.rd_addr[3] = R_MH;
        d.wb_en[1:0] = 2'b11; d.wb_addr[0] = R_ML; d.wb_addr[1] = R_MH;
      end
      G_MOVE: begin
        d.unit = EU_BYPASS; r.rd_en[0] = 1'b1;
        unique case (i[1:0])
          2'd1:    begin r.rd_addr[0] = 5'd16 + f_rs; d.wb_addr[0] = f_rd; end
          2'd2:    begin r.rd_addr[0] = f_rs; d.wb_addr[0] = 5'd16 + f_rd; end
          default: begin r.rd_addr[0] = f_rs; d.wb_addr[0] = f_rd; end
        endcase
        d.wb_en[0] = 1'b1;
      end
      G_LOAD, G_STORE: begin
        d.unit = EU_AGU;
        r.rd_en = (in_data.f.group == G_LOAD) ? 4'b0001 : 4'b0101;
        d.opsel_imm = 4'b0010;
        d.wb_en[0] = (in_data.f.group == G_LOAD);
        if (i[15:12] == OP_MISC) begin
          // byte/halfword forms: rd in [7:4], base in [3:0], offset ER or 0
          r.rd_addr[0] = {1'b0, i[3:0]}; r.rd_addr[2] = f_rs; d.wb_addr[0] = f_rs;
          d.imm = in_data.f.ext_valid ? in_data.f.ext : '0;
          unique case (i[9:8])
            2'd0:    d.mem = MEM_LDB;
            2'd1:    d.mem = MEM_LDH;
            2'd2:    d.mem = MEM_STB;
            default: d.mem = MEM_STH;
          endcase
        end else begin
          r.rd_addr[0] = f_rs; r.rd_addr[2] = f_rd; d.wb_addr[0] = f_rd;
          d.imm = in_data.f.ext_valid ? imm4 : {26'd0, i[3:0], 2'b00};
          d.mem = (in_data.f.group == G_LOAD) ? MEM_LOAD : MEM_STORE;
        end
      end
      G_PUSH, G_POP: begin
        // one micro-op from ID: stack pointer on port 0, pushed register on port 2
        d.unit = EU_AGU;
        r.rd_addr[0] = R_SP; r.rd_addr[2] = in_data.sreg;
        r.rd_en = (in_data.f.group == G_PUSH) ? 4'b0101 : 4'b0001;
        d.mem = (in_data.f.group == G_PUSH) ? MEM_PUSH : MEM_POP;
        d.wb_en[0] = (in_data.f.group == G_POP); d.wb_addr[0] = in_data.sreg;
        d.wb_en[2] = in_data.seg.last; d.wb_addr[2] = R_SP;
        send = (in_data.seg.count != 4'd0);
      end
      G_BRANCH: begin
        send = 1'b0;
        need_flags = (i[11:8] != 4'd0);
        taken = cond_true(i[11:8], flags_q);
      end
      G_JUMP: begin
        if (i[11:8] == 4'd1) begin
          d.jr = 1'b1; r.rd_en[0] = 1'b1; r.rd_addr[0] = f_rs;
        end else begin
          // JAL: link through the bypass unit, target computed here
          target = in_data.f.pc + 32'd2 + {{23{i[7]}}, i[7:0], 1'b0};
          taken = 1'b1;
          d.unit = EU_BYPASS; d.opsel_imm = 4'b0001; d.imm = in_data.f.pc + 32'd2;
          d.wb_en[0] = 1'b1; d.wb_addr[0] = R_LR;
        end
      end
      G_CP: begin
        d.unit = EU_CP; d.cpreg = i[3:0];
        if (i[11:8] == 4'd2) begin
          d.func = 4'd0; r.rd_en[0] = 1'b1; r.rd_addr[0] = f_rs;
        end else begin
          d.func = 4'd1; d.wb_en[0] = 1'b1; d.wb_addr[0] = f_rs;
        end
      end
      default: begin // G_SYS: NOP or HALT
        send = 1'b0;
        do_halt = (i[11:8] == 4'd1);
      end
    endcase
    for (int w = 0; w < 3; w++)
      if (d.wb_en[w]) r.lock[d.wb_addr[w]] = 1'b1;
    d.need_rf = (r.rd_en != '0) || (r.lock != '0);
    d.rd_en   = r.rd_en;
  end

  // ---------------- handshakes ----------------
  logic go, slot_free, accept;
  assign slot_free = !ctl_v_q || ctl_ready;
  assign go        = !halted_q && !jr_wait_q && !(need_flags && flag_pend_q != 4'd0)
                     && (!send || slot_free);
  assign rf_req_valid = in_valid && go && send && d.need_rf;
  assign rf_req       = r;
  assign in_ready     = go && (!(send && d.need_rf) || rf_req_ready);
  assign accept       = in_valid && in_ready;

  assign redirect     = accept && taken;
  assign redirect_pc  = target;
  assign halted       = halted_q;
  assign status_stall = in_valid && need_flags && (flag_pend_q != 4'd0);
  assign ctl_valid    = ctl_v_q;
  assign ctl          = ctl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_v_q     <= 1'b0;
      ctl_q       <= '0;
      flags_q     <= '0;
      flag_pend_q <= '0;
      jr_wait_q   <= 1'b0;
      halted_q    <= 1'b0;
    end else begin
      if (accept && send) begin
        ctl_v_q <= 1'b1;
        ctl_q   <= d;
      end else if (ctl_ready) begin
        ctl_v_q <= 1'b0;
      end
      flag_pend_q <= flag_pend_q + 4'(accept && send && d.setflags) - 4'(st_valid);
      if (st_valid) flags_q <= st_flags;
      if (accept && d.jr) jr_wait_q <= 1'b1;
      else if (jr_done)   jr_wait_q <= 1'b0;
      if (accept && do_halt) halted_q <= 1'b1;
    end
  end
endmodule
