// tb_althea_core: end-to-end test of the ALTHEA core at its default
// parameters.
//
// A small assembler (functions below) builds a program in the instruction
// memory model; the program exercises every instruction group: long
// immediates made of one, two and three LERIs, ALU, shifter, multiply and
// four-operand multiply-accumulate, moves to and from special registers,
// PUSH/POP of a register list, load and store, a counted loop with a
// conditional branch, a compare-and-branch, JAL/JR and the coprocessor
// channel, and ends with HALT. Memories answer one cycle after a request and
// their ready signals are randomised. After halt the registers and memory are
// compared with values worked out by hand in this file. Each pipeline
// mechanism (LERI folding, full instruction queue, PUSH/POP segmentation,
// ID-stage bypass, register-lock stall, status stall, fetch redirect,
// four-operand channel, coprocessor handshake, both extra write ports) is
// counted and must have happened at least once.
module tb_althea_core;
  import althea_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    imem_req_valid, imem_req_ready, imem_rsp_valid;
  word_t   imem_req_addr, imem_rsp_data;
  logic    dmem_req_valid, dmem_req_ready, dmem_req_we, dmem_rsp_valid;
  word_t   dmem_req_addr, dmem_req_wdata, dmem_rsp_data;
  logic [3:0] dmem_req_be;
  logic    cp_req_valid, cp_req_ready, cp_rsp_valid;
  cp_req_t cp_req;
  word_t   cp_rsp_data;
  logic    halted;
  logic    ev_leri, ev_qfull, ev_seg, ev_byp, ev_lock, ev_status, ev_redir;

  althea_core dut (
    .clk, .rst_n,
    .imem_req_valid, .imem_req_ready, .imem_req_addr, .imem_rsp_valid, .imem_rsp_data,
    .dmem_req_valid, .dmem_req_ready, .dmem_req_we, .dmem_req_be, .dmem_req_addr, .dmem_req_wdata,
    .dmem_rsp_valid, .dmem_rsp_data,
    .cp_req_valid, .cp_req_ready, .cp_req, .cp_rsp_valid, .cp_rsp_data,
    .halted,
    .ev_leri_folded(ev_leri), .ev_queue_full(ev_qfull), .ev_segment(ev_seg), .ev_id_bypass(ev_byp),
    .ev_lock_stall(ev_lock), .ev_status_stall(ev_status), .ev_redirect(ev_redir)
  );

  // ---------------- memory and coprocessor models ----------------
  logic [15:0] prog [512];
  word_t       dmem [256];
  word_t       cpregs [16];
  int          pc_asm;

  always_ff @(posedge clk) begin
    imem_req_ready <= ($urandom_range(0, 3) != 0);
    dmem_req_ready <= ($urandom_range(0, 3) != 0);
    cp_req_ready   <= ($urandom_range(0, 1) != 0);
    imem_rsp_valid <= imem_req_valid && imem_req_ready;
    imem_rsp_data  <= {prog[(imem_req_addr >> 1) + 1], prog[imem_req_addr >> 1]};
    dmem_rsp_valid <= dmem_req_valid && dmem_req_ready && !dmem_req_we;
    dmem_rsp_data  <= dmem[dmem_req_addr[9:2]];
    if (dmem_req_valid && dmem_req_ready && dmem_req_we)
      for (int b = 0; b < 4; b++)
        if (dmem_req_be[b]) dmem[dmem_req_addr[9:2]][8 * b +: 8] <= dmem_req_wdata[8 * b +: 8];
    cp_rsp_valid   <= cp_req_valid && cp_req_ready && cp_req.read;
    cp_rsp_data    <= cpregs[cp_req.cpreg];
    if (cp_req_valid && cp_req_ready && !cp_req.read) cpregs[cp_req.cpreg] <= cp_req.data;
  end

  // ---------------- assembler ----------------
  function automatic void emit(logic [15:0] w);
    prog[pc_asm] = w;
    pc_asm++;
  endfunction
  function automatic void leri(logic [13:0] v); emit({2'b11, v}); endfunction
  function automatic void alurr(int rd, int rs, int fn); emit({4'h1, 4'(rd), 4'(rs), 4'(fn)}); endfunction
  function automatic void aluri(int rd, int fn, int imm); emit({4'h2, 4'(rd), 4'(fn), 4'(imm)}); endfunction
  // LDI of any 32-bit value, with two LERIs in front when it needs them
  function automatic void ldi(int rd, logic [31:0] v);
    if (v > 32'd15) begin
      leri(v[31:18]);
      leri(v[17:4]);
    end
    aluri(rd, 6, int'(v[3:0]));
  endfunction
  function automatic void shift_imm(int rd, int amt, int typ); emit({4'h3, 4'(rd), 4'(amt), 4'(4 + typ)}); endfunction
  function automatic void mul(int ra, int rb, int mac); emit({4'h4, 4'(ra), 4'(rb), 4'(mac)}); endfunction
  function automatic void move(int rd, int rs, int fn); emit({4'h5, 4'(rd), 4'(rs), 4'(fn)}); endfunction
  function automatic void load(int rd, int ra, int imm); emit({4'h6, 4'(rd), 4'(ra), 4'(imm)}); endfunction
  function automatic void store(int rd, int ra, int imm); emit({4'h7, 4'(rd), 4'(ra), 4'(imm)}); endfunction
  function automatic void push(logic [11:0] m); emit({4'h8, m}); endfunction
  function automatic void pop(logic [11:0] m); emit({4'h9, m}); endfunction
  // branch to halfword address tgt
  function automatic void br(int cond, int tgt); emit({4'hA, 4'(cond), 8'(tgt - pc_asm - 1)}); endfunction
  function automatic void jal(int tgt); emit({4'hB, 4'd0, 8'(tgt - pc_asm - 1)}); endfunction
  function automatic void jr(int rs); emit({4'hB, 4'd1, 4'(rs), 4'd0}); endfunction
  function automatic void cpw(int cr, int rs); emit({4'h0, 4'd2, 4'(rs), 4'(cr)}); endfunction
  function automatic void cpr(int rd, int cr); emit({4'h0, 4'd3, 4'(rd), 4'(cr)}); endfunction

  int loop_pc, skip_pc, jal_pc, func_pc;

  task automatic build_program();
    for (int i = 0; i < 512; i++) prog[i] = 16'h0000;      // NOP
    pc_asm = 0;
    ldi(1, 5);
    ldi(2, 7);
    alurr(1, 2, 0);                 // R1 = 12 (reads R1 right after LDI: lock stall)
    ldi(3, 32'h1234_5678);          // two LERIs
    leri(14'h1555); leri(14'h32BF); leri(14'h2BAB); aluri(4, 6, 4'hE);  // three LERIs
    move(5, 3, 0);                  // R5 = R3 (bypass)
    shift_imm(5, 4, 0);             // R5 <<= 4
    ldi(6, 32'h8000_0000);
    shift_imm(6, 4, 2);             // R6 >>>= 4
    mul(1, 2, 0);                   // {MH,ML} = 12*7
    mul(3, 3, 1);                   // {MH,ML} += R3*R3   (four operands)
    move(7, 2, 1);                  // R7 = ML
    move(8, 3, 1);                  // R8 = MH
    ldi(9, 32'h100);
    move(4 - 0, 9, 2) ;             // SP (S[4]) = R9
    push(12'b0000_0000_1110);       // PUSH R1,R2,R3
    ldi(1, 0); ldi(2, 0); ldi(3, 0);
    pop(12'b0000_0000_1110);        // POP R1,R2,R3
    store(3, 9, 1);                 // mem[0x104] = R3
    load(10, 9, 1);                 // R10 = mem[0x104]
    ldi(11, 3); ldi(12, 0);
    loop_pc = pc_asm;
    aluri(12, 0, 2);                // R12 += 2
    aluri(11, 1, 1);                // R11 -= 1
    br(2, loop_pc);                 // BNE loop
    alurr(1, 2, 5);                 // CMP R1, R2 (12 vs 7)
    skip_pc = pc_asm + 2;
    br(13, skip_pc);                // BGT skip
    ldi(13, 9);                     // skipped
    ldi(14, 1);                     // skip:
    jal_pc = pc_asm;
    func_pc = jal_pc + 5;
    jal(func_pc);
    cpw(3, 14);                     // CP[3] = R14
    cpr(13, 3);                     // R13 = CP[3]
    emit(16'h0100);                 // HALT
    emit(16'h0000);
    // func:
    if (pc_asm != func_pc) $fatal(1, "assembler layout");
    ldi(15, 5);
    move(0, 1, 1);                  // R0 = LR (S[1])
    jr(0);
  endtask

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  int n_leri = 0, n_qfull = 0, n_seg = 0, n_lock = 0, n_status = 0, n_redir = 0;
  int n_byp = 0, n_four = 0, n_cp = 0, n_wr1 = 0, n_wr2 = 0;
  int cycles = 0;

  always_ff @(posedge clk) if (rst_n) begin
    cycles <= cycles + 1;
    n_leri   <= n_leri   + int'(ev_leri);
    n_qfull  <= n_qfull  + int'(ev_qfull);
    n_seg    <= n_seg    + int'(ev_seg);
    n_byp    <= n_byp    + int'(ev_byp);
    n_lock   <= n_lock   + int'(ev_lock);
    n_status <= n_status + int'(ev_status);
    n_redir  <= n_redir  + int'(ev_redir);
    n_four   <= n_four   + int'(dut.ex_in_valid && dut.ex_in_ready && dut.ex_in.opv == 4'b1111);
    n_cp     <= n_cp     + int'(cp_req_valid && cp_req_ready);
    n_wr1    <= n_wr1    + int'(dut.wr[1].en);
    n_wr2    <= n_wr2    + int'(dut.wr[2].en);
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  function automatic word_t reg_value(int r);
    return dut.u_rf.data_q[r];
  endfunction

  initial begin
    logic [63:0] acc;
    for (int i = 0; i < 256; i++) dmem[i] = '0;
    for (int i = 0; i < 16; i++) cpregs[i] = '0;
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (halted);
    repeat (2) @(posedge clk);
    acc = 64'd84 + 64'h1234_5678 * 64'h1234_5678;
    check("R0 (link)", reg_value(0), word_t'((jal_pc + 1) * 2));
    check("R1", reg_value(1), 32'd12);
    check("R2", reg_value(2), 32'd7);
    check("R3", reg_value(3), 32'h1234_5678);
    check("R4 (3 LERIs)", reg_value(4), 32'hCAFE_BABE);
    check("R5", reg_value(5), 32'h2345_6780);
    check("R6", reg_value(6), 32'hF800_0000);
    check("R7 (ML)", reg_value(7), acc[31:0]);
    check("R8 (MH)", reg_value(8), acc[63:32]);
    check("R9", reg_value(9), 32'h100);
    check("R10", reg_value(10), 32'h1234_5678);
    check("R11", reg_value(11), 32'd0);
    check("R12", reg_value(12), 32'd6);
    check("R13", reg_value(13), 32'd1);
    check("R14", reg_value(14), 32'd1);
    check("R15", reg_value(15), 32'd5);
    check("ML", reg_value(R_ML), acc[31:0]);
    check("MH", reg_value(R_MH), acc[63:32]);
    check("SP", reg_value(R_SP), 32'h100);
    check("LR", reg_value(R_LR), word_t'((jal_pc + 1) * 2));
    check("mem[0x104]", dmem[8'h41], 32'h1234_5678);
    check("mem[0xFC] (R1)", dmem[8'h3F], 32'd12);
    check("mem[0xF8] (R2)", dmem[8'h3E], 32'd7);
    check("mem[0xF4] (R3)", dmem[8'h3D], 32'h1234_5678);
    check("CP[3]", cpregs[3], 32'd1);
    checks++;
    if (dut.u_rf.lock_q != '0) begin failures++; $display("FAIL locks left set"); end
    $display("cycles to halt: %0d", cycles);
    check_count("LERI folded", n_leri);
    check_count("instruction queue full", n_qfull);
    check_count("PUSH/POP segmentation", n_seg);
    check_count("ID stage bypass", n_byp);
    check_count("register lock stall", n_lock);
    check_count("status stall", n_status);
    check_count("fetch redirect", n_redir);
    check_count("four-operand transfer", n_four);
    check_count("coprocessor transfer", n_cp);
    check_count("write port 1 (high word)", n_wr1);
    check_count("write port 2 (stack ptr)", n_wr2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: no halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
