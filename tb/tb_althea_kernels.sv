// tb_althea_kernels: the ALTHEA core at its default parameters running
// small integer kernels of the kind found in embedded benchmark suites:
// bit counting over an array, a bubble sort called as a subroutine (JAL,
// PUSH/POP of the registers it uses, return through JR), a linear search
// and a sum of squares built with the multiply-accumulate unit. Input data
// are random; the expected results are computed in this file and compared
// with the data memory after HALT. Memories answer one cycle after a
// request with random ready stalls. The cycle count and the number of
// instructions decoded are printed.
// The kinds of kernel follow the benchmarks the design was evaluated with;
// the programs, sizes and data are this test's own.
module tb_althea_kernels;
  import althea_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    imem_req_valid, imem_req_ready, imem_rsp_valid;
  word_t   imem_req_addr, imem_rsp_data;
  logic    dmem_req_valid, dmem_req_ready, dmem_req_we, dmem_rsp_valid;
  word_t   dmem_req_addr, dmem_req_wdata, dmem_rsp_data;
  logic [3:0] dmem_req_be;
  logic    cp_req_valid, cp_rsp_valid;
  cp_req_t cp_req;
  logic    halted;
  logic    ev_leri, ev_qfull, ev_seg, ev_byp, ev_lock, ev_status, ev_redir;

  althea_core dut (
    .clk, .rst_n,
    .imem_req_valid, .imem_req_ready, .imem_req_addr, .imem_rsp_valid, .imem_rsp_data,
    .dmem_req_valid, .dmem_req_ready, .dmem_req_we, .dmem_req_be, .dmem_req_addr, .dmem_req_wdata,
    .dmem_rsp_valid, .dmem_rsp_data,
    .cp_req_valid, .cp_req_ready(1'b1), .cp_req, .cp_rsp_valid, .cp_rsp_data(32'd0),
    .halted,
    .ev_leri_folded(ev_leri), .ev_queue_full(ev_qfull), .ev_segment(ev_seg),
    .ev_id_bypass(ev_byp), .ev_lock_stall(ev_lock), .ev_status_stall(ev_status),
    .ev_redirect(ev_redir)
  );

  logic [15:0] prog [1024];
  word_t       dmem [256];
  int          pc_asm;

  always_ff @(posedge clk) begin
    imem_req_ready <= ($urandom_range(0, 4) != 0);
    dmem_req_ready <= ($urandom_range(0, 4) != 0);
    imem_rsp_valid <= imem_req_valid && imem_req_ready;
    imem_rsp_data  <= {prog[imem_req_addr[10:1] + 10'd1], prog[imem_req_addr[10:1]]};
    dmem_rsp_valid <= dmem_req_valid && dmem_req_ready && !dmem_req_we;
    dmem_rsp_data  <= dmem[dmem_req_addr[9:2]];
    if (dmem_req_valid && dmem_req_ready && dmem_req_we)
      for (int b = 0; b < 4; b++)
        if (dmem_req_be[b]) dmem[dmem_req_addr[9:2]][8 * b +: 8] <= dmem_req_wdata[8 * b +: 8];
    cp_rsp_valid   <= 1'b0;
  end

  // ---------------- assembler ----------------
  function automatic void emit(logic [15:0] w); prog[pc_asm] = w; pc_asm++; endfunction
  function automatic void alurr(int rd, int rs, int fn); emit({4'h1, 4'(rd), 4'(rs), 4'(fn)}); endfunction
  function automatic void aluri(int rd, int fn, int imm); emit({4'h2, 4'(rd), 4'(fn), 4'(imm)}); endfunction
  function automatic void ldi(int rd, logic [31:0] v);
    if (v > 32'd15) begin emit({2'b11, v[31:18]}); emit({2'b11, v[17:4]}); end
    aluri(rd, 6, int'(v[3:0]));
  endfunction
  function automatic void shr1(int rd); emit({4'h3, 4'(rd), 4'd1, 4'd5}); endfunction
  function automatic void mul(int ra, int rb, int mac); emit({4'h4, 4'(ra), 4'(rb), 4'(mac)}); endfunction
  function automatic void move(int rd, int rs, int fn); emit({4'h5, 4'(rd), 4'(rs), 4'(fn)}); endfunction
  function automatic void load(int rd, int ra, int imm); emit({4'h6, 4'(rd), 4'(ra), 4'(imm)}); endfunction
  function automatic void store(int rd, int ra, int imm); emit({4'h7, 4'(rd), 4'(ra), 4'(imm)}); endfunction
  function automatic void push(logic [11:0] m); emit({4'h8, m}); endfunction
  function automatic void pop(logic [11:0] m); emit({4'h9, m}); endfunction
  function automatic void br(int cond, int tgt); emit({4'hA, 4'(cond), 8'(tgt - pc_asm - 1)}); endfunction
  function automatic void jal(int tgt); emit({4'hB, 4'd0, 8'(tgt - pc_asm - 1)}); endfunction
  function automatic void jr(int rs); emit({4'hB, 4'd1, 4'(rs), 4'd0}); endfunction
  localparam int ADD = 0, SUB = 1, AND = 2, CMP = 5;
  localparam int BRA = 0, BEQ = 1, BNE = 2, BLS = 10;

  localparam int NB = 8, NS = 8, NF = 16;        // array lengths
  localparam int BC_BASE = 32'h000, SORT_BASE = 32'h040, FIND_BASE = 32'h080, RES = 32'h200;
  int sort_fn, found_pc, l_outer, l_inner, l_next, l_pass, l_cmp, l_noswap, l_find;
  int fix_found, fix_next, fix_noswap, fix_jal;

  task automatic build();
    for (int i = 0; i < 1024; i++) prog[i] = 16'h0000;
    pc_asm = 0;
    ldi(9, RES);
    ldi(8, 32'h3F0);
    move(4, 8, 2);                              // SP = 0x3F0
    // --- bit count over NB words ---
    ldi(1, BC_BASE); ldi(2, NB); ldi(4, 0);
    l_outer = pc_asm;
    load(3, 1, 0);
    l_inner = pc_asm;
    aluri(3, CMP, 0);
    fix_next = pc_asm; emit(16'h0);             // BEQ next (patched)
    move(5, 3, 0);
    aluri(5, AND, 1);
    alurr(4, 5, ADD);
    shr1(3);
    br(BRA, l_inner);
    l_next = pc_asm;
    prog[fix_next] = {4'hA, 4'(BEQ), 8'(l_next - fix_next - 1)};
    aluri(1, ADD, 4);
    aluri(2, SUB, 1);
    br(BNE, l_outer);
    store(4, 9, 0);                             // RES[0] = bit count
    // --- sort, as a subroutine ---
    ldi(1, 32'h1111); ldi(2, 32'h2222);
    fix_jal = pc_asm; emit(16'h0);              // JAL sort (patched)
    store(1, 9, 2);                             // R1, R2 must survive the call
    store(2, 9, 3);
    // --- linear search for the key ---
    ldi(1, FIND_BASE); ldi(2, 0);
    emit({2'b11, 14'(0)}); emit({2'b11, 14'(0)});   // placeholder for the key (patched)
    aluri(7, 6, 0);
    l_find = pc_asm;
    load(3, 1, 0);
    alurr(3, 7, CMP);
    fix_found = pc_asm; emit(16'h0);            // BEQ found (patched)
    aluri(1, ADD, 4);
    aluri(2, ADD, 1);
    br(BRA, l_find);
    found_pc = pc_asm;
    prog[fix_found] = {4'hA, 4'(BEQ), 8'(found_pc - fix_found - 1)};
    store(2, 9, 1);                             // RES[1] = index
    // --- sum of squares with MAC ---
    ldi(1, BC_BASE); ldi(2, NB);
    ldi(3, 0); move(2, 3, 2); move(3, 3, 2);    // ML = MH = 0
    l_pass = pc_asm;
    load(3, 1, 0);
    mul(3, 3, 1);
    aluri(1, ADD, 4);
    aluri(2, SUB, 1);
    br(BNE, l_pass);
    move(5, 2, 1); move(6, 3, 1);
    store(5, 9, 4); store(6, 9, 5);             // RES[4] = ML, RES[5] = MH
    emit(16'h0100);                             // HALT
    // --- bubble sort of NS words at SORT_BASE ---
    sort_fn = pc_asm;
    prog[fix_jal] = {4'hB, 4'd0, 8'(sort_fn - fix_jal - 1)};
    push(12'b0000_0001_1110);                   // PUSH R1..R4, R8
    ldi(8, NS - 1);
    l_pass = pc_asm;
    ldi(1, SORT_BASE); ldi(2, NS - 1);
    l_cmp = pc_asm;
    load(3, 1, 0); load(4, 1, 1);
    alurr(3, 4, CMP);
    fix_noswap = pc_asm; emit(16'h0);           // BLS noswap (patched)
    store(4, 1, 0); store(3, 1, 1);
    l_noswap = pc_asm;
    prog[fix_noswap] = {4'hA, 4'(BLS), 8'(l_noswap - fix_noswap - 1)};
    aluri(1, ADD, 4);
    aluri(2, SUB, 1);
    br(BNE, l_cmp);
    aluri(8, SUB, 1);
    br(BNE, l_pass);
    pop(12'b0000_0001_1110);
    move(0, 1, 1);                              // R0 = LR
    jr(0);
  endtask

  int checks = 0, failures = 0, cycles = 0, ninst = 0;
  always_ff @(posedge clk) if (rst_n && !halted) begin
    cycles <= cycles + 1;
    ninst  <= ninst + int'(dut.id_valid && dut.id_ready);
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    word_t sorted [NS];
    word_t key;
    int kidx, bits;
    logic [63:0] sq;
    for (int i = 0; i < 256; i++) dmem[i] = $urandom;
    build();
    kidx = $urandom_range(3, NF - 1);
    key = dmem[FIND_BASE / 4 + kidx];
    for (int i = 0; i < kidx; i++) if (dmem[FIND_BASE / 4 + i] == key) dmem[FIND_BASE / 4 + i] ^= 32'h1;
    // patch the key into the LERI/LDI placeholder
    for (int p = 0; p < 200; p++)
      if (prog[p] == 16'hC000 && prog[p + 1] == 16'hC000 && prog[p + 2] == 16'h2760) begin
        prog[p] = {2'b11, key[31:18]}; prog[p + 1] = {2'b11, key[17:4]};
        prog[p + 2] = {4'h2, 4'd7, 4'd6, key[3:0]};
      end
    bits = 0; sq = '0;
    for (int i = 0; i < NB; i++) begin
      bits += $countones(dmem[BC_BASE / 4 + i]);
      sq += 64'(dmem[BC_BASE / 4 + i]) * 64'(dmem[BC_BASE / 4 + i]);
    end
    for (int i = 0; i < NS; i++) sorted[i] = dmem[SORT_BASE / 4 + i];
    sorted.sort();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (halted);
    repeat (2) @(posedge clk);
    check("bit count", dmem[RES / 4 + 0], word_t'(bits));
    check("search index", dmem[RES / 4 + 1], word_t'(kidx));
    check("R1 kept across the call", dmem[RES / 4 + 2], 32'h1111);
    check("R2 kept across the call", dmem[RES / 4 + 3], 32'h2222);
    check("sum of squares, high", dmem[RES / 4 + 5], sq[63:32]);
    check("sum of squares, low", dmem[RES / 4 + 4], sq[31:0]);
    for (int i = 0; i < NS; i++) check($sformatf("sorted[%0d]", i), dmem[SORT_BASE / 4 + i], sorted[i]);
    check("stack pointer restored", dut.u_rf.data_q[R_SP], 32'h3F0);
    $display("kernels: %0d instructions decoded in %0d cycles", ninst, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: no halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
