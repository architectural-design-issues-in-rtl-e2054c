// tb_althea_qsort: the ALTHEA core at its default parameters running a
// recursive quicksort, the kernel of the sorting benchmark, on 16 random
// signed words. The sort routine partitions around the last element
// (signed compare-and-branch), saves its return address and bounds with a
// four-register PUSH, calls itself with JAL on both halves, restores with
// POP and returns through JR, so deep chains of segmented PUSH/POP, stack
// pointer updates and register jumps follow one another. The expected
// result is the array sorted in this file; the stack pointer must be back
// at its start value. Memories answer one cycle after a request with random
// ready stalls; the cycle count is printed.
// The choice of a sorting kernel follows the benchmarks the design was
// evaluated with; the program, its size and its data are this test's own.
module tb_althea_qsort;
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
  localparam int ADD = 0, SUB = 1, CMP = 5;
  localparam int BRA = 0, BGE = 11;
  localparam int NQ = 16;
  localparam int QBASE = 32'h000;
  localparam word_t SP0 = 32'h3F0;

  // qs(R1 = address of the first element, R2 = address of the last one);
  // R3 = partition index, R4 = scan pointer, R6 = pivot, R7/R8 = values
  task automatic build();
    int qs, l_ret, l_scan, l_end, fix_call, fix_ret, fix_end, fix_next;
    for (int i = 0; i < 1024; i++) prog[i] = 16'h0000;
    pc_asm = 0;
    ldi(8, SP0); move(4, 8, 2);                              // SP = SP0
    ldi(1, QBASE); ldi(2, QBASE + 4 * (NQ - 1));
    fix_call = pc_asm; emit(16'h0);                         // JAL qs (patched)
    emit(16'h0100);                                         // HALT
    qs = pc_asm;
    prog[fix_call] = {4'hB, 4'd0, 8'(qs - fix_call - 1)};
    alurr(1, 2, CMP); fix_ret = pc_asm; emit(16'h0);        // BGE ret: lo >= hi
    load(6, 2, 0); move(3, 1, 0); move(4, 1, 0);
    l_scan = pc_asm;
    alurr(4, 2, CMP); fix_end = pc_asm; emit(16'h0);        // BGE end of scan
    load(7, 4, 0); alurr(7, 6, CMP); fix_next = pc_asm; emit(16'h0);   // BGE next
    load(8, 3, 0); store(7, 3, 0); store(8, 4, 0); aluri(3, ADD, 4);
    prog[fix_next] = {4'hA, 4'(BGE), 8'(pc_asm - fix_next - 1)};
    aluri(4, ADD, 4); br(BRA, l_scan);
    l_end = pc_asm;
    prog[fix_end] = {4'hA, 4'(BGE), 8'(l_end - fix_end - 1)};
    load(7, 3, 0); store(6, 3, 0); store(7, 2, 0);          // pivot into place
    move(0, 1, 1); push(12'b0000_0000_1111);                // save LR, lo, hi, i
    move(2, 3, 0); aluri(2, SUB, 4); jal(qs);               // qs(lo, i - 4)
    pop(12'b0000_0000_1111); push(12'b0000_0000_1111);
    move(1, 3, 0); aluri(1, ADD, 4); jal(qs);               // qs(i + 4, hi)
    pop(12'b0000_0000_1111); jr(0);
    l_ret = pc_asm;
    prog[fix_ret] = {4'hA, 4'(BGE), 8'(l_ret - fix_ret - 1)};
    move(0, 1, 1); jr(0);                                   // return through LR
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
    int sorted [NQ];
    for (int i = 0; i < 256; i++) dmem[i] = $urandom;
    if (($urandom & 1) != 0) dmem[QBASE / 4 + 3] = dmem[QBASE / 4 + 9];   // a duplicate
    for (int i = 0; i < NQ; i++) sorted[i] = int'(dmem[QBASE / 4 + i]);
    for (int i = 1; i < NQ; i++)                            // signed insertion sort
      for (int j = i; j > 0 && sorted[j - 1] > sorted[j]; j--) begin
        automatic int t = sorted[j];
        sorted[j] = sorted[j - 1]; sorted[j - 1] = t;
      end
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (halted);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NQ; i++) check($sformatf("a[%0d]", i), dmem[QBASE / 4 + i], word_t'(sorted[i]));
    check("stack pointer restored", dut.u_rf.data_q[R_SP], SP0);
    $display("qsort: %0d instructions decoded in %0d cycles", ninst, cycles);
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
