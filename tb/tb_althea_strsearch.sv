// tb_althea_strsearch: the ALTHEA core at its default parameters running a
// naive substring search, the kernel of the string-search benchmark. The
// text (48 characters) and the pattern (3 characters) are byte strings,
// four characters to a word, drawn from a four-letter alphabet so that
// partial matches are frequent. The program reads them with byte loads
// (LDB), compares the pattern at every text position, leaves the inner loop
// on the first mismatch, and stores the index of the first full match, or
// all ones if there is none; it also writes the index's low half with a
// halfword store and marks a found match in the text with a byte store, so
// the byte lanes of the data port are checked too. Several searches with
// new random texts run one after another in the same test. The expected
// results are found in this file. Memories answer one cycle after a request with
// random ready stalls; the cycle count is printed.
// The choice of a string-search kernel follows the benchmarks the design
// was evaluated with; the program, sizes and data are this test's own.
module tb_althea_strsearch;
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
  function automatic void shift(int rd, int src, int fn); emit({4'h3, 4'(rd), 4'(src), 4'(fn)}); endfunction
  localparam int ADD = 0, SUB = 1, CMP = 5;
  localparam int BRA = 0, BNE = 2;
  function automatic void ldb(int rd, int ra); emit({4'h0, 4'd4, 4'(rd), 4'(ra)}); endfunction
  function automatic void stb(int rd, int ra); emit({4'h0, 4'd6, 4'(rd), 4'(ra)}); endfunction
  function automatic void sth(int rd, int ra); emit({4'h0, 4'd7, 4'(rd), 4'(ra)}); endfunction
  localparam int NT = 48, M = 3, RUNS = 6;
  localparam int TBASE = 32'h000, PBASE = 32'h100, RES = 32'h200;

  // registers: R0 = text, R1 = pattern, R2 = position offset, R3 = positions
  // left, R4 = characters left, R5/R6 = character pointers, R7/R8 = characters,
  // R9 = result pointer, R10 = result, R11 = marker character
  task automatic build();
    int l_outer, l_inner, l_done, fix_miss, fix_done, l_miss;
    for (int i = 0; i < 1024; i++) prog[i] = 16'h0000;
    pc_asm = 0;
    ldi(0, TBASE); ldi(1, PBASE); ldi(9, RES);
    ldi(10, 32'hFFFF_FFFF); ldi(2, 0); ldi(3, NT - M + 1);
    l_outer = pc_asm;
    move(5, 0, 0); alurr(5, 2, ADD); move(6, 1, 0); ldi(4, M);
    l_inner = pc_asm;
    ldb(7, 5); ldb(8, 6);
    alurr(7, 8, CMP); fix_miss = pc_asm; emit(16'h0);       // BNE miss
    aluri(5, ADD, 1); aluri(6, ADD, 1);
    aluri(4, SUB, 1); br(BNE, l_inner);
    move(10, 2, 0);                                         // index
    move(5, 0, 0); alurr(5, 2, ADD); ldi(11, 8'h2A); stb(11, 5);   // mark it
    fix_done = pc_asm; emit(16'h0);                         // BRA done
    l_miss = pc_asm;
    prog[fix_miss] = {4'hA, 4'(BNE), 8'(l_miss - fix_miss - 1)};
    aluri(2, ADD, 1); aluri(3, SUB, 1); br(BNE, l_outer);
    l_done = pc_asm;
    prog[fix_done] = {4'hA, 4'(BRA), 8'(l_done - fix_done - 1)};
    store(10, 9, 0);
    move(5, 9, 0); aluri(5, ADD, 6); sth(10, 5);            // low half at RES + 6
    emit(16'h0100);                                         // HALT
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
    word_t exp;
    logic [7:0] text [NT];
    logic [7:0] pat [M];
    word_t res1;
    build();
    for (int run = 0; run < RUNS; run++) begin
      rst_n = 1'b0;
      for (int i = 0; i < 256; i++) dmem[i] = $urandom;
      for (int i = 0; i < NT; i++) begin
        text[i] = 8'h61 + 8'($urandom_range(0, 3));
        dmem[TBASE / 4 + i / 4][8 * (i % 4) +: 8] = text[i];
      end
      for (int i = 0; i < M; i++) begin
        pat[i] = 8'h61 + 8'($urandom_range(0, 3));
        dmem[PBASE / 4 + i / 4][8 * (i % 4) +: 8] = pat[i];
      end
      res1 = dmem[RES / 4 + 1];
      exp = 32'hFFFF_FFFF;
      for (int p = NT - M; p >= 0; p--) begin
        automatic bit hit = 1'b1;
        for (int j = 0; j < M; j++) if (text[p + j] != pat[j]) hit = 1'b0;
        if (hit) exp = word_t'(p);
      end
      if (exp != 32'hFFFF_FFFF) text[exp] = 8'h2A;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      wait (halted);
      repeat (2) @(posedge clk);
      check($sformatf("run %0d match index", run), dmem[RES / 4], exp);
      check($sformatf("run %0d halfword store", run), dmem[RES / 4 + 1], {exp[15:0], res1[15:0]});
      for (int i = 0; i < NT; i++) begin
        checks++;
        if (dmem[TBASE / 4 + i / 4][8 * (i % 4) +: 8] != text[i]) begin
          failures++; $display("FAIL run %0d text byte %0d", run, i);
        end
      end
    end
    $display("strsearch: %0d instructions decoded in %0d cycles", ninst, cycles);
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
