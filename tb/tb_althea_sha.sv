// tb_althea_sha: the ALTHEA core at its default parameters computing the
// SHA-1 compression function of one 512-bit message block, the kernel of
// the secure hash benchmark. The program is assembled in this file: it
// first expands the 16 message words into the 80-word schedule in data
// memory (XOR of four earlier words, rotated left by one), then runs the
// 80 rounds in four loops of 20, one per round function (choose, parity,
// majority, parity) with its constant, and finally adds the initial hash
// values and stores the five result words. Rotations are built from a left
// and a right shift, the bitwise complement from an XOR with all ones, and a
// LERI-extended offset addresses the schedule word being written. The message is random;
// the expected digest words are computed here with the standard algorithm
// and compared after HALT. Memories answer one cycle after a request with
// random ready stalls; the cycle count is printed.
// The choice of a secure-hash kernel follows the benchmarks the design was
// evaluated with; the program, its size and its data are this test's own.
module tb_althea_sha;
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
  function automatic void leri(logic [13:0] v); emit({2'b11, v}); endfunction
  localparam int ADD = 0, SUB = 1, AND = 2, OR = 3, XOR = 4;
  localparam int BNE = 2;
  localparam int LSL_R = 0, LSR_R = 1, LSL_I = 4, LSR_I = 5;
  localparam int W_BASE = 32'h000, RES = 32'h200;
  localparam word_t H0 = 32'h67452301, H1 = 32'hEFCDAB89, H2 = 32'h98BADCFE,
                    H3 = 32'h10325476, H4 = 32'hC3D2E1F0;
  localparam word_t K [4] = '{32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC, 32'hCA62C1D6};

  // registers: R0..R4 = a..e, R5/R6 temporaries, R7 = K, R8 = schedule
  // pointer, R9 = loop count, R10 = 27, R11 = 30, R12 = 31, R13 = all ones,
  // R14 = expansion pointer, R15 = result pointer
  task automatic round_loop(int kind);
    int top;
    ldi(7, K[kind]); ldi(9, 20);
    top = pc_asm;
    move(5, 1, 0);                                  // f(b, c, d)
    case (kind)
      0: begin alurr(5, 2, AND); move(6, 1, 0); alurr(6, 13, XOR); alurr(6, 3, AND); alurr(5, 6, OR); end
      2: begin alurr(5, 2, AND); move(6, 1, 0); alurr(6, 3, AND); alurr(5, 6, OR);
               move(6, 2, 0); alurr(6, 3, AND); alurr(5, 6, OR); end
      default: begin alurr(5, 2, XOR); alurr(5, 3, XOR); end
    endcase
    alurr(5, 4, ADD); alurr(5, 7, ADD);             // + e + K
    load(6, 8, 0); alurr(5, 6, ADD);                // + W[t]
    move(6, 0, 0); shift(6, 5, LSL_I); alurr(5, 6, ADD);
    move(6, 0, 0); shift(6, 10, LSR_R); alurr(5, 6, ADD);   // + rotl5(a)
    move(4, 3, 0); move(3, 2, 0);                   // e = d, d = c
    move(2, 1, 0); shift(2, 2, LSR_I); move(6, 1, 0); shift(6, 11, LSL_R);
    alurr(2, 6, OR);                                // c = rotl30(b)
    move(1, 0, 0); move(0, 5, 0);                   // b = a, a = temp
    aluri(8, ADD, 4);
    aluri(9, SUB, 1);
    br(BNE, top);
  endtask

  task automatic build();
    int top;
    for (int i = 0; i < 1024; i++) prog[i] = 16'h0000;
    pc_asm = 0;
    ldi(10, 27); ldi(11, 30); ldi(12, 31); ldi(13, 32'hFFFF_FFFF); ldi(15, RES);
    // --- message schedule W[16..79] ---
    ldi(14, W_BASE); ldi(9, 64);
    top = pc_asm;
    load(5, 14, 0); load(6, 14, 2); alurr(5, 6, XOR);       // W[t-16] ^ W[t-14]
    load(6, 14, 8); alurr(5, 6, XOR);                       // ^ W[t-8]
    load(6, 14, 13); alurr(5, 6, XOR);                      // ^ W[t-3]
    move(6, 5, 0); shift(6, 1, LSL_I); shift(5, 12, LSR_R); alurr(5, 6, OR);
    leri(14'd4); store(5, 14, 0);                           // W[t] at +64
    aluri(14, ADD, 4);
    aluri(9, SUB, 1);
    br(BNE, top);
    // --- 80 rounds ---
    ldi(0, H0); ldi(1, H1); ldi(2, H2); ldi(3, H3); ldi(4, H4);
    ldi(8, W_BASE);
    for (int k = 0; k < 4; k++) round_loop(k);
    ldi(5, H0); alurr(0, 5, ADD); store(0, 15, 0);
    ldi(5, H1); alurr(1, 5, ADD); store(1, 15, 1);
    ldi(5, H2); alurr(2, 5, ADD); store(2, 15, 2);
    ldi(5, H3); alurr(3, 5, ADD); store(3, 15, 3);
    ldi(5, H4); alurr(4, 5, ADD); store(4, 15, 4);
    emit(16'h0100);                                         // HALT
  endtask

  function automatic word_t rotl(word_t x, int n); return (x << n) | (x >> (32 - n)); endfunction

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
    word_t w [80];
    word_t a, b, c, d, e, f, t;
    word_t h [5];
    for (int i = 0; i < 256; i++) dmem[i] = $urandom;
    build();
    for (int i = 0; i < 16; i++) w[i] = dmem[W_BASE / 4 + i];
    for (int i = 16; i < 80; i++) w[i] = rotl(w[i - 3] ^ w[i - 8] ^ w[i - 14] ^ w[i - 16], 1);
    a = H0; b = H1; c = H2; d = H3; e = H4;
    for (int i = 0; i < 80; i++) begin
      if (i < 20)      f = (b & c) | (~b & d);
      else if (i < 40) f = b ^ c ^ d;
      else if (i < 60) f = (b & c) | (b & d) | (c & d);
      else             f = b ^ c ^ d;
      t = rotl(a, 5) + f + e + K[i / 20] + w[i];
      e = d; d = c; c = rotl(b, 30); b = a; a = t;
    end
    h = '{H0 + a, H1 + b, H2 + c, H3 + d, H4 + e};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (halted);
    repeat (2) @(posedge clk);
    check("W[79]", dmem[W_BASE / 4 + 79], w[79]);
    for (int i = 0; i < 5; i++) check($sformatf("digest word %0d", i), dmem[RES / 4 + i], h[i]);
    $display("sha1 block: %0d instructions decoded in %0d cycles", ninst, cycles);
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
