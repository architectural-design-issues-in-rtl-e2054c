// tb_althea_dijkstra: the ALTHEA core at its default parameters running
// Dijkstra's shortest-path algorithm, the kernel of the graph benchmark, on
// a complete directed graph of 8 nodes with random edge weights 1..100
// held as an 8x8 matrix (row stride 32 bytes) in data memory. The program
// initialises the distance and visited arrays, then 8 times selects the
// unvisited node with the smallest distance (signed compare-and-branch),
// marks it and relaxes all its edges. Array elements are addressed through
// computed pointers, and each row address is a node offset shifted left.
// The expected distances come from a Floyd-Warshall computation in this
// file, independent of the algorithm the program uses. Memories answer one
// cycle after a request with random ready stalls; the cycle count is printed.
// The choice of a shortest-path kernel follows the benchmarks the design was
// evaluated with; the program, graph size and data are this test's own.
module tb_althea_dijkstra;
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
  localparam int BNE = 2, BGE = 11;
  localparam int LSL_I = 4;
  localparam int N = 8;
  localparam int MAT = 32'h000, DIST = 32'h100, VIS = 32'h120;
  localparam word_t INF = 32'h7FFF_FFFF;

  // registers: R0 = dist base, R1 = visited base, R2 = matrix base, R3 = outer
  // count, R4 = element offset, R5 = best distance, R6 = offset of the chosen
  // node, R7 = address, R8/R9 = values, R10 = inner count, R11 = dist[u],
  // R12 = row address, R13 = INF, R14 = 0, R15 = 1
  task automatic build();
    int l_init, l_outer, l_sel, l_rel, fix_sel_v, fix_sel_d, fix_rel_v, fix_rel_d;
    for (int i = 0; i < 1024; i++) prog[i] = 16'h0000;
    pc_asm = 0;
    ldi(0, DIST); ldi(1, VIS); ldi(2, MAT); ldi(13, INF); ldi(14, 0); ldi(15, 1);
    ldi(4, 0); ldi(10, N);
    l_init = pc_asm;
    move(7, 0, 0); alurr(7, 4, ADD); store(13, 7, 0);       // dist[i] = INF
    move(7, 1, 0); alurr(7, 4, ADD); store(14, 7, 0);       // visited[i] = 0
    aluri(4, ADD, 4); aluri(10, SUB, 1); br(BNE, l_init);
    store(14, 0, 0);                                        // dist[0] = 0
    ldi(3, N);
    l_outer = pc_asm;
    // select the unvisited node with the smallest distance
    move(5, 13, 0); ldi(6, 0); ldi(4, 0); ldi(10, N);
    l_sel = pc_asm;
    move(7, 1, 0); alurr(7, 4, ADD); load(8, 7, 0);
    aluri(8, CMP, 0); fix_sel_v = pc_asm; emit(16'h0);      // BNE next: visited
    move(7, 0, 0); alurr(7, 4, ADD); load(8, 7, 0);
    alurr(8, 5, CMP); fix_sel_d = pc_asm; emit(16'h0);      // BGE next: not smaller
    move(5, 8, 0); move(6, 4, 0);
    prog[fix_sel_v] = {4'hA, 4'(BNE), 8'(pc_asm - fix_sel_v - 1)};
    prog[fix_sel_d] = {4'hA, 4'(BGE), 8'(pc_asm - fix_sel_d - 1)};
    aluri(4, ADD, 4); aluri(10, SUB, 1); br(BNE, l_sel);
    // mark it and load its distance and row
    move(7, 1, 0); alurr(7, 6, ADD); store(15, 7, 0);
    move(7, 0, 0); alurr(7, 6, ADD); load(11, 7, 0);
    move(12, 6, 0); shift(12, 3, LSL_I); alurr(12, 2, ADD);
    // relax its edges
    ldi(4, 0); ldi(10, N);
    l_rel = pc_asm;
    move(7, 1, 0); alurr(7, 4, ADD); load(8, 7, 0);
    aluri(8, CMP, 0); fix_rel_v = pc_asm; emit(16'h0);      // BNE next: visited
    move(7, 12, 0); alurr(7, 4, ADD); load(8, 7, 0);
    alurr(8, 11, ADD);                                      // dist[u] + w(u, v)
    move(7, 0, 0); alurr(7, 4, ADD); load(9, 7, 0);
    alurr(8, 9, CMP); fix_rel_d = pc_asm; emit(16'h0);      // BGE next: no gain
    store(8, 7, 0);
    prog[fix_rel_v] = {4'hA, 4'(BNE), 8'(pc_asm - fix_rel_v - 1)};
    prog[fix_rel_d] = {4'hA, 4'(BGE), 8'(pc_asm - fix_rel_d - 1)};
    aluri(4, ADD, 4); aluri(10, SUB, 1); br(BNE, l_rel);
    aluri(3, SUB, 1); br(BNE, l_outer);
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
    word_t dd [N][N];
    for (int i = 0; i < 256; i++) dmem[i] = $urandom;
    for (int u = 0; u < N; u++)
      for (int v = 0; v < N; v++) begin
        dmem[MAT / 4 + u * 8 + v] = (u == v) ? 32'd0 : word_t'($urandom_range(1, 100));
        dd[u][v] = dmem[MAT / 4 + u * 8 + v];
      end
    for (int k = 0; k < N; k++)
      for (int u = 0; u < N; u++)
        for (int v = 0; v < N; v++)
          if (dd[u][k] + dd[k][v] < dd[u][v]) dd[u][v] = dd[u][k] + dd[k][v];
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (halted);
    repeat (2) @(posedge clk);
    for (int v = 0; v < N; v++) check($sformatf("distance to node %0d", v), dmem[DIST / 4 + v], dd[0][v]);
    for (int v = 0; v < N; v++) check($sformatf("node %0d visited", v), dmem[VIS / 4 + v], 32'd1);
    $display("dijkstra: %0d instructions decoded in %0d cycles", ninst, cycles);
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
