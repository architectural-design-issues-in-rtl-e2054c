// tb_althea_random: random programs on the ALTHEA core at its default
// parameters, compared with an instruction-set model written in this file.
// Each program loads random 32-bit values into R0..R14 with LERI-prefixed
// LDIs, then runs a few hundred random instructions: register and
// immediate ALU operations (immediates with and without LERIs), shifts by
// register and by immediate, MUL and MAC, moves to and from ML, MH and SP,
// word, byte and halfword loads and stores around a fixed base register
// R15, PUSH and POP of random register lists, conditional branches, JAL
// and JR over short runs of instructions. The instruction-set model decodes the
// same program from memory and executes it one instruction at a time with
// no notion of the pipeline; after HALT every register R0..R15, LR, ML, MH,
// SP and the whole data memory must agree. Dependences between neighbouring
// instructions are dense, so register locks, status stalls and redirects
// are frequent. Memories answer one cycle after a request with random
// ready stalls.
// The instructions checked are this design's own encoding; the pipeline
// mechanisms they stress (locks, status channel, segmentation, LERI folding)
// are those of the design description.
module tb_althea_random;
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
  localparam int PROGS = 24, NINST = 250;
  localparam word_t DBASE = 32'h100, SP0 = 32'h3F0;

  // ---------------- program generator ----------------
  int depth;                                     // words on the stack
  function automatic void lconst(int rd, word_t v);
    leri(v[31:18]); leri(v[17:4]); aluri(rd, 6, int'(v[3:0]));
  endfunction
  function automatic void gen_simple();          // one halfword, no LERI
    if ($urandom_range(0, 1) == 0) alurr($urandom_range(0, 14), $urandom_range(0, 15), $urandom_range(0, 5));
    else aluri($urandom_range(0, 14), $urandom_range(0, 6), $urandom_range(0, 15));
  endfunction
  function automatic void gen_one();
    int k = $urandom_range(0, 13);
    int rd = $urandom_range(0, 14);
    case (k)
      0, 1: alurr(rd, $urandom_range(0, 15), $urandom_range(0, 5));
      2: begin
        int n = $urandom_range(0, 3);
        for (int j = 0; j < n; j++) leri(14'($urandom));
        aluri(rd, $urandom_range(0, 6), $urandom_range(0, 15));
      end
      3: begin
        int f = $urandom_range(0, 5);
        shift(rd, $urandom_range(0, 15), (f < 3) ? f : f + 1);
      end
      4: mul($urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 1));
      5: case ($urandom_range(0, 2))
           0: move(rd, $urandom_range(0, 15), 0);
           1: move(rd, $urandom_range(2, 4), 1);          // from ML, MH or SP
           default: move($urandom_range(2, 3), $urandom_range(0, 15), 2);   // to ML or MH
         endcase
      6: if ($urandom_range(0, 1) == 0) load(rd, 15, $urandom_range(0, 15));
         else store($urandom_range(0, 15), 15, $urandom_range(0, 15));
      7: begin
        if ($urandom_range(0, 1) == 0) leri(14'($urandom_range(0, 63)));
        emit({4'h0, 4'($urandom_range(4, 7)), 4'(($urandom_range(0, 1) == 0) ? rd : $urandom_range(0, 15)), 4'd15});
      end
      8: begin
        logic [11:0] m = 12'($urandom) | 12'(1 << $urandom_range(0, 11));
        if (depth + $countones(m) <= 48) begin push(m); depth += $countones(m); end
        else gen_simple();
      end
      9: begin
        logic [11:0] m = 12'($urandom) | 12'(1 << $urandom_range(0, 11));
        if ($countones(m) <= depth) begin pop(m); depth -= $countones(m); end
        else gen_simple();
      end
      12: begin                                             // JAL over n instructions
        int n = $urandom_range(1, 3);
        emit({4'hB, 4'd0, 8'(n)});
        for (int j = 0; j < n; j++) gen_simple();
      end
      13: begin                                             // JR to a built address
        int n = $urandom_range(1, 3);
        lconst(rd, word_t'(2 * (pc_asm + 4 + n)));
        jr(rd);
        for (int j = 0; j < n; j++) gen_simple();
      end
      default: begin
        int n = $urandom_range(1, 3);
        emit({4'hA, 4'($urandom_range(0, 15)), 8'(n)});
        for (int j = 0; j < n; j++) gen_simple();
      end
    endcase
  endfunction

  task automatic build();
    for (int i = 0; i < 1024; i++) prog[i] = 16'h0000;
    pc_asm = 0; depth = 0;
    lconst(1, SP0); move(4, 1, 2);                          // SP
    lconst(15, DBASE);
    for (int r = 0; r < 15; r++) lconst(r, $urandom);
    move(2, 0, 2); move(3, 1, 2);                           // ML, MH
    while (pc_asm < 1000 - 12 && NINST > 0) begin
      gen_one();
      if (pc_asm > 60 + 2 * NINST) break;
    end
    emit(16'h0100);                                         // HALT
  endtask

  // ---------------- instruction-set model ----------------
  word_t  rr [25];
  word_t  mm [256];
  logic   fn, fz, fc, fv;

  function automatic logic cond(logic [3:0] c);
    case (c)
      4'd0: return 1'b1;        4'd1: return fz;          4'd2: return !fz;
      4'd3: return fc;          4'd4: return !fc;         4'd5: return fn;
      4'd6: return !fn;         4'd7: return fv;          4'd8: return !fv;
      4'd9: return fc && !fz;   4'd10: return !fc || fz;  4'd11: return fn == fv;
      4'd12: return fn != fv;   4'd13: return !fz && fn == fv;
      4'd14: return fz || fn != fv;
      default: return 1'b0;
    endcase
  endfunction

  function automatic void setnz(word_t r, logic c, logic v);
    fn = r[31]; fz = (r == 0); fc = c; fv = v;
  endfunction

  function automatic word_t alu(int op, word_t a, word_t b, bit setf);
    logic [32:0] s;
    word_t r;
    case (op)
      0: begin s = {1'b0, a} + {1'b0, b}; r = s[31:0];
               if (setf) setnz(r, s[32], a[31] == b[31] && r[31] != a[31]); end
      1, 5: begin s = {1'b0, a} + {1'b0, ~b} + 33'd1; r = s[31:0];
               if (setf) setnz(r, s[32], a[31] != b[31] && r[31] != a[31]); end
      2: begin r = a & b; if (setf) setnz(r, 0, 0); end
      3: begin r = a | b; if (setf) setnz(r, 0, 0); end
      4: begin r = a ^ b; if (setf) setnz(r, 0, 0); end
      default: r = b;                                       // LDI
    endcase
    return r;
  endfunction

  task automatic iss_run();
    int pc = 0, steps = 0;
    bit ev = 0;
    word_t er = 0;
    fn = 0; fz = 0; fc = 0; fv = 0;
    forever begin
      logic [15:0] i = prog[pc];
      int op = i[15:12], a = i[11:8], b = i[7:4], c = i[3:0];
      word_t imm4, addr;
      steps++;
      if (steps > 20000) begin $display("FAIL model runaway"); failures++; return; end
      if (i[15:14] == 2'b11) begin
        er = ev ? {er[17:0], i[13:0]} : {{18{i[13]}}, i[13:0]};
        ev = 1; pc++; continue;
      end
      imm4 = ev ? {er[27:0], 4'(c)} : word_t'(c);
      pc++;
      case (op)
        0: case (a)
             1: return;                                     // HALT
             4, 5, 6, 7: begin
               addr = rr[c] + (ev ? er : 0);
               case (a)
                 4: rr[b] = {24'd0, mm[addr[9:2]][8 * addr[1:0] +: 8]};
                 5: rr[b] = {16'd0, mm[addr[9:2]][16 * addr[1] +: 16]};
                 6: mm[addr[9:2]][8 * addr[1:0] +: 8] = rr[b][7:0];
                 default: mm[addr[9:2]][16 * addr[1] +: 16] = rr[b][15:0];
               endcase
             end
             default: ;
           endcase
        1: begin word_t r = alu(c, rr[a], rr[b], 1); if (c != 5) rr[a] = r; end
        2: begin word_t r = alu(b, rr[a], imm4, b != 6); if (b != 5) rr[a] = r; end
        3: begin
          int amt = c[2] ? b : rr[b][4:0];
          word_t r;
          case (c[1:0])
            0: r = rr[a] << amt;
            1: r = rr[a] >> amt;
            default: r = word_t'($signed(rr[a]) >>> amt);
          endcase
          rr[a] = r; setnz(r, 0, 0);
        end
        4: begin
          logic [63:0] p = 64'(rr[a]) * 64'(rr[b]);
          if (c[0]) p += {rr[19], rr[18]};
          rr[18] = p[31:0]; rr[19] = p[63:32];
        end
        5: case (c[1:0])
             1: rr[a] = rr[16 + b];
             2: rr[16 + a] = rr[b];
             default: rr[a] = rr[b];
           endcase
        6: begin addr = rr[b] + (ev ? imm4 : word_t'(c * 4)); rr[a] = mm[addr[9:2]]; end
        7: begin addr = rr[b] + (ev ? imm4 : word_t'(c * 4)); mm[addr[9:2]] = rr[a]; end
        8, 9: begin
          int regs [$];
          word_t sp = rr[20];
          for (int r = 0; r < 12; r++) if (i[r]) regs.push_back(r);
          for (int k = 0; k < regs.size(); k++)
            if (op == 8) mm[(sp - 4 * (k + 1)) >> 2] = rr[regs[k]];
            else         rr[regs[k]] = mm[(sp + 4 * (regs.size() - 1 - k)) >> 2];
          rr[20] = (op == 8) ? sp - 4 * regs.size() : sp + 4 * regs.size();
        end
        10: if (cond(4'(a))) pc = pc + int'($signed(i[7:0]));
        11: if (a == 1) pc = int'(rr[b] >> 1);
            else begin rr[17] = word_t'(2 * pc); pc = pc + int'($signed(i[7:0])); end
        default: ;
      endcase
      ev = 0;
    end
  endtask

  int checks = 0, failures = 0;
  int n_lock = 0, n_status = 0, n_redir = 0, n_seg = 0;
  always_ff @(posedge clk) if (rst_n) begin
    n_lock   <= n_lock + int'(ev_lock);
    n_status <= n_status + int'(ev_status);
    n_redir  <= n_redir + int'(ev_redir);
    n_seg    <= n_seg + int'(ev_seg);
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int p = 0; p < PROGS; p++) begin
      rst_n = 1'b0;
      build();
      for (int i = 0; i < 256; i++) begin dmem[i] = $urandom; mm[i] = dmem[i]; end
      for (int r = 0; r < 25; r++) rr[r] = '0;
      iss_run();
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      wait (halted);
      repeat (2) @(posedge clk);
      for (int r = 0; r < 16; r++) check($sformatf("program %0d R%0d", p, r), dut.u_rf.data_q[r], rr[r]);
      check($sformatf("program %0d ML", p), dut.u_rf.data_q[R_ML], rr[18]);
      check($sformatf("program %0d MH", p), dut.u_rf.data_q[R_MH], rr[19]);
      check($sformatf("program %0d SP", p), dut.u_rf.data_q[R_SP], rr[20]);
      check($sformatf("program %0d LR", p), dut.u_rf.data_q[R_LR], rr[17]);
      for (int i = 0; i < 256; i++) check($sformatf("program %0d mem[%0d]", p, i), dmem[i], mm[i]);
    end
    $display("random programs: %0d lock stalls, %0d status stalls, %0d redirects, %0d segment steps",
             n_lock, n_status, n_redir, n_seg);
    if (n_lock == 0 || n_status == 0 || n_redir == 0 || n_seg == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: no halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
