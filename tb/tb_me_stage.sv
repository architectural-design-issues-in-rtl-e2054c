// tb_me_stage: self-checking test of the memory block. A data memory model
// with random request stalls and a one-cycle read latency sits behind the
// block. Random pass-through results, loads and stores, and PUSH/POP lists
// split into micro-ops, are sent with random gaps. Every write on the three
// register-file channels is compared with a reference list built here; a
// POP with the same list must return the values the PUSH saved, in the same
// registers, and the stack pointer must come back to its start value.
// Byte and halfword loads and stores at every lane check the data-align
// unit: the memory model honours the byte enables, and the loaded value
// must be the addressed lanes, zero-extended.
module tb_me_stage;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid = 1'b0;
  ex_out_t in_data = '0;
  logic    in_ready, busy;
  logic    dmem_req_valid, dmem_req_ready = 1'b0, dmem_req_we, dmem_rsp_valid = 1'b0;
  word_t   dmem_req_addr, dmem_req_wdata, dmem_rsp_data = '0;
  logic [3:0] dmem_req_be;
  rf_wr_t  wr [3];

  me_stage dut (.*);

  word_t mem [256];
  word_t ref_mem [256];
  typedef struct { int port; reg_t addr; word_t data; } wexp_t;
  wexp_t exp_q [$];
  int checks = 0, failures = 0;

  always @(posedge clk) begin
    dmem_req_ready <= ($urandom_range(0, 2) != 0);
    dmem_rsp_valid <= dmem_req_valid && dmem_req_ready && !dmem_req_we;
    dmem_rsp_data  <= mem[dmem_req_addr[9:2]];
    if (dmem_req_valid && dmem_req_ready && dmem_req_we)
      for (int b = 0; b < 4; b++)
        if (dmem_req_be[b]) mem[dmem_req_addr[9:2]][8 * b +: 8] <= dmem_req_wdata[8 * b +: 8];
    if (rst_n) for (int w = 0; w < 3; w++) if (wr[w].en) begin
      checks++;
      if (exp_q.size() == 0 || exp_q[0].port != w || exp_q[0].addr != wr[w].addr
          || exp_q[0].data != wr[w].data) begin
        failures++;
        $display("FAIL write port %0d r%0d=%h", w, wr[w].addr, wr[w].data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  task automatic send(ex_out_t x);
    @(negedge clk);
    in_valid = 1'b1; in_data = x;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  // a PUSH or POP of registers regs[] with stack pointer sp
  task automatic stack_op(mem_op_e op, int regs [$], word_t sp, word_t vals [$]);
    int n = regs.size();
    for (int k = 0; k < n; k++) begin
      ex_out_t x = '0;
      x.mem = op; x.res_lo = sp; x.sdata = vals[k];
      x.seg = '{first: (k == 0), last: (k == n - 1), index: 4'(k), count: 4'(n)};
      x.wb_en = {x.seg.last, 1'b0, op == MEM_POP};
      x.wb_addr[0] = reg_t'(regs[k]); x.wb_addr[2] = R_SP;
      if (op == MEM_PUSH) ref_mem[(sp - 4 * (k + 1)) >> 2] = vals[k];
      if (op == MEM_POP)  exp_q.push_back('{0, reg_t'(regs[k]), vals[k]});
      if (x.seg.last) exp_q.push_back('{2, R_SP, (op == MEM_PUSH) ? sp - 4 * n : sp + 4 * n});
      send(x);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin mem[i] = $urandom; ref_mem[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic ex_out_t x = '0;
      automatic int kind = $urandom_range(0, 5);
      automatic int lane = $urandom_range(0, 3);
      automatic int a = $urandom_range(0, 127);
      x.wb_addr[0] = 5'($urandom_range(0, 15));
      x.wb_addr[1] = R_MH;
      if (kind == 0) begin
        x.res_lo = $urandom; x.res_hi = $urandom; x.wb_en = 3'b011;
        exp_q.push_back('{0, x.wb_addr[0], x.res_lo});
        exp_q.push_back('{1, R_MH, x.res_hi});
      end else if (kind == 1) begin
        x.mem = MEM_LOAD; x.res_lo = word_t'(a * 4); x.wb_en = 3'b001;
        exp_q.push_back('{0, x.wb_addr[0], ref_mem[a]});
      end else if (kind == 2) begin
        x.mem = MEM_STORE; x.res_lo = word_t'(a * 4); x.sdata = $urandom;
        ref_mem[a] = x.sdata;
      end else if (kind == 4) begin
        x.res_lo = word_t'(a * 4 + lane); x.wb_en = 3'b001;
        if ($urandom_range(0, 1) == 0) begin
          x.mem = MEM_LDB;
          exp_q.push_back('{0, x.wb_addr[0], {24'd0, ref_mem[a][8 * lane +: 8]}});
        end else begin
          x.mem = MEM_LDH;
          exp_q.push_back('{0, x.wb_addr[0], {16'd0, ref_mem[a][16 * (lane / 2) +: 16]}});
        end
      end else if (kind == 5) begin
        x.res_lo = word_t'(a * 4 + lane); x.sdata = $urandom;
        if ($urandom_range(0, 1) == 0) begin
          x.mem = MEM_STB; ref_mem[a][8 * lane +: 8] = x.sdata[7:0];
        end else begin
          x.mem = MEM_STH; ref_mem[a][16 * (lane / 2) +: 16] = x.sdata[15:0];
        end
      end else begin
        automatic int regs [$];
        automatic word_t vals [$];
        automatic word_t sp = word_t'(($urandom_range(16, 63)) * 4 + 512);
        for (int r = 0; r < 12; r++) if ($urandom_range(0, 2) == 0) begin
          regs.push_back(r); vals.push_back($urandom);
        end
        if (regs.size() == 0) begin regs.push_back(3); vals.push_back($urandom); end
        stack_op(MEM_PUSH, regs, sp, vals);
        stack_op(MEM_POP, regs, sp - 4 * regs.size(), vals);
        continue;
      end
      send(x);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d writes missing", exp_q.size()); end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (mem[i] != ref_mem[i]) begin failures++; $display("FAIL mem[%0d]", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
