// tb_de1_stage: directed self-checking test of the first decode stage.
// Hand-encoded instructions are presented one at a time and the register
// request (read ports, addresses, registers to lock), the control bundle
// to DE2 and the redirect are compared with values written out here for
// each instruction group. Also checked: a conditional branch waits for the
// status channel while a flag-setting instruction is in flight (status
// stall) and then follows the returned flags; DE1 accepts nothing after a
// JR until jr_done; HALT stops it; and instructions with free outputs are
// taken one per cycle.
module tb_de1_stage;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid = 1'b0, rf_req_ready = 1'b1, ctl_ready = 1'b1;
  idinst_t in_data = '0;
  logic    st_valid = 1'b0, jr_done = 1'b0;
  flags_t  st_flags = '0;
  logic    in_ready, rf_req_valid, ctl_valid, redirect, halted, status_stall;
  rf_req_t rf_req;
  de_ctl_t ctl;
  word_t   redirect_pc;

  de1_stage dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic idinst_t mk(inst_t i, word_t pc = 32'h100, logic ev = 1'b0, word_t ext = '0);
    idinst_t d = '0;
    d.f.inst = i; d.f.pc = pc; d.f.ext_valid = ev; d.f.ext = ext; d.f.group = predecode(i);
    d.seg = '{first: 1'b1, last: 1'b1, index: 4'd0, count: 4'd1};
    return d;
  endfunction

  function automatic regmask_t bit_of(int r);
    regmask_t m = '0;
    m[r] = 1'b1;
    return m;
  endfunction

  // present one instruction; it must be taken in this cycle
  task automatic present(idinst_t d);
    @(negedge clk);
    in_valid = 1'b1; in_data = d;
    #1;
    check($sformatf("instruction %h accepted at once", d.f.inst), in_ready);
  endtask
  task automatic finish_cycle();
    @(posedge clk);
    @(negedge clk) in_valid = 1'b0;
  endtask

  initial begin
    idinst_t d;
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ADD R3, R5: reads R3 (port 0) and R5 (port 1), locks R3, sets flags
    present(mk(16'h1350));
    check("ADD request", rf_req_valid && rf_req.rd_en == 4'b0011 && rf_req.rd_addr[0] == 5'd3
                         && rf_req.rd_addr[1] == 5'd5 && rf_req.lock == bit_of(3));
    finish_cycle();
    check("ADD control", ctl_valid && ctl.unit == EU_ALU && ctl.func == 4'd0 && ctl.setflags
                         && ctl.wb_en == 3'b001 && ctl.wb_addr[0] == 5'd3 && ctl.need_rf);
    // status channel answers the ADD: Z set
    @(negedge clk); st_valid = 1'b1; st_flags = '{n: 1'b0, z: 1'b1, c: 1'b0, v: 1'b0};
    @(negedge clk); st_valid = 1'b0;

    // LDI R7 with a LERI value: no reads, locks R7, immediate {ER, imm4}
    present(mk(16'h276A, 32'h100, 1'b1, 32'h0123_4567));
    check("LDI request", rf_req_valid && rf_req.rd_en == 4'b0000 && rf_req.lock == bit_of(7));
    finish_cycle();
    check("LDI control", ctl.imm == 32'h1234_567A && ctl.opsel_imm == 4'b0010 && !ctl.setflags);

    // MAC R1, R2: four reads (R1, R2, ML, MH), locks ML and MH
    present(mk(16'h4121));
    check("MAC request", rf_req.rd_en == 4'b1111 && rf_req.rd_addr[2] == R_ML
                         && rf_req.rd_addr[3] == R_MH && rf_req.lock == (bit_of(18) | bit_of(19)));
    finish_cycle();
    check("MAC control", ctl.unit == EU_MUL && ctl.wb_en == 3'b011 && ctl.wb_addr[1] == R_MH);

    // STORE R4, [R2 + 3*4]: three operands (base, offset, data)
    present(mk(16'h7423));
    check("STORE request", rf_req.rd_en == 4'b0101 && rf_req.rd_addr[0] == 5'd2
                           && rf_req.rd_addr[2] == 5'd4 && rf_req.lock == '0);
    finish_cycle();
    check("STORE control", ctl.mem == MEM_STORE && ctl.imm == 32'd12 && ctl.wb_en == 3'b000);

    // LDB R5, [R3]: byte load, no offset without LERI, locks R5
    present(mk(16'h0453));
    check("LDB request", rf_req.rd_en == 4'b0001 && rf_req.rd_addr[0] == 5'd3
                         && rf_req.lock == bit_of(5));
    finish_cycle();
    check("LDB control", ctl.mem == MEM_LDB && ctl.imm == 32'd0 && ctl.unit == EU_AGU
                         && ctl.wb_en == 3'b001 && ctl.wb_addr[0] == 5'd5);

    // STH R7, [R1 + ER] with a LERI-built ER of 0x22
    present(mk(16'h0771, 32'h100, 1'b1, 32'h22));
    check("STH request", rf_req.rd_en == 4'b0101 && rf_req.rd_addr[0] == 5'd1
                         && rf_req.rd_addr[2] == 5'd7 && rf_req.lock == '0);
    finish_cycle();
    check("STH control", ctl.mem == MEM_STH && ctl.imm == 32'h22 && ctl.wb_en == 3'b000);

    // last micro-op of a POP into R6: reads SP, locks R6 and SP
    d = mk(16'h9040);
    d.sreg = 5'd6; d.seg = '{first: 1'b0, last: 1'b1, index: 4'd1, count: 4'd2};
    present(d);
    check("POP request", rf_req.rd_en == 4'b0001 && rf_req.rd_addr[0] == R_SP
                         && rf_req.lock == (bit_of(6) | bit_of(20)));
    finish_cycle();
    check("POP control", ctl.mem == MEM_POP && ctl.wb_en == 3'b101 && ctl.seg.index == 4'd1);

    // BEQ back by 4 halfwords, flags up to date and Z=1: taken, nothing sent
    present(mk(16'hA1FC, 32'h200));
    check("BEQ taken", redirect && redirect_pc == 32'h200 + 2 - 8 && !rf_req_valid);
    finish_cycle();
    check("BEQ sends no control", !ctl_valid);

    // SUB then BNE: the branch must wait for the SUB's status (status stall)
    present(mk(16'h1121));
    finish_cycle();
    @(negedge clk);
    in_valid = 1'b1; in_data = mk(16'hA210, 32'h300);
    t = 0;
    repeat (3) begin
      #1;
      check("BNE held while status pending", !in_ready && status_stall && !redirect);
      @(negedge clk); t++;
    end
    st_valid = 1'b1; st_flags = '{n: 1'b0, z: 1'b0, c: 1'b1, v: 1'b0};
    @(negedge clk); st_valid = 1'b0;
    #1;
    check("BNE taken after status", in_ready && redirect && redirect_pc == 32'h300 + 2 + 32);
    finish_cycle();

    // JR R9: register request, then nothing accepted until jr_done
    present(mk(16'hB190));
    check("JR request", rf_req.rd_en == 4'b0001 && rf_req.rd_addr[0] == 5'd9 && !redirect);
    finish_cycle();
    check("JR control", ctl.jr);
    @(negedge clk); in_valid = 1'b1; in_data = mk(16'h1350);
    repeat (3) begin #1; check("held after JR", !in_ready); @(negedge clk); end
    jr_done = 1'b1;
    @(negedge clk); jr_done = 1'b0;
    #1; check("accepted after jr_done", in_ready);
    finish_cycle();

    // JAL +6 halfwords: redirect and link R_LR = pc + 2 through the bypass
    present(mk(16'hB006, 32'h400));
    check("JAL redirect", redirect && redirect_pc == 32'h400 + 2 + 12 && rf_req.lock == bit_of(17));
    finish_cycle();
    check("JAL link", ctl.unit == EU_BYPASS && ctl.imm == 32'h402 && ctl.wb_addr[0] == R_LR);

    // throughput: five MOVs in five cycles
    @(negedge clk);
    in_valid = 1'b1; in_data = mk(16'h5120);
    t = 0;
    repeat (5) begin @(posedge clk); if (in_ready) t++; end
    @(negedge clk) in_valid = 1'b0;
    check("one instruction per cycle", t == 5);

    // HALT stops the stage
    present(mk(16'h0100));
    finish_cycle();
    check("halted", halted);
    @(negedge clk); in_valid = 1'b1; in_data = mk(16'h1350);
    #1; check("nothing accepted after HALT", !in_ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
