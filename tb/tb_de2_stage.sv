// tb_de2_stage: self-checking test of the second decode stage. Control
// bundles and register-file responses arrive on their own channels with
// independent random timing. Each operand sent to EX must be the immediate
// or the matching response word as selected, the active-channel mask must
// name exactly the used operands, and an unused operand channel must keep
// its previous value (on-demand channels). A JR must redirect to the value
// read for it and send nothing to EX.
module tb_de2_stage;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    ctl_valid = 1'b0, rsp_valid = 1'b0, out_ready = 1'b0;
  de_ctl_t ctl = '0;
  rf_rsp_t rsp = '0;
  logic    ctl_ready, rsp_ready, out_valid, jr_redirect, jr_done;
  ex_in_t  out_data;
  word_t   jr_pc;

  de2_stage dut (.*);

  int checks = 0, failures = 0, njr = 0, nheld = 0;
  de_ctl_t ctl_q [$];
  rf_rsp_t rsp_q [$];
  typedef struct { ex_in_t x; } exp_t;
  ex_in_t exp_q [$];
  word_t  exp_jr [$];
  word_t  last_op [4];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // producers
  always @(negedge clk) if (rst_n) begin
    if (!ctl_valid || ctl_ready_q) begin
      if (ctl_q.size() != 0 && $urandom_range(0, 2) != 0) begin
        ctl = ctl_q.pop_front(); ctl_valid = 1'b1;
      end else ctl_valid = 1'b0;
    end
    if (!rsp_valid || rsp_ready_q) begin
      if (rsp_q.size() != 0 && $urandom_range(0, 2) != 0) begin
        rsp = rsp_q.pop_front(); rsp_valid = 1'b1;
      end else rsp_valid = 1'b0;
    end
    out_ready = ($urandom_range(0, 3) != 0);
  end
  logic ctl_ready_q = 1'b0, rsp_ready_q = 1'b0;
  always @(posedge clk) begin
    ctl_ready_q <= ctl_valid && ctl_ready;
    rsp_ready_q <= rsp_valid && rsp_ready;
  end

  // consumer
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      ex_in_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_data.opv != e.opv || out_data.unit != e.unit || out_data.wb_addr != e.wb_addr) begin
        failures++; $display("FAIL control fields");
      end
      for (int p = 0; p < 4; p++) begin
        word_t got, want;
        got  = (p == 0) ? out_data.a : (p == 1) ? out_data.b : (p == 2) ? out_data.c : out_data.d;
        want = (p == 0) ? e.a : (p == 1) ? e.b : (p == 2) ? e.c : e.d;
        checks++;
        if (e.opv[p] ? (got != want) : (got != last_op[p])) begin
          failures++; $display("FAIL operand %0d got %h want %h (active %b)", p, got, want, e.opv[p]);
        end
        if (!e.opv[p]) nheld++;
        last_op[p] = got;
      end
    end
    if (jr_redirect) begin
      checks++;
      if (!jr_done || exp_jr.size() == 0 || jr_pc != exp_jr[0]) begin
        failures++; $display("FAIL jr to %h", jr_pc);
      end
      if (exp_jr.size() != 0) void'(exp_jr.pop_front());
      njr++;
    end
  end

  initial begin
    for (int p = 0; p < 4; p++) last_op[p] = '0;
    for (int n = 0; n < 400; n++) begin
      de_ctl_t c;
      rf_rsp_t r;
      ex_in_t e;
      c = '0; r = '0; e = '0;
      c.unit = eunit_e'($urandom_range(0, 4));
      c.rd_en = 4'($urandom);
      c.opsel_imm = 4'($urandom) & ~c.rd_en;
      c.imm = $urandom;
      c.wb_addr[0] = 5'($urandom_range(0, 24));
      c.jr = ($urandom_range(0, 9) == 0);
      if (c.jr) begin c.rd_en = 4'b0001; c.opsel_imm = '0; end
      c.need_rf = (c.rd_en != 0) || ($urandom_range(0, 3) == 0);
      r.valid = c.rd_en;
      for (int p = 0; p < 4; p++) r.data[p] = $urandom;
      e.unit = c.unit; e.opv = c.rd_en | c.opsel_imm; e.wb_addr = c.wb_addr;
      e.a = c.opsel_imm[0] ? c.imm : r.data[0];
      e.b = c.opsel_imm[1] ? c.imm : r.data[1];
      e.c = c.opsel_imm[2] ? c.imm : r.data[2];
      e.d = c.opsel_imm[3] ? c.imm : r.data[3];
      ctl_q.push_back(c);
      if (c.need_rf) rsp_q.push_back(r);
      if (c.jr) exp_jr.push_back(r.data[0]); else exp_q.push_back(e);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    check("all instructions reached EX", exp_q.size() == 0 && exp_jr.size() == 0);
    check("JR exercised", njr > 0);
    check("held operand channels exercised", nheld > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
