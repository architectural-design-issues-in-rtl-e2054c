// tb_id_stage: self-checking test of CISC segmentation. Random instructions,
// a third of them PUSH or POP with a random register list, are fed in with
// random output stalls. The output is compared with a reference stream
// built here: each listed register becomes one micro-op in ascending
// order, tagged first/last with index and count; other instructions pass
// unchanged. With the output always ready, a list of n registers must take
// exactly n cycles, and an ordinary instruction arriving at an empty stage
// must bypass it (appear at the output in the same cycle). A flush must
// empty the stage.
module tb_id_stage;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush = 1'b0, in_valid = 1'b0, out_ready = 1'b0;
  fetched_t in_data = '0;
  logic in_ready, out_valid, segmenting, bypassed;
  int nbypass = 0;
  idinst_t out_data;
  logic free_run = 1'b0, no_check = 1'b0;

  id_stage dut (.*);

  int checks = 0, failures = 0;
  idinst_t exp_q [$];

  task automatic add_expected(fetched_t f);
    idinst_t e;
    e.f = f;
    if (f.group == G_PUSH || f.group == G_POP) begin
      int n = $countones(f.inst[11:0]);
      int k = 0;
      if (n == 0) begin
        e.sreg = '0; e.seg = '{first: 1'b1, last: 1'b1, index: 4'd0, count: 4'd0};
        exp_q.push_back(e);
      end
      for (int r = 0; r < 12; r++) if (f.inst[r]) begin
        e.sreg = 5'(r);
        e.seg = '{first: (k == 0), last: (k == n - 1), index: 4'(k), count: 4'(n)};
        exp_q.push_back(e);
        k++;
      end
    end else begin
      e.sreg = '0; e.seg = '{first: 1'b1, last: 1'b1, index: 4'd0, count: 4'd1};
      exp_q.push_back(e);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    nbypass += int'(bypassed);
    out_ready <= free_run || ($urandom_range(0, 3) != 0);
    if (out_valid && out_ready && !no_check) begin
      checks++;
      if (exp_q.size() == 0 || out_data != exp_q[0]) begin
        failures++;
        $display("FAIL got %h sreg %0d seg %p", out_data.f.inst, out_data.sreg, out_data.seg);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  function automatic fetched_t rand_inst();
    fetched_t f;
    f.inst = 16'($urandom);
    if ($urandom_range(0, 2) == 0) f.inst[15:12] = ($urandom_range(0, 1) == 0) ? OP_PUSH : OP_POP;
    else if (f.inst[15:12] == OP_PUSH || f.inst[15:12] == OP_POP) f.inst[15:12] = OP_ALURR;
    f.inst[15:14] = (f.inst[15:14] == 2'b11) ? 2'b01 : f.inst[15:14];
    f.pc = $urandom; f.ext_valid = 1'b0; f.ext = '0;
    f.group = predecode(f.inst);
    return f;
  endfunction

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic fetched_t f = rand_inst();
      @(negedge clk);
      in_valid = 1'b1; in_data = f;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      add_expected(f);
      @(negedge clk) in_valid = 1'b0;
    end
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d micro-ops missing", exp_q.size()); end
    // rate: PUSH of 5 registers occupies the stage for 5 cycles
    free_run = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b1; in_data = '0;
    in_data.inst = {OP_PUSH, 12'b0000_1011_0101}; in_data.group = G_PUSH;
    add_expected(in_data);
    @(posedge clk); t0 = 0;
    @(negedge clk); in_valid = 1'b0;
    while (!(in_ready && !out_valid)) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != 5) begin failures++; $display("FAIL 5-register PUSH took %0d cycles", t0); end
    // bypass: an ordinary instruction reaches the output in the cycle it arrives
    @(negedge clk);
    in_valid = 1'b1; in_data = '0; in_data.inst = 16'h1234; in_data.group = G_ALURR;
    add_expected(in_data);
    #1;
    checks++;
    if (!(out_valid && out_data.f.inst == 16'h1234 && bypassed)) begin
      failures++; $display("FAIL no same-cycle bypass");
    end
    @(posedge clk);
    @(negedge clk) in_valid = 1'b0;
    #1;
    checks++;
    if (nbypass == 0 || out_valid) begin failures++; $display("FAIL bypass count %0d", nbypass); end
    // flush
    @(negedge clk);
    in_valid = 1'b1; in_data.inst = {OP_POP, 12'hFFF}; in_data.group = G_POP;
    free_run = 1'b0; no_check = 1'b1;
    @(posedge clk);
    @(negedge clk); in_valid = 1'b0; flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    checks++;
    if (out_valid || !in_ready) begin failures++; $display("FAIL flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
