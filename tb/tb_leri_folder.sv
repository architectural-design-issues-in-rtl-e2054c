// tb_leri_folder: self-checking test of LERI folding. Sequences of zero to
// three LERIs followed by an instruction are fed in with random output
// stalls; each non-LERI instruction must come out once, in order, with the
// extension value computed independently here, and no LERI may come out.
module tb_leri_folder;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush = 1'b0, in_valid = 1'b0, out_ready = 1'b0;
  inst_t in_inst = '0;
  word_t in_pc = '0;
  group_e in_group = G_SYS;
  logic in_ready, out_valid, folded;
  fetched_t out_data;

  leri_folder dut (.*);

  int checks = 0, failures = 0, nfold = 0;
  typedef struct { inst_t inst; logic ev; word_t ext; } exp_t;
  exp_t exp_q [$];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // drive one halfword, waiting for in_ready
  task automatic send(inst_t v);
    @(negedge clk);
    in_valid = 1'b1; in_inst = v; in_group = predecode(v);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 1'b0;
  endtask

  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (folded) nfold++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        if (out_data.inst != exp_q[0].inst || out_data.ext_valid != exp_q[0].ev
            || (exp_q[0].ev && out_data.ext != exp_q[0].ext)) begin
          failures++;
          $display("FAIL inst %h ext %b/%h expected %h %b/%h", out_data.inst, out_data.ext_valid,
                   out_data.ext, exp_q[0].inst, exp_q[0].ev, exp_q[0].ext);
        end
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    int total_leri = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      automatic int k = $urandom_range(0, 3);
      automatic logic [63:0] er = '0;
      inst_t ins;
      for (int j = 0; j < k; j++) begin
        automatic logic [13:0] v = 14'($urandom);
        er = (j == 0) ? {{50{v[13]}}, v} : {er[49:0], v};
        send({2'b11, v});
        total_leri++;
      end
      ins = {2'b0, 14'($urandom)};
      exp_q.push_back('{inst: ins, ev: (k != 0), ext: er[31:0]});
      send(ins);
    end
    repeat (20) @(posedge clk);
    check("all instructions came out", exp_q.size() == 0);
    check("every LERI folded", nfold == total_leri);
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
