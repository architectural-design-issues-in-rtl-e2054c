// tb_instr_queue: self-checking test of the four-entry instruction queue.
// Random pushes and pops are compared with a reference queue kept in the
// testbench; the full flag must rise after exactly DEPTH pushes without a
// pop, and a flush must empty the queue.
module tb_instr_queue;
  localparam int W = 16, DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush = 1'b0, in_valid = 1'b0, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic in_ready, out_valid, full;

  instr_queue #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [$];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // fill without popping: full after exactly DEPTH pushes
    for (int i = 0; i < DEPTH; i++) begin
      check("ready while not full", in_ready);
      in_valid = 1'b1; in_data = W'(100 + i);
      @(posedge clk); #1;
      ref_q.push_back(W'(100 + i));
    end
    in_valid = 1'b0;
    check("full after DEPTH pushes", full && !in_ready);
    check("head is first pushed", out_valid && out_data == 16'd100);
    // random traffic
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 2) != 0);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      check("valid matches reference", out_valid == (ref_q.size() != 0));
      if (out_valid) check("data matches reference", out_data == ref_q[0]);
      check("full matches reference", full == (ref_q.size() == DEPTH));
      @(posedge clk);
      if (out_valid && out_ready) void'(ref_q.pop_front());
      if (in_valid && in_ready)   ref_q.push_back(in_data);
    end
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b0; flush = 1'b1;
    @(posedge clk); #1;
    flush = 1'b0;
    check("empty after flush", !out_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
