// tb_reg_file: self-checking test of the locking register file. A reference
// model of the 25 registers and their locks runs in the testbench. Random
// requests read up to four registers and lock up to three destinations.
// A request whose sources or destinations are locked must get no response
// (and lock_stall must be high) until the testbench writes those registers;
// an unlocked request must be answered one cycle after it is accepted. Every
// response is compared with the reference values, and writes arrive on all
// three write channels, sometimes in the same cycle.
module tb_reg_file;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    req_valid = 1'b0, rsp_ready = 1'b1;
  rf_req_t req = '0;
  logic    req_ready, rsp_valid, any_locked, lock_stall;
  rf_rsp_t rsp;
  rf_wr_t  wr [3];

  reg_file dut (.*);

  word_t     ref_val [NUM_REGS];
  logic [NUM_REGS-1:0] ref_lock;
  int checks = 0, failures = 0, nstall = 0, nsimul = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // write up to three registers in one cycle, one per channel
  task automatic write3(int a0, int a1, int a2, logic [2:0] en);
    int a [3] = '{a0, a1, a2};
    @(negedge clk);
    for (int w = 0; w < 3; w++) begin
      wr[w].en = en[w]; wr[w].addr = 5'(a[w]); wr[w].data = $urandom;
      if (en[w]) begin ref_val[a[w]] = wr[w].data; ref_lock[a[w]] = 1'b0; end
    end
    if (en == 3'b111) nsimul++;
    @(negedge clk);
    for (int w = 0; w < 3; w++) wr[w].en = 1'b0;
  endtask

  initial begin
    for (int w = 0; w < 3; w++) wr[w] = '0;
    ref_lock = '0;
    for (int r = 0; r < NUM_REGS; r++) ref_val[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NUM_REGS; r += 3) write3(r, (r + 1) % NUM_REGS, (r + 2) % NUM_REGS, 3'b111);
    for (int n = 0; n < 400; n++) begin
      automatic rf_req_t q = '0;
      logic blocked;
      logic [NUM_REGS-1:0] need;
      int lat;
      for (int p = 0; p < 4; p++) begin
        q.rd_en[p] = ($urandom_range(0, 1) == 0);
        q.rd_addr[p] = 5'($urandom_range(0, NUM_REGS - 1));
      end
      for (int k = 0; k < 3; k++)
        if ($urandom_range(0, 1) == 0) q.lock[$urandom_range(0, NUM_REGS - 1)] = 1'b1;
      need = q.lock;
      for (int p = 0; p < 4; p++) if (q.rd_en[p]) need[q.rd_addr[p]] = 1'b1;
      blocked = ((need & ref_lock) != '0);
      @(negedge clk);
      req_valid = 1'b1; req = q;
      while (!req_ready) @(negedge clk);
      @(negedge clk) req_valid = 1'b0;     // accepted at the edge in between
      check("no response in the accepting cycle", !rsp_valid);
      @(negedge clk);
      if (blocked) begin
        repeat (3) begin
          check("no response while locked", !rsp_valid);
          check("lock_stall while locked", lock_stall);
          @(negedge clk);
        end
        nstall++;
        // complete the writes that hold the locks, on the three channels
        begin
          int pend [$];
          for (int r = 0; r < NUM_REGS; r++) if (need[r] && ref_lock[r]) pend.push_back(r);
          while (pend.size() > 0) begin
            automatic logic [2:0] en = '0;
            automatic int a [3] = '{0, 0, 0};
            for (int w = 0; w < 3 && pend.size() > 0; w++) begin a[w] = pend.pop_front(); en[w] = 1'b1; end
            write3(a[0], a[1], a[2], en);
          end
        end
        lat = 0;
        while (!rsp_valid && lat < 10) begin @(negedge clk); lat++; end
      end else begin
        check("response one cycle after request", rsp_valid);
      end
      check("response arrives", rsp_valid);
      check("response valid bits", rsp.valid == q.rd_en);
      for (int p = 0; p < 4; p++)
        if (q.rd_en[p]) check($sformatf("read port %0d data", p), rsp.data[p] == ref_val[q.rd_addr[p]]);
      @(posedge clk);                    // response consumed (rsp_ready = 1)
      ref_lock |= q.lock;
      @(negedge clk);
      check("lock bits match reference", dut.lock_q == ref_lock);
      // randomly complete some in-flight writes
      for (int r = 0; r < NUM_REGS; r++)
        if (ref_lock[r] && $urandom_range(0, 2) == 0) write3(r, 0, 0, 3'b001);
      check("any_locked", any_locked == (ref_lock != '0));
    end
    check("lock stalls exercised", nstall > 10);
    check("three simultaneous writes exercised", nsimul > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
