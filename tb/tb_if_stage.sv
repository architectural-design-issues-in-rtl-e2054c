// tb_if_stage: self-checking test of the fetch block. A random program with
// many LERIs is fetched from a memory model with random stalls. The output
// must be the program's non-LERI instructions in order, each with its
// address and the extension value of the LERIs in front of it, computed by
// a reference model here; redirects restart the reference at the target.
// With the output stalled the queue must report full. The first instruction
// must appear three cycles after reset with a memory that never stalls.
module tb_if_stage;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  halt = 1'b0, redirect = 1'b0, out_ready = 1'b0;
  word_t redirect_pc = '0;
  logic  imem_req_valid, imem_req_ready = 1'b1, imem_rsp_valid = 1'b0;
  word_t imem_req_addr, imem_rsp_data = '0;
  logic  out_valid, leri_folded, queue_full;
  fetched_t out_data;
  logic  stall_mem = 1'b0;

  if_stage dut (.*);

  logic [15:0] prog [1024];
  int checks = 0, failures = 0, nfull = 0, nleri = 0;
  word_t ref_pc;

  always @(posedge clk) begin
    imem_req_ready <= !stall_mem || ($urandom_range(0, 2) != 0);
    imem_rsp_valid <= imem_req_valid && imem_req_ready;
    imem_rsp_data  <= {prog[imem_req_addr[10:1] + 10'd1], prog[imem_req_addr[10:1]]};
    nfull <= nfull + int'(queue_full);
    nleri <= nleri + int'(leri_folded);
  end

  // reference: next folded instruction starting at ref_pc
  task automatic expect_next(fetched_t got);
    logic [63:0] er = '0;
    logic ev = 1'b0;
    while (prog[ref_pc[10:1]][15:14] == 2'b11) begin
      er = ev ? {er[49:0], prog[ref_pc[10:1]][13:0]}
              : {{50{prog[ref_pc[10:1]][13]}}, prog[ref_pc[10:1]][13:0]};
      ev = 1'b1;
      ref_pc += 2;
    end
    checks++;
    if (got.pc != ref_pc || got.inst != prog[ref_pc[10:1]] || got.ext_valid != ev
        || (ev && got.ext != er[31:0])) begin
      failures++;
      $display("FAIL got pc %h inst %h ext %b/%h, expected pc %h inst %h ext %b/%h", got.pc,
               got.inst, got.ext_valid, got.ext, ref_pc, prog[ref_pc[10:1]], ev, er[31:0]);
    end
    ref_pc += 2;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready && !redirect) expect_next(out_data);
    if (redirect) ref_pc = redirect_pc;
  end

  initial begin
    int lat;
    for (int i = 0; i < 1024; i++) begin
      prog[i] = 16'($urandom);
      if (prog[i][15:14] == 2'b11 && $urandom_range(0, 1) == 0) prog[i][15] = 1'b0;
    end
    prog[0] = 16'h1234;
    ref_pc = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    lat = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL first instruction after %0d cycles", lat); end
    stall_mem = 1'b1;
    repeat (40) @(negedge clk);          // output stalled: queue fills
    checks++;
    if (!queue_full) begin failures++; $display("FAIL queue not full"); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      out_ready   = ($urandom_range(0, 3) != 0);
      redirect    = ($urandom_range(0, 50) == 0);
      redirect_pc = {22'd0, 9'($urandom), 1'b0};
    end
    @(negedge clk) redirect = 1'b0;
    checks++;
    if (nleri == 0) begin failures++; $display("FAIL no LERI folded"); end
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
