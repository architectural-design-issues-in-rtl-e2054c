// tb_prefetcher: self-checking test of the prefetcher. A random program in a
// memory model with random request stalls is fetched; the halfword stream
// must follow the program in address order with the right address and the
// right instruction group, also after redirects to random (even and odd
// halfword) targets; while halt is high no fetch may be requested.
module tb_prefetcher;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  halt = 1'b0, redirect = 1'b0, out_ready = 1'b0;
  word_t redirect_pc = '0;
  logic  imem_req_valid, imem_req_ready = 1'b0, imem_rsp_valid = 1'b0;
  word_t imem_req_addr, imem_rsp_data = '0;
  logic  out_valid;
  inst_t out_inst;
  word_t out_pc;
  group_e out_group;

  prefetcher dut (.*);

  logic [15:0] prog [1024];
  int checks = 0, failures = 0, nredir = 0;
  word_t exp_pc;

  // independent group table
  function automatic group_e ref_group(inst_t i);
    if (i[15:12] == 4'h0)
      case (i[11:8])
        4'd2, 4'd3: return G_CP;
        4'd4, 4'd5: return G_LOAD;     // byte/halfword loads
        4'd6, 4'd7: return G_STORE;    // byte/halfword stores
        default:    return G_SYS;
      endcase
    if (i[15:14] == 2'b11) return G_SYS;
    return group_e'(i[15:12]);
  endfunction

  always @(posedge clk) begin
    imem_req_ready <= ($urandom_range(0, 2) != 0);
    imem_rsp_valid <= imem_req_valid && imem_req_ready;
    imem_rsp_data  <= {prog[imem_req_addr[10:1] + 10'd1], prog[imem_req_addr[10:1]]};
    if (rst_n && halt && imem_req_valid) begin
      failures++; $display("FAIL fetch requested while halted");
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready && !redirect) begin
      checks++;
      if (out_pc != exp_pc || out_inst != prog[exp_pc[10:1]] || out_group != ref_group(out_inst)) begin
        failures++;
        $display("FAIL pc %h inst %h grp %0d, expected pc %h inst %h", out_pc, out_inst, out_group,
                 exp_pc, prog[exp_pc[10:1]]);
      end
      exp_pc = exp_pc + 32'd2;
    end
    if (redirect) begin
      exp_pc = redirect_pc;
      nredir++;
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = 16'($urandom);
    exp_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      out_ready   = ($urandom_range(0, 3) != 0);
      redirect    = ($urandom_range(0, 60) == 0);
      redirect_pc = {22'd0, 9'($urandom), 1'b0};
      halt        = (n > 2500 && n < 2600);
    end
    @(negedge clk) redirect = 1'b0;
    checks++;
    if (nredir == 0) begin failures++; $display("FAIL no redirect exercised"); end
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
