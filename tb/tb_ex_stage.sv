// tb_ex_stage: self-checking test of the execution block. Random operations
// for every unit (bypass, ALU with all its functions, shifts, multiply and
// multiply-accumulate, address generation) are sent with random output
// stalls; results and the status flags on the status channel are compared
// with reference values computed here. Coprocessor writes and reads go
// through a coprocessor model with random stalls. One instruction per cycle
// must be sustained when the output is always ready.
module tb_ex_stage;
  import althea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid = 1'b0, out_ready = 1'b1;
  ex_in_t  in_data = '0;
  logic    in_ready, out_valid, st_valid;
  ex_out_t out_data;
  flags_t  st_flags;
  logic    cp_req_valid, cp_req_ready = 1'b0, cp_rsp_valid = 1'b0;
  cp_req_t cp_req;
  word_t   cp_rsp_data = '0;
  logic    random_ready = 1'b1;

  ex_stage dut (.*);

  word_t   cpregs [16];
  int checks = 0, failures = 0;
  typedef struct { logic has_out; word_t lo, hi; logic has_st; flags_t fl; } exp_t;
  exp_t out_q [$], st_q [$];

  always @(posedge clk) begin
    cp_req_ready <= ($urandom_range(0, 1) != 0);
    cp_rsp_valid <= cp_req_valid && cp_req_ready && cp_req.read;
    cp_rsp_data  <= cpregs[cp_req.cpreg];
    if (cp_req_valid && cp_req_ready && !cp_req.read) cpregs[cp_req.cpreg] <= cp_req.data;
    if (rst_n) out_ready <= !random_ready || ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_q.size() == 0 || out_data.res_lo != out_q[0].lo || out_data.res_hi != out_q[0].hi) begin
        failures++;
        $display("FAIL result %h:%h expected %h:%h", out_data.res_hi, out_data.res_lo,
                 out_q[0].hi, out_q[0].lo);
      end
      if (out_q.size() != 0) void'(out_q.pop_front());
    end
    if (rst_n && st_valid) begin
      checks++;
      if (st_q.size() == 0 || st_flags != st_q[0].fl) begin
        failures++;
        $display("FAIL flags %b expected %b", st_flags, st_q[0].fl);
      end
      if (st_q.size() != 0) void'(st_q.pop_front());
    end
  end

  // reference model
  function automatic exp_t model(ex_in_t x);
    exp_t e = '{has_out: 1'b1, lo: '0, hi: '0, has_st: x.setflags, fl: '0};
    logic [63:0] p;
    logic [32:0] s;
    logic [63:0] w;
    case (x.unit)
      EU_ALU: case (x.func)
        0: begin s = 33'(x.a) + 33'(x.b); e.lo = s[31:0]; e.fl.c = s[32];
                 w = 64'($signed(x.a)) + 64'($signed(x.b));
                 e.fl.v = (w != 64'($signed(e.lo))); end
        1, 5: begin e.lo = x.a - x.b; e.fl.c = (x.a >= x.b);
                 w = 64'($signed(x.a)) - 64'($signed(x.b));
                 e.fl.v = (w != 64'($signed(e.lo))); end
        2: e.lo = x.a & x.b;
        3: e.lo = x.a | x.b;
        4: e.lo = x.a ^ x.b;
        6: e.lo = x.b;
        default: e.lo = x.a;
      endcase
      EU_SHIFT: case (x.func[1:0])
        0: e.lo = x.a << x.b[4:0];
        1: e.lo = x.a >> x.b[4:0];
        default: e.lo = word_t'($signed(x.a) >>> x.b[4:0]);
      endcase
      EU_MUL: begin
        p = 64'(x.a) * 64'(x.b) + (x.func[0] ? {x.d, x.c} : 64'd0);
        e.lo = p[31:0]; e.hi = p[63:32];
      end
      EU_AGU: e.lo = x.a + x.b;
      default: e.lo = x.a;
    endcase
    e.fl.n = e.lo[31];
    e.fl.z = (e.lo == 0);
    return e;
  endfunction

  task automatic issue(ex_in_t x);
    @(negedge clk);
    in_valid = 1'b1; in_data = x;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 1'b0;
  endtask

  initial begin
    int t0;
    for (int i = 0; i < 16; i++) cpregs[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      automatic ex_in_t x = '0;
      exp_t e;
      x.unit = eunit_e'($urandom_range(0, 4));
      x.func = 4'($urandom_range(0, x.unit == EU_ALU ? 6 : 2));
      x.a = $urandom; x.b = ($urandom_range(0, 3) == 0) ? x.a : $urandom;
      x.c = $urandom; x.d = $urandom;
      if ($urandom_range(0, 4) == 0) x.b = 32'($urandom_range(0, 40));
      x.setflags = (x.unit == EU_ALU || x.unit == EU_SHIFT) && !(x.unit == EU_ALU && x.func == 6);
      x.wb_en = 3'b001;
      e = model(x);
      out_q.push_back(e);
      if (e.has_st) st_q.push_back(e);
      issue(x);
    end
    // coprocessor write then read back
    for (int n = 0; n < 20; n++) begin
      automatic ex_in_t x = '0;
      automatic word_t v = $urandom;
      x.unit = EU_CP; x.func = 4'd0; x.cpreg = 4'(n); x.a = v;
      issue(x);
      x.func = 4'd1; x.wb_en = 3'b001;
      out_q.push_back('{has_out: 1'b1, lo: v, hi: '0, has_st: 1'b0, fl: '0});
      issue(x);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (out_q.size() != 0 || st_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    // throughput: ten back-to-back ALU ops with the output always ready
    random_ready = 1'b0;
    @(negedge clk);
    t0 = 0;
    in_valid = 1'b1;
    in_data = '0; in_data.unit = EU_ALU; in_data.a = 32'd1; in_data.b = 32'd2; in_data.wb_en = 3'b001;
    for (int k = 0; k < 10; k++) begin
      out_q.push_back(model(in_data));
      @(posedge clk);
      if (in_ready) t0++;
    end
    @(negedge clk) in_valid = 1'b0;
    checks++;
    if (t0 != 10) begin failures++; $display("FAIL %0d of 10 accepted back to back", t0); end
    repeat (5) @(posedge clk);
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
