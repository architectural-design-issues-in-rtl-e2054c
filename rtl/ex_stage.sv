// ex_stage: the execution (EX) block.
//
// EX holds a bypass path, an ALU, a shifter, a 32x32 multiplier with 64-bit
// accumulate, an address adder and the coprocessor port; the unit named by
// DE1 is the only one whose result is used. Each unit takes its operands
// from the operand channels Opa..Opd: a MOVE passes Opa through the bypass,
// ALU and shifter use Opa and Opb, a store uses three operands and a
// multiply-accumulate four ({MH,ML} + Opa*Opb with ML on Opc and MH on Opd).
// The 4-bit status register (N, Z, C, V) is updated by flag-setting
// instructions, and each update is sent back to DE1 on the status channel
// for branch resolution. A coprocessor write is sent on the coprocessor
// request channel; a coprocessor read waits for the coprocessor's response
// and passes its data on as the result.
// Interface: operand channel in, result channel to ME out (valid/ready,
// one output register), status channel out (a one-cycle valid, always
// accepted). One instruction per cycle, except coprocessor reads. The set
// of units, the operand counts and the status channel to DE1 are the
// description's; the ALU operations, flag rules (C is carry out of ADD and
// "no borrow" for SUB and CMP) and the unsigned multiply are this design's.
module ex_stage
  import althea_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ex_in_t  in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output ex_out_t out_data,
  output logic    st_valid,
  output flags_t  st_flags,
  output logic    cp_req_valid,
  input  logic    cp_req_ready,
  output cp_req_t cp_req,
  input  logic    cp_rsp_valid,
  input  word_t   cp_rsp_data
);
  ex_out_t out_q;
  logic    out_v_q;
  flags_t  status_q;
  logic    st_v_q;
  logic    cp_wait_q;        // a coprocessor read was sent, waiting for data

  // ---------------- execution units ----------------
  word_t   res_lo, res_hi;
  flags_t  fl;
  logic [32:0] sum;
  logic [63:0] prod;

  always_comb begin
    res_lo = '0;
    res_hi = '0;
    fl     = '0;
    sum    = '0;
    prod   = '0;
    unique case (in_data.unit)
      EU_ALU: begin
        unique case (alu_op_e'(in_data.func))
          ALU_ADD: begin
            sum = {1'b0, in_data.a} + {1'b0, in_data.b};
            res_lo = sum[31:0]; fl.c = sum[32];
            fl.v = (in_data.a[31] == in_data.b[31]) && (res_lo[31] != in_data.a[31]);
          end
          ALU_SUB, ALU_CMP: begin
            sum = {1'b0, in_data.a} + {1'b0, ~in_data.b} + 33'd1;
            res_lo = sum[31:0]; fl.c = sum[32];
            fl.v = (in_data.a[31] != in_data.b[31]) && (res_lo[31] != in_data.a[31]);
          end
          ALU_AND: res_lo = in_data.a & in_data.b;
          ALU_OR:  res_lo = in_data.a | in_data.b;
          ALU_XOR: res_lo = in_data.a ^ in_data.b;
          ALU_LDI: res_lo = in_data.b;
          default: res_lo = in_data.a;
        endcase
      end
      EU_SHIFT: begin
        unique case (shift_op_e'(in_data.func[1:0]))
          SH_LL:   res_lo = in_data.a << in_data.b[4:0];
          SH_RL:   res_lo = in_data.a >> in_data.b[4:0];
          SH_RA:   res_lo = word_t'($signed(in_data.a) >>> in_data.b[4:0]);
          default: res_lo = in_data.a;
        endcase
      end
      EU_MUL: begin
        prod = 64'(in_data.a) * 64'(in_data.b);
        if (in_data.func[0]) prod = prod + {in_data.d, in_data.c};
        res_lo = prod[31:0];
        res_hi = prod[63:32];
      end
      EU_AGU: begin
        // load/store: base + offset; PUSH/POP: the stack pointer itself
        res_lo = (in_data.mem == MEM_PUSH || in_data.mem == MEM_POP) ? in_data.a
                                                                     : in_data.a + in_data.b;
      end
      EU_CP:   res_lo = cp_rsp_data;
      default: res_lo = in_data.a;            // bypass (MOVE, link)
    endcase
    fl.n = res_lo[31];
    fl.z = (res_lo == '0);
  end

  // ---------------- handshakes ----------------
  logic slot_free, is_cp, cp_done, take;
  assign slot_free    = !out_v_q || out_ready;
  assign is_cp        = (in_data.unit == EU_CP);
  assign cp_req_valid = in_valid && is_cp && !cp_wait_q && slot_free;
  assign cp_req       = '{read: in_data.func[0], cpreg: in_data.cpreg, data: in_data.a};
  // a write is done when the request is taken, a read when data returns
  assign cp_done      = in_data.func[0] ? (cp_wait_q && cp_rsp_valid)
                                        : (cp_req_valid && cp_req_ready);
  assign in_ready     = slot_free && (!is_cp || cp_done);
  assign take         = in_valid && in_ready;

  assign out_valid = out_v_q;
  assign out_data  = out_q;
  assign st_valid  = st_v_q;
  assign st_flags  = status_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_v_q   <= 1'b0;
      out_q     <= '0;
      status_q  <= '0;
      st_v_q    <= 1'b0;
      cp_wait_q <= 1'b0;
    end else begin
      st_v_q <= take && in_data.setflags;
      if (take && in_data.setflags) status_q <= fl;
      if (cp_req_valid && cp_req_ready && in_data.func[0]) cp_wait_q <= 1'b1;
      else if (cp_wait_q && cp_rsp_valid)                   cp_wait_q <= 1'b0;
      if (take && in_data.wb_en != '0 || take && in_data.mem != MEM_NONE) begin
        out_v_q      <= 1'b1;
        out_q.res_lo <= res_lo;
        out_q.res_hi <= res_hi;
        out_q.sdata  <= in_data.c;
        out_q.mem    <= in_data.mem;
        out_q.seg    <= in_data.seg;
        out_q.wb_en  <= in_data.wb_en;
        out_q.wb_addr <= in_data.wb_addr;
      end else if (out_ready) begin
        out_v_q <= 1'b0;
      end
    end
  end
endmodule
