// le2_core: LE2, a SIMD vector coprocessor closely coupled to a scalar CPU.
//
// The engine holds the LE2 programmer's model: VREGS vector registers of up
// to VLMAX 16-bit elements, a run-time vector length VLEN, a predicate
// register (one bit per element), SREGS 32-bit scalar registers and two
// 32-bit vector accumulators.  A vector instruction touches elements
// 0..VLEN-1; an element is written only if its predicate bit is set.  The
// datapath has LANES 16-bit lanes, so a vector instruction is split into
// ceil(VLEN/LANES) micro-ops, one element group each, issued one per cycle.
// Scalar instructions run on lanes 0 and 1 chained into one 32-bit datapath.
//
// Pipeline (8 stages, one micro-op per stage):
//   DEC  decode, hazard check, vector/predicate register read, address calc
//   AG   request to STRMEM (load or store of one 64-bit group)
//   MRD1, MRD2  the two cycles of STRMEM read latency; accumulator read
//   EX1  lane ALUs and 16x16 multipliers
//   EX2  accumulate, accumulator read-out with shift and saturation
//   PWB  write masks (VLEN, predicate) and result select
//   WB   register, accumulator and predicate write
// Only DEC and AG stall: DEC while a micro-op in flight writes one of its
// sources (same register and element group), AG while STRMEM has not granted
// its request; AG then sends bubbles on, so MRD1..WB never stall and load data
// meets its micro-op at a fixed distance.
//
// CPU interface: instr/op_data are taken when instr_valid and instr_ready;
// op_data is the CPU register operand for SLI and SETVL.  instr_ready is
// also high in the cycle the instruction in DEC issues its last micro-op, so
// instructions follow each other without a gap.  SETVL takes effect
// in DEC.  Exceptions are precise: SETVL above VLMAX, and a load or store whose
// whole range [sreg[ra]+imm, +8*groups) is not inside STRMEM, are refused in
// DEC before any state changes; exc_valid pulses with the cause and the
// instruction is dropped.  cpu_sreg_data reads a scalar register with no
// latency.  Register read in DEC and the stage assignments, the instruction
// set and encoding (le2_pkg), the lane count and the exception causes are
// this design's choices; the stage names and the programmer's model follow
// the architecture description.  The architecture calls the engine a 2-way
// long-instruction-word machine without defining the slots; this engine takes
// one instruction at a time.
module le2_core
  import le2_pkg::*;
#(
  parameter int unsigned VREGS     = 16,
  parameter int unsigned VLMAX     = 4096,
  parameter int unsigned SREGS     = 16,
  parameter logic [31:0] MEM_BASE  = STRMEM_BASE,
  parameter int unsigned MEM_BYTES = 131072,
  localparam int unsigned NGRP = VLMAX / LANES,
  localparam int unsigned GW   = $clog2(NGRP),
  localparam int unsigned LW   = $clog2(VLMAX + 1),
  localparam int unsigned VRW  = $clog2(VREGS),
  localparam int unsigned SRW  = $clog2(SREGS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // coprocessor port of the scalar CPU
  input  logic           instr_valid,
  input  logic [31:0]    instr,
  input  logic [31:0]    op_data,
  output logic           instr_ready,
  output logic           exc_valid,
  output le2_exc_e       exc_cause,
  output logic           busy,
  input  logic [SRW-1:0] cpu_sreg_idx,
  output logic [31:0]    cpu_sreg_data,
  // STRMEM client port
  output mem_req_t       mem_req,
  input  mem_rsp_t       mem_rsp,
  // events, one pulse per stalled cycle
  output logic           ev_hazard_stall,
  output logic           ev_mem_stall
);
  typedef struct packed {
    logic             valid;
    le2_op_e          op;
    logic [3:0]       rd;
    logic [13:0]      imm;
    logic [GW-1:0]    grp;
    logic [LANES-1:0] mask;   // elements this micro-op may write
    logic [31:0]      addr;   // STRMEM address of the group
    logic [31:0]      sa;     // scalar operand a (or CPU operand)
    logic [31:0]      sb;     // scalar operand b (or immediate)
    wkind_e           wk;     // what it writes
  } uop_t;

  typedef logic [LANES-1:0][ELEM_W-1:0] vec_t;
  typedef logic [LANES-1:0][ACC_W-1:0]  accv_t;

  // ---------------------------------------------------------------- state
  le2_instr_t    cur;
  logic          cur_valid;
  logic [31:0]   cur_opdata;
  logic [GW-1:0] grp;

  uop_t  u_ag, u_m1, u_m2, u_e1, u_e2, u_pw, u_wb;
  vec_t  va_m1, vb_m1, va_m2, vb_m2, va_e1, vb_e1;
  vec_t  mem_e1;
  vec_t  res_e2, res_pw, res_wb;
  logic [LANES-1:0][31:0] prod_e2;
  logic [LANES-1:0] cmp_e2, cmp_pw;
  accv_t acc_e2, accw_pw, accw_wb;
  logic [31:0] sres_pw, sres_wb;
  vec_t  mem_e1_e2;
  logic [LANES-1:0] pred_wd;

  // ---------------------------------------------------------------- register state
  vec_t             vrf_a, vrf_b;
  logic             vrf_re;
  logic [LANES-1:0] vrf_we;
  accv_t            vacc_q;
  logic             vacc_re;
  logic [LANES-1:0] vacc_we;
  logic [LW-1:0]    vlen;
  logic [LANES-1:0] vlmask, pmask;
  logic             vlen_we;
  logic [LW-1:0]    vlen_wdata;
  logic [LANES-1:0] pred_we;
  logic             pred_set_all;
  logic [31:0]      s_da, s_db;
  logic             sreg_we;

  le2_vrf #(.VREGS(VREGS), .VLMAX(VLMAX)) u_vrf (
    .clk,
    .re(vrf_re),
    .ra_reg(VRW'(cur.ra)), .ra_grp(grp),
    .rb_reg(VRW'(cur.rb)), .rb_grp(grp),
    .rdata_a(vrf_a), .rdata_b(vrf_b),
    .we(vrf_we), .w_reg(VRW'(u_wb.rd)), .w_grp(u_wb.grp), .wdata(res_wb)
  );

  le2_vacc #(.VLMAX(VLMAX)) u_vacc (
    .clk,
    .re(vacc_re), .r_grp(u_m2.grp), .rdata(vacc_q),
    .we(vacc_we), .w_grp(u_wb.grp), .wdata(accw_wb)
  );

  le2_vctrl_regs #(.VLMAX(VLMAX)) u_vctrl (
    .clk, .rst_n,
    .vlen_we, .vlen_wdata, .vlen,
    .grp, .vlmask, .mask(pmask),
    .pred_set_all, .pred_we, .pred_grp(u_wb.grp), .pred_wdata(pred_wd)
  );

  le2_sreg_file #(.SREGS(SREGS)) u_sreg (
    .clk, .rst_n,
    .ra(SRW'(cur.ra)), .da(s_da),
    .rb(SRW'(cur.rb)), .db(s_db),
    .rc(cpu_sreg_idx), .dc(cpu_sreg_data),
    .we(sreg_we), .wa(SRW'(u_wb.rd)), .wd(sres_wb)
  );

  // compare results travel to WB in bit 0 of each lane
  always_comb
    for (int l = 0; l < LANES; l++) pred_wd[l] = res_wb[l][0];

  // ---------------------------------------------------------------- DEC
  logic [GW:0]   ng;          // groups of the current instruction
  logic          is_vec, is_mem;
  logic          hazard, ag_stall, emit, retire;
  logic          exc_now;
  le2_exc_e      exc_c;
  logic [31:0]   base, gaddr, last_addr;
  uop_t          u_dec;

  assign is_vec = is_vector_op(cur.op);
  assign is_mem = cur.op inside {OP_VLD, OP_VST};
  assign ng     = is_vec ? (GW+1)'((int'(vlen) + LANES - 1) / LANES)
                         : ((cur.op inside {OP_NOP, OP_SETVL}) ? '0 : (GW+1)'(1));

  assign base      = s_da + 32'(signed'(cur.imm));
  assign gaddr     = {base[31:3], 3'b000} + {{(29-GW){1'b0}}, grp, 3'b000};
  assign last_addr = {base[31:3], 3'b000} + ({{(31-GW){1'b0}}, ng} << 3) - 32'd1;

  // in-flight writers: does any stage from AG to WB write this source?
  function automatic logic writes(uop_t u, wkind_e k, logic [3:0] idx, logic [GW-1:0] g,
                                  logic use_idx, logic use_grp);
    return u.valid && u.wk == k && (!use_idx || u.rd == idx) && (!use_grp || u.grp == g);
  endfunction

  function automatic logic inflight(wkind_e k, logic [3:0] idx, logic [GW-1:0] g,
                                    logic use_idx, logic use_grp);
    return writes(u_ag, k, idx, g, use_idx, use_grp) || writes(u_m1, k, idx, g, use_idx, use_grp) ||
           writes(u_m2, k, idx, g, use_idx, use_grp) || writes(u_e1, k, idx, g, use_idx, use_grp) ||
           writes(u_e2, k, idx, g, use_idx, use_grp) || writes(u_pw, k, idx, g, use_idx, use_grp) ||
           writes(u_wb, k, idx, g, use_idx, use_grp);
  endfunction

  always_comb begin
    logic rv_a, rv_b, rs_a, rs_b, r_acc, r_pred;
    rv_a = 1'b0; rv_b = 1'b0; rs_a = 1'b0; rs_b = 1'b0; r_acc = 1'b0;
    r_pred = is_vec && !(cur.op inside {OP_VCMPGT, OP_VCMPEQ});
    unique case (cur.op)
      OP_VADD, OP_VSUB, OP_VMUL, OP_VMIN, OP_VMAX, OP_VABSD,
      OP_VAND, OP_VOR, OP_VXOR, OP_VCMPGT, OP_VCMPEQ: begin rv_a = 1'b1; rv_b = 1'b1; end
      OP_VSRA, OP_VSLL, OP_SMOVV:                    rv_a = 1'b1;
      OP_VSPLAT, OP_VLD, OP_SADDI:                   rs_a = 1'b1;
      OP_VMAC:  begin rv_a = 1'b1; rv_b = 1'b1; r_acc = 1'b1; end
      OP_VACRD: r_acc = 1'b1;
      OP_VST:   begin rs_a = 1'b1; rv_b = 1'b1; end
      OP_SADD, OP_SSUB, OP_SAND, OP_SOR: begin rs_a = 1'b1; rs_b = 1'b1; end
      default: ;
    endcase
    hazard = cur_valid && (
             (rv_a   && inflight(WK_VREG, cur.ra, grp, 1'b1, 1'b1)) ||
             (rv_b   && inflight(WK_VREG, cur.rb, grp, 1'b1, 1'b1)) ||
             (rs_a   && inflight(WK_SREG, cur.ra, grp, 1'b1, 1'b0)) ||
             (rs_b   && inflight(WK_SREG, cur.rb, grp, 1'b1, 1'b0)) ||
             (r_acc  && inflight(WK_VACC, 4'd0,   grp, 1'b0, 1'b1)) ||
             (r_pred && inflight(WK_PRED, 4'd0,   grp, 1'b0, 1'b0)));
  end

  // exceptions, checked before the first group is issued
  always_comb begin
    exc_c = EXC_NONE;
    if (cur_valid && cur.op == OP_SETVL && cur_opdata > 32'(VLMAX))
      exc_c = EXC_VLEN;
    else if (cur_valid && is_mem && ng != '0 && grp == '0 && !hazard &&
             !(base >= MEM_BASE && last_addr >= base &&
               last_addr - MEM_BASE < 32'(MEM_BYTES)))
      exc_c = EXC_RANGE;
  end
  assign exc_now = (exc_c != EXC_NONE);

  assign emit   = cur_valid && ng != '0 && !hazard && !ag_stall && !exc_now;
  assign retire = cur_valid && (exc_now || ng == '0 || (emit && (GW+1)'(grp) == ng - 1'b1));
  assign instr_ready = !cur_valid || retire;
  assign vrf_re = emit;

  assign vlen_we    = cur_valid && cur.op == OP_SETVL && !exc_now;
  assign vlen_wdata = LW'(cur_opdata);

  always_comb begin
    u_dec       = '0;
    u_dec.valid = 1'b1;
    u_dec.op    = cur.op;
    u_dec.rd    = cur.rd;
    u_dec.imm   = cur.imm;
    u_dec.grp   = grp;
    u_dec.addr  = gaddr;
    u_dec.sa    = (cur.op == OP_SLI) ? cur_opdata : s_da;
    u_dec.sb    = (cur.op == OP_SADDI) ? 32'(signed'(cur.imm)) : s_db;
    u_dec.mask  = (cur.op inside {OP_VCMPGT, OP_VCMPEQ}) ? vlmask :
                  is_vec ? pmask : '1;
    unique case (cur.op)
      OP_VST:                      u_dec.wk = WK_MEM;
      OP_VMAC, OP_VACLR:           u_dec.wk = WK_VACC;
      OP_VCMPGT, OP_VCMPEQ, OP_VPSET: u_dec.wk = WK_PRED;
      OP_SADD, OP_SSUB, OP_SADDI, OP_SLI, OP_SMOVV, OP_SAND, OP_SOR: u_dec.wk = WK_SREG;
      OP_NOP, OP_SETVL:            u_dec.wk = WK_NONE;
      default:                     u_dec.wk = WK_VREG;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur        <= '0;
      cur_valid  <= 1'b0;
      cur_opdata <= '0;
      grp        <= '0;
      exc_valid  <= 1'b0;
      exc_cause  <= EXC_NONE;
    end else begin
      exc_valid <= exc_now;
      if (exc_now) exc_cause <= exc_c;
      if (!cur_valid || retire) begin
        // a new instruction may enter in the cycle the last one retires
        cur_valid <= instr_valid;
        if (instr_valid) begin
          cur        <= le2_instr_t'(instr);
          cur_opdata <= op_data;
          grp        <= '0;
        end
      end else if (emit) begin
        grp <= grp + 1'b1;
      end
    end

  // ---------------------------------------------------------------- AG
  always_comb begin
    mem_req        = '0;
    mem_req.valid  = u_ag.valid && (u_ag.op inside {OP_VLD, OP_VST});
    mem_req.write  = (u_ag.op == OP_VST);
    mem_req.addr   = u_ag.addr;
    mem_req.wdata  = vrf_b;
    mem_req.strobe = (u_ag.op == OP_VST) ? u_ag.mask : '1;
  end
  assign ag_stall        = mem_req.valid && !mem_rsp.gnt;
  assign ev_mem_stall    = ag_stall;
  assign ev_hazard_stall = hazard && !ag_stall;

  // ---------------------------------------------------------------- MRD2 / EX1 datapath
  assign vacc_re = u_m2.valid && (u_m2.op inside {OP_VMAC, OP_VACRD});

  vec_t                   alu_res;
  logic [LANES-1:0]       alu_cout, alu_cmp;
  logic [LANES-1:0][31:0] alu_prod;
  vec_t                   ex_a, ex_b;
  logic [LANES-1:0]       ex_cin;
  logic                   scalar_e1;

  assign scalar_e1 = u_e1.op inside {OP_SADD, OP_SSUB, OP_SADDI, OP_SLI, OP_SAND, OP_SOR};

  always_comb begin
    ex_a = va_e1;
    ex_b = vb_e1;
    if (scalar_e1) begin
      ex_a = '0; ex_b = '0;
      ex_a[0] = u_e1.sa[15:0];  ex_a[1] = u_e1.sa[31:16];
      ex_b[0] = u_e1.sb[15:0];  ex_b[1] = u_e1.sb[31:16];
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    if (l == 1) begin : g_chain
      // lane 1 takes lane 0's carry for scalar operations
      assign ex_cin[l] = scalar_e1 ? alu_cout[0] : (u_e1.op inside {OP_VSUB, OP_VABSD});
    end else begin : g_nochain
      assign ex_cin[l] = u_e1.op inside {OP_VSUB, OP_SSUB, OP_VABSD};
    end
    le2_lane_alu u_alu (
      .op(u_e1.op), .a(ex_a[l]), .b(ex_b[l]), .shamt(u_e1.imm[3:0]), .cin(ex_cin[l]),
      .res(alu_res[l]), .cout(alu_cout[l]), .prod(alu_prod[l]), .cmp(alu_cmp[l])
    );
  end

  // ---------------------------------------------------------------- EX2 / PWB datapath
  vec_t  res_ex2;
  accv_t accw_ex2;
  always_comb
    for (int l = 0; l < LANES; l++) begin
      accw_ex2[l] = (u_e2.op == OP_VACLR) ? '0 : acc_e2[l] + prod_e2[l];
      unique case (u_e2.op)
        OP_VLD:    res_ex2[l] = mem_e1_e2[l];
        OP_VSPLAT: res_ex2[l] = u_e2.sa[15:0];
        OP_VACRD:  res_ex2[l] = sat16(signed'(acc_e2[l]) >>> u_e2.imm[4:0]);
        default:   res_ex2[l] = res_e2[l];
      endcase
    end


  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      u_ag <= '0; u_m1 <= '0; u_m2 <= '0; u_e1 <= '0; u_e2 <= '0; u_pw <= '0; u_wb <= '0;
    end else begin
      if (emit)           u_ag <= u_dec;
      else if (!ag_stall) u_ag.valid <= 1'b0;
      u_m1       <= u_ag;
      u_m1.valid <= u_ag.valid && !ag_stall;
      u_m2 <= u_m1;
      u_e1 <= u_m2;
      u_e2 <= u_e1;
      u_pw <= u_e2;
      u_wb <= u_pw;
    end

  always_ff @(posedge clk) begin
    if (!ag_stall) begin va_m1 <= vrf_a; vb_m1 <= vrf_b; end
    va_m2 <= va_m1;  vb_m2 <= vb_m1;
    va_e1 <= va_m2;  vb_e1 <= vb_m2;
    mem_e1 <= mem_rsp.rdata;
    // EX1 -> EX2
    res_e2    <= alu_res;
    prod_e2   <= alu_prod;
    cmp_e2    <= alu_cmp;
    acc_e2    <= vacc_q;
    mem_e1_e2 <= mem_e1;
    // EX2 -> PWB
    res_pw  <= res_ex2;
    accw_pw <= accw_ex2;
    cmp_pw  <= cmp_e2;
    sres_pw <= {res_e2[1], res_e2[0]};
    // PWB -> WB
    for (int l = 0; l < LANES; l++)
      res_wb[l] <= (u_pw.wk == WK_PRED) ? {15'd0, cmp_pw[l]} : res_pw[l];
    accw_wb <= accw_pw;
    sres_wb <= sres_pw;
  end

  // ---------------------------------------------------------------- WB
  assign vrf_we       = (u_wb.valid && u_wb.wk == WK_VREG) ? u_wb.mask : '0;
  assign vacc_we      = (u_wb.valid && u_wb.wk == WK_VACC) ? u_wb.mask : '0;
  assign pred_we      = (u_wb.valid && u_wb.wk == WK_PRED && u_wb.op != OP_VPSET) ? u_wb.mask : '0;
  assign pred_set_all = u_wb.valid && u_wb.op == OP_VPSET;
  assign sreg_we      = u_wb.valid && u_wb.wk == WK_SREG;

  assign busy = cur_valid || u_ag.valid || u_m1.valid || u_m2.valid || u_e1.valid ||
                u_e2.valid || u_pw.valid || u_wb.valid;

  // load data must meet its micro-op in MRD2
  a_load_data: assert property (@(posedge clk) disable iff (!rst_n)
    (u_m2.valid && u_m2.op == OP_VLD) |-> mem_rsp.rvalid)
    else $error("le2_core: load data missing in MRD2");
endmodule
