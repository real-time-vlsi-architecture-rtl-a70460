// le2_pkg: types and constants shared by the LE2 vector engine, the STRMEM
// local memory and the SSS2 top level.
//
// LE2 is a SIMD coprocessor with 16-bit vector elements.  Its architectural
// sizes (VREGS, VLMAX, SREGS) are module parameters; the lane count is fixed
// here because it also sets the STRMEM word: one element group of LANES
// 16-bit elements is exactly one 64-bit STRMEM word.  The lane count, the
// instruction encoding and the operation list below are this design's own
// choices; the element width, the 32-bit scalar registers and the STRMEM
// base address 0x30000000 follow the architecture description.
//
// Instruction word (32 bits):
//   [31:26] opcode  [25:22] rd  [21:18] ra  [17:14] rb  [13:0] imm (signed)
package le2_pkg;

  localparam int unsigned LANES   = 4;            // 16-bit lanes per cycle
  localparam int unsigned ELEM_W  = 16;
  localparam int unsigned WORD_W  = LANES*ELEM_W; // 64-bit memory word
  localparam int unsigned ACC_W   = 32;

  localparam logic [31:0] STRMEM_BASE = 32'h3000_0000;

  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    // element-wise vector operations: vd = va op vb (or op imm)
    OP_VADD   = 6'd1,
    OP_VSUB   = 6'd2,
    OP_VMUL   = 6'd3,   // low 16 bits of the signed product
    OP_VMIN   = 6'd4,
    OP_VMAX   = 6'd5,
    OP_VABSD  = 6'd6,   // |va - vb|
    OP_VAND   = 6'd7,
    OP_VOR    = 6'd8,
    OP_VXOR   = 6'd9,
    OP_VSRA   = 6'd10,  // va >>> imm[3:0]
    OP_VSLL   = 6'd11,  // va << imm[3:0]
    OP_VSPLAT = 6'd12,  // vd = sreg[ra][15:0] in every element
    // accumulators
    OP_VMAC   = 6'd13,  // VACC += va * vb (32-bit)
    OP_VACLR  = 6'd14,  // VACC = 0
    OP_VACRD  = 6'd15,  // vd = sat16(VACC >>> imm[4:0])
    // predicate
    OP_VCMPGT = 6'd16,  // pred = va > vb (VLEN elements)
    OP_VCMPEQ = 6'd17,  // pred = va == vb
    OP_VPSET  = 6'd18,  // pred = all ones
    // STRMEM, unit stride, address sreg[ra] + imm
    OP_VLD    = 6'd19,  // vd = mem
    OP_VST    = 6'd20,  // mem = vb
    // scalar, executed on lanes 0 and 1
    OP_SADD   = 6'd21,  // sd = sa + sb
    OP_SSUB   = 6'd22,  // sd = sa - sb
    OP_SADDI  = 6'd23,  // sd = sa + imm
    OP_SLI    = 6'd24,  // sd = CPU operand
    OP_SMOVV  = 6'd25,  // sd = {va[1], va[0]}
    OP_SETVL  = 6'd26,  // VLEN = CPU operand
    OP_SAND   = 6'd27,
    OP_SOR    = 6'd28
  } le2_op_e;

  typedef struct packed {
    le2_op_e     op;
    logic [3:0]  rd;
    logic [3:0]  ra;
    logic [3:0]  rb;
    logic [13:0] imm;
  } le2_instr_t;

  typedef enum logic [1:0] {
    EXC_NONE  = 2'd0,
    EXC_VLEN  = 2'd1,   // SETVL operand above VLMAX
    EXC_RANGE = 2'd2    // load/store range outside STRMEM
  } le2_exc_e;

  // what a micro-op writes; used by the hazard check
  typedef enum logic [2:0] {
    WK_NONE = 3'd0,
    WK_VREG = 3'd1,
    WK_SREG = 3'd2,
    WK_VACC = 3'd3,
    WK_PRED = 3'd4,
    WK_MEM  = 3'd5
  } wkind_e;

  // STRMEM client port
  typedef struct packed {
    logic              valid;
    logic              write;
    logic [31:0]       addr;   // byte address, 8-byte aligned
    logic [WORD_W-1:0] wdata;
    logic [LANES-1:0]  strobe; // one per 16-bit element
  } mem_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rvalid; // two cycles after the grant of a read
    logic [WORD_W-1:0] rdata;
  } mem_rsp_t;

  function automatic logic is_vector_op(le2_op_e op);
    return op inside {OP_VADD, OP_VSUB, OP_VMUL, OP_VMIN, OP_VMAX, OP_VABSD,
                      OP_VAND, OP_VOR, OP_VXOR, OP_VSRA, OP_VSLL, OP_VSPLAT,
                      OP_VMAC, OP_VACLR, OP_VACRD, OP_VCMPGT, OP_VCMPEQ,
                      OP_VLD, OP_VST};
  endfunction

  // saturate a signed 32-bit value to 16 bits
  function automatic logic [15:0] sat16(logic signed [31:0] v);
    if (v > 32'sd32767)       return 16'h7fff;
    else if (v < -32'sd32768) return 16'h8000;
    else                      return v[15:0];
  endfunction

endpackage
