// le2_lane_alu: one 16-bit lane of the LE2 exec1 stage (combinational).
//
// Every lane computes, for its two 16-bit operands, the result of the
// element-wise operation selected by op, the signed 16x16 product (used by the
// multiply-accumulate in exec2) and a compare bit for the predicate.  Add and
// subtract take a carry in and give a carry out: for scalar instructions the
// engine chains lane 0 into lane 1, so lanes 0 and 1 together form the 32-bit
// scalar datapath and no separate scalar ALU exists.  For a subtract, cin must
// be 1 on the low lane (two's complement) and the chained carry on the high
// lane.  Vector add/sub wrap around.  Using lanes 0 and 1 for scalar work
// follows the LE2 architecture; the operation list is this design's own.
module le2_lane_alu
  import le2_pkg::*;
(
  input  le2_op_e            op,
  input  logic [15:0]        a,
  input  logic [15:0]        b,
  input  logic [3:0]         shamt,
  input  logic               cin,
  output logic [15:0]        res,
  output logic               cout,
  output logic signed [31:0] prod,
  output logic               cmp
);
  logic        sub;
  logic [16:0] sum;
  logic signed [15:0] sa, sb;

  assign sa   = a;
  assign sb   = b;
  assign sub  = op inside {OP_VSUB, OP_SSUB, OP_VABSD};
  assign sum  = {1'b0, a} + {1'b0, sub ? ~b : b} + 17'(cin);
  assign cout = sum[16];
  assign prod = sa * sb;

  always_comb begin
    cmp = 1'b0;
    unique case (op)
      OP_VCMPGT: cmp = sa > sb;
      OP_VCMPEQ: cmp = a == b;
      default:   cmp = 1'b0;
    endcase
  end

  always_comb begin
    unique case (op)
      OP_VADD, OP_VSUB, OP_SADD, OP_SSUB, OP_SADDI: res = sum[15:0];
      OP_VMUL:  res = prod[15:0];
      OP_VMIN:  res = (sa < sb) ? a : b;
      OP_VMAX:  res = (sa > sb) ? a : b;
      OP_VABSD: res = (sa > sb) ? 16'(a - b) : 16'(b - a);
      OP_VAND, OP_SAND: res = a & b;
      OP_VOR,  OP_SOR:  res = a | b;
      OP_VXOR:  res = a ^ b;
      OP_VSRA:  res = 16'(sa >>> shamt);
      OP_VSLL:  res = a << shamt;
      default:  res = a;   // moves, splat, loads pass operand a
    endcase
  end
endmodule
