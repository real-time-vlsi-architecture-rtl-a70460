// tb_le2_lane_alu: every lane operation on random and corner operands against
// an independent reference, and a 32-bit scalar add/sub built from two lane
// instances with the carry of lane 0 chained into lane 1.
module tb_le2_lane_alu;
  import le2_pkg::*;
  le2_op_e op;
  logic [15:0] a, b, res, a1, b1, res1;
  logic [3:0]  shamt;
  logic cin, cout, cmp, cout1, cmp1;
  logic signed [31:0] prod, prod1;
  int checks = 0, failures = 0;

  le2_lane_alu lo (.op, .a, .b, .shamt, .cin, .res, .cout, .prod, .cmp);
  le2_lane_alu hi (.op, .a(a1), .b(b1), .shamt, .cin(cout), .res(res1), .cout(cout1), .prod(prod1), .cmp(cmp1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] ref_res(le2_op_e o, logic signed [15:0] x, logic signed [15:0] y, int sh);
    int xi, yi;
    xi = x; yi = y;
    case (o)
      OP_VADD:  return 16'(xi + yi);
      OP_VSUB:  return 16'(xi - yi);
      OP_VMUL:  return 16'(xi * yi);
      OP_VMIN:  return 16'((xi < yi) ? xi : yi);
      OP_VMAX:  return 16'((xi > yi) ? xi : yi);
      OP_VABSD: return 16'((xi > yi) ? xi - yi : yi - xi);
      OP_VAND:  return x & y;
      OP_VOR:   return x | y;
      OP_VXOR:  return x ^ y;
      OP_VSRA:  return 16'(xi >>> sh);
      OP_VSLL:  return 16'(xi << sh);
      default:  return x;
    endcase
  endfunction

  le2_op_e ops[$] = '{OP_VADD, OP_VSUB, OP_VMUL, OP_VMIN, OP_VMAX, OP_VABSD, OP_VAND, OP_VOR,
                      OP_VXOR, OP_VSRA, OP_VSLL, OP_VSPLAT, OP_VCMPGT, OP_VCMPEQ};
  logic [15:0] corner[$] = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff, 16'h8000, 16'h1234};

  initial begin
    for (int k = 0; k < 4000; k++) begin
      op = ops[k % ops.size()];
      a = (k % 3 == 0) ? corner[$urandom_range(0, 5)] : 16'($urandom());
      b = (k % 5 == 0) ? corner[$urandom_range(0, 5)] : 16'($urandom());
      if (k % 7 == 0) b = a;
      shamt = 4'($urandom());
      cin = (op inside {OP_VSUB, OP_VABSD});
      a1 = 0; b1 = 0;
      #1;
      check(res == ref_res(op, a, b, shamt), $sformatf("op %s a %h b %h res %h", op.name(), a, b, res));
      check(prod == 32'(signed'(a)) * 32'(signed'(b)), "product");
      if (op == OP_VCMPGT) check(cmp == (signed'(a) > signed'(b)), "compare gt");
      if (op == OP_VCMPEQ) check(cmp == (a == b), "compare eq");
    end
    // scalar 32-bit add and subtract over lanes 0 and 1
    for (int k = 0; k < 2000; k++) begin
      logic [31:0] x, y;
      x = $urandom(); y = $urandom();
      if (k % 4 == 0) y = 32'h0000_ffff - x[15:0];
      op = (k % 2 == 0) ? OP_SADD : OP_SSUB;
      a = x[15:0]; a1 = x[31:16]; b = y[15:0]; b1 = y[31:16];
      cin = (op == OP_SSUB);
      #1;
      check({res1, res} == ((op == OP_SADD) ? x + y : x - y),
            $sformatf("%s %h %h -> %h", op.name(), x, y, {res1, res}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
