// le2_ref_pkg: instruction-level reference model of the LE2 engine for the
// testbenches.  It executes one instruction at a time on its own copy of the
// architectural state (vector and scalar registers, VLEN, predicate,
// accumulators) and of STRMEM (one 16-bit element per even byte address), and
// reports the exception an instruction raises.  It models the meaning of each
// instruction only, not the pipeline.
package le2_ref_pkg;
  import le2_pkg::*;

  function automatic logic [31:0] sext14(logic [13:0] v);
    return {{18{v[13]}}, v};
  endfunction

  class le2_model #(int VLMAX = 64, int VREGS = 16, int SREGS = 16);
    logic [15:0] v   [VREGS][VLMAX];
    logic [31:0] acc [VLMAX];
    bit          pred[VLMAX];
    int          vlen;
    logic [31:0] s   [SREGS];
    logic [15:0] mem [int unsigned];  // key: byte address
    logic [31:0] mem_base;
    int unsigned mem_bytes;

    function new(logic [31:0] base, int unsigned bytes);
      mem_base  = base;
      mem_bytes = bytes;
      vlen      = VLMAX;
      foreach (pred[i]) pred[i] = 1'b1;
      foreach (s[i])    s[i] = '0;
      foreach (acc[i])  acc[i] = '0;
      foreach (v[r, i]) v[r][i] = '0;
    endfunction

    function logic [15:0] rd_mem(int unsigned a);
      return mem.exists(a) ? mem[a] : 16'h0;
    endfunction

    // returns the exception cause (EXC_NONE if executed)
    function le2_exc_e exec(logic [31:0] iw, logic [31:0] opd);
      le2_instr_t   in;
      logic [31:0]  base, al, last;
      int           ng;
      logic signed [15:0] a, b;
      in = le2_instr_t'(iw);
      ng = (vlen + LANES - 1) / LANES;
      case (in.op)
        OP_SETVL: begin
          if (opd > 32'(VLMAX)) return EXC_VLEN;
          vlen = int'(opd);
        end
        OP_SLI:   s[in.rd] = opd;
        OP_SADD:  s[in.rd] = s[in.ra] + s[in.rb];
        OP_SSUB:  s[in.rd] = s[in.ra] - s[in.rb];
        OP_SAND:  s[in.rd] = s[in.ra] & s[in.rb];
        OP_SOR:   s[in.rd] = s[in.ra] | s[in.rb];
        OP_SADDI: s[in.rd] = s[in.ra] + sext14(in.imm);
        OP_SMOVV: s[in.rd] = {v[in.ra][1], v[in.ra][0]};
        OP_VPSET: foreach (pred[i]) pred[i] = 1'b1;
        OP_VLD, OP_VST: begin
          base = s[in.ra] + sext14(in.imm);
          al   = {base[31:3], 3'b000};
          last = al + 32'(ng * 8) - 1;
          if (ng == 0) return EXC_NONE;
          if (!(base >= mem_base && last >= base && last - mem_base < mem_bytes)) return EXC_RANGE;
          for (int i = 0; i < vlen; i++)
            if (pred[i]) begin
              if (in.op == OP_VLD) v[in.rd][i] = rd_mem(al + 2*i);
              else                 mem[al + 2*i] = v[in.rb][i];
            end
        end
        default:
          for (int i = 0; i < vlen; i++) begin
            a = v[in.ra][i];
            b = v[in.rb][i];
            case (in.op)
              OP_VCMPGT: pred[i] = (a > b);
              OP_VCMPEQ: pred[i] = (a == b);
              default: if (pred[i]) case (in.op)
                OP_VADD:   v[in.rd][i] = a + b;
                OP_VSUB:   v[in.rd][i] = a - b;
                OP_VMUL:   v[in.rd][i] = 16'(a * b);
                OP_VMIN:   v[in.rd][i] = (a < b) ? a : b;
                OP_VMAX:   v[in.rd][i] = (a > b) ? a : b;
                OP_VABSD:  v[in.rd][i] = (a > b) ? 16'(a - b) : 16'(b - a);
                OP_VAND:   v[in.rd][i] = a & b;
                OP_VOR:    v[in.rd][i] = a | b;
                OP_VXOR:   v[in.rd][i] = a ^ b;
                OP_VSRA:   v[in.rd][i] = 16'(a >>> in.imm[3:0]);
                OP_VSLL:   v[in.rd][i] = 16'(a << in.imm[3:0]);
                OP_VSPLAT: v[in.rd][i] = s[in.ra][15:0];
                OP_VMAC:   acc[i] = acc[i] + 32'(32'(signed'(a)) * 32'(signed'(b)));
                OP_VACLR:  acc[i] = '0;
                OP_VACRD:  v[in.rd][i] = sat16(signed'(acc[i]) >>> in.imm[4:0]);
                default: ;
              endcase
            endcase
          end
      endcase
      return EXC_NONE;
    endfunction
  endclass

  function automatic logic [31:0] mk(le2_op_e op, int rd, int ra, int rb, int imm);
    le2_instr_t i;
    i.op = op; i.rd = 4'(rd); i.ra = 4'(ra); i.rb = 4'(rb); i.imm = 14'(imm);
    return 32'(i);
  endfunction
endpackage
