// le2_vrf: LE2 vector register file.
//
// VREGS vector registers of VLMAX 16-bit elements (the architectural sizes of
// the LE2 programmer's model, 16 x 4096 by default).  Each register is stored
// as VLMAX/LANES words of one element group (LANES elements, 64 bits), so the
// whole file is one memory of VREGS*VLMAX/LANES words with a write enable per
// element.  Two synchronous read ports (A and B) and one write port; this port
// arrangement is this design's own choice.
//
// Timing: when re is high, rdata_a/rdata_b show the addressed groups after the
// clock edge and hold their value while re is low, so a stalled pipeline
// stage keeps its operands.  A read and a write of the same word in one cycle
// return the old contents; the engine's hazard check never lets that happen.
module le2_vrf
  import le2_pkg::*;
#(
  parameter int unsigned VREGS = 16,
  parameter int unsigned VLMAX = 4096,
  localparam int unsigned NGRP = VLMAX / LANES,
  localparam int unsigned RW   = $clog2(VREGS),
  localparam int unsigned GW   = $clog2(NGRP)
) (
  input  logic              clk,
  input  logic              re,
  input  logic [RW-1:0]     ra_reg,
  input  logic [GW-1:0]     ra_grp,
  input  logic [RW-1:0]     rb_reg,
  input  logic [GW-1:0]     rb_grp,
  output logic [WORD_W-1:0] rdata_a,
  output logic [WORD_W-1:0] rdata_b,
  input  logic [LANES-1:0]  we,
  input  logic [RW-1:0]     w_reg,
  input  logic [GW-1:0]     w_grp,
  input  logic [WORD_W-1:0] wdata
);
  logic [WORD_W-1:0] mem [VREGS*NGRP];

  always_ff @(posedge clk) begin
    if (re) begin
      rdata_a <= mem[{ra_reg, ra_grp}];
      rdata_b <= mem[{rb_reg, rb_grp}];
    end
    for (int l = 0; l < LANES; l++)
      if (we[l]) mem[{w_reg, w_grp}][l*ELEM_W +: ELEM_W] <= wdata[l*ELEM_W +: ELEM_W];
  end
endmodule
