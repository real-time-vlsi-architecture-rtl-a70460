// le2_vacc: the two LE2 vector accumulators VACC0 and VACC1.
//
// Each accumulator holds VLMAX/2 elements of 32 bits.  Together they hold one
// 32-bit accumulator per element of a VLMAX-long 16-bit vector: element i of
// a vector belongs to VACC(i mod 2), entry i/2 (this even/odd mapping is this
// design's choice).  An element group of LANES elements therefore touches
// LANES/2 entries of each accumulator, stored as one word per accumulator.
//
// Interface: synchronous read of one group (rdata valid the cycle after re,
// held while re is low), and a write of one group with an enable per element.
// rdata lane l is element group*LANES + l.  Accumulators are not reset; the
// program clears them with an accumulator-clear instruction.
module le2_vacc
  import le2_pkg::*;
#(
  parameter int unsigned VLMAX = 4096,
  localparam int unsigned NGRP = VLMAX / LANES,
  localparam int unsigned GW   = $clog2(NGRP),
  localparam int unsigned HALF = LANES / 2
) (
  input  logic                        clk,
  input  logic                        re,
  input  logic [GW-1:0]               r_grp,
  output logic [LANES-1:0][ACC_W-1:0] rdata,
  input  logic [LANES-1:0]            we,
  input  logic [GW-1:0]               w_grp,
  input  logic [LANES-1:0][ACC_W-1:0] wdata
);
  // acc0 holds the even lanes of each group, acc1 the odd lanes
  logic [HALF-1:0][ACC_W-1:0] acc0 [NGRP];
  logic [HALF-1:0][ACC_W-1:0] acc1 [NGRP];
  logic [HALF-1:0][ACC_W-1:0] q0, q1;

  always_ff @(posedge clk) begin
    if (re) begin
      q0 <= acc0[r_grp];
      q1 <= acc1[r_grp];
    end
    for (int k = 0; k < HALF; k++) begin
      if (we[2*k])   acc0[w_grp][k] <= wdata[2*k];
      if (we[2*k+1]) acc1[w_grp][k] <= wdata[2*k+1];
    end
  end

  always_comb
    for (int k = 0; k < HALF; k++) begin
      rdata[2*k]   = q0[k];
      rdata[2*k+1] = q1[k];
    end
endmodule
