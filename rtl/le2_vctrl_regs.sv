// le2_vctrl_regs: LE2 vector-length register (VLEN) and predicate register.
//
// VLEN says how many elements (0..VLMAX) of the vector registers take part in
// an instruction; the predicate register holds one bit per element and masks
// the elements below VLEN further.  For an element group this block produces
// two masks: vlmask (element index < VLEN) and mask (vlmask and predicate).
// Masks are combinational from grp.  Writes take effect at the clock edge:
// vlen_we loads VLEN, pred_set_all sets every predicate bit, pred_we writes
// the predicate bits of one group element by element.
// Reset: VLEN = VLMAX, predicate all ones (this design's choice).
module le2_vctrl_regs
  import le2_pkg::*;
#(
  parameter int unsigned VLMAX = 4096,
  localparam int unsigned NGRP = VLMAX / LANES,
  localparam int unsigned GW   = $clog2(NGRP),
  localparam int unsigned LW   = $clog2(VLMAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             vlen_we,
  input  logic [LW-1:0]    vlen_wdata,
  output logic [LW-1:0]    vlen,
  input  logic [GW-1:0]    grp,
  output logic [LANES-1:0] vlmask,
  output logic [LANES-1:0] mask,
  input  logic             pred_set_all,
  input  logic [LANES-1:0] pred_we,
  input  logic [GW-1:0]    pred_grp,
  input  logic [LANES-1:0] pred_wdata
);
  logic [NGRP-1:0][LANES-1:0] pred;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vlen <= LW'(VLMAX);
      pred <= '1;
    end else begin
      if (vlen_we) vlen <= vlen_wdata;
      if (pred_set_all) pred <= '1;
      else
        for (int l = 0; l < LANES; l++)
          if (pred_we[l]) pred[pred_grp][l] <= pred_wdata[l];
    end
  end

  always_comb
    for (int l = 0; l < LANES; l++) begin
      vlmask[l] = (int'(grp) * LANES + l < int'(vlen));
      mask[l]   = vlmask[l] & pred[grp][l];
    end
endmodule
