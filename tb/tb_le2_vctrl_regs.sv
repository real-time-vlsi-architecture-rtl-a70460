// tb_le2_vctrl_regs: VLEN and predicate masks (VLMAX = 64).  Checks the reset
// values, then random VLEN writes, predicate group writes and set-all, and
// compares the masks of every group against element-by-element reference.
module tb_le2_vctrl_regs;
  import le2_pkg::*;
  localparam int VLMAX = 64, NGRP = VLMAX / LANES;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic vlen_we = 0, pred_set_all = 0;
  logic [6:0] vlen_wdata = 0, vlen;
  logic [3:0] grp = 0, pred_grp = 0;
  logic [3:0] vlmask, mask, pred_we = 0, pred_wdata = 0;
  bit   pred [VLMAX];
  int   vl;
  int checks = 0, failures = 0;

  le2_vctrl_regs #(.VLMAX(VLMAX)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all();
    for (int g = 0; g < NGRP; g++) begin
      grp = 4'(g);
      #1;
      for (int l = 0; l < LANES; l++) begin
        check(vlmask[l] == (g*LANES + l < vl), $sformatf("vlmask g%0d l%0d vlen %0d", g, l, vl));
        check(mask[l] == ((g*LANES + l < vl) && pred[g*LANES + l]), $sformatf("mask g%0d l%0d", g, l));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    vl = VLMAX;
    foreach (pred[i]) pred[i] = 1;
    @(negedge clk);
    check(vlen == VLMAX, "VLEN reset value");
    check_all();
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: begin vlen_we = 1; vlen_wdata = 7'($urandom_range(0, VLMAX)); vl = vlen_wdata; end
        1: pred_set_all = ($urandom_range(0, 3) == 0);
        default: begin
          pred_we = 4'($urandom()); pred_grp = 4'($urandom()); pred_wdata = 4'($urandom());
        end
      endcase
      @(posedge clk);
      if (pred_set_all) foreach (pred[i]) pred[i] = 1;
      else for (int l = 0; l < LANES; l++) if (pred_we[l]) pred[pred_grp*LANES + l] = pred_wdata[l];
      @(negedge clk);
      vlen_we = 0; pred_set_all = 0; pred_we = 0;
      check(int'(vlen) == vl, "VLEN value");
      check_all();
    end
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
