// tb_le2_vacc: random group writes with element enables and random group
// reads of the two accumulators (VLMAX = 32), against a shadow array indexed
// by vector element; also checks the even/odd split: element 2k is entry k of
// VACC0 and element 2k+1 entry k of VACC1.
module tb_le2_vacc;
  import le2_pkg::*;
  localparam int VLMAX = 32, NGRP = VLMAX / LANES;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re = 0;
  logic [2:0] r_grp = 0, w_grp = 0;
  logic [LANES-1:0][31:0] rdata, wdata = '0;
  logic [3:0] we = 0;
  logic [31:0] shadow [VLMAX];
  int checks = 0, failures = 0;

  le2_vacc #(.VLMAX(VLMAX)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int g = 0; g < NGRP; g++) begin
      @(negedge clk);
      we = '1; w_grp = 3'(g);
      for (int l = 0; l < LANES; l++) begin
        wdata[l] = $urandom();
        shadow[g*LANES + l] = wdata[l];
      end
    end
    @(negedge clk) we = 0;
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      re = 1; r_grp = 3'($urandom());
      we = 4'($urandom()); w_grp = 3'($urandom());
      for (int l = 0; l < LANES; l++) wdata[l] = $urandom();
      @(posedge clk);
      @(negedge clk);
      for (int l = 0; l < LANES; l++)
        check(rdata[l] == shadow[r_grp*LANES + l], $sformatf("grp %0d lane %0d", r_grp, l));
      for (int l = 0; l < LANES; l++)
        if (we[l]) shadow[w_grp*LANES + l] = wdata[l];
      re = 0; we = 0;
    end
    // storage layout
    for (int i = 0; i < VLMAX; i++)
      check(((i % 2) == 0 ? dut.acc0[i / LANES][(i % LANES) / 2] : dut.acc1[i / LANES][(i % LANES) / 2])
            == shadow[i], $sformatf("element %0d not in VACC%0d entry %0d", i, i % 2, i / 2));
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
