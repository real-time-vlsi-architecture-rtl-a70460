// tb_le2_vrf: random writes with random element enables and random reads on
// both ports of the vector register file (4 registers x 64 elements),
// compared with a shadow copy one cycle after the read; also checks that the
// outputs hold while re is low.
module tb_le2_vrf;
  import le2_pkg::*;
  localparam int VREGS = 4, VLMAX = 64, NGRP = VLMAX / LANES;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re = 0;
  logic [1:0] ra_reg = 0, rb_reg = 0, w_reg = 0;
  logic [3:0] ra_grp = 0, rb_grp = 0, w_grp = 0;
  logic [63:0] rdata_a, rdata_b, wdata = 0;
  logic [3:0] we = 0;
  logic [63:0] shadow [VREGS][NGRP];
  int checks = 0, failures = 0;

  le2_vrf #(.VREGS(VREGS), .VLMAX(VLMAX)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [63:0] ea, eb;
    // fill every word
    for (int r = 0; r < VREGS; r++)
      for (int g = 0; g < NGRP; g++) begin
        @(negedge clk);
        we = '1; w_reg = 2'(r); w_grp = 4'(g); wdata = {$urandom(), $urandom()};
        shadow[r][g] = wdata;
      end
    @(negedge clk) we = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      re = 1;
      ra_reg = 2'($urandom()); ra_grp = 4'($urandom());
      rb_reg = 2'($urandom()); rb_grp = 4'($urandom());
      ea = shadow[ra_reg][ra_grp];
      eb = shadow[rb_reg][rb_grp];
      we = 4'($urandom()); w_reg = 2'($urandom()); w_grp = 4'($urandom());
      wdata = {$urandom(), $urandom()};
      @(posedge clk);
      for (int l = 0; l < LANES; l++)
        if (we[l]) shadow[w_reg][w_grp][16*l +: 16] = wdata[16*l +: 16];
      @(negedge clk);
      re = 0; we = 0;
      check(rdata_a == ea, $sformatf("port A %h expected %h", rdata_a, ea));
      check(rdata_b == eb, $sformatf("port B %h expected %h", rdata_b, eb));
      ra_reg = ~ra_reg;
      @(negedge clk);
      check(rdata_a == ea, "port A did not hold");
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
