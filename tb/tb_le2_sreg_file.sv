// tb_le2_sreg_file: reset to zero, then random writes and reads on all three
// read ports against a shadow copy.
module tb_le2_sreg_file;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] ra = 0, rb = 0, rc = 0, wa = 0;
  logic [31:0] da, db, dc, wd = 0;
  logic we = 0;
  logic [31:0] shadow [16];
  int checks = 0, failures = 0;

  le2_sreg_file #(.SREGS(16)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) rc = 4'(i);
      #1 check(dc == 0, "reset value");
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; wa = 4'($urandom()); wd = $urandom();
      ra = 4'($urandom()); rb = 4'($urandom()); rc = 4'($urandom());
      #1;
      check(da == shadow[ra] && db == shadow[rb] && dc == shadow[rc], "read ports");
      @(posedge clk);
      if (we) shadow[wa] = wd;
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
