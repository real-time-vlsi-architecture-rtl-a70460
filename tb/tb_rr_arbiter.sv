// tb_rr_arbiter: with all four requesting, grants rotate 0,1,2,3; with random
// requests the grant is one-hot, requested, and the first requester at or
// after the pointer, which moves past the winner only when advance is high.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] req = 0, gnt;
  logic advance = 0;
  int ptr = 0;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(4)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk) req = 4'hf; advance = 1;
      #1 check(gnt == 4'(1 << (k % 4)), $sformatf("rotation step %0d gnt %b", k, gnt));
    end
    @(posedge clk);
    ptr = 0;   // nine grants in rotation leave the pointer at 0
    for (int k = 0; k < 2000; k++) begin
      int w;
      @(negedge clk);
      req = 4'($urandom()); advance = $urandom_range(0, 1) == 1;
      #1;
      w = -1;
      for (int i = 0; i < 4; i++) if (w < 0 && req[(ptr + i) % 4]) w = (ptr + i) % 4;
      check(gnt == ((w < 0) ? 4'b0 : 4'(1 << w)), $sformatf("req %b ptr %0d gnt %b", req, ptr, gnt));
      @(posedge clk);
      if (advance && w >= 0) ptr = (w + 1) % 4;
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
