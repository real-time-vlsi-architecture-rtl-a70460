// tb_strmem_dma: the DMA engine between two behavioural memories.  The
// system side grants after a random delay and returns read data 1..4 cycles
// later; the STRMEM side grants after a random delay with the fixed two-cycle
// read latency.  Copies random blocks system -> STRMEM and back to another
// system address, then checks every copied word, that nothing outside the
// destination ranges was written, the done pulse and busy, and a zero-length
// descriptor.
module tb_strmem_dma;
  import le2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_start = 0, cfg_to_strmem = 0, busy, done;
  logic [31:0] cfg_sys_addr = 0, cfg_str_addr = 0;
  logic [15:0] cfg_words = 0;
  mem_req_t sys_req, str_req;
  mem_rsp_t sys_rsp, str_rsp;
  logic [63:0] sysmem [int unsigned];
  logic [63:0] strm   [int unsigned];
  int checks = 0, failures = 0, n_done = 0;

  strmem_dma dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // behavioural system-bus memory
  int sys_lat = 0;
  logic [63:0] sys_pend [$];
  int          sys_due  [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always_comb begin
    sys_rsp.gnt = sys_req.valid && (sys_lat == 0);
  end
  always @(posedge clk) begin
    sys_rsp.rvalid <= 0;
    if (sys_req.valid && sys_lat > 0) sys_lat <= sys_lat - 1;
    if (sys_req.valid && sys_rsp.gnt) begin
      sys_lat <= $urandom_range(0, 3);
      if (sys_req.write) sysmem[sys_req.addr] = sys_req.wdata;
      else begin
        sys_pend.push_back(sysmem.exists(sys_req.addr) ? sysmem[sys_req.addr] : 64'h0);
        sys_due.push_back(cyc + $urandom_range(1, 4));
      end
    end
    if (sys_due.size() > 0 && sys_due[0] <= cyc) begin
      sys_rsp.rvalid <= 1;
      sys_rsp.rdata  <= sys_pend.pop_front();
      void'(sys_due.pop_front());
    end
  end

  // behavioural STRMEM port
  int str_lat = 0;
  logic [2:0] rv = 0;
  logic [63:0] rd1, rd2;
  always_comb str_rsp.gnt = str_req.valid && (str_lat == 0);
  always @(posedge clk) begin
    if (str_req.valid && str_lat > 0) str_lat <= str_lat - 1;
    rv  <= {rv[1:0], 1'b0};
    rd2 <= rd1;
    if (str_req.valid && str_rsp.gnt) begin
      str_lat <= $urandom_range(0, 2);
      if (str_req.write) strm[str_req.addr] = str_req.wdata;
      else begin
        rv[0] <= 1;
        rd1   <= strm.exists(str_req.addr) ? strm[str_req.addr] : 64'h0;
      end
    end
  end
  assign str_rsp.rvalid = rv[1];
  assign str_rsp.rdata  = rd2;

  always @(posedge clk) if (rst_n && done) n_done++;

  task automatic run(bit to_str, logic [31:0] sa, logic [31:0] ta, int n);
    int d0;
    d0 = n_done;
    @(negedge clk);
    cfg_start = 1; cfg_to_strmem = to_str; cfg_sys_addr = sa; cfg_str_addr = ta; cfg_words = 16'(n);
    @(negedge clk);
    cfg_start = 0;
    if (n > 0) check(busy, "busy after start");
    while (busy) @(negedge clk);
    @(negedge clk);
    check(n_done == d0 + 1, "one done pulse");
  endtask

  initial begin
    sys_rsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int n;
      logic [31:0] sa, ta, ba;
      n  = $urandom_range(1, 40);
      sa = 32'h4000_0000 + 32'h1000 * t;
      ta = STRMEM_BASE + 32'h400 * t;
      ba = 32'h5000_0000 + 32'h1000 * t;
      for (int i = 0; i < n; i++) sysmem[sa + 8*i] = {$urandom(), $urandom()};
      run(1, sa, ta, n);
      for (int i = 0; i < n; i++)
        check(strm.exists(ta + 8*i) && strm[ta + 8*i] == sysmem[sa + 8*i], $sformatf("to STRMEM word %0d", i));
      check(!strm.exists(ta + 8*n), "wrote past the end in STRMEM");
      run(0, ba, ta, n);
      for (int i = 0; i < n; i++)
        check(sysmem.exists(ba + 8*i) && sysmem[ba + 8*i] == sysmem[sa + 8*i], $sformatf("back to system word %0d", i));
      check(!sysmem.exists(ba + 8*n), "wrote past the end in system memory");
    end
    run(1, 32'h4000_0000, STRMEM_BASE, 0);
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
