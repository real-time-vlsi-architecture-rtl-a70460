// tb_l2_cache: random reads and writes (random strobes) over an address range
// four times the cache (SETS = 16, LINE_WORDS = 4) against a shadow memory,
// with a behavioural external memory that grants and answers after random
// delays.  Checks every read, that repeated stores to a resident line cause
// no external traffic, that hits, misses and dirty write-backs all occur, and
// after flushing by reading a disjoint range that external memory holds the
// shadow contents.
module tb_l2_cache;
  import le2_pkg::*;
  localparam int SETS = 16, LW = 4, CACHE_BYTES = SETS * LW * 8;
  localparam logic [31:0] A0 = 32'h4000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mem_req_t up_req = '0, dn_req;
  mem_rsp_t up_rsp, dn_rsp;
  logic ev_hit, ev_miss, ev_writeback;
  logic [63:0] ext [int unsigned];
  logic [63:0] shadow [int unsigned];
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_wb = 0, n_dn = 0;

  l2_cache #(.SETS(SETS), .LINE_WORDS(LW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // behavioural external memory
  int lat = 0, due = -1, cyc = 0;
  logic [63:0] pend;
  always_comb begin
    dn_rsp.gnt = dn_req.valid && lat == 0 && due < 0;
  end
  always @(posedge clk) begin
    cyc++;
    dn_rsp.rvalid <= 0;
    if (dn_req.valid && lat > 0) lat <= lat - 1;
    if (dn_rsp.gnt) begin
      n_dn++;
      lat <= $urandom_range(0, 3);
      if (dn_req.write) ext[dn_req.addr] = dn_req.wdata;
      else begin
        pend = ext.exists(dn_req.addr) ? ext[dn_req.addr] : 64'h0;
        due <= cyc + $urandom_range(1, 5);
      end
    end
    if (due >= 0 && due <= cyc) begin
      dn_rsp.rvalid <= 1;
      dn_rsp.rdata  <= pend;
      due <= -1;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_writeback) n_wb++;
  end

  task automatic access(bit wr, logic [31:0] a, logic [63:0] wd, logic [3:0] st, output logic [63:0] rd);
    @(negedge clk);
    up_req = '{valid: 1, write: wr, addr: a, wdata: wd, strobe: st};
    @(posedge clk);
    while (!up_rsp.gnt) @(posedge clk);
    @(negedge clk) up_req = '0;
    if (!wr) begin
      while (!up_rsp.rvalid) @(negedge clk);
      rd = up_rsp.rdata;
    end
  endtask

  initial begin
    logic [63:0] d, e;
    logic [31:0] a;
    int dn0;
    for (int w = 0; w < 4 * CACHE_BYTES / 8; w++) begin
      ext[A0 + 8*w] = {$urandom(), $urandom()};
      shadow[A0 + 8*w] = ext[A0 + 8*w];
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      a = A0 + 8 * $urandom_range(0, 4 * CACHE_BYTES / 8 - 1);
      if ($urandom_range(0, 1)) begin
        logic [3:0] st;
        d = {$urandom(), $urandom()};
        st = 4'($urandom());
        access(1, a, d, st, e);
        for (int l = 0; l < LANES; l++) if (st[l]) shadow[a][16*l +: 16] = d[16*l +: 16];
      end else begin
        access(0, a, '0, '0, d);
        check(d == shadow[a], $sformatf("read %h: %h expected %h", a, d, shadow[a]));
      end
    end
    // stores to a resident line stay in the cache
    access(0, A0, '0, '0, d);
    dn0 = n_dn;
    for (int k = 0; k < 20; k++) begin
      d = {$urandom(), $urandom()};
      access(1, A0 + 8 * (k % LW), d, 4'hf, e);
      shadow[A0 + 8 * (k % LW)] = d;
    end
    check(n_dn == dn0, "stores to a resident line reached external memory");
    // flush by reading a disjoint range mapping onto every set
    for (int w = 0; w < CACHE_BYTES / 8; w++) access(0, A0 + 32'h10_0000 + 8*w, '0, '0, d);
    for (int w = 0; w < 4 * CACHE_BYTES / 8; w++)
      check(ext[A0 + 8*w] == shadow[A0 + 8*w], $sformatf("external word %h after flush", A0 + 8*w));
    check(n_hit > 0 && n_miss > 0 && n_wb > 0, $sformatf("hits %0d misses %0d write-backs %0d", n_hit, n_miss, n_wb));
    $display("hits %0d, misses %0d, write-backs %0d", n_hit, n_miss, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
