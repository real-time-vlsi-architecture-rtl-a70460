// tb_strmem: three clients issue random reads and writes (random element
// strobes, some outside the window) to a 4-bank STRMEM of 16 words per bank.
// A monitor keeps a shadow memory updated at each granted write and checks
// every read: data equal to the shadow at its grant, delivered exactly two
// cycles after the grant.  Phases where all clients hit one bank check that
// the round-robin arbiter serves each client within NCLIENTS-1 cycles of
// waiting; conflicts are counted and must occur.
module tb_strmem;
  import le2_pkg::*;
  localparam int NC = 3, NB = 4, BW = 16, BYTES = NB * BW * 8;
  localparam logic [31:0] B = STRMEM_BASE;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mem_req_t req [NC];
  mem_rsp_t rsp [NC];
  logic [15:0] shadow [BYTES / 2];
  int checks = 0, failures = 0, conflicts = 0, max_wait = 0;
  int wait_c [NC];
  bit run = 0, same_bank = 0;
  typedef struct { logic [63:0] d; longint t; } exp_t;
  exp_t q [NC][$];
  longint cyc = 0;

  strmem #(.NCLIENTS(NC), .NBANKS(NB), .BANK_WORDS(BW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic mem_req_t new_req(int c);
    mem_req_t r;
    int w;
    w = same_bank ? NB * $urandom_range(0, BW - 1) : $urandom_range(0, BYTES / 8 - 1);
    r.valid  = $urandom_range(0, 3) != 0;
    r.write  = $urandom_range(0, 1);
    r.addr   = ($urandom_range(0, 19) == 0) ? B + BYTES + 8 * $urandom_range(0, 7) : B + 8 * w;
    r.wdata  = {$urandom(), $urandom()};
    r.strobe = 4'($urandom());
    return r;
  endfunction

  // clients: a new request once the old one is granted
  for (genvar c = 0; c < NC; c++) begin : g_cl
    always @(posedge clk or negedge rst_n)
      if (!rst_n) req[c] <= '0;
      else if (!req[c].valid || rsp[c].gnt) req[c] <= run ? new_req(c) : '0;
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    int bank_busy [NB];
    cyc++;
    foreach (bank_busy[b]) bank_busy[b] = 0;
    for (int c = 0; c < NC; c++) begin
      if (rsp[c].rvalid) begin
        if (q[c].size() == 0) check(0, "read data without a read");
        else begin
          exp_t e;
          e = q[c].pop_front();
          check(rsp[c].rdata == e.d, $sformatf("client %0d read %h expected %h", c, rsp[c].rdata, e.d));
          check(cyc - e.t == 2, $sformatf("read latency %0d", cyc - e.t));
        end
      end
      if (req[c].valid && !rsp[c].gnt) begin
        wait_c[c]++;
        conflicts++;
        if (wait_c[c] > max_wait) max_wait = wait_c[c];
      end
      if (req[c].valid && rsp[c].gnt) begin
        logic [31:0] off;
        logic [63:0] d;
        wait_c[c] = 0;
        off = req[c].addr - B;
        if (off < BYTES) begin
          int bk;
          bk = (off / 8) % NB;
          check(bank_busy[bk] == 0, "two grants in one bank");
          bank_busy[bk] = 1;
        end
        if (req[c].write) begin
          if (off < BYTES)
            for (int l = 0; l < LANES; l++)
              if (req[c].strobe[l]) shadow[off / 2 + l] = req[c].wdata[16*l +: 16];
        end else begin
          for (int l = 0; l < LANES; l++) d[16*l +: 16] = (off < BYTES) ? shadow[off / 2 + l] : 16'h0;
          q[c].push_back('{d, cyc});
        end
      end
    end
  end

  initial begin
    foreach (wait_c[c]) wait_c[c] = 0;
    for (int c = 0; c < NC; c++) req[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill memory through client 0 (no other traffic)
    for (int w = 0; w < BYTES / 8; w++) begin
      @(negedge clk);
      req[0] = '{valid: 1, write: 1, addr: B + 8 * w, wdata: {$urandom(), $urandom()}, strobe: '1};
    end
    @(negedge clk) req[0] = '0;
    @(negedge clk);
    run = 1;
    repeat (3000) @(posedge clk);
    same_bank = 1;
    repeat (2000) @(posedge clk);
    run = 0;
    repeat (5) @(posedge clk);
    for (int c = 0; c < NC; c++) check(q[c].size() == 0, "reads never answered");
    check(conflicts > 0, "no bank conflict happened");
    check(max_wait <= NC - 1, $sformatf("a client waited %0d cycles", max_wait));
    $display("conflict cycles %0d, longest wait %0d", conflicts, max_wait);
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
