// tb_sss2_top: end-to-end run of the SSS2 core at its default size (two LE2
// engines with VLMAX = 4096, 128 KB STRMEM in four banks).
//
// Data flow of the run:
//   1. the host stream writes image frame A (4096 pixels) into STRMEM;
//   2. the DMA engine copies frame B from system memory into STRMEM;
//   3. both engines run at once, competing for the STRMEM banks with each
//      other and with the host stream, which reads frame A at random
//      addresses meanwhile (every answer checked):
//      engine 0 - frame difference |A - B|, thresholded with a predicate
//                 (pixels under the threshold become 0), on the full frame
//                 and again with an odd vector length;
//      engine 1 - 3-tap filter of A with the multiply-accumulate unit,
//                 read out with a shift and saturation;
//      each engine also raises one exception (bad VLEN, load out of range);
//   4. the DMA copies engine 0's result out through the L2 cache twice, to
//      two regions that share cache sets (the first copy is written back to
//      DDR2), and the second copy back into STRMEM; the host stream reads it
//      and engine 1's result.
// Everything is compared with the instruction-level reference model.  The
// run counts hazard stalls, STRMEM arbitration stalls, exceptions, DMA
// transfers in both directions, host stream accesses, vector-length changes,
// predicate-masked elements and L2 hits, misses and write-backs; each must
// happen at least once.
module tb_sss2_top;
  import le2_pkg::*;
  import le2_ref_pkg::*;

  localparam int NPE = 2, VLMAX = 4096, MEM_BYTES = 4 * 4096 * 8;
  localparam logic [31:0] B = STRMEM_BASE;
  localparam logic [31:0] A_OFF = 32'h0000, B_OFF = 32'h2000, R0_OFF = 32'h4000,
                          R1_OFF = 32'h6000, R2_OFF = 32'h8000;
  localparam logic [31:0] RB_OFF = 32'hA000;
  localparam logic [31:0] SYS_B = 32'h4000_0000, SYS_R = 32'h5000_0000, SYS_R2 = 32'h5001_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPE-1:0]       cop_valid = '0, cop_ready, cop_exc, cop_busy, ev_h, ev_m;
  logic [NPE-1:0][31:0] cop_instr = '0, cop_opdata = '0, cpu_sreg_data;
  logic [NPE-1:0][3:0]  cpu_sreg_idx = '0;
  le2_exc_e             cop_exc_cause [NPE];
  logic        dma_start = 0, dma_to_strmem = 0, dma_busy, dma_done;
  logic [31:0] dma_sys_addr = 0, dma_str_addr = 0;
  logic [15:0] dma_words = 0;
  mem_req_t    sys_req, host_req = '0;
  mem_rsp_t    sys_rsp, host_rsp;
  logic        l2_hit, l2_miss, l2_wb;

  sss2_top dut (
    .clk, .rst_n, .cop_valid, .cop_instr, .cop_opdata, .cop_ready, .cop_exc, .cop_exc_cause,
    .cop_busy, .cpu_sreg_idx, .cpu_sreg_data, .ev_hazard_stall(ev_h), .ev_mem_stall(ev_m),
    .dma_start, .dma_to_strmem, .dma_sys_addr, .dma_str_addr, .dma_words, .dma_busy, .dma_done,
    .ddr_req(sys_req), .ddr_rsp(sys_rsp), .l2_hit, .l2_miss, .l2_writeback(l2_wb),
    .host_req, .host_rsp
  );

  int checks = 0, failures = 0;
  int n_hazard = 0, n_memstall = 0, n_exc = 0, n_dma_in = 0, n_dma_out = 0, n_host = 0;
  int n_setvl = 0, n_masked = 0, n_l2hit = 0, n_l2miss = 0, n_l2wb = 0;
  le2_exc_e exp_exc [NPE][$];
  le2_model #(.VLMAX(VLMAX)) m [NPE];
  logic [63:0] sysmem [int unsigned];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // behavioural DDR2 behind the L2 cache: always ready, data next cycle
  assign sys_rsp.gnt = sys_req.valid;
  always @(posedge clk) begin
    sys_rsp.rvalid <= sys_req.valid && !sys_req.write;
    if (sys_req.valid && !sys_req.write)
      sys_rsp.rdata <= sysmem.exists(sys_req.addr) ? sysmem[sys_req.addr] : 64'h0;
    if (sys_req.valid && sys_req.write) sysmem[sys_req.addr] = sys_req.wdata;
  end

  always @(posedge clk) if (rst_n) begin
    if (l2_hit)  n_l2hit++;
    if (l2_miss) n_l2miss++;
    if (l2_wb)   n_l2wb++;
    for (int p = 0; p < NPE; p++) begin
      if (ev_h[p]) n_hazard++;
      if (ev_m[p]) n_memstall++;
      if (cop_exc[p]) begin
        n_exc++;
        if (exp_exc[p].size() == 0) check(0, $sformatf("engine %0d: unexpected exception", p));
        else check(exp_exc[p].pop_front() == cop_exc_cause[p], $sformatf("engine %0d: exception cause", p));
      end
    end
  end

  task automatic issue(int p, logic [31:0] iw, logic [31:0] opd = 0);
    le2_exc_e e;
    le2_instr_t in;
    in = le2_instr_t'(iw);
    // back to back: a call made at a falling edge drives at once
    if ($time % 10 != 0) @(negedge clk);
    while (!cop_ready[p]) @(negedge clk);
    cop_valid[p] = 1; cop_instr[p] = iw; cop_opdata[p] = opd;
    @(negedge clk);
    cop_valid[p] = 0;
    if (in.op == OP_SETVL) n_setvl++;
    if (is_vector_op(in.op) && !(in.op inside {OP_VCMPGT, OP_VCMPEQ}))
      for (int i = 0; i < m[p].vlen; i++) if (!m[p].pred[i]) n_masked++;
    e = m[p].exec(iw, opd);
    if (e != EXC_NONE) exp_exc[p].push_back(e);
  endtask

  task automatic drain(int p);
    @(negedge clk);
    while (cop_busy[p] || !cop_ready[p]) @(negedge clk);
  endtask

  // host stream: one word per access
  task automatic host_write(logic [31:0] a, logic [63:0] d);
    @(negedge clk);
    host_req = '{valid: 1, write: 1, addr: a, wdata: d, strobe: '1};
    @(posedge clk);
    while (!host_rsp.gnt) @(posedge clk);
    @(negedge clk) host_req = '0;
    n_host++;
  endtask

  task automatic host_read(logic [31:0] a, output logic [63:0] d);
    @(negedge clk);
    host_req = '{valid: 1, write: 0, addr: a, wdata: '0, strobe: '1};
    @(posedge clk);
    while (!host_rsp.gnt) @(posedge clk);
    @(negedge clk) host_req = '0;
    while (!host_rsp.rvalid) @(negedge clk);
    d = host_rsp.rdata;
    n_host++;
  endtask

  // random back-to-back host reads of frame A while the engines run; each
  // answer is checked two cycles after its grant
  bit host_noise = 0;
  logic [31:0] host_q [$];
  longint      host_t [$];
  longint      hcyc = 0;
  always @(posedge clk) begin
    hcyc++;
    if (host_rsp.rvalid && host_q.size() > 0 && hcyc - host_t[0] == 2) begin
      check(host_rsp.rdata == model_word(0, host_q[0]), $sformatf("host read %h during the run", host_q[0]));
      void'(host_q.pop_front());
      void'(host_t.pop_front());
    end
    if (host_noise || host_q.size() > 0 || (host_req.valid && !host_rsp.gnt)) begin
      if (host_req.valid && host_rsp.gnt && !host_req.write) begin
        host_q.push_back(host_req.addr);
        host_t.push_back(hcyc);
        n_host++;
      end
      if (!host_req.valid || host_rsp.gnt)
        host_req <= '{valid: host_noise, write: 0,
                      addr: B + A_OFF + 8 * $urandom_range(0, VLMAX / LANES - 1), wdata: '0, strobe: '1};
    end
  end

  task automatic dma(bit to_str, logic [31:0] sa, logic [31:0] ta, int words);
    @(negedge clk);
    dma_start = 1; dma_to_strmem = to_str; dma_sys_addr = sa; dma_str_addr = ta; dma_words = 16'(words);
    @(negedge clk) dma_start = 0;
    while (!dma_done) @(negedge clk);
    if (to_str) n_dma_in++; else n_dma_out++;
  endtask

  function automatic void model_write(logic [31:0] a, logic [63:0] d);
    for (int p = 0; p < NPE; p++)
      for (int l = 0; l < LANES; l++) m[p].mem[a + 2*l] = d[16*l +: 16];
  endfunction

  function automatic logic [63:0] model_word(int p, logic [31:0] a);
    logic [63:0] d;
    for (int l = 0; l < LANES; l++) d[16*l +: 16] = m[p].rd_mem(a + 2*l);
    return d;
  endfunction

  // engine 0: thresholded frame difference
  task automatic prog_diff(int vl, logic [31:0] res_off);
    int p = 0;
    issue(p, mk(OP_SETVL, 0, 0, 0, 0), vl);
    issue(p, mk(OP_SLI, 1, 0, 0, 0), B);
    issue(p, mk(OP_SLI, 6, 0, 0, 0), B_OFF);
    issue(p, mk(OP_SADD, 2, 1, 6, 0));                    // base of B, depends on s1 and s6
    issue(p, mk(OP_VLD, 0, 1, 0, int'(A_OFF)));
    issue(p, mk(OP_VLD, 1, 2, 0, 0));
    issue(p, mk(OP_VABSD, 2, 0, 1, 0));
    issue(p, mk(OP_SLI, 3, 0, 0, 0), 32'd6000);          // threshold
    issue(p, mk(OP_VSPLAT, 3, 3, 0, 0));
    issue(p, mk(OP_VXOR, 4, 4, 4, 0));                    // zero
    issue(p, mk(OP_VCMPGT, 0, 2, 3, 0));
    issue(p, mk(OP_VOR, 4, 2, 2, 0));                     // copy where above threshold
    issue(p, mk(OP_VPSET, 0, 0, 0, 0));
    issue(p, mk(OP_SLI, 7, 0, 0, 0), B + res_off);
    issue(p, mk(OP_VST, 0, 7, 4, 0));
    issue(p, mk(OP_SMOVV, 5, 4, 0, 0));
  endtask

  // engine 1: y[i] = sat((x[i]*3 + x[i+4]*2 + x[i+8]*-1) >> 2)
  task automatic prog_filter();
    int p = 1;
    issue(p, mk(OP_SETVL, 0, 0, 0, 0), VLMAX + 1);         // refused
    issue(p, mk(OP_SETVL, 0, 0, 0, 0), VLMAX - 8);
    issue(p, mk(OP_SLI, 1, 0, 0, 0), B + MEM_BYTES - 8);
    issue(p, mk(OP_VLD, 9, 1, 0, 0));                      // runs past STRMEM: refused
    issue(p, mk(OP_SLI, 1, 0, 0, 0), B);
    issue(p, mk(OP_VACLR, 0, 0, 0, 0));
    for (int k = 0; k < 3; k++) begin
      issue(p, mk(OP_SLI, 2, 0, 0, 0), (k == 0) ? 3 : (k == 1) ? 2 : 32'hffff_ffff);
      issue(p, mk(OP_VSPLAT, 1, 2, 0, 0));
      issue(p, mk(OP_VLD, 0, 1, 0, int'(A_OFF) + 8 * k));
      issue(p, mk(OP_VMAC, 0, 0, 1, 0));
    end
    issue(p, mk(OP_VACRD, 2, 0, 0, 2));
    issue(p, mk(OP_SLI, 3, 0, 0, 0), B + R1_OFF);
    issue(p, mk(OP_VST, 0, 3, 2, 0));
  endtask

  initial begin
    logic [63:0] d;
    int vwords;
    logic [31:0] res_area[3] = '{R0_OFF, R1_OFF, R2_OFF};
    for (int p = 0; p < NPE; p++) m[p] = new(B, MEM_BYTES);
    vwords = VLMAX / LANES;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // frame A through the host stream, frame B through the DMA
    for (int w = 0; w < vwords + 2; w++) begin
      d = {$urandom(), $urandom()};
      host_write(B + A_OFF + 8*w, d);
      model_write(B + A_OFF + 8*w, d);
    end
    for (int w = 0; w < vwords; w++) begin
      d = {$urandom(), $urandom()};
      sysmem[SYS_B + 8*w] = d;
      model_write(B + B_OFF + 8*w, d);
    end
    dma(1, SYS_B, B + B_OFF, vwords);
    // clear the result areas, which short vectors write only in part
    for (int w = 0; w < vwords; w++)
      foreach (res_area[k]) begin
        host_write(B + res_area[k] + 8*w, 64'h0);
        model_write(B + res_area[k] + 8*w, 64'h0);
      end

    // both engines at once, the host reading frame A at random meanwhile
    host_noise = 1;
    fork
      begin prog_diff(VLMAX, R0_OFF); prog_diff(VLMAX - 3, R2_OFF); drain(0); end
      begin prog_filter(); drain(1); end
    join
    host_noise = 0;
    @(negedge clk);
    while (host_req.valid || host_q.size() > 0) @(negedge clk);
    host_req = '0;
    repeat (5) @(negedge clk);

    // results out: engine 0 by DMA (twice, to two regions that share the L2
    // sets, so the first copy is written back to DDR2 by the second), then
    // the second copy back into STRMEM through the cache; engine 1 by the
    // host stream
    dma(0, SYS_R, B + R0_OFF, vwords);
    dma(0, SYS_R2, B + R0_OFF, vwords);
    dma(1, SYS_R2, B + RB_OFF, vwords);
    for (int w = 0; w < vwords; w++)
      check(sysmem.exists(SYS_R + 8*w) && sysmem[SYS_R + 8*w] == model_word(0, B + R0_OFF + 8*w),
            $sformatf("difference word %0d in DDR2", w));
    for (int w = 0; w < vwords; w++) begin
      host_read(B + RB_OFF + 8*w, d);
      check(d == model_word(0, B + R0_OFF + 8*w), $sformatf("difference word %0d via L2", w));
    end
    for (int w = 0; w < vwords; w++) begin
      host_read(B + R2_OFF + 8*w, d);
      check(d == model_word(0, B + R2_OFF + 8*w), $sformatf("short difference word %0d", w));
    end
    for (int w = 0; w < vwords; w++) begin
      host_read(B + R1_OFF + 8*w, d);
      check(d == model_word(1, B + R1_OFF + 8*w), $sformatf("filter word %0d: %h vs %h", w, d, model_word(1, B + R1_OFF + 8*w)));
    end
    for (int p = 0; p < NPE; p++) begin
      for (int r = 0; r < 16; r++) begin
        @(negedge clk) cpu_sreg_idx[p] = 4'(r);
        #1 check(cpu_sreg_data[p] == m[p].s[r], $sformatf("engine %0d s%0d", p, r));
      end
      check(exp_exc[p].size() == 0, "exception never raised");
    end

    $display("hazard stalls %0d, STRMEM stalls %0d, exceptions %0d, DMA in %0d out %0d, host accesses %0d, VLEN changes %0d, masked elements %0d, L2 hits %0d misses %0d write-backs %0d",
             n_hazard, n_memstall, n_exc, n_dma_in, n_dma_out, n_host, n_setvl, n_masked, n_l2hit, n_l2miss, n_l2wb);
    check(n_l2hit > 0 && n_l2miss > 0 && n_l2wb > 0, "L2 hits, misses and write-backs");
    check(n_hazard > 0,   "no hazard stall");
    check(n_memstall > 0, "no STRMEM arbitration stall");
    check(n_exc == 2,     "exceptions");
    check(n_dma_in > 0 && n_dma_out > 0, "DMA both directions");
    check(n_host > 0,     "host stream");
    check(n_setvl > 2,    "vector length changes");
    check(n_masked > 0,   "predicate masking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
