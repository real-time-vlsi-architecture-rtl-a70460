// tb_le2_core: self-checking test of the LE2 engine.
//
// The engine runs with VLMAX = 64 against a small STRMEM (2 KB).  A second
// STRMEM client belongs to the testbench: it preloads and dumps memory and,
// during the random phase, issues reads to random banks so that the engine's
// loads and stores lose arbitration and stall.  Checks:
//   - pipeline latency: a one-group instruction keeps the engine busy for the
//     8 pipeline stages; an independent full-length instruction for
//     VLMAX/LANES + 7 cycles (one group per cycle); four independent
//     one-group instructions issue on consecutive cycles (8 + 3 cycles);
//   - a dependent instruction waits for its producer (hazard stall) and
//     reads the new value;
//   - a random instruction stream (all operations, random VLEN, predicate
//     compares, loads/stores, out-of-range and bad-VLEN exceptions) against
//     the reference model: every exception in order, then all of STRMEM, every
//     vector and scalar register and the accumulators.
module tb_le2_core;
  import le2_pkg::*;
  import le2_ref_pkg::*;

  localparam int VLMAX = 64;
  localparam int NGRP  = VLMAX / LANES;
  localparam int BANK_WORDS = 64;
  localparam int MEM_BYTES  = 4 * BANK_WORDS * 8;
  localparam logic [31:0] B = STRMEM_BASE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        instr_valid = 0;
  logic [31:0] instr = 0, op_data = 0;
  logic        instr_ready, exc_valid, busy, ev_h, ev_m;
  le2_exc_e    exc_cause;
  logic [3:0]  cpu_idx = 0;
  logic [31:0] cpu_data;
  mem_req_t    req [2];
  mem_rsp_t    rsp [2];
  mem_req_t    treq = '0;

  le2_core #(.VLMAX(VLMAX), .MEM_BYTES(MEM_BYTES)) dut (
    .clk, .rst_n, .instr_valid, .instr, .op_data, .instr_ready,
    .exc_valid, .exc_cause, .busy, .cpu_sreg_idx(cpu_idx), .cpu_sreg_data(cpu_data),
    .mem_req(req[0]), .mem_rsp(rsp[0]), .ev_hazard_stall(ev_h), .ev_mem_stall(ev_m)
  );
  assign req[1] = treq;
  strmem #(.NCLIENTS(2), .NBANKS(4), .BANK_WORDS(BANK_WORDS)) u_mem (
    .clk, .rst_n, .req, .rsp
  );

  int checks = 0, failures = 0;
  int n_hazard = 0, n_memstall = 0, n_exc = 0;
  le2_exc_e exp_exc[$];
  le2_model #(.VLMAX(VLMAX)) m;
  bit noise = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && ev_h) n_hazard++;
    if (rst_n && ev_m) n_memstall++;
    if (rst_n && exc_valid) begin
      n_exc++;
      if (exp_exc.size() == 0) check(0, $sformatf("unexpected exception %0d op %0d", exc_cause, dut.cur.op));
      else begin
        le2_exc_e e;
        e = exp_exc.pop_front();
        check(e == exc_cause, $sformatf("exception cause %0d expected %0d", exc_cause, e));
      end
    end
  end

  // issue one instruction, run the model on it
  task automatic issue(logic [31:0] iw, logic [31:0] opd = 0);
    le2_exc_e e;
    // back to back: a call made at a falling edge drives at once
    if ($time % 10 != 0) @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr_valid = 1; instr = iw; op_data = opd;
    @(negedge clk);
    instr_valid = 0;
    e = m.exec(iw, opd);
    if (e != EXC_NONE) exp_exc.push_back(e);
  endtask

  task automatic drain();
    @(negedge clk);
    while (busy || instr_ready == 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  // testbench STRMEM port
  task automatic mem_write(logic [31:0] a, logic [63:0] d);
    @(negedge clk);
    treq = '{valid: 1, write: 1, addr: a, wdata: d, strobe: '1};
    @(posedge clk);
    while (!rsp[1].gnt) @(posedge clk);
    @(negedge clk) treq = '0;
  endtask

  task automatic mem_read(logic [31:0] a, output logic [63:0] d);
    @(negedge clk);
    treq = '{valid: 1, write: 0, addr: a, wdata: '0, strobe: '1};
    @(posedge clk);
    while (!rsp[1].gnt) @(posedge clk);
    @(negedge clk) treq = '0;
    while (!rsp[1].rvalid) @(negedge clk);
    d = rsp[1].rdata;
  endtask

  // random reads that compete with the engine for the banks
  always @(posedge clk)
    if (noise) begin
      if (!treq.valid || rsp[1].gnt)
        treq <= '{valid: ($urandom_range(0, 1) == 1), write: 0,
                 addr: B + 8 * $urandom_range(0, MEM_BYTES / 8 - 1), wdata: '0, strobe: '1};
    end

  // busy cycles of one instruction, counted from its acceptance
  task automatic time_one(logic [31:0] iw, int expect_cycles, string what);
    int n;
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr_valid = 1; instr = iw;
    @(posedge clk);
    void'(m.exec(iw, 0));
    #1 instr_valid = 0;
    n = 0;
    @(posedge clk);
    while (busy) begin
      n++;
      @(posedge clk);
    end
    check(n == expect_cycles, $sformatf("%s: busy %0d cycles, expected %0d", what, n, expect_cycles));
  endtask

  task automatic compare_memory(string tag);
    logic [63:0] d;
    for (int w = 0; w < MEM_BYTES / 8; w++) begin
      mem_read(B + 8 * w, d);
      for (int l = 0; l < LANES; l++)
        check(d[16*l +: 16] == m.rd_mem(B + 8 * w + 2 * l),
              $sformatf("%s mem %h lane %0d: %h vs %h", tag, B + 8 * w, l, d[16*l +: 16], m.rd_mem(B + 8 * w + 2 * l)));
    end
  endtask

  function automatic logic [31:0] rnd_base(int len_bytes);
    return B + 8 * $urandom_range(0, (MEM_BYTES - len_bytes) / 8);
  endfunction

  // random instruction stream
  task automatic random_program(int n);
    le2_op_e ops[$] = '{OP_VADD, OP_VSUB, OP_VMUL, OP_VMIN, OP_VMAX, OP_VABSD, OP_VAND,
                        OP_VOR, OP_VXOR, OP_VSRA, OP_VSLL, OP_VSPLAT, OP_VMAC, OP_VMAC,
                        OP_VACLR, OP_VACRD, OP_VCMPGT, OP_VCMPEQ, OP_VPSET, OP_VLD, OP_VST,
                        OP_SADD, OP_SSUB, OP_SADDI, OP_SLI, OP_SMOVV, OP_SETVL, OP_SAND,
                        OP_SOR, OP_VLD, OP_VST};
    for (int k = 0; k < n; k++) begin
      le2_op_e op;
      int rd, ra, rb;
      op = ops[$urandom_range(0, ops.size() - 1)];
      rd = $urandom_range(0, 15); ra = $urandom_range(0, 15); rb = $urandom_range(0, 15);
      case (op)
        OP_SETVL:
          issue(mk(op, 0, 0, 0, 0), ($urandom_range(0, 19) == 0) ? VLMAX + $urandom_range(1, 9)
                                                                  : $urandom_range(0, VLMAX));
        OP_VLD, OP_VST: begin
          // base register s13..s15, 1 in 8 out of the window
          ra = $urandom_range(13, 15);
          if ($urandom_range(0, 7) == 0)
            issue(mk(OP_SLI, ra, 0, 0, 0), B + MEM_BYTES - 8 * $urandom_range(0, 2));
          else
            issue(mk(OP_SLI, ra, 0, 0, 0), rnd_base(2 * VLMAX));
          issue(mk(op, rd, ra, rb, 0));
        end
        OP_SLI:   issue(mk(op, $urandom_range(0, 12), 0, 0, 0), $urandom());
        OP_SADD, OP_SSUB, OP_SAND, OP_SOR, OP_SMOVV:
                  issue(mk(op, $urandom_range(0, 12), ra, rb, 0));
        OP_SADDI: issue(mk(op, $urandom_range(0, 12), ra, 0, $urandom_range(0, 16383)));
        OP_VACRD: issue(mk(op, rd, 0, 0, $urandom_range(0, 20)));
        default:  issue(mk(op, rd, ra, rb, $urandom_range(0, 15)));
      endcase
    end
  endtask

  initial begin
    logic [63:0] d;
    m = new(B, MEM_BYTES);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // preload STRMEM with random data
    for (int w = 0; w < MEM_BYTES / 8; w++) begin
      d = {$urandom(), $urandom()};
      mem_write(B + 8 * w, d);
      for (int l = 0; l < LANES; l++) m.mem[B + 8 * w + 2 * l] = d[16*l +: 16];
    end
    // initialise all vector registers and the accumulators
    issue(mk(OP_SLI, 15, 0, 0, 0), B);
    for (int r = 0; r < 16; r++) issue(mk(OP_VLD, r, 15, 0, 2 * VLMAX * (r % 8)));
    issue(mk(OP_VACLR, 0, 0, 0, 0));
    drain();

    // latency: one group passes the 8 stages
    issue(mk(OP_SETVL, 0, 0, 0, 0), LANES);
    drain();
    time_one(mk(OP_VADD, 3, 1, 2, 0), 8, "one-group VADD");
    // throughput: one group per cycle
    issue(mk(OP_SETVL, 0, 0, 0, 0), VLMAX);
    drain();
    time_one(mk(OP_VXOR, 4, 5, 6, 0), NGRP + 7, "full-length VXOR");
    // four independent one-group instructions issue on consecutive cycles
    begin
      int n;
      issue(mk(OP_SETVL, 0, 0, 0, 0), LANES);
      drain();
      n = 0;
      fork
        begin
          issue(mk(OP_VADD, 9, 1, 2, 0));
          issue(mk(OP_VSUB, 10, 1, 2, 0));
          issue(mk(OP_VAND, 11, 1, 2, 0));
          issue(mk(OP_VOR, 12, 1, 2, 0));
        end
        begin
          @(posedge clk);
          while (!busy) @(posedge clk);
          while (busy) begin
            n++;
            @(posedge clk);
          end
        end
      join
      check(n == 8 + 3, $sformatf("four back-to-back instructions: busy %0d cycles, expected 11", n));
    end
    // dependent pair with one group: the second waits for the first
    issue(mk(OP_SETVL, 0, 0, 0, 0), 3);
    begin
      int h0;
      h0 = n_hazard;
      issue(mk(OP_VADD, 7, 1, 2, 0));
      issue(mk(OP_VMUL, 8, 7, 7, 0));
      drain();
      check(n_hazard - h0 >= 6, $sformatf("dependent VMUL stalled %0d cycles", n_hazard - h0));
    end

    // random stream with bank contention
    noise = 1;
    random_program(1500);
    drain();
    noise = 0;
    @(negedge clk) treq = '0;
    drain();
    check(exp_exc.size() == 0, $sformatf("%0d exceptions never raised", exp_exc.size()));

    // results: memory, scalar registers, vector registers, accumulators
    compare_memory("after program");
    for (int r = 0; r < 16; r++) begin
      @(negedge clk) cpu_idx = 4'(r);
      #1 check(cpu_data == m.s[r], $sformatf("s%0d = %h, expected %h", r, cpu_data, m.s[r]));
    end
    issue(mk(OP_SETVL, 0, 0, 0, 0), VLMAX);
    issue(mk(OP_VPSET, 0, 0, 0, 0));
    issue(mk(OP_SLI, 15, 0, 0, 0), B);
    for (int r = 0; r < 16; r++) begin
      issue(mk(OP_SADDI, 14, 15, 0, 2 * VLMAX * r));
      issue(mk(OP_VST, 0, 14, r, 0));
    end
    drain();
    compare_memory("vector registers");
    issue(mk(OP_VACRD, 0, 0, 0, 0));
    issue(mk(OP_VACRD, 1, 0, 0, 16));
    issue(mk(OP_VACRD, 2, 0, 0, 8));
    issue(mk(OP_VST, 0, 15, 0, 0));
    issue(mk(OP_VST, 0, 15, 1, 2 * VLMAX));
    issue(mk(OP_VST, 0, 15, 2, 4 * VLMAX));
    drain();
    compare_memory("accumulators");

    check(n_hazard > 0,   "no hazard stall seen");
    check(n_memstall > 0, "no STRMEM arbitration stall seen");
    check(n_exc > 3,      "too few exceptions exercised");
    $display("hazard stall cycles %0d, memory stall cycles %0d, exceptions %0d",
             n_hazard, n_memstall, n_exc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
