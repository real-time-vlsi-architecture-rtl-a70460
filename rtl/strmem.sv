// strmem: STRMEM, the multi-bank, multi-client streaming local memory.
//
// STRMEM sits in the global address map at BASE (0x30000000) and is shared by
// the vector engines, the DMA engine and the host stream.  It is built from
// NBANKS single-ported banks of BANK_WORDS 64-bit words.  Consecutive 64-bit
// words go to consecutive banks (word interleaving), so clients streaming
// through different regions rarely meet in one bank.  Each bank has a
// round-robin arbiter over the clients addressing it; a client that loses
// keeps its request up and is granted later.  Bank count, size, interleaving
// and arbitration are this design's choices.
//
// Client protocol (mem_req_t / mem_rsp_t): hold valid, write, addr, wdata and
// strobe until gnt.  A write happens at the granted edge, one strobe bit per
// 16-bit element.  Read data arrives with rvalid exactly two cycles after the
// grant (bank read, then output register), which the LE2 pipeline uses as its
// memrd1/memrd2 stages.  Addresses outside the window are granted at once;
// writes to them are dropped and reads return zero.
module strmem
  import le2_pkg::*;
#(
  parameter int unsigned NCLIENTS   = 4,
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BANK_WORDS = 4096,
  parameter logic [31:0] BASE       = STRMEM_BASE
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req [NCLIENTS],
  output mem_rsp_t rsp [NCLIENTS]
);
  localparam int unsigned BW    = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  localparam int unsigned RWW   = $clog2(BANK_WORDS);
  localparam int unsigned BYTES = NBANKS * BANK_WORDS * (WORD_W / 8);

  logic [NCLIENTS-1:0]  in_win;
  logic [BW-1:0]        c_bank [NCLIENTS];
  logic [RWW-1:0]       c_row  [NCLIENTS];
  logic [NCLIENTS-1:0]  breq   [NBANKS];
  logic [NCLIENTS-1:0]  bgnt   [NBANKS];
  logic [NCLIENTS-1:0]  gnt;
  logic [WORD_W-1:0]    bq     [NBANKS];

  // address decode per client
  always_comb
    for (int c = 0; c < NCLIENTS; c++) begin
      logic [31:0] off;
      logic [31:0] w;
      off       = req[c].addr - BASE;
      w         = off >> 3;
      in_win[c] = (req[c].addr >= BASE) && (off < BYTES);
      c_bank[c] = BW'(w % NBANKS);
      c_row[c]  = RWW'(w / NBANKS);
    end

  always_comb
    for (int b = 0; b < NBANKS; b++)
      for (int c = 0; c < NCLIENTS; c++)
        breq[b][c] = req[c].valid && in_win[c] && (int'(c_bank[c]) == b);

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic [WORD_W-1:0] mem [BANK_WORDS];
    logic [RWW-1:0]    row;
    logic              wr;
    logic [WORD_W-1:0] wd;
    logic [LANES-1:0]  st;

    rr_arbiter #(.N(NCLIENTS)) u_arb (
      .clk, .rst_n, .req(breq[b]), .advance(1'b1), .gnt(bgnt[b])
    );

    always_comb begin
      row = '0; wr = 1'b0; wd = '0; st = '0;
      for (int c = 0; c < NCLIENTS; c++)
        if (bgnt[b][c]) begin
          row = c_row[c];
          wr  = req[c].write;
          wd  = req[c].wdata;
          st  = req[c].strobe;
        end
    end

    always_ff @(posedge clk) begin
      if (|bgnt[b] && !wr) bq[b] <= mem[row];
      if (|bgnt[b] && wr)
        for (int l = 0; l < LANES; l++)
          if (st[l]) mem[row][l*ELEM_W +: ELEM_W] <= wd[l*ELEM_W +: ELEM_W];
    end
  end

  always_comb
    for (int c = 0; c < NCLIENTS; c++) begin
      gnt[c] = req[c].valid && !in_win[c];
      for (int b = 0; b < NBANKS; b++) gnt[c] |= bgnt[b][c];
    end

  // read return pipeline per client: grant -> bank read -> output register
  logic [NCLIENTS-1:0] rd1, rd1_win, rd2;
  logic [BW-1:0]       rd1_bank [NCLIENTS];
  logic [WORD_W-1:0]   rdat     [NCLIENTS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd1 <= '0; rd1_win <= '0; rd2 <= '0;
      for (int c = 0; c < NCLIENTS; c++) begin
        rd1_bank[c] <= '0;
        rdat[c]     <= '0;
      end
    end else
      for (int c = 0; c < NCLIENTS; c++) begin
        rd1[c]      <= gnt[c] && !req[c].write;
        rd1_win[c]  <= in_win[c];
        rd1_bank[c] <= c_bank[c];
        rd2[c]      <= rd1[c];
        if (rd1[c]) rdat[c] <= rd1_win[c] ? bq[rd1_bank[c]] : '0;
      end

  always_comb
    for (int c = 0; c < NCLIENTS; c++) begin
      rsp[c].gnt    = gnt[c];
      rsp[c].rvalid = rd2[c];
      rsp[c].rdata  = rdat[c];
    end

  // a client must hold its request until it is granted
  for (genvar c = 0; c < NCLIENTS; c++) begin : g_chk
    property p_hold;
      @(posedge clk) disable iff (!rst_n)
        req[c].valid && !rsp[c].gnt |=> req[c].valid && $stable(req[c].addr) && $stable(req[c].write);
    endproperty
    a_hold: assert property (p_hold) else $error("strmem: client %0d dropped an ungranted request", c);
  end
endmodule
