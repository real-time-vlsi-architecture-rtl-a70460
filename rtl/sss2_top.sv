// sss2_top: the SSS2 processing core - NPE LE2 vector engines, a DMA engine
// and a host stream sharing one multi-bank STRMEM, and the second-level data
// cache in front of external memory.
//
// In the full system every LE2 is coupled to its own scalar CPU, which issues
// the vector instructions; those CPUs, the system bus, the debug unit and the
// DDR2 controller are outside this module.  Each engine's coprocessor port,
// the DMA descriptor port, the host streaming port and the external-memory
// side of the L2 cache therefore appear as top-level ports.  The DMA reaches
// external memory through the L2 cache (DMA -> l2_cache -> ddr port); with
// the system bus absent it is the cache's only client.
//
// STRMEM client numbering: 0..NPE-1 the engines, NPE the DMA, NPE+1 the host.
// All engines see STRMEM at 0x30000000.  Timing of each port is that of the
// block behind it (le2_core, strmem_dma, strmem).  NPE = 2 is this design's
// default; the architecture leaves the number of engines open.
module sss2_top
  import le2_pkg::*;
#(
  parameter int unsigned NPE        = 2,
  parameter int unsigned VREGS      = 16,
  parameter int unsigned VLMAX      = 4096,
  parameter int unsigned SREGS      = 16,
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BANK_WORDS = 4096,
  parameter int unsigned L2_SETS    = 256,
  parameter int unsigned L2_LINE    = 4,
  localparam int unsigned SRW = $clog2(SREGS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // coprocessor ports, one per engine
  input  logic [NPE-1:0]           cop_valid,
  input  logic [NPE-1:0][31:0]     cop_instr,
  input  logic [NPE-1:0][31:0]     cop_opdata,
  output logic [NPE-1:0]           cop_ready,
  output logic [NPE-1:0]           cop_exc,
  output le2_exc_e                 cop_exc_cause [NPE],
  output logic [NPE-1:0]           cop_busy,
  input  logic [NPE-1:0][SRW-1:0]  cpu_sreg_idx,
  output logic [NPE-1:0][31:0]     cpu_sreg_data,
  output logic [NPE-1:0]           ev_hazard_stall,
  output logic [NPE-1:0]           ev_mem_stall,
  // DMA descriptor and system-bus side
  input  logic                     dma_start,
  input  logic                     dma_to_strmem,
  input  logic [31:0]              dma_sys_addr,
  input  logic [31:0]              dma_str_addr,
  input  logic [15:0]              dma_words,
  output logic                     dma_busy,
  output logic                     dma_done,
  // external memory (DDR2 controller) side of the L2 cache
  output mem_req_t                 ddr_req,
  input  mem_rsp_t                 ddr_rsp,
  output logic                     l2_hit,
  output logic                     l2_miss,
  output logic                     l2_writeback,
  // host streaming port into STRMEM
  input  mem_req_t                 host_req,
  output mem_rsp_t                 host_rsp
);
  localparam int unsigned NCL = NPE + 2;
  localparam int unsigned MEM_BYTES = NBANKS * BANK_WORDS * (WORD_W / 8);

  mem_req_t creq [NCL];
  mem_req_t sys_req;
  mem_rsp_t sys_rsp;
  mem_rsp_t crsp [NCL];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    le2_core #(
      .VREGS(VREGS), .VLMAX(VLMAX), .SREGS(SREGS),
      .MEM_BASE(STRMEM_BASE), .MEM_BYTES(MEM_BYTES)
    ) u_le2 (
      .clk, .rst_n,
      .instr_valid(cop_valid[p]), .instr(cop_instr[p]), .op_data(cop_opdata[p]),
      .instr_ready(cop_ready[p]),
      .exc_valid(cop_exc[p]), .exc_cause(cop_exc_cause[p]), .busy(cop_busy[p]),
      .cpu_sreg_idx(cpu_sreg_idx[p]), .cpu_sreg_data(cpu_sreg_data[p]),
      .mem_req(creq[p]), .mem_rsp(crsp[p]),
      .ev_hazard_stall(ev_hazard_stall[p]), .ev_mem_stall(ev_mem_stall[p])
    );
  end

  strmem_dma u_dma (
    .clk, .rst_n,
    .cfg_start(dma_start), .cfg_to_strmem(dma_to_strmem),
    .cfg_sys_addr(dma_sys_addr), .cfg_str_addr(dma_str_addr), .cfg_words(dma_words),
    .busy(dma_busy), .done(dma_done),
    .sys_req, .sys_rsp,
    .str_req(creq[NPE]), .str_rsp(crsp[NPE])
  );

  l2_cache #(.SETS(L2_SETS), .LINE_WORDS(L2_LINE)) u_l2 (
    .clk, .rst_n,
    .up_req(sys_req), .up_rsp(sys_rsp),
    .dn_req(ddr_req), .dn_rsp(ddr_rsp),
    .ev_hit(l2_hit), .ev_miss(l2_miss), .ev_writeback(l2_writeback)
  );

  assign creq[NPE+1] = host_req;
  assign host_rsp    = crsp[NPE+1];

  strmem #(
    .NCLIENTS(NCL), .NBANKS(NBANKS), .BANK_WORDS(BANK_WORDS), .BASE(STRMEM_BASE)
  ) u_strmem (
    .clk, .rst_n, .req(creq), .rsp(crsp)
  );
endmodule
