// l2_cache: second-level data cache between the system bus and the DDR2
// controller.
//
// The scalar CPUs have write-through first-level data caches, so every store
// reaches the system bus.  This cache is write-back and write-allocate: stores
// that hit only mark the line dirty, and the external memory sees a line only
// when a dirty line is evicted.  Organisation: direct mapped, SETS lines of
// LINE_WORDS 64-bit words (8 KB by default).  Associativity, sizes and the
// write policy are this design's choices; the document calls the cache
// configurable, and SETS and LINE_WORDS are its configuration.
//
// Upstream port (mem_req_t/mem_rsp_t, same protocol as STRMEM): hold the
// request until gnt; a hit is granted in the cycle it is presented and read
// data follows one cycle later with rvalid.  A miss first writes the dirty
// victim back (LINE_WORDS writes), then fills the line (LINE_WORDS reads,
// data with rvalid any number of cycles later, one read outstanding) and then
// grants the request as a hit.  Downstream port: the same protocol, one word
// per request, always whole words (its strobe bits are constant ones).
// Upstream strobes select 16-bit elements on writes.
module l2_cache
  import le2_pkg::*;
#(
  parameter int unsigned SETS       = 256,
  parameter int unsigned LINE_WORDS = 4,
  localparam int unsigned IW = $clog2(SETS),
  localparam int unsigned OW = $clog2(LINE_WORDS),
  localparam int unsigned TW = 32 - IW - OW - 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t up_req,
  output mem_rsp_t up_rsp,
  output mem_req_t dn_req,
  input  mem_rsp_t dn_rsp,
  output logic     ev_hit,
  output logic     ev_miss,
  output logic     ev_writeback
);
  typedef enum logic [1:0] {S_LOOK, S_WB, S_FILL, S_FWAIT} state_e;

  logic [WORD_W-1:0] data [SETS*LINE_WORDS];
  logic [TW-1:0]     tag  [SETS];
  logic [SETS-1:0]   valid, dirty;

  state_e        state;
  logic [OW-1:0] cnt;
  logic [TW-1:0] a_tag;
  logic [IW-1:0] a_idx;
  logic [OW-1:0] a_off;
  logic          hit;

  assign a_tag = up_req.addr[31 -: TW];
  assign a_idx = up_req.addr[3+OW +: IW];
  assign a_off = up_req.addr[3 +: OW];
  assign hit   = valid[a_idx] && tag[a_idx] == a_tag;

  logic              gnt, rvalid_q;
  logic [WORD_W-1:0] rdata_q;

  assign gnt          = (state == S_LOOK) && up_req.valid && hit;
  assign up_rsp       = '{gnt: gnt, rvalid: rvalid_q, rdata: rdata_q};
  assign ev_hit       = gnt;
  assign ev_miss      = (state == S_LOOK) && up_req.valid && !hit;
  assign ev_writeback = ev_miss && dirty[a_idx];

  always_comb begin
    dn_req = '0;
    dn_req.strobe = '1;
    unique case (state)
      S_WB: begin
        dn_req.valid = 1'b1;
        dn_req.write = 1'b1;
        dn_req.addr  = {tag[a_idx], a_idx, cnt, 3'b000};
        dn_req.wdata = data[{a_idx, cnt}];
      end
      S_FILL: begin
        dn_req.valid = 1'b1;
        dn_req.addr  = {a_tag, a_idx, cnt, 3'b000};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (gnt && !up_req.write) rdata_q <= data[{a_idx, a_off}];
    if (gnt && up_req.write)
      for (int l = 0; l < LANES; l++)
        if (up_req.strobe[l])
          data[{a_idx, a_off}][l*ELEM_W +: ELEM_W] <= up_req.wdata[l*ELEM_W +: ELEM_W];
    if (state == S_FWAIT && dn_rsp.rvalid) data[{a_idx, cnt}] <= dn_rsp.rdata;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rvalid_q <= 1'b0;
      state <= S_LOOK;
      cnt   <= '0;
      valid <= '0;
      dirty <= '0;
      for (int s = 0; s < SETS; s++) tag[s] <= '0;
    end else begin
      rvalid_q <= gnt && !up_req.write;
      unique case (state)
        S_LOOK:
          if (up_req.valid) begin
            if (hit) begin
              if (up_req.write) dirty[a_idx] <= 1'b1;
            end else begin
              cnt   <= '0;
              state <= (valid[a_idx] && dirty[a_idx]) ? S_WB : S_FILL;
            end
          end
        S_WB:
          if (dn_rsp.gnt) begin
            cnt <= cnt + 1'b1;
            if (cnt == OW'(LINE_WORDS - 1)) begin
              dirty[a_idx] <= 1'b0;
              state        <= S_FILL;
            end
          end
        S_FILL:
          if (dn_rsp.gnt) state <= S_FWAIT;
        S_FWAIT:
          if (dn_rsp.rvalid) begin
            cnt <= cnt + 1'b1;
            if (cnt == OW'(LINE_WORDS - 1)) begin
              valid[a_idx] <= 1'b1;
              tag[a_idx]   <= a_tag;
              state        <= S_LOOK;
            end else
              state <= S_FILL;
          end
        default: state <= S_LOOK;
      endcase
    end

  // the upstream request must not change while a miss is served
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    up_req.valid && !up_rsp.gnt |=> up_req.valid && $stable(up_req.addr))
    else $error("l2_cache: request changed before its grant");
endmodule
