// strmem_dma: block-copy DMA engine between the system bus and STRMEM.
//
// One descriptor at a time: a start pulse with a direction, a system-bus
// address, a STRMEM address and a length in 64-bit words.  The engine copies
// word by word: it reads a word from the source port, waits for its data and
// writes it to the destination port, with one word in flight.  Both ports use
// the STRMEM client protocol (hold the request until gnt, read data comes
// with rvalid some cycles later; on the STRMEM side two cycles).  done pulses
// for one cycle when the last word is written; busy is high in between.
// Starting a transfer while busy is ignored.  The descriptor format and the
// word-at-a-time operation are this design's own choices.
module strmem_dma
  import le2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_start,
  input  logic        cfg_to_strmem,  // 1: system bus -> STRMEM, 0: STRMEM -> system bus
  input  logic [31:0] cfg_sys_addr,
  input  logic [31:0] cfg_str_addr,
  input  logic [15:0] cfg_words,
  output logic        busy,
  output logic        done,
  output mem_req_t    sys_req,
  input  mem_rsp_t    sys_rsp,
  output mem_req_t    str_req,
  input  mem_rsp_t    str_rsp
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_RWAIT, S_WR} state_e;
  state_e            state;
  logic              to_str;
  logic [31:0]       src, dst;
  logic [15:0]       left;
  logic [WORD_W-1:0] buffer;

  mem_req_t rd_req, wr_req;
  mem_rsp_t src_rsp, dst_rsp;

  always_comb begin
    rd_req        = '0;
    rd_req.valid  = (state == S_RD);
    rd_req.addr   = src;
    wr_req        = '0;
    wr_req.valid  = (state == S_WR);
    wr_req.write  = 1'b1;
    wr_req.addr   = dst;
    wr_req.wdata  = buffer;
    wr_req.strobe = '1;
    sys_req = to_str ? rd_req : wr_req;
    str_req = to_str ? wr_req : rd_req;
    src_rsp = to_str ? sys_rsp : str_rsp;
    dst_rsp = to_str ? str_rsp : sys_rsp;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state  <= S_IDLE;
      to_str <= 1'b1;
      src    <= '0;
      dst    <= '0;
      left   <= '0;
      buffer <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (cfg_start) begin
            to_str <= cfg_to_strmem;
            src    <= cfg_to_strmem ? cfg_sys_addr : cfg_str_addr;
            dst    <= cfg_to_strmem ? cfg_str_addr : cfg_sys_addr;
            left   <= cfg_words;
            if (cfg_words == '0) done  <= 1'b1;
            else                 state <= S_RD;
          end
        S_RD:
          if (src_rsp.gnt) state <= S_RWAIT;
        S_RWAIT:
          if (src_rsp.rvalid) begin
            buffer <= src_rsp.rdata;
            state  <= S_WR;
          end
        S_WR:
          if (dst_rsp.gnt) begin
            src  <= src + (WORD_W / 8);
            dst  <= dst + (WORD_W / 8);
            left <= left - 1'b1;
            if (left == 16'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else
              state <= S_RD;
          end
        default: state <= S_IDLE;
      endcase
    end
endmodule
