// rr_arbiter: round-robin arbiter, one per STRMEM bank.
//
// Grants one of N requesters (one-hot gnt, combinational from req).  The
// search starts at the requester after the one granted last; the pointer
// moves only when advance is high, so a grant that is not used keeps its
// priority.  After reset requester 0 has the highest priority.  Round robin
// is this design's choice of STRMEM arbitration policy.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;     // highest-priority requester
  logic [IW-1:0] winner;

  always_comb begin
    gnt    = '0;
    winner = ptr;
    for (int k = N - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (req[idx]) winner = IW'(idx);
    end
    if (req != '0) gnt[winner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ptr <= '0;
    else if (advance && req != '0) ptr <= IW'((int'(winner) + 1) % N);
endmodule
