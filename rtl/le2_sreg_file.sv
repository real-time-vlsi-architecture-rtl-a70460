// le2_sreg_file: LE2 scalar registers, SREGS x 32 bits.
//
// Two combinational read ports for the engine (da, db), a third (dc) for the
// host CPU, which reads engine results with no added latency, and one write
// port written at the clock edge.  Registers reset to zero.  The register
// count and width follow the LE2 programmer's model; the ports are this
// design's choice.
module le2_sreg_file #(
  parameter int unsigned SREGS = 16,
  localparam int unsigned RW = $clog2(SREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] ra,
  output logic [31:0]   da,
  input  logic [RW-1:0] rb,
  output logic [31:0]   db,
  input  logic [RW-1:0] rc,
  output logic [31:0]   dc,
  input  logic          we,
  input  logic [RW-1:0] wa,
  input  logic [31:0]   wd
);
  logic [31:0] r [SREGS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  for (int i = 0; i < SREGS; i++) r[i] <= '0;
    else if (we) r[wa] <= wd;

  assign da = r[ra];
  assign db = r[rb];
  assign dc = r[rc];
endmodule
