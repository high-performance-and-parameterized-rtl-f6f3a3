// lu_ram: simple dual-port RAM with one write and one registered read port.
//
// This is the storage the array keeps in block RAM: S0 in PE_0 (the
// diagonal of U), S1_j and S2_j in PE_j (the partial sums a'_{x,y} and the
// current row of U), and the L buffer of PE_0.  A write takes effect at the
// clock edge; a read returns the word one cycle after its address is
// presented, and a read of the address being written in the same cycle
// returns the old word.  Contents are not reset: the array never reads a
// word it has not written first.
//
// Ports: we/waddr/wdata write port, re/raddr read enable and address,
// rdata read data (held while re is low).
module lu_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 64,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
