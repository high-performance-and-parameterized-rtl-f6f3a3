// lu_top: LU decomposition array, a circular linear array of P+1 PEs.
//
// Factors an n x n matrix A (n <= NMAX, no pivoting) held in external
// memory into a unit lower-triangular L and an upper-triangular U, which are
// written back to memory.  PE_0 (lu_ctrl + lu_pe0) reads A, divides by the
// diagonal and feeds the multipliers; PE_1..PE_P (lu_pe) each own every
// P-th column and keep its partial sums on chip.  The PEs are connected only
// to their neighbours by two buses:
//   U chain: memory -> PE_0.inU -> PE_0.outU -> PE_1.inU -> ... -> PE_P.outU
//            -> memory write port wr_u (finished elements u_{k,y}, y > k);
//   L ring:  PE_0.outL -> PE_1.inL -> ... -> PE_P.outL -> PE_0.inL.
// PE_0 writes u_{k,k} and l_{x,k} through the second write port wr_l.
// With the default P = 17 (18 PEs) the factorization of an n x n matrix
// takes about n^3 / (3P) cycles; the partial-sum storage is (NMAX-1)^2 words
// spread over the PEs plus NMAX words for the diagonal.
//
// Usage: hold n, pulse start; busy stays high until done pulses.  Read
// requests are accepted when rd_req_valid and rd_req_ready are both high and
// answered in order on rd_rsp_valid/rd_rsp_data, with at most 16 in flight.
// The write ports have no back-pressure.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// "disable iff" condition of the checking assertions at the end of the file,
// which is why a linter may report it as used synchronously and
// asynchronously; the assertions are not part of the circuit.
module lu_top
  import lu_pkg::*;
#(
  parameter int unsigned P    = 17,
  parameter int unsigned NMAX = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  idx_t n,
  output logic busy,
  output logic done,
  // external memory: reads of A
  output logic rd_req_valid,
  input  logic rd_req_ready,
  output idx_t rd_req_row,
  output idx_t rd_req_col,
  input  logic rd_rsp_valid,
  input  fp_t  rd_rsp_data,
  // external memory: writes of U above the diagonal (from PE_P)
  output logic wr_u_valid,
  output idx_t wr_u_row,
  output idx_t wr_u_col,
  output fp_t  wr_u_data,
  // external memory: writes of the diagonal of U and of L (from PE_0)
  output logic wr_l_valid,
  output idx_t wr_l_row,
  output idx_t wr_l_col,
  output fp_t  wr_l_data
);

  tok_t u_bus [P+1];   // u_bus[j] = outU of PE_j
  tok_t l_bus [P+1];   // l_bus[j] = outL of PE_j
  tok_t ctl_tok;
  logic s2_done, s3_done, s3_go, s3_first;
  idx_t s3_d;

  lu_ctrl #(.P(P), .NMAX(NMAX)) u_ctrl (
    .clk, .rst_n, .start, .n, .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_row, .rd_req_col,
    .rd_rsp_valid, .rd_rsp_data,
    .tok_out(ctl_tok),
    .s2_done, .s3_done, .s3_go, .s3_d, .s3_first
  );

  lu_pe0 #(.NMAX(NMAX)) u_pe0 (
    .clk, .rst_n,
    .in_u(ctl_tok), .in_l(l_bus[P]), .out_u(u_bus[0]), .out_l(l_bus[0]),
    .s3_go, .s3_d, .s3_first, .s2_done, .s3_done,
    .wr_valid(wr_l_valid), .wr_row(wr_l_row), .wr_col(wr_l_col), .wr_data(wr_l_data)
  );

  for (genvar j = 1; j <= P; j++) begin : g_pe
    lu_pe #(.J(j), .P(P), .NMAX(NMAX)) u_pe (
      .clk, .rst_n,
      .in_u(u_bus[j-1]), .in_l(l_bus[j-1]), .out_u(u_bus[j]), .out_l(l_bus[j])
    );
  end

  // End of the U chain: finished elements of U go to memory.
  assign wr_u_valid = (u_bus[P].kind == T_U_OUT);
  assign wr_u_row   = u_bus[P].x;
  assign wr_u_col   = u_bus[P].y;
  assign wr_u_data  = u_bus[P].data;

  // Every element of A is consumed by its owner before the end of the chain.
  a_chain_clean: assert property (@(posedge clk) disable iff (!rst_n)
    u_bus[P].kind == T_NONE || u_bus[P].kind == T_U_OUT);

endmodule
