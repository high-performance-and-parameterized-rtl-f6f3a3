// tb_lu_full: the LU array at its default size (P = 17, i.e. 18 PEs, and
// NMAX = 1000) factoring one 1000 x 1000 matrix, the largest size the
// design was evaluated with.  Memory answers after 2 cycles without
// refusing requests.  The cycle count is also held against the published
// 171.0 ms at 110 MHz (18,810,000 cycles) and may exceed it by at most 15 %.
// See lu_bench for what is checked; the refused-request
// mechanism is covered by tb_lu_top.
module tb_lu_full;
  import lu_pkg::*;

  logic clk, rst_n, start, busy, done;
  idx_t n;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid;
  idx_t rd_req_row, rd_req_col;
  fp_t  rd_rsp_data;
  logic wr_u_valid, wr_l_valid;
  idx_t wr_u_row, wr_u_col, wr_l_row, wr_l_col;
  fp_t  wr_u_data, wr_l_data;
  logic uq_wait;
  logic finished;

  lu_top dut (.*);

  always_comb begin
    uq_wait = 1'b0;
    if (dut.g_pe[1].u_pe.uq_n != 0 && dut.g_pe[1].u_pe.pass_u) uq_wait = 1'b1;
    if (dut.g_pe[17].u_pe.uq_n != 0 && dut.g_pe[17].u_pe.pass_u) uq_wait = 1'b1;
  end

  lu_bench #(.P(17), .NMAX(1000), .NSIZES(1), .SIZES('{1000, 0, 0, 0, 0, 0, 0, 0}),
             .REF_CYC('{18810000, 0, 0, 0, 0, 0, 0, 0}), .REF_TOL(15),
             .MEM_LAT(2), .STALL(1'b0), .WATCHDOG(64'd40_000_000)) bench (
    .clk, .rst_n, .start, .n, .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_row, .rd_req_col, .rd_rsp_valid, .rd_rsp_data,
    .wr_u_valid, .wr_u_row, .wr_u_col, .wr_u_data,
    .wr_l_valid, .wr_l_row, .wr_l_col, .wr_l_data,
    .probe_uq_wait(uq_wait), .probe_s3_go(dut.s3_go), .probe_s3_d(dut.s3_d), .finished
  );

  initial begin
    @(posedge finished);
    $finish;
  end

endmodule
