// tb_lu_top: end-to-end test of the LU array at a reduced size.
//
// Four PEs plus PE_0 (P = 4) and NMAX = 24; factors matrices of size 1, 2,
// 5, 13 and 24 one after another, with a memory that answers after 3
// cycles and refuses some requests.  See lu_bench for what is checked.
module tb_lu_top;
  import lu_pkg::*;

  localparam int unsigned P    = 4;
  localparam int unsigned NMAX = 24;

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

  lu_top #(.P(P), .NMAX(NMAX)) dut (.*);

  always_comb begin
    uq_wait = 1'b0;
    if (dut.g_pe[1].u_pe.uq_n != 0 && dut.g_pe[1].u_pe.pass_u) uq_wait = 1'b1;
    if (dut.g_pe[P].u_pe.uq_n != 0 && dut.g_pe[P].u_pe.pass_u) uq_wait = 1'b1;
  end

  lu_bench #(.P(P), .NMAX(NMAX), .NSIZES(5), .SIZES('{1, 2, 5, 13, 24, 0, 0, 0}),
             .MEM_LAT(3), .STALL(1'b1), .WATCHDOG(64'd2_000_000)) bench (
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
