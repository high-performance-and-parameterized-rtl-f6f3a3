// tb_lu_workloads: the LU array at its default size (P = 17, NMAX = 1000)
// factoring the evaluated matrix sizes n = 100, 300, 500 and 800 one after
// another (n = 1000 is run by tb_lu_full).  Besides the bit-exact check of L
// and U and the latency bound of lu_bench, each cycle count is held against
// the published latency of the 18-PE implementation at 110 MHz
// (0.33, 5.5, 22.7 and 91.6 ms, i.e. 36,300, 605,000, 2,497,000 and
// 10,076,000 cycles) and may exceed it by at most 30 %: the published
// figures are below the stage-by-stage schedule this array follows,
// presumably because they let Stage 3 overlap the next Stage 1, which this
// array does not do (it takes 8 to 26 % more cycles at these sizes).
module tb_lu_workloads;
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

  lu_bench #(.P(17), .NMAX(1000), .NSIZES(4), .SIZES('{100, 300, 500, 800, 0, 0, 0, 0}),
             .REF_CYC('{36300, 605000, 2497000, 10076000, 0, 0, 0, 0}), .REF_TOL(30),
             .MEM_LAT(2), .STALL(1'b0), .WATCHDOG(64'd30_000_000)) bench (
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
