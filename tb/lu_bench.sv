// lu_bench: stimulus, external-memory model and checker for lu_top.
//
// Drives the clock and reset, keeps the matrix in a behavioural model of
// the external memory (reads answered in order after MEM_LAT cycles; when
// STALL is set the memory refuses a request about one cycle in four) and
// runs one decomposition for every size in the list SIZES.  Each matrix is
// random with entries in [-1, 1] and a diagonal of n + 1 so that no pivoting
// is needed.  The expected L and U are computed here in the simulator's IEEE
// double arithmetic, with the same order of operations as the array
//   u_{k,y} = a_{k,y} - s_{k,y},  l_{x,k} = (a_{x,k} - s_{x,k}) / u_{k,k},
//   s_{x,y} accumulates l_{x,i} * u_{i,y} for i = 0, 1, ...,
// so every element is compared bit for bit.  Each element of L and U must
// be written exactly once.  The cycle count from start to done is checked
// against the latency bound of the design (see lat_bound) and printed.
//
// The mechanisms it counts, and fails on if any never happened: Stage-1,
// Stage-2 and Stage-3 tokens, iterations with a multi-cycle l spacing
// (D > 1) and with D = 1, a finished u waiting in a PE's queue for a free
// slot, ownership wrapping from PE_P to PE_1, and (with STALL) a refused
// memory request.  After printing TB_RESULT (also when its watchdog
// fires) it raises finished, on which the enclosing testbench calls $finish.
module lu_bench
  import lu_pkg::*;
#(
  parameter int unsigned P       = 3,
  parameter int unsigned NMAX    = 16,
  parameter int unsigned NSIZES  = 1,
  parameter int unsigned SIZES [8] = '{16, 0, 0, 0, 0, 0, 0, 0},
  // Optional reference latencies in cycles (0 = none) and the allowed excess
  // in percent: the measured cycle count may not exceed REF_CYC * (1 + TOL/100).
  parameter longint unsigned REF_CYC [8] = '{0, 0, 0, 0, 0, 0, 0, 0},
  parameter int unsigned REF_TOL = 15,
  parameter int unsigned MEM_LAT = 2,
  parameter bit          STALL   = 1'b1,
  parameter longint unsigned WATCHDOG = 64'd10_000_000
) (
  output logic clk,
  output logic rst_n,
  output logic start,
  output idx_t n,
  input  logic busy,
  input  logic done,
  input  logic rd_req_valid,
  output logic rd_req_ready,
  input  idx_t rd_req_row,
  input  idx_t rd_req_col,
  output logic rd_rsp_valid,
  output fp_t  rd_rsp_data,
  input  logic wr_u_valid,
  input  idx_t wr_u_row,
  input  idx_t wr_u_col,
  input  fp_t  wr_u_data,
  input  logic wr_l_valid,
  input  idx_t wr_l_row,
  input  idx_t wr_l_col,
  input  fp_t  wr_l_data,
  // probes into the array
  input  logic probe_uq_wait,  // some PE holds a finished u behind passing traffic
  input  logic probe_s3_go,
  input  idx_t probe_s3_d,
  // raised once TB_RESULT has been printed; the enclosing testbench ends
  // the simulation on it
  output logic finished
);

  // Per-mechanism counters.
  longint unsigned cnt_row = 0, cnt_col = 0, cnt_l = 0, cnt_d1 = 0, cnt_dn = 0;
  longint unsigned cnt_uq = 0, cnt_wrap = 0, cnt_stall = 0;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  fp_t  a_m  [NMAX*NMAX];
  fp_t  r_m  [NMAX*NMAX];
  int   w_cnt [NMAX*NMAX];

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------- external memory
  logic        rp_v [MEM_LAT];
  fp_t         rp_d [MEM_LAT];
  logic        stall_now;

  always @(posedge clk) stall_now <= STALL && ($urandom % 4 == 0);
  assign rd_req_ready = !stall_now;

  always @(posedge clk) begin
    rp_v[0] <= rd_req_valid && rd_req_ready;
    rp_d[0] <= a_m[int'(rd_req_row) * NMAX + int'(rd_req_col)];
    for (int i = 1; i < MEM_LAT; i++) begin
      rp_v[i] <= rp_v[i-1];
      rp_d[i] <= rp_d[i-1];
    end
    if (rd_req_valid && !rd_req_ready) cnt_stall++;
    if (rd_req_valid && rd_req_ready) begin
      if (rd_req_col > rd_req_row) cnt_row++;
      else cnt_col++;
    end
    if (wr_u_valid) begin
      r_m[int'(wr_u_row) * NMAX + int'(wr_u_col)] <= wr_u_data;
      w_cnt[int'(wr_u_row) * NMAX + int'(wr_u_col)]++;
    end
    if (wr_l_valid) begin
      r_m[int'(wr_l_row) * NMAX + int'(wr_l_col)] <= wr_l_data;
      w_cnt[int'(wr_l_row) * NMAX + int'(wr_l_col)]++;
    end
    if (probe_uq_wait) cnt_uq++;
    if (probe_s3_go) begin
      if (probe_s3_d > 1) cnt_dn++;
      else cnt_d1++;
    end
    if (rd_req_valid && rd_req_ready && rd_req_col > idx_t'(P) && rd_req_row < rd_req_col) cnt_wrap++;
  end
  assign rd_rsp_valid = rp_v[MEM_LAT-1];
  assign rd_rsp_data  = rp_d[MEM_LAT-1];

  // ------------------------------------------------------------ helpers
  function automatic real rnd_unit();
    return real'($urandom % 2000001) / 1.0e6 - 1.0;
  endfunction

  // Latency bound: the sum over the stages of the source's latency analysis
  // (Stage 1 of iteration 0, Stages 1+2 and Stage 3 of every iteration),
  // plus a per-iteration allowance for what this implementation adds to it:
  // the memory and tag-queue latency, one register per PE hop of a Stage-2
  // result and of the l stream, the S0 and S1 read cycles, and the fixed
  // drain time of Stage 3.
  function automatic longint lat_bound(input int nn);
    longint t, m, d, pp, nl;
    pp = longint'(P);
    nl = longint'(nn);
    t  = nl - 1 + pp + longint'(LAT_ADD);
    for (int k = 1; k < nn; k++)
      t += 2 * (nl - longint'(k) - 1) + pp + longint'(LAT_ADD) + longint'(LAT_DIV);
    for (int k = 0; k < nn; k++) begin
      m = nl - longint'(k) - 1;
      d = (m + pp - 1) / pp;
      if (m > 0) t += d * m + longint'(LAT_MUL) + longint'(LAT_ADD);
    end
    t += nl * (longint'(MEM_LAT) + 2 * pp + longint'(PE_MAC_DRAIN) + 16);
    if (STALL) t += nl * nl;   // refused requests
    return t;
  endfunction

  task automatic run_one(input int nn, input longint unsigned ref_cyc);
    real    ar [];
    real    s  [];
    real    lr [];
    real    ur [];
    longint t0, t1;
    int     bad;
    ar = new[nn*nn];
    s  = new[nn*nn];
    lr = new[nn*nn];
    ur = new[nn*nn];
    for (int i = 0; i < nn; i++)
      for (int j = 0; j < nn; j++) begin
        ar[i*nn+j] = (i == j) ? real'(nn) + 1.0 : rnd_unit();
        a_m[i*NMAX+j] = $realtobits(ar[i*nn+j]);
        r_m[i*NMAX+j] = '0;
        w_cnt[i*NMAX+j] = 0;
      end
    // Reference factorization, same operation order as the array.
    for (int i = 0; i < nn*nn; i++) s[i] = 0.0;
    for (int k = 0; k < nn; k++) begin
      for (int y = k; y < nn; y++) ur[k*nn+y] = ar[k*nn+y] - s[k*nn+y];
      for (int x = k + 1; x < nn; x++) lr[x*nn+k] = (ar[x*nn+k] - s[x*nn+k]) / ur[k*nn+k];
      for (int x = k + 1; x < nn; x++)
        for (int y = k + 1; y < nn; y++)
          s[x*nn+y] = (k == 0) ? lr[x*nn+k] * ur[k*nn+y] : s[x*nn+y] + lr[x*nn+k] * ur[k*nn+y];
    end
    // Run the array.
    @(posedge clk);
    n     <= idx_t'(nn);
    start <= 1'b1;
    t0 = longint'(cycle);
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    t1 = longint'(cycle);
    repeat (64) @(posedge clk);
    bad = 0;
    for (int i = 0; i < nn; i++)
      for (int j = 0; j < nn; j++) begin
        fp_t e;
        e = (j >= i) ? $realtobits(ur[i*nn+j]) : $realtobits(lr[i*nn+j]);
        checks++;
        if (r_m[i*NMAX+j] !== e || w_cnt[i*NMAX+j] != 1) begin
          failures++;
          bad++;
          if (bad <= 5)
            $display("FAIL n=%0d (%0d,%0d): got %h expected %h, written %0d times",
                     nn, i, j, r_m[i*NMAX+j], e, w_cnt[i*NMAX+j]);
        end
      end
    checks++;
    if (t1 - t0 > lat_bound(nn)) begin
      failures++;
      $display("FAIL n=%0d latency %0d cycles above bound %0d", nn, t1 - t0, lat_bound(nn));
    end
    if (ref_cyc != 0) begin
      checks++;
      if (longint'(t1 - t0) * 100 > longint'(ref_cyc) * (100 + longint'(REF_TOL))) begin
        failures++;
        $display("FAIL n=%0d latency %0d cycles more than %0d%% above the reference %0d",
                 nn, t1 - t0, REF_TOL, ref_cyc);
      end
      $display("n=%0d: reference %0d cycles, measured/reference = %0.3f",
               nn, ref_cyc, real'(t1 - t0) / real'(ref_cyc));
    end
    $display("n=%0d P=%0d: %0d cycles (n^3/3P = %0d, bound %0d), %0d element errors",
             nn, P, t1 - t0, (longint'(nn) ** 3) / (3 * P), lat_bound(nn), bad);
  endtask

  task automatic need(input string what, input longint unsigned c);
    checks++;
    $display("mechanism %-34s happened %0d times", what, c);
    if (c == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    for (longint unsigned i = 0; i < WATCHDOG; i++) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

  initial begin
    finished = 1'b0;
    rst_n = 1'b0;
    start = 1'b0;
    n     = '0;
    for (int i = 0; i < MEM_LAT; i++) rp_v[i] = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < NSIZES; i++) run_one(int'(SIZES[i]), REF_CYC[i]);
    need("Stage 1 (row of A) elements", cnt_row);
    need("Stage 2 (column of A) elements", cnt_col);
    need("Stage 3 with D = 1", cnt_d1);
    need("Stage 3 with D > 1", cnt_dn);
    need("u waiting for a U-chain slot", cnt_uq);
    need("column ownership wrapping PE_P->PE_1", cnt_wrap);
    if (STALL) need("memory request refused", cnt_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

endmodule
