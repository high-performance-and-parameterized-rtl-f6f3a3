// tb_lu_pe0: self-checking testbench for PE_0's datapath, lu_pe0.
//
// NMAX = 12.  For two iterations (k = 0 with n = 12, then k = 3) it sends
// the column results a'_{x,k}, x = k..n-1, into inL as PE_P would, the
// diagonal first, with a gap in the middle of the stream, and checks:
//   - u_{k,k} is written to memory at once, and every l_{x,k} =
//     a'_{x,k} / u_{k,k} (expected value from the simulator's double
//     division) is written LAT_DIV + 1 cycles after its a' entered;
//   - s2_done pulses exactly once, after the last l;
//   - after s3_go with spacing D, the l_{x,k} leave on outL as T_L tokens,
//     in order, exactly D cycles apart, the last one flagged;
//   - when the last T_L comes back on inL, s3_done pulses D + PE_MAC_DRAIN + 1
//     cycles later (the cycle the token is seen counts as the first);
//   - inU is copied to outU one cycle later.
module tb_lu_pe0;
  import lu_pkg::*;

  localparam int unsigned NMAX = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t in_u, in_l, out_u, out_l;
  logic s3_go = 1'b0, s3_first = 1'b0, s2_done, s3_done;
  idx_t s3_d = '0;
  logic wr_valid;
  idx_t wr_row, wr_col;
  fp_t  wr_data;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  lu_pe0 #(.NMAX(NMAX)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // Expected memory writes, keyed by row*100+col, with their due cycle.
  fp_t    exp_w  [int];
  longint exp_at [int];
  int     s2_cnt = 0, s3_cnt = 0;
  longint s3_at = 0;
  tok_t   l_exp [$];
  longint last_l = -1;
  int     d_now = 1;
  tok_t   u_prev = TOK_NONE;

  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_valid) begin
        int key;
        key = int'(wr_row) * 100 + int'(wr_col);
        chk(exp_w.exists(key), $sformatf("unexpected write (%0d,%0d)", wr_row, wr_col));
        if (exp_w.exists(key)) begin
          chk(wr_data == exp_w[key], $sformatf("write (%0d,%0d) %h expected %h", wr_row, wr_col, wr_data, exp_w[key]));
          chk(cyc == exp_at[key], $sformatf("write (%0d,%0d) at %0d expected %0d", wr_row, wr_col, cyc, exp_at[key]));
          exp_w.delete(key);
        end
      end
      if (s2_done) s2_cnt++;
      if (s3_done) begin
        s3_cnt++;
        chk(cyc == s3_at, $sformatf("s3_done at %0d expected %0d", cyc, s3_at));
      end
      if (out_l.kind != T_NONE) begin
        chk(out_l.kind == T_L && l_exp.size() != 0 && out_l == l_exp[0], "T_L token");
        if (l_exp.size() != 0) void'(l_exp.pop_front());
        if (last_l >= 0) chk(cyc - last_l == longint'(d_now), $sformatf("l spacing %0d expected %0d", cyc - last_l, d_now));
        last_l = cyc;
      end
      chk(out_u == u_prev, "inU copied to outU");
      u_prev = in_u;
    end
  end

  task automatic iteration(input int k, input int nn, input int d);
    real  col [NMAX];
    real  ukk;
    tok_t t;
    for (int x = k; x < nn; x++) col[x] = real'($urandom % 2001) / 100.0 - 10.0;
    col[k] = 3.0 + real'($urandom % 100) / 7.0;
    ukk = col[k];
    for (int x = k; x < nn; x++) begin
      t = TOK_NONE;
      t.kind  = T_COL_P;
      t.last  = (x == nn - 1);
      t.x     = idx_t'(x);
      t.y     = idx_t'(k);
      t.sbase = saddr_t'(x * 5);
      t.data  = $realtobits(col[x]);
      in_l <= t;
      in_u <= t;
      // the write is seen at the next edge (diagonal) or LAT_DIV + 1 later
      exp_w[x * 100 + k]  = (x == k) ? t.data : $realtobits(col[x] / ukk);
      exp_at[x * 100 + k] = cyc + 1 + ((x == k) ? 64'd0 : longint'(LAT_DIV) + 1);
      if (x > k) begin
        tok_t e;
        e = TOK_NONE;
        e.kind  = T_L;
        e.first = (k == 0);
        e.last  = (x == nn - 1);
        e.x     = idx_t'(x);
        e.y     = idx_t'(k);
        e.sbase = saddr_t'(x * 5);
        e.data  = $realtobits(col[x] / ukk);
        l_exp.push_back(e);
      end
      @(posedge clk);
      if (x == k + 4) begin
        in_l <= TOK_NONE;
        in_u <= TOK_NONE;
        repeat (3) @(posedge clk);
      end
    end
    in_l <= TOK_NONE;
    in_u <= TOK_NONE;
    while (s2_cnt == 0) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(s2_cnt == 1 && exp_w.size() == 0, "Stage 2 complete");
    s2_cnt = 0;
    // Stage 3.
    d_now  = d;
    last_l = -1;
    s3_go <= 1'b1; s3_d <= idx_t'(d); s3_first <= (k == 0);
    @(posedge clk);
    s3_go <= 1'b0;
    while (l_exp.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
    // Return the last l as PE_P would.
    t = TOK_NONE;
    t.kind = T_L;
    t.last = 1'b1;
    in_l <= t;
    s3_at = cyc + 2 + longint'(d) + longint'(PE_MAC_DRAIN);
    @(posedge clk);
    in_l <= TOK_NONE;
    while (s3_cnt == 0) @(posedge clk);
    s3_cnt = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_u = TOK_NONE;
    in_l = TOK_NONE;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    iteration(0, NMAX, 4);
    iteration(3, NMAX, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
