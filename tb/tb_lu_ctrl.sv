// tb_lu_ctrl: self-checking testbench for the control unit lu_ctrl.
//
// P = 3, NMAX = 9, factoring n = 8 and then n = 1.  A memory model answers
// every read with a word that encodes its row and column; the testbench
// plays PE_0's part (s2_done a while after the last Stage-2 token, s3_done
// a while after s3_go).  It checks, against values it computes itself:
// the order of the reads (row k right of the diagonal, then column k from
// the diagonal down), the kind, owner PE ((y-1) mod P + 1, column 0 -> P),
// local column ((y-1) div P), S1 row base ((x-1) * CMAX), first and last
// flags of every token, the D = ceil((n-k-1)/P) handed to Stage 3, and that
// no request is issued while waiting for a stage to end.
module tb_lu_ctrl;
  import lu_pkg::*;

  localparam int unsigned P    = 3;
  localparam int unsigned NMAX = 9;
  localparam int unsigned CMAX = (NMAX - 1 + P - 1) / P;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  idx_t n;
  logic busy, done;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid;
  idx_t rd_req_row, rd_req_col;
  fp_t  rd_rsp_data;
  tok_t tok_out;
  logic s2_done = 1'b0, s3_done = 1'b0, s3_go, s3_first;
  idx_t s3_d;
  int   checks = 0, failures = 0;
  logic waiting = 1'b0;

  always #5 clk = ~clk;

  lu_ctrl #(.P(P), .NMAX(NMAX)) dut (.*);

  // Memory: 2-cycle latency, refuses every third cycle.
  logic v1, v2;
  fp_t  d1, d2;
  int   cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    v1 <= rd_req_valid && rd_req_ready;
    d1 <= {32'(rd_req_row), 32'(rd_req_col)};
    v2 <= v1;
    d2 <= d1;
  end
  assign rd_req_ready = (cyc % 3 != 2);
  assign rd_rsp_valid = v2;
  assign rd_rsp_data  = d2;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // Expected token sequence, generated here.
  tok_t exp_q [$];
  always @(posedge clk) begin
    if (rst_n && tok_out.kind != T_NONE) begin
      tok_t e;
      chk(exp_q.size() != 0, "unexpected token");
      if (exp_q.size() != 0) begin
        e = exp_q.pop_front();
        chk(tok_out == e, $sformatf("token (%0d,%0d) kind %0d pe %0d c %0d sbase %0d first %0d last %0d, expected (%0d,%0d) kind %0d pe %0d c %0d sbase %0d first %0d last %0d",
            tok_out.x, tok_out.y, tok_out.kind, tok_out.pe, tok_out.c, tok_out.sbase, tok_out.first, tok_out.last,
            e.x, e.y, e.kind, e.pe, e.c, e.sbase, e.first, e.last));
      end
    end
    if (rst_n && waiting) chk(!rd_req_valid, "read request while a stage drains");
  end

  function automatic tok_t mk(input tok_kind_e kd, input int x, input int y, input int k, input int nn);
    tok_t t;
    int   col;
    t = TOK_NONE;
    t.kind  = kd;
    t.first = (k == 0);
    t.last  = (kd == T_COL_A) && (x == nn - 1);
    t.x     = idx_t'(x);
    t.y     = idx_t'(y);
    col     = (kd == T_ROW_A) ? y : k;
    t.pe    = (col == 0) ? pe_id_t'(P) : pe_id_t'((col - 1) % P + 1);
    t.c     = (col == 0) ? '1 : idx_t'((col - 1) / P);
    t.sbase = saddr_t'((x - 1) * int'(CMAX));
    t.data  = {32'(x), 32'(y)};
    return t;
  endfunction

  task automatic run(input int nn);
    n <= idx_t'(nn);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int k = 0; k < nn; k++) begin
      for (int y = k + 1; y < nn; y++) exp_q.push_back(mk(T_ROW_A, k, y, k, nn));
      for (int x = k; x < nn; x++)     exp_q.push_back(mk(T_COL_A, x, k, k, nn));
      // Wait for the last token of the column, then report Stage 2 done.
      while (exp_q.size() != 0) @(posedge clk);
      waiting = 1'b1;
      repeat (7) @(posedge clk);
      s2_done <= 1'b1;
      @(posedge clk);
      s2_done <= 1'b0;
      if (k == nn - 1) begin
        while (!done) @(posedge clk);
        chk(1'b1, "done");
      end else begin
        while (!s3_go) @(posedge clk);
        chk(int'(s3_d) == (nn - k - 1 + P - 1) / P,
            $sformatf("k=%0d D=%0d expected %0d", k, s3_d, (nn - k - 1 + P - 1) / P));
        chk(s3_first == (k == 0), "s3_first");
        repeat (11) @(posedge clk);
        s3_done <= 1'b1;
        @(posedge clk);
        s3_done <= 1'b0;
      end
      waiting = 1'b0;
    end
    @(posedge clk);
    chk(!busy, "idle after done");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(8);
    repeat (3) @(posedge clk);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
