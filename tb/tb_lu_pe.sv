// tb_lu_pe: self-checking testbench for one processing element, lu_pe.
//
// PE_2 of an array with P = 3 and NMAX = 10 (it owns columns 2, 5 and 8,
// local columns 0..2).  The testbench drives inU and inL with the token
// streams that two iterations would bring and checks, with expected values
// computed in the simulator's double arithmetic:
//   - Stage 1 (k = 0, then k = 1): T_U_OUT tokens carry u = a - a' for the
//     owned columns, all other tokens pass unchanged and in order;
//   - Stage 3 (k = 0, then k = 1): T_L tokens pass to outL one cycle later,
//     spaced D cycles apart, and update the partial sums;
//   - Stage 2 (columns 2, 5, 8 after iteration 1): T_COL_P tokens on outL
//     carry a_{x,y} - (l_{x,0} u_{0,y} + l_{x,1} u_{1,y}).
module tb_lu_pe;
  import lu_pkg::*;

  localparam int unsigned J    = 2;
  localparam int unsigned P    = 3;
  localparam int unsigned NMAX = 10;
  localparam int unsigned CMAX = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t in_u, in_l, out_u, out_l;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  lu_pe #(.J(J), .P(P), .NMAX(NMAX)) dut (.*);

  real  u0 [NMAX], u1 [NMAX], l0 [NMAX], l1 [NMAX], a [NMAX][NMAX];
  tok_t exp_u [$];   // expected passthrough / U_OUT tokens (any order for U_OUT)
  real  exp_uout [int];
  real  exp_colp [int];
  int   pass_seen = 0, uout_seen = 0, colp_seen = 0, l_seen = 0;
  tok_t pass_q [$];
  tok_t l_q [$];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  function automatic int owner(input int y);
    return (y - 1) % P + 1;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      case (out_u.kind)
        T_U_OUT: begin
          int key;
          key = int'(out_u.x) * 100 + int'(out_u.y);
          chk(exp_uout.exists(key), $sformatf("unexpected u (%0d,%0d)", out_u.x, out_u.y));
          if (exp_uout.exists(key)) begin
            chk(out_u.data == $realtobits(exp_uout[key]),
                $sformatf("u (%0d,%0d) %h expected %h", out_u.x, out_u.y, out_u.data, $realtobits(exp_uout[key])));
            exp_uout.delete(key);
          end
          uout_seen++;
        end
        T_NONE: ;
        default: begin
          chk(pass_q.size() != 0 && out_u == pass_q[0], "passthrough token on outU");
          if (pass_q.size() != 0) void'(pass_q.pop_front());
          pass_seen++;
        end
      endcase
      if (out_l.kind == T_COL_P) begin
        int key;
        key = int'(out_l.x) * 100 + int'(out_l.y);
        chk(exp_colp.exists(key), $sformatf("unexpected a' (%0d,%0d)", out_l.x, out_l.y));
        if (exp_colp.exists(key)) begin
          chk(out_l.data == $realtobits(exp_colp[key]),
              $sformatf("a' (%0d,%0d) %h expected %h", out_l.x, out_l.y, out_l.data, $realtobits(exp_colp[key])));
          exp_colp.delete(key);
        end
        colp_seen++;
      end else if (out_l.kind == T_L) begin
        chk(l_q.size() != 0 && out_l == l_q[0], "T_L forwarded");
        if (l_q.size() != 0) void'(l_q.pop_front());
        l_seen++;
      end
    end
  end

  function automatic tok_t tk(input tok_kind_e kd, input int x, input int y, input int k, input real d);
    tok_t t;
    int   col;
    t = TOK_NONE;
    t.kind  = kd;
    t.first = (k == 0);
    t.x     = idx_t'(x);
    t.y     = idx_t'(y);
    col     = (kd == T_ROW_A || kd == T_COL_A) ? ((kd == T_ROW_A) ? y : k) : 1;
    t.pe    = pe_id_t'(owner(col));
    t.c     = idx_t'((col - 1) / P);
    t.sbase = saddr_t'((x - 1) * int'(CMAX));
    t.data  = $realtobits(d);
    return t;
  endfunction

  // Stage 1 of iteration k: a_{k,y} for y = k+1..n-1.
  task automatic stage1(input int k);
    for (int y = k + 1; y < NMAX; y++) begin
      tok_t t;
      t = tk(T_ROW_A, k, y, k, a[k][y]);
      if (owner(y) == J) begin
        real u;
        u = (k == 0) ? a[k][y] : a[k][y] - l0[k] * u0[y];
        if (k == 0) u0[y] = u; else u1[y] = u;
        exp_uout[k * 100 + y] = u;
      end else begin
        pass_q.push_back(t);
      end
      in_u <= t;
      @(posedge clk);
    end
    in_u <= TOK_NONE;
  endtask

  // Stage 3 of iteration k: l_{x,k} for x = k+1..n-1, D cycles apart.
  task automatic stage3(input int k, input int d);
    for (int x = k + 1; x < NMAX; x++) begin
      tok_t t;
      t = TOK_NONE;
      t.kind  = T_L;
      t.first = (k == 0);
      t.last  = (x == NMAX - 1);
      t.x     = idx_t'(x);
      t.y     = idx_t'(k);
      t.sbase = saddr_t'((x - 1) * int'(CMAX));
      t.data  = $realtobits((k == 0) ? l0[x] : l1[x]);
      l_q.push_back(t);
      in_l <= t;
      @(posedge clk);
      in_l <= TOK_NONE;
      repeat (d - 1) @(posedge clk);
    end
    repeat (PE_MAC_DRAIN + 2) @(posedge clk);
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
    for (int i = 0; i < NMAX; i++) begin
      for (int j = 0; j < NMAX; j++) a[i][j] = real'($urandom % 2001) / 1000.0 - 1.0;
      l0[i] = real'($urandom % 2001) / 1000.0 - 1.0;
      l1[i] = real'($urandom % 2001) / 1000.0 - 1.0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    stage1(0);                // u_{0,y}
    repeat (30) @(posedge clk);
    stage3(0, 3);             // a' = l0 * u0, D = ceil(9/3) = 3
    stage1(1);                // u_{1,y} = a - l0[1] u0
    repeat (30) @(posedge clk);
    stage3(1, 3);             // a' += l1 * u1, D = ceil(8/3) = 3
    // Stage 2 for the owned columns 2, 5, 8 (as if k were 2, 5, 8).
    for (int y = 2; y < NMAX; y += P) begin
      for (int x = 2; x < NMAX; x++) begin
        tok_t t;
        t = tk(T_COL_A, x, y, y, a[x][y]);
        exp_colp[x * 100 + y] = a[x][y] - (l0[x] * u0[y] + l1[x] * u1[y]);
        in_u <= t;
        @(posedge clk);
      end
      in_u <= TOK_NONE;
      repeat (20) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    chk(exp_uout.size() == 0, "all u produced");
    chk(exp_colp.size() == 0, "all a' produced");
    chk(pass_q.size() == 0 && pass_seen > 0, "all passthrough tokens seen");
    chk(l_q.size() == 0 && l_seen == 17, "all l tokens forwarded");
    $display("u %0d, a' %0d, passed %0d, l %0d", uout_seen, colp_seen, pass_seen, l_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
