// lu_pe: processing element PE_j (1 <= j <= P) of the LU array.
//
// PE_j owns the matrix columns y = j, j+P, j+2P, ... (local column number
// c = (y-1)/P) and holds two storages: S1 with the partial sums
//   a'_{x,y} = sum over i < k of l_{x,i} * u_{i,y}
// of every owned column (rows 1..NMAX-1), and S2 with the owned elements
// u_{k,y} of the current row of U.  It has one multiplier and one
// adder/subtractor and works on the tokens that reach it:
//   Stage 1, T_ROW_A a_{k,y} on inU, owned y: u = a - a'_{k,y}; u goes into
//            S2 and, as a T_U_OUT token, down the U chain to memory.
//   Stage 2, T_COL_A a_{x,k} on inU, owned k: a - a'_{x,k} leaves on outL as
//            a T_COL_P token for PE_0, which divides it by u_{k,k}.
//   Stage 3, T_L l_{x,k} on inL: the token moves on to the next PE at once,
//            and in the following cycles the PE performs, one per cycle,
//            a'_{x,y} += l_{x,k} * u_{k,y} for each owned y > k.
// In iteration k = 0 (tokens flagged first) no partial sums exist yet, so the
// stored value is replaced by zero instead of being read.
//
// Every other token is forwarded with one cycle of delay, as are T_L tokens.
// A finished u waits in a small queue until the U chain has an empty slot
// (the slot of a token some PE consumed, or the gap after the stream).
// Stage-3 operand timing: S2 read (1 cycle), multiplier (LAT_MUL), product
// register while S1 is read (1 cycle), adder (LAT_ADD), S1 write.
//
// Follows the source: the ports inU/outU/inL/outL, S1_j and S2_j, the
// operations of the three stages and the column ownership.  This design's
// own choices: the token format, the 1-cycle hops, the output queue of
// finished u, and the way the PE learns its Stage-3 columns (it records the
// first local column and the number of owned elements of row k as Stage 1
// passes, and uses them when the l_{x,k} of the same k arrive).
//
// Ports: in_u/out_u and in_l/out_l are lu_pkg::tok_t buses.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// "disable iff" condition of the checking assertions at the end of the file,
// which is why a linter may report it as used synchronously and
// asynchronously; the assertions are not part of the circuit.
module lu_pe
  import lu_pkg::*;
#(
  parameter int unsigned J     = 1,
  parameter int unsigned P     = 17,
  parameter int unsigned NMAX  = 1000,
  parameter int unsigned CMAX  = (NMAX - 1 + P - 1) / P,   // owned columns
  parameter int unsigned S1_D  = (NMAX - 1) * CMAX,        // S1 words
  parameter int unsigned UQ_D  = 32                        // u queue depth
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t in_u,
  input  tok_t in_l,
  output tok_t out_u,
  output tok_t out_l
);

  localparam int unsigned S1_AW = (S1_D > 1) ? $clog2(S1_D) : 1;
  localparam int unsigned S2_AW = (CMAX > 1) ? $clog2(CMAX) : 1;
  localparam int unsigned UQ_AW = $clog2(UQ_D);

  // Operation carried alongside the adder.
  typedef enum logic [1:0] {OP_ROW = 2'd0, OP_COL = 2'd1, OP_MAC = 2'd2} op_e;

  typedef struct packed {
    op_e    op;
    logic   last;
    idx_t   x;
    idx_t   y;
    idx_t   c;
    saddr_t sbase;
  } atag_t;

  typedef struct packed {
    logic   first;
    idx_t   c;
    saddr_t sbase;
  } mtag_t;

  // ---------------------------------------------------------------- storages
  logic             s1_we, s1_re;
  logic [S1_AW-1:0] s1_waddr, s1_raddr;
  fp_t              s1_wdata, s1_rdata;
  logic             s2_we, s2_re;
  logic [S2_AW-1:0] s2_waddr, s2_raddr;
  fp_t              s2_wdata, s2_rdata;

  lu_ram #(.DEPTH(S1_D), .W(FP_W), .AW(S1_AW)) u_s1 (
    .clk, .we(s1_we), .waddr(s1_waddr), .wdata(s1_wdata),
    .re(s1_re), .raddr(s1_raddr), .rdata(s1_rdata)
  );

  lu_ram #(.DEPTH(CMAX), .W(FP_W), .AW(S2_AW)) u_s2 (
    .clk, .we(s2_we), .waddr(s2_waddr), .wdata(s2_wdata),
    .re(s2_re), .raddr(s2_raddr), .rdata(s2_rdata)
  );

  // ------------------------------------------------- Stage 1 / 2: subtract
  logic  take_u;
  assign take_u = (in_u.kind == T_ROW_A || in_u.kind == T_COL_A) && in_u.pe == pe_id_t'(J);

  // The consumed token waits one cycle for its S1 word.
  logic  sub_v;
  tok_t  sub_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sub_v <= 1'b0;
    else        sub_v <= take_u;
  end
  always_ff @(posedge clk) sub_t <= in_u;

  // Row bookkeeping for Stage 3: first owned local column of row k and the
  // number of owned elements of that row.
  idx_t cur_row, c_first, n_own;
  logic take_l;
  assign take_l = (in_l.kind == T_L);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_row <= '1;
      c_first <= '0;
      n_own   <= '0;
    end else if (take_l && in_l.last) begin
      // Stage 3 of this row is over: forget it, so that a later row with
      // the same number (in the next matrix) starts a fresh count.
      cur_row <= '1;
    end else if (take_u && in_u.kind == T_ROW_A) begin
      if (in_u.x != cur_row) begin
        cur_row <= in_u.x;
        c_first <= in_u.c;
        n_own   <= idx_t'(1);
      end else begin
        n_own   <= n_own + idx_t'(1);
      end
    end
  end

  // ------------------------------------------------ Stage 3: multiply-add
  logic   mac_first;
  idx_t   mac_cnt, mac_c;
  saddr_t mac_base;
  fp_t    mac_l;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_cnt <= '0;
    end else if (take_l) begin
      mac_cnt <= (cur_row == in_l.y) ? n_own : '0;
    end else if (mac_cnt != 0) begin
      mac_cnt <= mac_cnt - idx_t'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (take_l) begin
      mac_c     <= c_first;
      mac_l     <= in_l.data;
      mac_base  <= in_l.sbase;
      mac_first <= in_l.first;
    end else if (mac_cnt != 0) begin
      mac_c     <= mac_c + idx_t'(1);
    end
  end

  // S2 read this cycle, multiplier next cycle.
  logic  m0_v;
  mtag_t m0_t;
  fp_t   m0_l;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m0_v <= 1'b0;
    else        m0_v <= (mac_cnt != 0);
  end
  always_ff @(posedge clk) begin
    m0_t <= '{first: mac_first, c: mac_c, sbase: mac_base};
    m0_l <= mac_l;
  end

  logic  mo_v;
  fp_t   mo_p;
  mtag_t mo_t;
  fp_mul #(.LAT(LAT_MUL), .TAG_W($bits(mtag_t))) u_mul (
    .clk, .rst_n,
    .in_valid(m0_v), .in_a(m0_l), .in_b(s2_rdata), .in_tag(m0_t),
    .out_valid(mo_v), .out_p(mo_p), .out_tag(mo_t)
  );

  // Product waits one cycle while its partial sum is read from S1.
  logic  pr_v;
  fp_t   pr_p;
  mtag_t pr_t;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pr_v <= 1'b0;
    else        pr_v <= mo_v;
  end
  always_ff @(posedge clk) begin
    pr_p <= mo_p;
    pr_t <= mo_t;
  end

  // --------------------------------------------------- shared adder inputs
  logic  add_v, add_sub;
  fp_t   add_a, add_b;
  atag_t add_t;
  logic  ao_v;
  fp_t   ao_s;
  atag_t ao_t;

  always_comb begin
    add_v   = 1'b0;
    add_sub = 1'b0;
    add_a   = '0;
    add_b   = '0;
    add_t   = '0;
    if (sub_v) begin
      add_v   = 1'b1;
      add_sub = 1'b1;
      add_a   = sub_t.data;
      add_b   = sub_t.first ? '0 : s1_rdata;
      add_t   = '{op: (sub_t.kind == T_ROW_A) ? OP_ROW : OP_COL, last: sub_t.last,
                  x: sub_t.x, y: sub_t.y, c: sub_t.c, sbase: sub_t.sbase};
    end else if (pr_v) begin
      add_v   = 1'b1;
      add_a   = pr_t.first ? '0 : s1_rdata;
      add_b   = pr_p;
      add_t   = '{op: OP_MAC, last: 1'b0, x: '0, y: '0, c: pr_t.c, sbase: pr_t.sbase};
    end
  end

  fp_add #(.LAT(LAT_ADD), .TAG_W($bits(atag_t))) u_add (
    .clk, .rst_n,
    .in_valid(add_v), .in_a(add_a), .in_b(add_b), .in_sub(add_sub), .in_tag(add_t),
    .out_valid(ao_v), .out_s(ao_s), .out_tag(ao_t)
  );

  // ------------------------------------------------------ storage ports
  always_comb begin
    s1_re    = (take_u && !in_u.first) || (mo_v && !mo_t.first);
    s1_raddr = take_u ? S1_AW'(in_u.sbase + saddr_t'(in_u.c))
                      : S1_AW'(mo_t.sbase + saddr_t'(mo_t.c));
    s1_we    = ao_v && ao_t.op == OP_MAC;
    s1_waddr = S1_AW'(ao_t.sbase + saddr_t'(ao_t.c));
    s1_wdata = ao_s;
    s2_re    = (mac_cnt != 0);
    s2_raddr = S2_AW'(mac_c);
    s2_we    = ao_v && ao_t.op == OP_ROW;
    s2_waddr = S2_AW'(ao_t.c);
    s2_wdata = ao_s;
  end

  // ---------------------------------------------------- queue of finished u
  tok_t             uq [UQ_D];
  logic [UQ_AW-1:0] uq_wp, uq_rp;
  logic [UQ_AW:0]   uq_n;
  logic             uq_push, uq_pop;
  logic             pass_u;

  assign uq_push = ao_v && ao_t.op == OP_ROW;
  assign pass_u  = (in_u.kind != T_NONE) && !take_u;
  assign uq_pop  = !pass_u && (uq_n != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uq_wp <= '0;
      uq_rp <= '0;
      uq_n  <= '0;
    end else begin
      if (uq_push) uq_wp <= uq_wp + 1'b1;
      if (uq_pop)  uq_rp <= uq_rp + 1'b1;
      if (uq_push && !uq_pop)      uq_n <= uq_n + 1'b1;
      else if (uq_pop && !uq_push) uq_n <= uq_n - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (uq_push)
      uq[uq_wp] <= '{kind: T_U_OUT, first: 1'b0, last: 1'b0, pe: pe_id_t'(J),
                     x: ao_t.x, y: ao_t.y, c: ao_t.c, sbase: '0, data: ao_s};
  end

  // ------------------------------------------------------------ outputs
  logic col_out;
  assign col_out = ao_v && ao_t.op == OP_COL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_u <= TOK_NONE;
      out_l <= TOK_NONE;
    end else begin
      if (pass_u)      out_u <= in_u;
      else if (uq_pop) out_u <= uq[uq_rp];
      else             out_u <= TOK_NONE;

      if (col_out)
        out_l <= '{kind: T_COL_P, first: 1'b0, last: ao_t.last, pe: '0,
                   x: ao_t.x, y: ao_t.y, c: '0, sbase: ao_t.sbase, data: ao_s};
      else
        out_l <= in_l;
    end
  end

  // ---------------------------------------------------------- assertions
  // The three stages never compete for the adder, the S1 read port or outL,
  // and the u queue never overflows.
  a_adder_free: assert property (@(posedge clk) disable iff (!rst_n) !(sub_v && pr_v));
  a_s1_free:    assert property (@(posedge clk) disable iff (!rst_n) !(take_u && mo_v));
  a_outl_free:  assert property (@(posedge clk) disable iff (!rst_n) !(col_out && in_l.kind != T_NONE));
  a_uq_room:    assert property (@(posedge clk) disable iff (!rst_n) !(uq_push && uq_n == (UQ_AW+1)'(UQ_D)));
  a_mac_done:   assert property (@(posedge clk) disable iff (!rst_n) !(take_l && mac_cnt > 1));

endmodule
