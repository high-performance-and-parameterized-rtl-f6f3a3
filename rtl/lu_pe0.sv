// lu_pe0: processing element PE_0 of the LU array (datapath part).
//
// PE_0 closes the ring: its inL is fed by PE_P and its outL feeds PE_1.  It
// holds the floating-point divider and the storage S0 of the diagonal
// elements u_{x,x} of U.  In Stage 2 of iteration k the column results
// a'_{x,k} (x = k..n-1) arrive on inL as T_COL_P tokens, the diagonal one
// first:
//   x = k  : a'_{k,k} is u_{k,k}; it is written into S0 and to memory.
//   x > k  : a'_{x,k} is divided by u_{k,k}, read back from S0, giving
//            l_{x,k}; l goes to memory and into the L buffer.
// When the controller starts Stage 3 (s3_go) PE_0 sends the buffered l_{x,k}
// to PE_1 as T_L tokens, one every D cycles, D = ceil((n-k-1)/P) being the
// largest number of multiply-adds one PE does per l.  When the last of them
// has come round the ring from PE_P, PE_0 waits for PE_P's multiply-add
// pipeline to drain and reports s3_done.  The U-chain input (inU) is
// passed to outU with one register.
//
// Follows the source: divider and S0 in PE_0, the division by u_{k,k},
// l_{x,k} fed to PE_1 through inL in Stage 3.  This design's own choices:
// the L buffer that holds l_{x,k} between Stages 2 and 3 (the source does
// not say where they wait), the D-cycle spacing, and the end-of-stage
// detection by the returning last token plus a fixed drain time.
//
// Timing: S0 is read one cycle after u_{k,k} is written, so each dividend
// waits one register before entering the LAT_DIV-stage divider.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// "disable iff" condition of the checking assertions at the end of the file,
// which is why a linter may report it as used synchronously and
// asynchronously; the assertions are not part of the circuit.
module lu_pe0
  import lu_pkg::*;
#(
  parameter int unsigned NMAX = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t in_u,
  input  tok_t in_l,
  output tok_t out_u,
  output tok_t out_l,
  // from / to the control unit
  input  logic s3_go,
  input  idx_t s3_d,
  input  logic s3_first,
  output logic s2_done,
  output logic s3_done,
  // results to external memory: u_{k,k} and l_{x,k}
  output logic wr_valid,
  output idx_t wr_row,
  output idx_t wr_col,
  output fp_t  wr_data
);

  localparam int unsigned NAW = (NMAX > 1) ? $clog2(NMAX) : 1;

  typedef struct packed {
    logic   last;
    idx_t   x;
    idx_t   y;
    saddr_t sbase;
  } dtag_t;

  typedef struct packed {
    idx_t   x;
    saddr_t sbase;
    fp_t    l;
  } lent_t;

  // ------------------------------------------------------ inU -> outU
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_u <= TOK_NONE;
    else        out_u <= in_u;
  end

  // ----------------------------------------------------------- S0
  logic           col_in, diag_in;
  idx_t           cur_k;
  logic [NAW-1:0] s0_addr;
  fp_t            s0_rdata;

  assign col_in  = (in_l.kind == T_COL_P);
  assign diag_in = col_in && (in_l.x == in_l.y);
  assign s0_addr = diag_in ? NAW'(in_l.x) : NAW'(cur_k);

  lu_ram #(.DEPTH(NMAX), .W(FP_W), .AW(NAW)) u_s0 (
    .clk, .we(diag_in), .waddr(s0_addr), .wdata(in_l.data),
    .re(1'b1), .raddr(NAW'(cur_k)), .rdata(s0_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cur_k <= '0;
    else if (diag_in) cur_k <= in_l.x;
  end

  // ------------------------------------------------------- divider
  logic  d1_v;
  dtag_t d1_t;
  fp_t   d1_a;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d1_v <= 1'b0;
    else        d1_v <= col_in && !diag_in;
  end
  always_ff @(posedge clk) begin
    d1_t <= '{last: in_l.last, x: in_l.x, y: in_l.y, sbase: in_l.sbase};
    d1_a <= in_l.data;
  end

  logic  dv_v;
  fp_t   dv_q;
  dtag_t dv_t;
  fp_div #(.LAT(LAT_DIV), .TAG_W($bits(dtag_t))) u_div (
    .clk, .rst_n,
    .in_valid(d1_v), .in_a(d1_a), .in_b(s0_rdata), .in_tag(d1_t),
    .out_valid(dv_v), .out_q(dv_q), .out_tag(dv_t)
  );

  // ------------------------------------------------------- L buffer
  logic           lb_we, lb_re;
  logic [NAW-1:0] lb_wp, lb_rp;
  lent_t          lb_rdata;

  assign lb_we = dv_v;

  lu_ram #(.DEPTH(NMAX), .W($bits(lent_t)), .AW(NAW)) u_lbuf (
    .clk, .we(lb_we), .waddr(lb_wp), .wdata({dv_t.x, dv_t.sbase, dv_q}),
    .re(lb_re), .raddr(lb_rp), .rdata(lb_rdata)
  );

  // -------------------------------------------------- Stage 3 issue
  logic s3_act, s3_fst, iss_q, iss_last_q;
  idx_t s3_gap, s3_dd, s3_cnt, drain;

  assign lb_re = s3_act && (s3_gap == 0) && (idx_t'(lb_rp) != s3_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_wp      <= '0;
      lb_rp      <= '0;
      s3_act     <= 1'b0;
      s3_fst     <= 1'b0;
      s3_gap     <= '0;
      s3_dd      <= '0;
      s3_cnt     <= '0;
      iss_q      <= 1'b0;
      iss_last_q <= 1'b0;
      drain      <= '0;
      s2_done    <= 1'b0;
      s3_done    <= 1'b0;
    end else begin
      s2_done <= (dv_v && dv_t.last) || (diag_in && in_l.last);
      s3_done <= 1'b0;
      iss_q   <= lb_re;
      iss_last_q <= lb_re && (idx_t'(lb_rp) + idx_t'(1) == s3_cnt);
      if (lb_we) lb_wp <= lb_wp + 1'b1;
      if (s3_go) begin
        s3_act <= 1'b1;
        s3_fst <= s3_first;
        s3_dd  <= s3_d;
        s3_gap <= '0;
        s3_cnt <= idx_t'(lb_wp);
        lb_rp  <= '0;
      end else if (s3_act) begin
        if (lb_re) begin
          lb_rp  <= lb_rp + 1'b1;
          s3_gap <= s3_dd - idx_t'(1);
        end else if (s3_gap != 0) begin
          s3_gap <= s3_gap - idx_t'(1);
        end else begin
          s3_act <= 1'b0;
        end
      end
      // The last l has passed PE_P: wait for PE_P's pipeline to drain.
      if (in_l.kind == T_L && in_l.last) begin
        drain <= s3_dd + idx_t'(PE_MAC_DRAIN);
      end else if (drain != 0) begin
        drain <= drain - idx_t'(1);
        if (drain == idx_t'(1)) begin
          s3_done <= 1'b1;
          lb_wp   <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_l <= TOK_NONE;
    end else if (iss_q) begin
      out_l <= '{kind: T_L, first: s3_fst, last: iss_last_q, pe: '0,
                 x: lb_rdata.x, y: cur_k, c: '0, sbase: lb_rdata.sbase, data: lb_rdata.l};
    end else begin
      out_l <= TOK_NONE;
    end
  end

  // ------------------------------------------------- memory write port
  always_comb begin
    wr_valid = diag_in || dv_v;
    wr_row   = diag_in ? in_l.x : dv_t.x;
    wr_col   = diag_in ? in_l.y : dv_t.y;
    wr_data  = diag_in ? in_l.data : dv_q;
  end

  a_wr_free: assert property (@(posedge clk) disable iff (!rst_n) !(diag_in && dv_v));

endmodule
