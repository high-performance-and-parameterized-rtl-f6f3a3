// fp_div: pipelined 64-bit IEEE-754 floating-point divider.
//
// Computes a / b.  One division is accepted every cycle and its quotient
// appears LAT cycles later (default 58, the divider depth of the design)
// with its tag.  The pipeline is a radix-2 restoring divider, one
// quotient bit per stage:
//   stage 0        unpack, exponent difference, and pre-shift of the
//                  dividend significand so that the quotient lies in [1,2);
//   stages 1..54   one quotient bit each (53 significand bits and a guard
//                  bit); the partial remainder stays below twice the divisor;
//   stage 55       round to nearest even with the final remainder as sticky;
//   the rest       plain registers up to LAT.
// Only partly IEEE compliant, as the design's units were: denormals count as
// zero, underflow flushes to zero, x/0 gives infinity, 0/0 and inf/inf a
// quiet NaN.  The radix and stage split are this design's choice; the
// source gives the depth only.
//
// Ports: in_valid/in_a/in_b/in_tag in, out_valid/out_q/out_tag out.
module fp_div
  import lu_pkg::*;
#(
  parameter int unsigned LAT   = LAT_DIV,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp_t              in_a,
  input  fp_t              in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp_t              out_q,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned QB   = 54;          // quotient bits produced
  localparam int unsigned NST  = QB + 2;      // unpack + QB steps + round
  localparam int unsigned XTRA = LAT - NST;   // trailing delay registers

  typedef struct packed {
    logic               spec;   // result already known (zero, inf, NaN)
    fp_t                sval;
    logic               s;
    logic signed [13:0] e;
    logic [54:0]        rem;
    logic [52:0]        dv;
    logic [QB-1:0]      q;
  } dstage_t;

  dstage_t          st_q [QB+1];
  logic             v_q  [LAT];
  logic [TAG_W-1:0] t_q  [LAT];
  fp_t              r_q  [XTRA+1];

  // Stage 0: unpack and classify.
  function automatic dstage_t unpack(input fp_t a, input fp_t b);
    dstage_t     r;
    logic [10:0] ea, eb;
    logic        za, zb, ia, ib, na, nb;
    logic [52:0] ma, mb;
    r    = '0;
    ea   = a[62:52];
    eb   = b[62:52];
    za   = (ea == 0);
    zb   = (eb == 0);
    ia   = (ea == 11'h7ff) && (a[51:0] == 0);
    ib   = (eb == 11'h7ff) && (b[51:0] == 0);
    na   = (ea == 11'h7ff) && (a[51:0] != 0);
    nb   = (eb == 11'h7ff) && (b[51:0] != 0);
    r.s  = a[63] ^ b[63];
    ma   = {1'b1, a[51:0]};
    mb   = {1'b1, b[51:0]};
    r.dv = mb;
    if (na || nb || (za && zb) || (ia && ib)) begin
      r.spec = 1'b1;
      r.sval = 64'h7ff8_0000_0000_0000;
    end else if (ia || zb) begin
      r.spec = 1'b1;
      r.sval = {r.s, 11'h7ff, 52'd0};
    end else if (za || ib) begin
      r.spec = 1'b1;
      r.sval = {r.s, 63'd0};
    end
    r.e = 14'(signed'({3'b0, ea})) - 14'(signed'({3'b0, eb})) + 14'sd1023;
    if (ma < mb) begin
      r.rem = {1'b0, ma, 1'b0};
      r.e   = r.e - 14'sd1;
    end else begin
      r.rem = {2'b0, ma};
    end
    return r;
  endfunction

  // One restoring step: the remainder is below twice the divisor.
  function automatic dstage_t step(input dstage_t i);
    dstage_t o;
    o = i;
    if (i.rem >= {2'b0, i.dv}) begin
      o.rem = (i.rem - {2'b0, i.dv}) << 1;
      o.q   = {i.q[QB-2:0], 1'b1};
    end else begin
      o.rem = i.rem << 1;
      o.q   = {i.q[QB-2:0], 1'b0};
    end
    return o;
  endfunction

  function automatic fp_t round_q(input dstage_t i);
    logic [53:0]        m;
    logic signed [13:0] e;
    if (i.spec) return i.sval;
    m = {1'b0, i.q[QB-1:1]};
    e = i.e;
    if (i.q[0] && ((i.rem != 0) || m[0])) m = m + 54'd1;
    if (m[53]) begin
      m = m >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {i.s, 11'h7ff, 52'd0};
    if (e <= 14'sd0) return {i.s, 63'd0};
    return {i.s, e[10:0], m[51:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < LAT; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    t_q[0] <= in_tag;
    for (int i = 1; i < LAT; i++) t_q[i] <= t_q[i-1];
    st_q[0] <= unpack(in_a, in_b);
    for (int i = 1; i <= QB; i++) st_q[i] <= step(st_q[i-1]);
    r_q[0] <= round_q(st_q[QB]);
    for (int i = 1; i <= XTRA; i++) r_q[i] <= r_q[i-1];
  end

  assign out_valid = v_q[LAT-1];
  assign out_q     = r_q[XTRA];
  assign out_tag   = t_q[LAT-1];

endmodule
