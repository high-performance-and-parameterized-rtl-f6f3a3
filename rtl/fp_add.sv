// fp_add: pipelined 64-bit IEEE-754 floating-point adder/subtractor.
//
// Computes a + b, or a - b when in_sub is set.  One operation is accepted
// every cycle and its result appears LAT cycles later (default 11, the
// adder depth of the design) with its tag.  Operands are aligned with
// guard, round and sticky bits, added or subtracted, normalised with a
// leading-zero count and rounded to nearest even.  Like the units the
// design was characterised with it is only partly IEEE compliant:
// denormals count as zero, underflow flushes to zero, overflow gives
// infinity, and inf - inf gives a quiet NaN.  An exact zero result is +0
// unless both operands are -0.  The sum is formed in the first stage and the
// other LAT-1 stages are a register chain for synthesis to retime; that
// split is this design's choice.
//
// Ports: in_valid/in_a/in_b/in_sub/in_tag in, out_valid/out_s/out_tag out.
module fp_add
  import lu_pkg::*;
#(
  parameter int unsigned LAT   = LAT_ADD,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp_t              in_a,
  input  fp_t              in_b,
  input  logic             in_sub,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp_t              out_s,
  output logic [TAG_W-1:0] out_tag
);

  function automatic fp_t fadd(input fp_t a_in, input fp_t b_in, input logic sub);
    fp_t                a, b, t;
    logic               sa, sb;
    logic [10:0]        ea, eb;
    logic [11:0]        d;
    logic [55:0]        ma, mb, mbs, nm;
    logic [56:0]        sum;
    logic               st;
    logic signed [13:0] e;
    logic [53:0]        m;
    int                 lz;
    a = a_in;
    b = {b_in[63] ^ sub, b_in[62:0]};
    // Denormals are treated as zero.
    if (a[62:52] == 0) a = {a[63], 63'd0};
    if (b[62:52] == 0) b = {b[63], 63'd0};
    // NaN and infinity.
    if ((a[62:52] == 11'h7ff && a[51:0] != 0) || (b[62:52] == 11'h7ff && b[51:0] != 0))
      return 64'h7ff8_0000_0000_0000;
    if (a[62:52] == 11'h7ff && b[62:52] == 11'h7ff)
      return (a[63] == b[63]) ? a : 64'h7ff8_0000_0000_0000;
    if (a[62:52] == 11'h7ff) return a;
    if (b[62:52] == 11'h7ff) return b;
    // Zeros.
    if (a[62:0] == 0 && b[62:0] == 0) return {a[63] & b[63], 63'd0};
    if (a[62:0] == 0) return b;
    if (b[62:0] == 0) return a;
    // Order the operands so that |a| >= |b|.
    if (a[62:0] < b[62:0]) begin
      t = a;
      a = b;
      b = t;
    end
    sa = a[63];
    sb = b[63];
    ea = a[62:52];
    eb = b[62:52];
    ma = {1'b1, a[51:0], 3'b000};
    mb = {1'b1, b[51:0], 3'b000};
    d  = {1'b0, ea} - {1'b0, eb};
    if (d > 12'd56) begin
      mbs = 56'd1;                       // only the sticky bit is left
    end else begin
      mbs = mb >> d;
      st  = (mb & ((56'd1 << d) - 56'd1)) != 0;
      mbs[0] = mbs[0] | st;
    end
    e = 14'(signed'({3'b0, ea}));
    if (sa == sb) begin
      sum = {1'b0, ma} + {1'b0, mbs};
      if (sum[56]) begin
        nm = sum[56:1];
        nm[0] = nm[0] | sum[0];
        e = e + 14'sd1;
      end else begin
        nm = sum[55:0];
      end
    end else begin
      nm = ma - mbs;
      if (nm == 0) return 64'd0;
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (nm[i]) break;
        lz++;
      end
      nm = nm << lz;
      e = e - 14'(lz);
    end
    m = {1'b0, nm[55:3]};
    if (nm[2] && ((|nm[1:0]) || m[0])) m = m + 54'd1;
    if (m[53]) begin
      m = m >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {sa, 11'h7ff, 52'd0};
    if (e <= 14'sd0) return {sa, 63'd0};
    return {sa, e[10:0], m[51:0]};
  endfunction

  logic             v_q [LAT];
  fp_t              s_q [LAT];
  logic [TAG_W-1:0] t_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < LAT; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    s_q[0] <= fadd(in_a, in_b, in_sub);
    t_q[0] <= in_tag;
    for (int i = 1; i < LAT; i++) begin
      s_q[i] <= s_q[i-1];
      t_q[i] <= t_q[i-1];
    end
  end

  assign out_valid = v_q[LAT-1];
  assign out_s     = s_q[LAT-1];
  assign out_tag   = t_q[LAT-1];

endmodule
