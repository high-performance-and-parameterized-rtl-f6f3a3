// fp_mul: pipelined 64-bit IEEE-754 floating-point multiplier.
//
// One product is accepted every cycle and appears LAT cycles later
// (default 8, the multiplier depth of the design), together with a tag that
// travels with it unchanged, so the caller needs no separate delay line.
// The arithmetic is round-to-nearest-even on normal numbers.  It is only
// partly IEEE compliant, like the units the design was built with: denormal
// inputs count as zero, results below the normal range flush to a signed
// zero, overflow gives infinity, and NaN or infinity times zero gives a
// quiet NaN.  The product is computed in the first stage and the remaining
// LAT-1 register stages are meant to be retimed into it by synthesis; this
// split is this design's choice, the source only fixes the depth.
//
// Ports: in_valid/in_a/in_b/in_tag in, out_valid/out_p/out_tag out.
module fp_mul
  import lu_pkg::*;
#(
  parameter int unsigned LAT   = LAT_MUL,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp_t              in_a,
  input  fp_t              in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp_t              out_p,
  output logic [TAG_W-1:0] out_tag
);

  function automatic fp_t fmul(input fp_t a, input fp_t b);
    logic               s;
    logic [10:0]        ea, eb;
    logic [52:0]        ma, mb;
    logic [105:0]       prod;
    logic signed [13:0] e;
    logic [53:0]        m;
    logic               g, st;
    s  = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    ma = {1'b1, a[51:0]};
    mb = {1'b1, b[51:0]};
    if ((ea == 11'h7ff && a[51:0] != 0) || (eb == 11'h7ff && b[51:0] != 0))
      return 64'h7ff8_0000_0000_0000;
    if (ea == 11'h7ff || eb == 11'h7ff) begin
      if (ea == 0 || eb == 0) return 64'h7ff8_0000_0000_0000;
      return {s, 11'h7ff, 52'd0};
    end
    if (ea == 0 || eb == 0) return {s, 63'd0};
    prod = ma * mb;
    e = 14'(signed'({3'b0, ea})) + 14'(signed'({3'b0, eb})) - 14'sd1023;
    if (prod[105]) begin
      m  = {1'b0, prod[105:53]};
      g  = prod[52];
      st = |prod[51:0];
      e  = e + 14'sd1;
    end else begin
      m  = {1'b0, prod[104:52]};
      g  = prod[51];
      st = |prod[50:0];
    end
    if (g && (st || m[0])) m = m + 54'd1;
    if (m[53]) begin
      m = m >> 1;
      e = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {s, 11'h7ff, 52'd0};
    if (e <= 14'sd0) return {s, 63'd0};
    return {s, e[10:0], m[51:0]};
  endfunction

  logic             v_q [LAT];
  fp_t              p_q [LAT];
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
    p_q[0] <= fmul(in_a, in_b);
    t_q[0] <= in_tag;
    for (int i = 1; i < LAT; i++) begin
      p_q[i] <= p_q[i-1];
      t_q[i] <= t_q[i-1];
    end
  end

  assign out_valid = v_q[LAT-1];
  assign out_p     = p_q[LAT-1];
  assign out_tag   = t_q[LAT-1];

endmodule
