// tb_fp_div: self-checking testbench for fp_div.
//
// Streams random double-precision operands through the unit, one per cycle,
// and compares every result bit for bit with the simulator's own IEEE
// double arithmetic on the same operands (operands are kept in a range where
// no denormal or overflow can occur, and special cases are checked
// separately).  It also checks that a lone operation comes out exactly
// 58 cycles after it went in.
module tb_fp_div;
  import lu_pkg::*;

  localparam int unsigned LAT = 58;
  localparam int unsigned NR  = 4000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid;
  fp_t         in_a, in_b;
  logic        sub_in;
  logic [15:0] in_tag;
  logic        out_valid;
  fp_t         out_r;
  logic [15:0] out_tag;
  int          checks = 0;
  int          failures = 0;
  fp_t         ea [NR+16];
  fp_t         eb [NR+16];
  logic        es [NR+16];
  int          nexp = 0;

  always #5 clk = ~clk;

  fp_div #(.TAG_W(16)) dut (
    .clk, .rst_n, .in_valid, .in_a, .in_b, 
    .in_tag, .out_valid, .out_q(out_r), .out_tag
  );

  function automatic fp_t rnd_fp(input int unsigned erange, input int unsigned ebase);
    fp_t r;
    r[63]    = 1'($urandom);
    r[62:52] = 11'(ebase + ($urandom % erange));
    r[51:0]  = {20'($urandom), 32'($urandom)};
    if ($urandom % 8 == 0) r[51:0] = {r[51:40], 40'd0};
    return r;
  endfunction

  function automatic fp_t expect_of(input fp_t a, input fp_t b, input logic sub);
    real r;
    r = $bitstoreal(a) / $bitstoreal(b);
    return $realtobits(r);
  endfunction

  task automatic check(input fp_t got, input fp_t exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  // Scoreboard: results come out in order.
  int rd_idx = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (rd_idx < nexp) begin
        check(out_r, expect_of(ea[rd_idx], eb[rd_idx], es[rd_idx]), "stream");
        checks++;
        if (out_tag != 16'(rd_idx)) failures++;
      end else begin
        failures++;
      end
      rd_idx++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    in_valid = 1'b0; in_a = '0; in_b = '0; sub_in = 1'b0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // Latency of one lone operation.
    ea[0] = 64'h3ff8_0000_0000_0000; eb[0] = 64'h4000_0000_0000_0000; es[0] = 1'b0;
    nexp = 1;
    in_valid <= 1'b1; in_a <= ea[0]; in_b <= eb[0]; sub_in <= 1'b0; in_tag <= 16'd0;
    @(posedge clk);
    in_valid <= 1'b0;
    lat = 0;  // edges after the one that took the operands; out_valid is read before its update
    while (!out_valid && lat < 200) begin
      @(posedge clk);
      lat++;
    end
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("FAIL latency %0d expected %0d", lat, LAT);
    end
    @(posedge clk);
    // Random stream, one operation per cycle.
    for (int i = 1; i < NR; i++) begin
      case (i % 4)
        0: begin ea[i] = rnd_fp(120, 963); eb[i] = rnd_fp(120, 963); end
        1: begin ea[i] = rnd_fp(3, 1022);  eb[i] = rnd_fp(3, 1022);  end
        2: begin ea[i] = rnd_fp(1, 1023);  eb[i] = rnd_fp(1, 1023);  end
        default: begin ea[i] = rnd_fp(60, 993); eb[i] = rnd_fp(2, 1023); end
      endcase
      if (i % 16 == 5) eb[i] = {~ea[i][63], ea[i][62:1], ~ea[i][0]};
      es[i] = 1'($urandom);
      nexp = i + 1;
      in_valid <= 1'b1; in_a <= ea[i]; in_b <= eb[i]; sub_in <= es[i]; in_tag <= 16'(i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (rd_idx != nexp) failures++;
    // Special operands: zeros and infinities.
    begin
      fp_t sa [4];
      fp_t sb [4];
      sa[0] = 64'h0; sb[0] = 64'h3ff0_0000_0000_0000;
      sa[1] = 64'h4008_0000_0000_0000; sb[1] = 64'h0;
      sa[2] = 64'h7ff0_0000_0000_0000; sb[2] = 64'h4000_0000_0000_0000;
      sa[3] = 64'hc010_0000_0000_0000; sb[3] = 64'hc010_0000_0000_0000;
      for (int i = 0; i < 4; i++) begin
        ea[nexp] = sa[i]; eb[nexp] = sb[i]; es[nexp] = 1'b0;
        in_valid <= 1'b1; in_a <= sa[i]; in_b <= sb[i]; sub_in <= 1'b0; in_tag <= 16'(nexp);
        nexp++;
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (LAT + 5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
