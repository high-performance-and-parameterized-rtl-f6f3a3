// tb_lu_ram: self-checking testbench for lu_ram.
//
// Fills the RAM with random words, reads them back in random order and
// checks the one-cycle read latency, that a read of the address being
// written returns the old word, and that the output holds while re is low.
module tb_lu_ram;
  localparam int unsigned DEPTH = 40;
  localparam int unsigned W     = 64;
  localparam int unsigned AW    = 6;

  logic          clk = 1'b0;
  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [DEPTH];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  lu_ram #(.DEPTH(DEPTH), .W(W), .AW(AW)) dut (.*);

  task automatic expect_rd(input logic [W-1:0] e, input string what);
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, e);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom % DEPTH;
      re = 1; raddr = AW'(a);
      @(negedge clk);
      expect_rd(model[a], "read");
    end
    // Read and write the same address in one cycle: old word comes out.
    re = 1; raddr = 6'd7; we = 1; waddr = 6'd7; wdata = 64'h0123_4567_89ab_cdef;
    @(negedge clk);
    expect_rd(model[7], "read during write");
    model[7] = 64'h0123_4567_89ab_cdef;
    we = 0;
    @(negedge clk);
    expect_rd(model[7], "read after write");
    // Output holds while re is low.
    re = 0; raddr = 6'd3;
    @(negedge clk);
    @(negedge clk);
    expect_rd(model[7], "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
