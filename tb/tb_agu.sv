// tb_agu: self-checking testbench of the address generation unit.
// Starts walks with random window shapes, strides and bases. Checks every
// address against base + y*stride_y + x, the first/last tags, one address
// per clock, and that a start in the clock of the last address makes the next
// walk follow with no gap.
module tb_agu;
  import hmp_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0;
  agu_cfg_t      cfg;
  logic [AW-1:0] addr;
  logic          valid, first, last, busy;
  int            checks = 0, failures = 0;

  agu dut (.clk, .rst_n, .start, .cfg, .addr, .valid, .first, .last, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // expected address stream of one walk
  task automatic walk(agu_cfg_t c, bit chain_next, agu_cfg_t nxt);
    int n = int'(c.len_x) * int'(c.len_y);
    int i = 0;
    for (int y = 0; y < c.len_y; y++)
      for (int x = 0; x < c.len_x; x++) begin
        @(posedge clk); #1;
        check("valid", 32'(valid), 1);
        check("addr", 32'(addr), 32'(AW'(c.base + AW'(y) * c.stride_y + AW'(x))));
        check("first", 32'(first), 32'(i == 0));
        check("last", 32'(last), 32'(i == n - 1));
        start = chain_next && (i == n - 1);
        if (start) cfg = nxt;
        i++;
      end
  endtask

  initial begin
    agu_cfg_t c0, c1;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check("idle invalid", 32'(valid), 0);
    for (int t = 0; t < 40; t++) begin
      c0.base     = AW'($urandom);
      c0.len_x    = 8'($urandom_range(1, 16));
      c0.len_y    = 8'($urandom_range(1, 16));
      c0.stride_y = AW'($urandom_range(16, 300));
      c1.base     = AW'($urandom);
      c1.len_x    = 8'($urandom_range(1, 8));
      c1.len_y    = 8'($urandom_range(1, 8));
      c1.stride_y = AW'($urandom_range(8, 100));
      cfg   = c0;
      start = 1'b1;
      walk(c0, 1'b1, c1);   // chained: c1 follows with no gap
      walk(c1, 1'b0, c1);
      start = 1'b0;
      @(posedge clk); #1;
      check("ends after len_x*len_y addresses", 32'(valid), 0);
      check("not busy", 32'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
