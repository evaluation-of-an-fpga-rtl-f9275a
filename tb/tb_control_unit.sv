// tb_control_unit: self-checking testbench of the control unit.
// Checks the one-clock start and stop pulses for a core mask, the busy read
// back, the sticky done bits, their clear by write-1 and by a new start.
module tb_control_unit;
  import hmp_pkg::*;

  localparam int NCORE = 5;
  logic             clk = 1'b0, rst_n = 1'b0;
  host_req_t        hreq;
  host_rsp_t        hrsp;
  logic [NCORE-1:0] start, stop, busy, done;
  int               checks = 0, failures = 0;

  control_unit #(.NCORE(NCORE)) dut (.clk, .rst_n, .hreq, .hrsp, .start, .stop, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(int off, logic [31:0] d);
    @(negedge clk);
    hreq = '{req: 1'b1, we: 1'b1, addr: HAW'(off), wdata: d};
    @(negedge clk);
    hreq = '0;
  endtask

  task automatic rd(int off, output logic [31:0] d);
    @(negedge clk);
    hreq = '{req: 1'b1, we: 1'b0, addr: HAW'(off), wdata: '0};
    @(posedge clk); #1;
    hreq = '0;
    check("rvalid", 32'(hrsp.rvalid), 1);
    d = hrsp.rdata;
  endtask

  initial begin
    logic [31:0] d;
    logic [NCORE-1:0] m;
    hreq = '0; busy = '0; done = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      m = NCORE'($urandom);
      // start pulse: exactly one clock
      @(negedge clk);
      hreq = '{req: 1'b1, we: 1'b1, addr: HAW'(0), wdata: 32'(m)};
      @(posedge clk); #1;
      hreq = '0;
      check("start pulse", 32'(start), 32'(m));
      @(posedge clk); #1;
      check("start pulse ends", 32'(start), 0);
      busy = NCORE'($urandom);
      rd(2, d);
      check("busy readback", d, 32'(busy));
      // done pulses collected
      @(negedge clk); done = m; @(negedge clk); done = '0;
      rd(3, d);
      check("sticky done", d, 32'(m));
      wr(3, 32'(m & NCORE'(5)));
      rd(3, d);
      check("done cleared by write 1", d, 32'(m) & ~32'd5);
      // stop pulse
      @(negedge clk);
      hreq = '{req: 1'b1, we: 1'b1, addr: HAW'(1), wdata: 32'(m)};
      @(posedge clk); #1;
      hreq = '0;
      check("stop pulse", 32'(stop), 32'(m));
      wr(0, 32'(m));
      rd(3, d);
      check("start clears done", d, 32'(0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
