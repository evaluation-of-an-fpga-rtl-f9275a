// tb_local_mem: self-checking testbench of the local memory module.
// Writes random words through port A, reads them back through both ports
// and checks the one-clock read latency and the read-before-write behaviour
// of port A, against a reference array kept in the testbench.
module tb_local_mem;
  import hmp_pkg::*;

  localparam int DEPTH = 1024;
  localparam int MAW   = $clog2(DEPTH);
  logic           clk = 1'b0;
  logic           a_en = 1'b0, a_we = 1'b0, b_en = 1'b0;
  logic [MAW-1:0] a_addr = '0, b_addr = '0;
  data_t          a_wdata = '0, a_rdata, b_rdata;
  data_t          model [DEPTH];
  int             checks = 0, failures = 0;

  local_mem #(.DEPTH(DEPTH)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                  .b_en, .b_addr, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    int ra, rb;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1'b1; a_we = 1'b1; a_addr = MAW'(i);
      a_wdata = data_t'($urandom);
      model[i] = a_wdata;
    end
    // random reads on both ports, with writes mixed in on port A
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ra = $urandom_range(DEPTH - 1);
      rb = $urandom_range(DEPTH - 1);
      a_en = 1'b1; a_we = n[0]; a_addr = MAW'(ra); a_wdata = data_t'($urandom);
      b_en = 1'b1; b_addr = MAW'(rb);
      @(posedge clk); #1;
      check("port A read (old data)", 32'(a_rdata), 32'(model[ra]));
      check("port B read (old data)", 32'(b_rdata), 32'(model[rb]));
      if (a_we) model[ra] = a_wdata;
    end
    // disabled port B holds its output
    @(negedge clk);
    a_en = 1'b0; b_en = 1'b1; b_addr = 0;
    @(posedge clk); #1;
    @(negedge clk);
    b_en = 1'b0; b_addr = 5;
    @(posedge clk); #1;
    check("port B holds when disabled", 32'(b_rdata), 32'(model[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
