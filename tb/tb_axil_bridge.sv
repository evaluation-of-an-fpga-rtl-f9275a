// tb_axil_bridge: self-checking testbench of the AXI4-lite bridge.
// An AXI4-lite master in the testbench issues random writes and reads, with
// random delays on BREADY/RREADY. A register-file model on the internal bus
// side answers reads one clock after the request. Checks: the byte-to-word
// address conversion, the write data, that each write makes exactly one
// internal request, the read data, and OKAY responses.
module tb_axil_bridge;
  import hmp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] awaddr = '0, wdata = '0, araddr = '0, rdata;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  host_req_t   hreq;
  host_rsp_t   hrsp;
  logic [31:0] regs [256];
  int          nreq = 0;
  int          checks = 0, failures = 0;

  axil_bridge dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(4'hf), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .hreq, .hrsp);

  always #5 clk = ~clk;

  // internal bus model: 256-word register file, read data one clock later
  always_ff @(posedge clk) begin
    hrsp.rvalid <= hreq.req && !hreq.we;
    hrsp.rdata  <= regs[hreq.addr[7:0]];
    if (hreq.req) nreq <= nreq + 1;
    if (hreq.req && hreq.we) regs[hreq.addr[7:0]] <= hreq.wdata;
  end

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
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic axi_write(logic [31:0] a, logic [31:0] d);
    int nreq0 = nreq;
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1'b1; wvalid = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    #1 awvalid = 1'b0; wvalid = 1'b0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1 bready = 1'b1;
    do @(posedge clk); while (!bvalid);
    check("bresp", 32'(bresp), 0);
    #1 bready = 1'b0;
    check("one internal request per write", 32'(nreq - nreq0), 1);
  endtask

  task automatic axi_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 1'b0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1 rready = 1'b1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    check("rresp", 32'(rresp), 0);
    #1 rready = 1'b0;
  endtask

  initial begin
    logic [31:0] model [256];
    logic [31:0] d;
    int          w;
    for (int i = 0; i < 256; i++) begin
      regs[i]  = 32'(i) * 32'h01010101;
      model[i] = regs[i];
    end
    hrsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      w = $urandom_range(255);
      if ($urandom_range(1) != 0) begin
        d = $urandom;
        axi_write(32'(w) << 2, d);
        model[w] = d;
      end else begin
        axi_read(32'(w) << 2, d);
        check("read data", d, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
