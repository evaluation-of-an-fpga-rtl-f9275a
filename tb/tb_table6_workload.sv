// tb_table6_workload: the 640x480-image filter workload with 12x12, 18x18
// and 24x24 windows on the platform at its default size (four 4x4 MIMD-2D
// cores = 64 PEs), driven over AXI4-lite as the CPU would.
// One full scan area (rows 0..k-1, all 640-k+1 windows) is run for each
// window size k; the other 480-k scan areas repeat the same steps at other
// rows. A lane memory holds 1024 words, so the scan area is cut into
// column segments: with kp = k rounded up to a multiple of 4 and rl = kp/4
// image rows per lane, a segment is at most floor(1024/rl) columns wide.
// The segments are handed to the four MIMD cores in batches. The cores of a
// batch are loaded one after another (pack-4 image writes) and started
// together. The pixel-parallel chain is the same for every size:
// MUL x4 -> ADD x2 -> ADD -> ACC. Each lane AGU walks k columns x rl rows,
// so a window takes k*rl clocks. For k = 18 the window is padded to 20 rows
// with zero coefficients. Every window result is checked against a sum
// computed here (16-bit wrap, no 1/constant scaling), and each core's clock
// count against n_windows*k*rl + 11.
module tb_table6_workload;
  import hmp_pkg::*;

  localparam int NCORE = 5;
  localparam int IW = 640, IH = 24;    // columns; rows of the first scan area
  localparam int RES = 512;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] awaddr = '0, wdata = '0, araddr = '0, rdata;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [NCORE-1:0] core_busy, core_done;
  int          checks = 0, failures = 0;

  int img [IH][IW];
  int cf  [IH][IH];                    // cf[j][i] = R(i, j), zero padded

  hmp_top dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(4'hf), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .core_busy, .core_done);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  function automatic logic [31:0] ba(int slv, logic [1:0] rgn, int idx, int off);
    return {9'd0, 4'(slv), rgn, 5'(idx), 10'(off), 2'b00};
  endfunction

  task automatic axi_write(logic [31:0] ad, logic [31:0] d);
    @(negedge clk);
    awaddr = ad; wdata = d; awvalid = 1'b1; wvalid = 1'b1; bready = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    #1 awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1 bready = 1'b0;
  endtask

  task automatic axi_read(logic [31:0] ad, output logic [31:0] d);
    @(negedge clk);
    araddr = ad; arvalid = 1'b1; rready = 1'b1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 1'b0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata;
    @(posedge clk); #1 rready = 1'b0;
  endtask

  function automatic logic [31:0] pcfg(pe_op_e op, int sa, int sb);
    pe_cfg_t c;
    c.op = op; c.sel_a = SELW'(sa); c.sel_b = SELW'(sb); c.swb = SWB_RESULT;
    return 32'(c);
  endfunction

  // load MIMD core `core` with columns s0..s0+sw-1 of the scan area, the
  // coefficients and one context of nw windows
  task automatic load_core(int core, int k, int rl, int s0, int sw, int nw);
    int slv;
    slv = core + 1;
    for (int q = 0; q < rl; q++)
      for (int c = 0; c < sw; c++)
        axi_write(ba(slv, RGN_PACK4, 0, q*sw + c),
                  {8'(img[4*q+3][s0+c]), 8'(img[4*q+2][s0+c]),
                   8'(img[4*q+1][s0+c]), 8'(img[4*q][s0+c])});
    for (int l = 0; l < 4; l++)
      for (int g = 0; g < rl; g++)
        for (int i = 0; i < k; i++)
          axi_write(ba(slv, RGN_MEM, 4 + l, g*k + i), 32'(cf[4*g + l][i]));
    for (int p = 0; p < 16; p++) axi_write(ba(slv, RGN_CFG, 0, p), pcfg(OP_NOP, 0, 0));
    for (int l = 0; l < 4; l++) axi_write(ba(slv, RGN_CFG, 0, l), pcfg(OP_MUL, l, 4 + l));
    axi_write(ba(slv, RGN_CFG, 0, 5),  pcfg(OP_ADD, 0, 1));
    axi_write(ba(slv, RGN_CFG, 0, 6),  pcfg(OP_ADD, 2, 3));
    axi_write(ba(slv, RGN_CFG, 0, 10), pcfg(OP_ADD, 1, 2));
    axi_write(ba(slv, RGN_CFG, 0, 14), pcfg(OP_ACC, 2, 0));
    for (int m = 0; m < 8; m++) begin
      axi_write(ba(slv, RGN_CFG, 0, 32 + 4*m), 32'h8000_0000);
      axi_write(ba(slv, RGN_CFG, 0, 33 + 4*m), (m < 4) ? 1 : 0);
      axi_write(ba(slv, RGN_CFG, 0, 34 + 4*m), {16'd0, 8'(rl), 8'(k)});
      axi_write(ba(slv, RGN_CFG, 0, 35 + 4*m), (m < 4) ? sw : k);
    end
    axi_write(ba(slv, RGN_CFG, 0, 96), nw);
    axi_write(ba(slv, RGN_CFG, 0, 97), 32'h8000_0000 | (4 << 8) | 2);
    axi_write(ba(slv, RGN_CFG, 0, 98), RES);
    axi_write(ba(slv, RGN_CFG, 0, 99), 1);
    axi_write(ba(slv, RGN_CFG, 0, 100), k * rl);
  endtask

  task automatic run_size(int k);
    logic [31:0] d;
    int kp, rl, swmax, nwmax, ntot, nseg, s;
    int s0 [8], nw [8];
    int mask, busy_clk;
    kp    = (k + 3) / 4 * 4;
    rl    = kp / 4;
    swmax = 1024 / rl;
    if (swmax > IW) swmax = IW;
    nwmax = swmax - k + 1;
    ntot  = IW - k + 1;
    nseg  = (ntot + nwmax - 1) / nwmax;
    for (int j = 0; j < IH; j++)
      for (int i = 0; i < IH; i++) cf[j][i] = (j < k && i < k) ? $urandom_range(255) : 0;
    for (int g = 0; g < nseg; g++) begin
      s0[g] = g * nwmax;
      nw[g] = (ntot - s0[g] < nwmax) ? ntot - s0[g] : nwmax;
    end
    busy_clk = 0;
    for (int b = 0; b < nseg; b += 4) begin
      mask = 0;
      for (int c = 0; c < 4 && b + c < nseg; c++) begin
        load_core(c, k, rl, s0[b+c], nw[b+c] + k - 1, nw[b+c]);
        mask |= 1 << c;
      end
      axi_write(ba(0, RGN_MEM, 0, 0), 32'(mask));
      do begin
        repeat (100) @(posedge clk);
        axi_read(ba(0, RGN_MEM, 0, 3), d);
      end while ((int'(d) & mask) != mask);
      for (int c = 0; c < 4 && b + c < nseg; c++) begin
        axi_read(ba(c + 1, RGN_STAT, 0, 1), d);
        check($sformatf("%0dx%0d core %0d clocks", k, k, c), d, 32'(nw[b+c] * k * rl + 11));
        if (c == 0) busy_clk += int'(d);
        for (int w = 0; w < nw[b+c]; w++) begin
          s = 0;
          for (int j = 0; j < k; j++)
            for (int i = 0; i < k; i++) s += img[j][s0[b+c] + w + i] * cf[j][i];
          axi_read(ba(c + 1, RGN_MEM, 4, RES + w), d);
          check($sformatf("%0dx%0d window %0d", k, k, s0[b+c] + w), d, 32'(s & 16'hffff));
        end
      end
    end
    $display("%0dx%0d: %0d windows in %0d segments, %0d clocks of computation per scan area",
             k, k, ntot, nseg, busy_clk);
  endtask

  initial begin
    for (int j = 0; j < IH; j++)
      for (int i = 0; i < IW; i++) img[j][i] = $urandom_range(255);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_size(12);
    run_size(18);
    run_size(24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
