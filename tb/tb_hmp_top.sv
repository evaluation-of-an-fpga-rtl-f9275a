// tb_hmp_top: end-to-end testbench of the platform at its default size
// (four 4x4 MIMD-2D cores, one 4-PE SIMD-1D core, 1024-word memories).
// An AXI4-lite master in the testbench plays the CPU:
//   * MIMD core 0 filters, and core 1 computes the SAD of, a 16x256 image
//     with a 16x16 window (241 windows, pixel-parallel, one context). The
//     image goes in with pack-4 writes (four 8-bit pixels per 32-bit
//     transfer).
//   * MIMD cores 2 and 3 filter a 20x64 image in two contexts (scan areas
//     y=0 and y=3); the second context rotates the memory-to-PE network.
//   * the SIMD core filters and then computes the SAD of a 16x64 segment
//     (49 windows, window-parallel; the last round is partly masked).
// All cores are started together through the control unit. Core 3 is stopped
// and its contexts are written again over AXI while the other cores are still
// computing (transfer overlapped with computation), then it is started
// again. Every window result is read back over AXI and compared
// with a sum computed here. Clock counts are compared with
// n_windows*64 + 11 per MIMD context and ceil(49/4)*passes*257 + 4 for SIMD.
// Each mechanism (AXI write/read, pack-4 transfer, start of several cores at
// once, stop, context switch, network rotation, SIMD mode switch, masked
// round, sticky done, transfer during computation) is counted, and one
// that never happened is a failure.
module tb_hmp_top;
  import hmp_pkg::*;

  localparam int NCORE = 5;
  localparam int WIN = 16;
  localparam int RES = 256;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] awaddr = '0, wdata = '0, araddr = '0, rdata;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [NCORE-1:0] core_busy, core_done;
  int          checks = 0, failures = 0;

  // mechanism counters
  int n_axi_wr = 0, n_axi_rd = 0, n_pack4 = 0, n_multistart = 0, n_stop = 0;
  int n_ctx_switch = 0, n_rotation = 0, n_simd_modes = 0, n_masked = 0, n_sticky = 0;
  int n_overlap = 0;

  int img  [16][256];
  int img2 [20][64];
  int cf   [WIN][WIN];

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // context switches and network rotations seen inside the MIMD cores
  logic [1:0] ctx_q [4];
  always @(posedge clk) begin
    if (dut.g_mimd[0].u_core.ctx != ctx_q[0]) n_ctx_switch++;
    if (dut.g_mimd[1].u_core.ctx != ctx_q[1]) n_ctx_switch++;
    if (dut.g_mimd[2].u_core.ctx != ctx_q[2]) n_ctx_switch++;
    if (dut.g_mimd[3].u_core.ctx != ctx_q[3]) n_ctx_switch++;
    ctx_q[0] <= dut.g_mimd[0].u_core.ctx;
    ctx_q[1] <= dut.g_mimd[1].u_core.ctx;
    ctx_q[2] <= dut.g_mimd[2].u_core.ctx;
    ctx_q[3] <= dut.g_mimd[3].u_core.ctx;
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
    n_axi_wr++;
    if (ad[18:17] == RGN_PACK4) n_pack4++;
  endtask

  task automatic axi_read(logic [31:0] ad, output logic [31:0] d);
    @(negedge clk);
    araddr = ad; arvalid = 1'b1; rready = 1'b1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 1'b0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata;
    @(posedge clk); #1 rready = 1'b0;
    n_axi_rd++;
  endtask

  function automatic logic [31:0] pcfg(pe_op_e op, int sa, int sb);
    pe_cfg_t c;
    c.op = op; c.sel_a = SELW'(sa); c.sel_b = SELW'(sb); c.swb = SWB_RESULT;
    return 32'(c);
  endfunction

  // pixel-parallel filter/SAD context on MIMD core `core` (slave core+1)
  task automatic mimd_context(int core, int ctx, bit sad, int y, int w, bit last);
    int l, slv;
    slv = core + 1;
    for (int p = 0; p < 16; p++) axi_write(ba(slv, RGN_CFG, 0, ctx*256 + p), pcfg(OP_NOP, 0, 0));
    for (int k = 0; k < 4; k++)
      axi_write(ba(slv, RGN_CFG, 0, ctx*256 + k), pcfg(sad ? OP_AD : OP_MUL, (y + k) % 4, 4 + k));
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 5),  pcfg(OP_ADD, 0, 1));
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 6),  pcfg(OP_ADD, 2, 3));
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 10), pcfg(OP_ADD, 1, 2));
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 14), pcfg(OP_ACC, 2, 0));
    for (int m = 0; m < 8; m++) begin
      l = (m - y % 4 + 4) % 4;
      axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 32 + 4*m),
                32'h8000_0000 | ((m < 4) ? 32'(((y + l) / 4) * w) : 0));
      axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 33 + 4*m), (m < 4) ? 1 : 0);
      axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 34 + 4*m), {16'd0, 8'd4, 8'd16});
      axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 35 + 4*m), (m < 4) ? w : 16);
    end
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 96), w - WIN + 1);
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 97), 32'h8000_0000 | (4 << 8) | 2);
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 98), RES + 256 * ctx);
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 99), 32'(last));
    axi_write(ba(slv, RGN_CFG, 0, ctx*256 + 100), 64);
    if (y % 4 != 0) n_rotation++;
  endtask

  task automatic mimd_coefs(int core);
    for (int l = 0; l < 4; l++)
      for (int g = 0; g < 4; g++)
        for (int i = 0; i < WIN; i++)
          axi_write(ba(core + 1, RGN_MEM, 4 + l, g*16 + i), 32'(cf[4*g + l][i]));
  endtask

  function automatic int wsum(bit sad, int p, int c);
    return sad ? ((p > c) ? p - c : c - p) : p * c;
  endfunction

  task automatic wait_done(logic [NCORE-1:0] mask);
    logic [31:0] d;
    do begin
      repeat (200) @(posedge clk);
      axi_read(ba(0, RGN_MEM, 0, 3), d);
    end while ((d[NCORE-1:0] & mask) != mask);
    n_sticky++;
  endtask

  task automatic simd_run(bit sad);
    logic [31:0] d;
    int s;
    axi_write(ba(5, RGN_CFG, 0, 0), 32'(sad));
    axi_write(ba(0, RGN_MEM, 0, 0), 32'h10);     // start SIMD core
    wait_done(5'h10);
    axi_read(ba(5, RGN_STAT, 0, 1), d);
    check(sad ? "SIMD SAD clocks" : "SIMD filter clocks", d, 32'(13 * (sad ? 2 : 1) * 257 + 4));
    for (int w = 0; w < 49; w++) begin
      s = 0;
      for (int j = 0; j < WIN; j++)
        for (int i = 0; i < WIN; i++) s += wsum(sad, img[j][w + i], cf[j][i]);
      axi_read(ba(5, RGN_MEM, 2*(w % 4) + 1, 512 + w / 4), d);
      check($sformatf("SIMD %s window %0d", sad ? "SAD" : "filter", w), d, 32'(s & 16'hffff));
    end
    for (int k = 1; k < 4; k++) begin
      axi_read(ba(5, RGN_MEM, 2*k + 1, 512 + 12), d);
      check("SIMD masked PE wrote nothing", d, 32'hbeef);
      n_masked++;
    end
    n_simd_modes++;
  endtask

  initial begin
    logic [31:0] d;
    int s;
    for (int j = 0; j < 16; j++)
      for (int i = 0; i < 256; i++) img[j][i] = $urandom_range(255);
    for (int j = 0; j < 20; j++)
      for (int i = 0; i < 64; i++) img2[j][i] = $urandom_range(255);
    for (int j = 0; j < WIN; j++)
      for (int i = 0; i < WIN; i++) cf[j][i] = $urandom_range(255);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- MIMD cores 0 and 1: 16x256 image, rows spread over memories 0..3
    for (int core = 0; core < 2; core++) begin
      for (int q = 0; q < 4; q++)
        for (int c = 0; c < 256; c++)
          axi_write(ba(core + 1, RGN_PACK4, 0, q*256 + c),
                    {8'(img[4*q+3][c]), 8'(img[4*q+2][c]), 8'(img[4*q+1][c]), 8'(img[4*q][c])});
      mimd_coefs(core);
      mimd_context(core, 0, core == 1, 0, 256, 1'b1);
    end
    // ---- MIMD cores 2 and 3: 20x64 image, two scan areas
    for (int core = 2; core < 4; core++) begin
      for (int q = 0; q < 5; q++)
        for (int c = 0; c < 64; c++)
          axi_write(ba(core + 1, RGN_PACK4, 0, q*64 + c),
                    {8'(img2[4*q+3][c]), 8'(img2[4*q+2][c]), 8'(img2[4*q+1][c]), 8'(img2[4*q][c])});
      mimd_coefs(core);
      mimd_context(core, 0, 1'b0, 0, 64, 1'b0);
      mimd_context(core, 1, 1'b0, 3, 64, 1'b1);
    end
    // ---- SIMD core: 16x64 segment of the image in every image memory
    for (int k = 0; k < 4; k++) begin
      for (int j = 0; j < 16; j++)
        for (int i = 0; i < 64; i++) axi_write(ba(5, RGN_MEM, 2*k, j*64 + i), 32'(img[j][i]));
      for (int i = 0; i < 256; i++) axi_write(ba(5, RGN_MEM, 2*k + 1, i), 32'(cf[i/16][i%16]));
      axi_write(ba(5, RGN_MEM, 2*k + 1, 512 + 12), 32'hbeef);
    end
    axi_write(ba(5, RGN_CFG, 0, 3), 64);      // image row stride
    axi_write(ba(5, RGN_CFG, 0, 8), 49);      // windows
    axi_write(ba(5, RGN_CFG, 0, 9), 512);     // results
    axi_write(ba(5, RGN_CFG, 0, 10), 256);    // AD scratch

    // ---- start all MIMD cores and the SIMD core (filter) together
    axi_write(ba(5, RGN_CFG, 0, 0), 0);
    axi_write(ba(0, RGN_MEM, 0, 0), 32'h1f);
    axi_read(ba(0, RGN_MEM, 0, 2), d);
    check("all cores busy", d, 32'h1f);
    if (d == 32'h1f) n_multistart++;
    axi_write(ba(0, RGN_MEM, 0, 1), 32'h08);  // stop core 3
    axi_read(ba(0, RGN_MEM, 0, 2), d);
    check("core 3 stopped", 32'(d[3]), 0);
    if (!d[3]) n_stop++;
    // reload core 3's contexts while the other cores compute: data transfer
    // to one core overlapped with computation on the others
    mimd_context(3, 0, 1'b0, 0, 64, 1'b0);
    mimd_context(3, 1, 1'b0, 3, 64, 1'b1);
    axi_read(ba(0, RGN_MEM, 0, 2), d);
    check("cores 0-2 still busy after the transfer to core 3", 32'(d[2:0]), 7);
    if (d[2:0] == 3'b111 && !d[3]) n_overlap++;
    wait_done(5'h17);
    axi_write(ba(0, RGN_MEM, 0, 0), 32'h08);  // start core 3 again
    wait_done(5'h08);

    // ---- MIMD results
    for (int core = 0; core < 2; core++) begin
      axi_read(ba(core + 1, RGN_STAT, 0, 1), d);
      check("MIMD 241-window clocks", d, 32'(241 * 64 + 11));
      for (int w = 0; w < 241; w++) begin
        s = 0;
        for (int j = 0; j < WIN; j++)
          for (int i = 0; i < WIN; i++) s += wsum(core == 1, img[j][w + i], cf[j][i]);
        axi_read(ba(core + 1, RGN_MEM, 4, RES + w), d);
        check($sformatf("MIMD core %0d window %0d", core, w), d, 32'(s & 16'hffff));
      end
    end
    for (int core = 2; core < 4; core++) begin
      axi_read(ba(core + 1, RGN_STAT, 0, 1), d);
      check("MIMD two-context clocks", d, 32'(2 * (49 * 64 + 11)));
      for (int x = 0; x < 2; x++)
        for (int w = 0; w < 49; w++) begin
          s = 0;
          for (int j = 0; j < WIN; j++)
            for (int i = 0; i < WIN; i++) s += wsum(1'b0, img2[3*x + j][w + i], cf[j][i]);
          axi_read(ba(core + 1, RGN_MEM, 4, RES + 256*x + w), d);
          check($sformatf("MIMD core %0d ctx %0d window %0d", core, x, w), d, 32'(s & 16'hffff));
        end
    end

    // ---- SIMD results: filter (already run), then SAD
    axi_read(ba(5, RGN_STAT, 0, 1), d);
    check("SIMD filter clocks", d, 32'(13 * 257 + 4));
    for (int w = 0; w < 49; w++) begin
      s = 0;
      for (int j = 0; j < WIN; j++)
        for (int i = 0; i < WIN; i++) s += wsum(1'b0, img[j][w + i], cf[j][i]);
      axi_read(ba(5, RGN_MEM, 2*(w % 4) + 1, 512 + w / 4), d);
      check($sformatf("SIMD filter window %0d", w), d, 32'(s & 16'hffff));
    end
    simd_run(1'b1);

    // ---- every mechanism happened
    check("AXI writes", 32'(n_axi_wr > 0), 1);
    check("AXI reads", 32'(n_axi_rd > 0), 1);
    check("pack-4 transfers", 32'(n_pack4 > 0), 1);
    check("several cores started together", 32'(n_multistart > 0), 1);
    check("core stopped", 32'(n_stop > 0), 1);
    check("context switches", 32'(n_ctx_switch > 0), 1);
    check("network rotations", 32'(n_rotation > 0), 1);
    check("SIMD AD/ACC mode switch", 32'(n_simd_modes > 0), 1);
    check("masked SIMD round", 32'(n_masked > 0), 1);
    check("sticky done seen", 32'(n_sticky > 0), 1);
    check("transfer overlapped with computation", 32'(n_overlap > 0), 1);
    $display("mechanisms: axi_wr=%0d axi_rd=%0d pack4=%0d multistart=%0d stop=%0d ctx_switch=%0d rotation=%0d simd_modes=%0d masked=%0d sticky=%0d overlap=%0d",
             n_axi_wr, n_axi_rd, n_pack4, n_multistart, n_stop, n_ctx_switch, n_rotation,
             n_simd_modes, n_masked, n_sticky, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
