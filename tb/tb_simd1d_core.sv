// tb_simd1d_core: self-checking testbench of the SIMD-1D accelerator core.
// Loads an image of 16 rows x IMG_W columns into the image memory of every
// PE, a 16x16 coefficient/template window into every coefficient memory,
// and runs the core in filter mode and in SAD mode over all windows of the
// row (n_windows = IMG_W - 15, not a multiple of NPE, so the last round is
// partly masked). Each result is compared with a sum computed in the
// testbench. The clock count of each run is checked against
//   ceil(n_windows/NPE) * passes * (16*16 + 1) + 4.
// Also checks the pack-4 transfer (four pixels per 32-bit write) and that
// nothing is written past the last window.
module tb_simd1d_core;
  import hmp_pkg::*;

  localparam int NPE   = 4;
  localparam int WIN   = 16;
  localparam int IMG_W = 16 + 9;
  localparam int NWIN  = IMG_W - WIN + 1;     // 10 windows
  localparam int RES   = 512, SCR = 256;

  logic      clk = 1'b0, rst_n = 1'b0;
  host_req_t hreq;
  host_rsp_t hrsp;
  logic      start = 1'b0, stop = 1'b0, busy, done;
  int        checks = 0, failures = 0;
  int        img [WIN][IMG_W];
  int        cf  [WIN*WIN];

  simd1d_core dut (.clk, .rst_n, .hreq, .hrsp, .start, .stop, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [HAW-1:0] a(logic [1:0] rgn, int idx, int off);
    return HAW'({rgn, 5'(idx), 10'(off)});
  endfunction

  task automatic wr(logic [HAW-1:0] ad, logic [31:0] d);
    @(negedge clk);
    hreq = '{req: 1'b1, we: 1'b1, addr: ad, wdata: d};
    @(negedge clk);
    hreq = '0;
  endtask

  task automatic rd(logic [HAW-1:0] ad, output logic [31:0] d);
    @(negedge clk);
    hreq = '{req: 1'b1, we: 1'b0, addr: ad, wdata: '0};
    @(posedge clk); #1;
    hreq = '0;
    d = hrsp.rdata;
  endtask

  task automatic run(bit sad);
    logic [31:0] d;
    int          exp, cyc, rounds, s;
    wr(a(RGN_CFG, 0, 0), 32'(sad));
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    check("busy after start", 32'(busy), 1);
    cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    rounds = (NWIN + NPE - 1) / NPE;
    rd(a(RGN_STAT, 0, 1), d);
    check(sad ? "SAD clocks" : "filter clocks", d,
          32'(rounds * (sad ? 2 : 1) * (WIN*WIN + 1) + 4));
    for (int w = 0; w < NWIN; w++) begin
      s = 0;
      for (int j = 0; j < WIN; j++)
        for (int i = 0; i < WIN; i++)
          if (sad) s += (img[j][w+i] > cf[j*WIN+i]) ? img[j][w+i] - cf[j*WIN+i]
                                                     : cf[j*WIN+i] - img[j][w+i];
          else     s += img[j][w+i] * cf[j*WIN+i];
      exp = s & 32'hffff;
      rd(a(RGN_MEM, 2*(w % NPE) + 1, RES + w / NPE), d);
      check($sformatf("%s window %0d", sad ? "SAD" : "filter", w), d, 32'(exp));
    end
    // PEs 2 and 3 have no window in the last round
    for (int k = NWIN % NPE; k < NPE; k++) begin
      rd(a(RGN_MEM, 2*k + 1, RES + NWIN / NPE), d);
      check("no write past last window", d, 32'hdead);
    end
  endtask

  initial begin
    logic [31:0] d;
    hreq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < WIN; j++)
      for (int i = 0; i < IMG_W; i++) img[j][i] = $urandom_range(255);
    for (int i = 0; i < WIN*WIN; i++) cf[i] = $urandom_range(255);

    // pack-4 transfer: memories 4..7 get one byte each
    wr(a(RGN_PACK4, 1, 1000), 32'h04_03_02_01);
    for (int m = 4; m < 8; m++) begin
      rd(a(RGN_MEM, m, 1000), d);
      check("pack-4 byte lane", d, 32'(m - 3));
    end

    for (int k = 0; k < NPE; k++) begin
      for (int j = 0; j < WIN; j++)
        for (int i = 0; i < IMG_W; i++) wr(a(RGN_MEM, 2*k, j*IMG_W + i), 32'(img[j][i]));
      for (int i = 0; i < WIN*WIN; i++) wr(a(RGN_MEM, 2*k + 1, i), 32'(cf[i]));
      for (int r = 0; r < 4; r++) wr(a(RGN_MEM, 2*k + 1, RES + r), 32'hdead);
    end
    wr(a(RGN_CFG, 0, 1), WIN);
    wr(a(RGN_CFG, 0, 2), WIN);
    wr(a(RGN_CFG, 0, 3), IMG_W);
    wr(a(RGN_CFG, 0, 4), 0);
    wr(a(RGN_CFG, 0, 5), 1);
    wr(a(RGN_CFG, 0, 6), NPE);
    wr(a(RGN_CFG, 0, 7), 0);
    wr(a(RGN_CFG, 0, 8), NWIN);
    wr(a(RGN_CFG, 0, 9), RES);
    wr(a(RGN_CFG, 0, 10), SCR);
    rd(a(RGN_CFG, 0, 8), d);
    check("n_windows readback", d, NWIN);

    run(1'b0);   // filter (MAC pass)
    run(1'b1);   // SAD (AD pass + accumulation pass)

    // stop aborts a run
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (10) @(negedge clk);
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    check("stop returns to idle", 32'(busy), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
