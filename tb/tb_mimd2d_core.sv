// tb_mimd2d_core: self-checking testbench of the MIMD-2D accelerator core.
// Maps pixel-parallel filtering and SAD onto the 4x4 array:
//   column 0 : four MUL (filter) or AD (SAD) PEs, one per lane
//   column 1 : two ADD PEs (lanes 0+1, lanes 2+3)
//   column 2 : one ADD PE
//   column 3 : one ACC PE, whose window sums are written to memory 4
// Image rows are spread over memories 0..3 (row r in memory r mod 4), and
// loaded with 32-bit pack-4 writes (four pixels per transfer). The
// coefficients/template of lane L sit in memory 4+L. Four contexts run in
// one start: filter on scan areas y=0 and y=3, SAD on y=1 and y=4. Each
// scan area rotates the memory-to-PE connection by y mod 4. Every window
// result is compared with a sum computed in the testbench. The clock count
// is checked against sum over contexts of (n_windows*64 + 2*COLS + 3).
// A second run maps the filter window-parallel: each of the four rows runs
// a MAC over a whole window from its own image memory (the image is copied
// into memories 0..3 with pack-4 writes that repeat one pixel in all four
// bytes) and its own coefficient memory 4+L; columns 1..3 pass the sums on
// (ADD with an idle operand). Four write-back ports store the sums tagged
// last, lane L into memory 4+L. Eight windows take 2 x 256 + 11 clocks.
module tb_mimd2d_core;
  import hmp_pkg::*;

  localparam int ROWS = 4, COLS = 4;
  localparam int WIN  = 16;
  localparam int H = 20, W = 24;
  localparam int NWIN = W - WIN + 1;   // 9 windows per scan area
  localparam int RES  = 256;

  logic      clk = 1'b0, rst_n = 1'b0;
  host_req_t hreq;
  host_rsp_t hrsp;
  logic      start = 1'b0, stop = 1'b0, busy, done;
  int        checks = 0, failures = 0;
  int        img [H][W];
  int        cf  [WIN][WIN];        // cf[j][i] = R(i, j)

  mimd2d_core dut (.clk, .rst_n, .hreq, .hrsp, .start, .stop, .busy, .done);

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

  function automatic logic [31:0] pcfg(pe_op_e op, int sa, int sb);
    pe_cfg_t c;
    c.op = op; c.sel_a = SELW'(sa); c.sel_b = SELW'(sb); c.swb = SWB_RESULT;
    return 32'(c);
  endfunction

  task automatic cfg_wr(int ctx, int item, logic [31:0] d);
    wr(a(RGN_CFG, 0, ctx * 256 + item), d);
  endtask

  // one context: filter (sad=0) or SAD (sad=1) on the scan area at row y
  task automatic set_context(int ctx, bit sad, int y, bit last);
    int l;
    for (int p = 0; p < ROWS * COLS; p++) cfg_wr(ctx, p, pcfg(OP_NOP, 0, 0));
    for (int l = 0; l < ROWS; l++)
      cfg_wr(ctx, 0 * ROWS + l, pcfg(sad ? OP_AD : OP_MUL, (y + l) % 4, 4 + l));
    cfg_wr(ctx, 1 * ROWS + 1, pcfg(OP_ADD, 0, 1));
    cfg_wr(ctx, 1 * ROWS + 2, pcfg(OP_ADD, 2, 3));
    cfg_wr(ctx, 2 * ROWS + 2, pcfg(OP_ADD, 1, 2));
    cfg_wr(ctx, 3 * ROWS + 2, pcfg(OP_ACC, 2, 0));
    for (int m = 0; m < 4; m++) begin
      l = (m - y % 4 + 4) % 4;            // lane served by image memory m
      cfg_wr(ctx, 32 + 4*m + 0, 32'h8000_0000 | 32'(((y + l) / 4) * W));
      cfg_wr(ctx, 32 + 4*m + 1, 1);
      cfg_wr(ctx, 32 + 4*m + 2, {16'd0, 8'd4, 8'd16});
      cfg_wr(ctx, 32 + 4*m + 3, W);
    end
    for (int m = 4; m < 8; m++) begin
      cfg_wr(ctx, 32 + 4*m + 0, 32'h8000_0000);
      cfg_wr(ctx, 32 + 4*m + 1, 0);
      cfg_wr(ctx, 32 + 4*m + 2, {16'd0, 8'd4, 8'd16});
      cfg_wr(ctx, 32 + 4*m + 3, 16);
    end
    cfg_wr(ctx, 96, NWIN);
    cfg_wr(ctx, 97, 32'h8000_0000 | (4 << 8) | 2);
    cfg_wr(ctx, 98, RES + 16 * ctx);
    cfg_wr(ctx, 99, 32'(last));
    cfg_wr(ctx, 100, 64);
  endtask

  initial begin
    logic [31:0] d;
    int          s, cyc, p;
    static bit   sad_of [4] = '{0, 0, 1, 1};
    static int   y_of   [4] = '{0, 3, 1, 4};
    hreq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r][c] = $urandom_range(255);
    for (int j = 0; j < WIN; j++)
      for (int i = 0; i < WIN; i++) cf[j][i] = $urandom_range(255);

    // image: rows 4q..4q+3 of column c go out in one 32-bit pack-4 write
    for (int q = 0; q < H / 4; q++)
      for (int c = 0; c < W; c++)
        wr(a(RGN_PACK4, 0, q * W + c),
           {8'(img[4*q+3][c]), 8'(img[4*q+2][c]), 8'(img[4*q+1][c]), 8'(img[4*q][c])});
    // coefficients: lane l holds rows j = 4g + l
    for (int l = 0; l < 4; l++)
      for (int g = 0; g < 4; g++)
        for (int i = 0; i < WIN; i++) wr(a(RGN_MEM, 4 + l, g * 16 + i), 32'(cf[4*g+l][i]));
    rd(a(RGN_MEM, 2, 1 * W + 5), d);
    check("pack-4 lane 2", d, 32'(img[6][5]));

    for (int x = 0; x < 4; x++) set_context(x, sad_of[x], y_of[x], x == 3);

    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    check("busy", 32'(busy), 1);
    cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    rd(a(RGN_STAT, 0, 1), d);
    check("clocks of four contexts", d, 32'(4 * (NWIN * 64 + 2 * COLS + 3)));

    for (int x = 0; x < 4; x++)
      for (int w = 0; w < NWIN; w++) begin
        s = 0;
        for (int j = 0; j < WIN; j++)
          for (int i = 0; i < WIN; i++) begin
            p = img[y_of[x] + j][w + i];
            if (sad_of[x]) s += (p > cf[j][i]) ? p - cf[j][i] : cf[j][i] - p;
            else           s += p * cf[j][i];
          end
        rd(a(RGN_MEM, 4, RES + 16 * x + w), d);
        check($sformatf("ctx %0d (%s, y=%0d) window %0d", x, sad_of[x] ? "SAD" : "filter",
                        y_of[x], w), d, 32'(s & 16'hffff));
      end

    // ---- window-parallel filter on the scan area at row 0
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < W; c++)
        wr(a(RGN_PACK4, 0, r * W + c), {4{8'(img[r][c])}});
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < WIN * WIN; k++) wr(a(RGN_MEM, 4 + l, k), 32'(cf[k / WIN][k % WIN]));
    for (int q = 0; q < ROWS * COLS; q++)
      cfg_wr(0, q, (q < ROWS) ? pcfg(OP_MAC, q, 4 + q) : pcfg(OP_ADD, q % ROWS, 15));
    for (int m = 0; m < 8; m++) begin
      cfg_wr(0, 32 + 4*m + 0, 32'h8000_0000 | ((m < 4) ? 32'(m) : 32'd0));
      cfg_wr(0, 32 + 4*m + 1, (m < 4) ? 4 : 0);
      cfg_wr(0, 32 + 4*m + 2, {16'd0, 8'd16, 8'd16});
      cfg_wr(0, 32 + 4*m + 3, (m < 4) ? W : WIN);
    end
    wr(a(RGN_MEM, 5, 514), 0);
    cfg_wr(0, 96, 2);
    cfg_wr(0, 97, 32'h8000_0000 | (4 << 16) | (4 << 8) | 0);
    cfg_wr(0, 98, 512);
    cfg_wr(0, 99, 1);
    cfg_wr(0, 100, 256);
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    while (!done) @(posedge clk);
    rd(a(RGN_STAT, 0, 1), d);
    check("window-parallel clocks", d, 32'(2 * 256 + 2 * COLS + 3));
    for (int w = 0; w < 8; w++) begin
      s = 0;
      for (int j = 0; j < WIN; j++)
        for (int i = 0; i < WIN; i++) s += img[j][w + i] * cf[j][i];
      rd(a(RGN_MEM, 4 + w % 4, 512 + w / 4), d);
      check($sformatf("window-parallel filter window %0d", w), d, 32'(s & 16'hffff));
    end
    // only one result per lane and group: the word after each is untouched
    rd(a(RGN_MEM, 5, 514), d);
    check("no extra write-back", d, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
