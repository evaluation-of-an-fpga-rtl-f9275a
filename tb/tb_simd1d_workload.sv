// tb_simd1d_workload: the 16x256-image, 16x16-window filter and SAD workload
// on two SIMD-1D cores side by side: the default core (4 PEs, 8 memories)
// and one built with 9 PEs (18 memories), the two SIMD sizes the platform is
// evaluated with. Both keep 1024-word memories. A whole 16x256 image does not
// fit one image memory, so the testbench, acting as the host, loads it in
// five overlapping segments of at most 64 columns (49+49+49+49+45 = 241
// windows). Both cores share the host bus; writes reach both (the 4-PE core
// ignores memory indexes it does not have), reads select one. For each
// segment both run the filter, then the SAD, and every window result of each
// core is checked against a sum computed here. The clocks each core reports,
// summed over the segments, are checked too:
//   4 PEs: 64 rounds (13+13+13+13+12) x 257 + 5 x 4 filter, x 514 for SAD
//   9 PEs: 29 rounds (6+6+6+6+5)      x 257 + 5 x 4 filter, x 514 for SAD
module tb_simd1d_workload;
  import hmp_pkg::*;

  localparam int NPE = 9, WIN = 16, IW = 256, IH = 16;  // NPE of the larger core
  localparam int RES = 512, SCR = 256;

  logic      clk = 1'b0, rst_n = 1'b0;
  host_req_t hreq;
  host_rsp_t hrsp4, hrsp9;
  logic      start = 1'b0, stop = 1'b0, busy4, done4, busy9, done9;
  logic      sel9 = 1'b0;                  // which core a read addresses
  int        checks = 0, failures = 0;
  int        img [IH][IW];
  int        cf  [WIN*WIN];

  simd1d_core #(.NPE(4))   u_simd4 (.clk, .rst_n, .hreq, .hrsp(hrsp4), .start, .stop,
                                    .busy(busy4), .done(done4));
  simd1d_core #(.NPE(NPE)) u_simd9 (.clk, .rst_n, .hreq, .hrsp(hrsp9), .start, .stop,
                                    .busy(busy9), .done(done9));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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
    d = sel9 ? hrsp9.rdata : hrsp4.rdata;
  endtask

  initial begin
    logic [31:0] d;
    int s, s0, sw, nw, p, np;
    int clk_filter [2], clk_sad [2];
    int nwin_total;
    hreq = '0;
    nwin_total = 0;
    clk_filter = '{0, 0};
    clk_sad    = '{0, 0};
    for (int j = 0; j < IH; j++)
      for (int i = 0; i < IW; i++) img[j][i] = $urandom_range(255);
    for (int i = 0; i < WIN*WIN; i++) cf[i] = $urandom_range(255);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < NPE; k++)
      for (int i = 0; i < WIN*WIN; i++) wr(a(RGN_MEM, 2*k + 1, i), 32'(cf[i]));
    wr(a(RGN_CFG, 0, 9), RES);
    wr(a(RGN_CFG, 0, 10), SCR);

    for (int seg = 0; seg < 5; seg++) begin
      s0 = seg * 49;
      sw = (IW - s0 < 64) ? IW - s0 : 64;
      nw = sw - WIN + 1;
      nwin_total += nw;
      for (int k = 0; k < NPE; k++)
        for (int j = 0; j < IH; j++)
          for (int i = 0; i < sw; i++) wr(a(RGN_MEM, 2*k, j*sw + i), 32'(img[j][s0 + i]));
      wr(a(RGN_CFG, 0, 3), sw);
      wr(a(RGN_CFG, 0, 8), nw);
      for (int sad = 0; sad < 2; sad++) begin
        wr(a(RGN_CFG, 0, 0), sad);
        @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
        @(negedge clk);
        while (busy4 || busy9) @(posedge clk);
        for (int c = 0; c < 2; c++) begin
          sel9 = (c == 1);
          np   = sel9 ? NPE : 4;
          rd(a(RGN_STAT, 0, 1), d);
          if (sad != 0) clk_sad[c] += int'(d); else clk_filter[c] += int'(d);
          for (int w = 0; w < nw; w++) begin
            s = 0;
            for (int j = 0; j < WIN; j++)
              for (int i = 0; i < WIN; i++) begin
                p = img[j][s0 + w + i];
                s += (sad != 0) ? ((p > cf[j*WIN+i]) ? p - cf[j*WIN+i] : cf[j*WIN+i] - p)
                         : p * cf[j*WIN+i];
              end
            rd(a(RGN_MEM, 2*(w % np) + 1, RES + w / np), d);
            check($sformatf("%0d PEs segment %0d %s window %0d", np, seg,
                            (sad != 0) ? "SAD" : "filter", s0 + w), d, 32'(s & 16'hffff));
          end
        end
      end
    end
    check("all 241 windows", nwin_total, 241);
    check("4 PEs: filter clocks over 5 segments", clk_filter[0], 64 * 257 + 5 * 4);
    check("4 PEs: SAD clocks over 5 segments", clk_sad[0], 64 * 514 + 5 * 4);
    check("9 PEs: filter clocks over 5 segments", clk_filter[1], 29 * 257 + 5 * 4);
    check("9 PEs: SAD clocks over 5 segments", clk_sad[1], 29 * 514 + 5 * 4);
    $display("4 PEs: filter %0d clocks, SAD %0d; 9 PEs: filter %0d, SAD %0d",
             clk_filter[0], clk_sad[0], clk_filter[1], clk_sad[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
