// mimd2d_core: MIMD two-dimensional accelerator core (FE-GA-like template).
//
// A ROWS x COLS array of processing elements with NMEM local memories, each
// with its own AGU. Data streams from left to right:
//   * only the leftmost column reads the memories: each input multiplexer of
//     a column-0 PE picks one of the NMEM memory read ports. Changing these
//     selects per context rotates the memory-to-PE connection. The document
//     does this when the scan area changes.
//   * between neighbouring columns an interconnection network lets each PE
//     input pick output A or B of any PE of the previous column
//     (candidate j < ROWS: out_a of row j, j >= ROWS: out_b of row j-ROWS);
//   * only the rightmost column writes the memories: up to ROWS write-back
//     ports, port p writing output A of last-column row wb_row+p to memory
//     wb_mem+p. One port serves pixel-parallel mappings (one result per
//     window). One port per lane serves window-parallel mappings, where each
//     row computes its own window.
// Every PE may run a different operation (MIMD). PEs, AGUs and networks are
// all set by a context. The configuration memory holds NCTX contexts. After
// start they run one after another, up to the context marked last. A
// context processes n_windows windows back to back. For window w every
// enabled AGU walks its window from base + w*win_step, one address per
// clock. A new window starts every `period` clocks, so the array stays
// pipelined across windows. After the last window the core waits for the
// pipeline to drain, then loads the next context.
//
// Timing: a context takes n_windows*period + 2*COLS + 3 clocks. Pixel-parallel
// filtering or SAD of a 16x16 window over 4 lanes needs period = 64.
// Window-parallel filtering (a MAC per lane, 4 windows at once) needs
// period = 256 per group of 4 windows.
//
// Host interface (word addresses, core-local, see hmp_pkg):
//   RGN_MEM / RGN_PACK4 : as in simd1d_core (memory words, packed pixels)
//   RGN_CFG offset {ctx[1:0], item[7:0]}:
//     item p (0..31)            PE p = col*ROWS + row: pe_cfg_t in bits [12:0]
//     item 32+4m+0              AGU m: bit 31 enable, [11:0] base
//     item 32+4m+1              AGU m: [11:0] win_step (base increment/window)
//     item 32+4m+2              AGU m: [7:0] len_x, [15:8] len_y
//     item 32+4m+3              AGU m: [11:0] stride_y
//     item 96  n_windows        item 97  write-back: [3:0] first row,
//     item 98  write-back base           [11:8] first memory, [19:16] ports
//                                        (0 = 1), bit 31 write only words
//                                        tagged last
//     item 99  bit 0: last context       item 100 period (clocks per window)
//   RGN_STAT offset 0: bit0 busy;  offset 1: clocks of last run.
// Host writes to memories and contexts take effect only while the core is
// idle. Reads return one clock after the request.
//
// The array shape, the number of memories, the left-in/right-out restriction,
// the reconfigurable networks and the multi-context execution come from the
// document. The full crossbar between columns, the context layout and the
// tag-driven accumulation and write-back are choices of this design.
module mimd2d_core
  import hmp_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned NMEM  = 8,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NCTX  = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  host_req_t hreq,
  output host_rsp_t hrsp,
  input  logic      start,
  input  logic      stop,
  output logic      busy,
  output logic      done
);

  localparam int unsigned NPE  = ROWS * COLS;
  localparam int unsigned NIN  = (NMEM > 2 * ROWS) ? NMEM : 2 * ROWS;
  localparam int unsigned MAW  = $clog2(DEPTH);
  localparam int unsigned CW   = (NCTX > 1) ? $clog2(NCTX) : 1;

  // ---------------------------------------------- configuration memory
  pe_cfg_t       c_pe      [NCTX][NPE];
  logic          c_agu_en  [NCTX][NMEM];
  agu_cfg_t      c_agu     [NCTX][NMEM];
  logic [AW-1:0] c_step    [NCTX][NMEM];
  logic [15:0]   c_nwin    [NCTX];
  logic [3:0]    c_wb_row  [NCTX];
  logic [3:0]    c_wb_mem  [NCTX];
  logic [3:0]    c_wb_n    [NCTX];
  logic          c_wb_last [NCTX];
  logic [AW-1:0] c_wb_base [NCTX];
  logic          c_last    [NCTX];
  logic [15:0]   c_period  [NCTX];

  logic [1:0] h_rgn;
  logic [4:0] h_idx;
  logic [9:0] h_off;
  logic [7:0] h_item;
  logic [1:0] h_ctx;
  assign h_rgn  = hreq.addr[16:15];
  assign h_idx  = hreq.addr[14:10];
  assign h_off  = hreq.addr[9:0];
  assign h_ctx  = h_off[9:8];
  assign h_item = h_off[7:0];

  logic h_wr_cfg;
  assign h_wr_cfg = hreq.req && hreq.we && !busy && h_rgn == RGN_CFG
                    && 32'(h_ctx) < NCTX;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < NCTX; x++) begin
        for (int p = 0; p < NPE; p++) c_pe[x][p] <= '0;
        for (int m = 0; m < NMEM; m++) begin
          c_agu_en[x][m] <= 1'b0;
          c_agu[x][m]    <= '0;
          c_step[x][m]   <= '0;
        end
        c_nwin[x]    <= '0;
        c_wb_row[x]  <= '0;
        c_wb_mem[x]  <= '0;
        c_wb_n[x]    <= '0;
        c_wb_last[x] <= 1'b0;
        c_wb_base[x] <= '0;
        c_last[x]    <= 1'b1;
        c_period[x]  <= 16'd1;
      end
    end else if (h_wr_cfg) begin
      if (32'(h_item) < NPE) begin
        for (int p = 0; p < NPE; p++)
          if (32'(h_item) == p) c_pe[h_ctx][p] <= pe_cfg_t'(hreq.wdata[$bits(pe_cfg_t)-1:0]);
      end else if (h_item >= 8'd32 && h_item < 8'd96) begin
        for (int m = 0; m < NMEM; m++) begin
          if (32'(h_item) == 32 + 4 * m) begin
            c_agu_en[h_ctx][m]   <= hreq.wdata[31];
            c_agu[h_ctx][m].base <= hreq.wdata[AW-1:0];
          end
          if (32'(h_item) == 33 + 4 * m) c_step[h_ctx][m] <= hreq.wdata[AW-1:0];
          if (32'(h_item) == 34 + 4 * m) begin
            c_agu[h_ctx][m].len_x <= hreq.wdata[7:0];
            c_agu[h_ctx][m].len_y <= hreq.wdata[15:8];
          end
          if (32'(h_item) == 35 + 4 * m) c_agu[h_ctx][m].stride_y <= hreq.wdata[AW-1:0];
        end
      end else begin
        unique case (h_item)
          8'd96: c_nwin[h_ctx] <= hreq.wdata[15:0];
          8'd97: begin
            c_wb_row[h_ctx]  <= hreq.wdata[3:0];
            c_wb_mem[h_ctx]  <= hreq.wdata[11:8];
            c_wb_n[h_ctx]    <= hreq.wdata[19:16];
            c_wb_last[h_ctx] <= hreq.wdata[31];
          end
          8'd98:  c_wb_base[h_ctx] <= hreq.wdata[AW-1:0];
          8'd99:  c_last[h_ctx]    <= hreq.wdata[0];
          8'd100: c_period[h_ctx]  <= hreq.wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------ sequencer
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e        state;
  logic [CW-1:0] ctx;
  logic [15:0]   win, cnt;
  logic [7:0]    drain;
  logic [31:0]   cycles;
  logic          agu_go;

  localparam logic [7:0] DRAIN_CLKS = 8'(2 * COLS + 3);

  assign busy   = (state != S_IDLE);
  assign agu_go = (state == S_RUN) && (cnt == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ctx    <= '0;
      win    <= '0;
      cnt    <= '0;
      drain  <= '0;
      done   <= 1'b0;
      cycles <= '0;
    end else begin
      done <= 1'b0;
      if (stop) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            state  <= (c_nwin[0] != 0) ? S_RUN : S_DRAIN;
            ctx    <= '0;
            win    <= '0;
            cnt    <= '0;
            drain  <= '0;
            cycles <= '0;
          end
          S_RUN: begin
            cycles <= cycles + 32'd1;
            if (cnt + 16'd1 >= c_period[ctx]) begin
              cnt <= '0;
              if (win + 16'd1 >= c_nwin[ctx]) begin
                state <= S_DRAIN;
                drain <= '0;
              end else begin
                win <= win + 16'd1;
              end
            end else begin
              cnt <= cnt + 16'd1;
            end
          end
          S_DRAIN: begin
            cycles <= cycles + 32'd1;
            drain  <= drain + 8'd1;
            if (drain + 8'd1 >= DRAIN_CLKS) begin
              if (c_last[ctx] || 32'(ctx) + 1 >= NCTX) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                ctx   <= ctx + CW'(1);
                win   <= '0;
                cnt   <= '0;
                state <= (c_nwin[32'(ctx) + 1] != 0) ? S_RUN : S_DRAIN;
                drain <= '0;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // ------------------------------------------- memories and their AGUs
  word_t         mem_w  [NMEM];
  data_t         a_rdata [NMEM], b_rdata [NMEM];
  logic [AW-1:0] agu_addr [NMEM];
  logic          agu_v [NMEM], agu_f [NMEM], agu_l [NMEM];
  logic          a_en [NMEM], a_we [NMEM];
  logic [MAW-1:0] a_addr [NMEM];
  data_t         a_wdata [NMEM];

  // write-back from the rightmost column: port p takes output A of row
  // wb_row+p and writes memory wb_mem+p at wb_base + (its own count)
  word_t         pe_out_a [COLS][ROWS];
  word_t         pe_out_b [COLS][ROWS];
  word_t         wb_w   [ROWS];
  logic          wb_en  [ROWS];
  logic [AW-1:0] wb_cnt [ROWS];
  logic [3:0]    wb_np;

  assign wb_np = (c_wb_n[ctx] == 4'd0) ? 4'd1 : c_wb_n[ctx];

  always_comb begin
    for (int p = 0; p < ROWS; p++) begin
      wb_w[p] = WORD_IDLE;
      for (int r = 0; r < ROWS; r++)
        if (p < 32'(wb_np) && 32'(c_wb_row[ctx]) + p == r) wb_w[p] = pe_out_a[COLS-1][r];
      wb_en[p] = busy && wb_w[p].valid && (wb_w[p].last || !c_wb_last[ctx]);
    end
  end

  for (genvar p = 0; p < ROWS; p++) begin : g_wb
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) wb_cnt[p] <= '0;
      else if ((state == S_IDLE && start) || (state == S_DRAIN && drain + 8'd1 >= DRAIN_CLKS))
        wb_cnt[p] <= '0;
      else if (wb_en[p]) wb_cnt[p] <= wb_cnt[p] + AW'(1);
    end
  end

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    agu_cfg_t acfg;
    logic     tv, tf, tl;

    always_comb begin
      acfg      = c_agu[ctx][m];
      acfg.base = c_agu[ctx][m].base + AW'(win) * c_step[ctx][m];
    end

    agu u_agu (
      .clk, .rst_n, .start(agu_go && c_agu_en[ctx][m]), .cfg(acfg),
      .addr(agu_addr[m]), .valid(agu_v[m]), .first(agu_f[m]), .last(agu_l[m]),
      .busy());

    always_comb begin
      if (busy) begin
        a_en[m]    = 1'b0;
        a_addr[m]  = '0;
        a_wdata[m] = '0;
        for (int p = 0; p < ROWS; p++)
          if (wb_en[p] && 32'(c_wb_mem[ctx]) + p == m) begin
            a_en[m]    = 1'b1;
            a_addr[m]  = MAW'(c_wb_base[ctx] + wb_cnt[p]);
            a_wdata[m] = wb_w[p].data;
          end
        a_we[m]    = a_en[m];
      end else begin
        a_en[m]    = hreq.req && (h_rgn == RGN_MEM && 32'(h_idx) == m
                     || h_rgn == RGN_PACK4 && 32'(h_idx) == m / 4);
        a_we[m]    = hreq.we;
        a_addr[m]  = MAW'(h_off);
        a_wdata[m] = (h_rgn == RGN_PACK4) ? data_t'(hreq.wdata[8*(m%4) +: 8])
                                          : data_t'(hreq.wdata[15:0]);
      end
    end

    local_mem #(.DEPTH(DEPTH)) u_mem (
      .clk,
      .a_en(a_en[m]), .a_we(a_we[m]), .a_addr(a_addr[m]), .a_wdata(a_wdata[m]),
      .a_rdata(a_rdata[m]),
      .b_en(agu_v[m]), .b_addr(MAW'(agu_addr[m])), .b_rdata(b_rdata[m]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tv <= 1'b0;
        tf <= 1'b0;
        tl <= 1'b0;
      end else begin
        tv <= agu_v[m];
        tf <= agu_f[m];
        tl <= agu_l[m];
      end
    end
    assign mem_w[m] = '{valid: tv, first: tf, last: tl, data: b_rdata[m]};
  end

  // ------------------------------------------------------- PE array
  for (genvar c = 0; c < COLS; c++) begin : g_col
    word_t cand [NIN];
    always_comb begin
      for (int j = 0; j < NIN; j++) cand[j] = WORD_IDLE;
      if (c == 0) begin
        for (int j = 0; j < NMEM; j++) cand[j] = mem_w[j];
      end else begin
        for (int j = 0; j < ROWS; j++) begin
          cand[j]        = pe_out_a[(c > 0) ? c - 1 : 0][j];
          cand[ROWS + j] = pe_out_b[(c > 0) ? c - 1 : 0][j];
        end
      end
    end
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      pe #(.NIN(NIN)) u_pe (
        .clk, .rst_n, .cfg(c_pe[ctx][c*ROWS + r]), .in_a(cand), .in_b(cand),
        .out_a(pe_out_a[c][r]), .out_b(pe_out_b[c][r]));
    end
  end

  // ------------------------------------------------------- host reads
  logic        rd_mem_q;
  logic [4:0]  rd_idx_q;
  logic [31:0] rd_reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hrsp.rvalid <= 1'b0;
      rd_mem_q    <= 1'b0;
      rd_idx_q    <= '0;
      rd_reg_q    <= '0;
    end else begin
      hrsp.rvalid <= hreq.req && !hreq.we;
      rd_mem_q    <= (h_rgn == RGN_MEM);
      rd_idx_q    <= h_idx;
      unique case ({h_rgn, h_off})
        {RGN_STAT, 10'd0}: rd_reg_q <= 32'(busy);
        {RGN_STAT, 10'd1}: rd_reg_q <= cycles;
        default:           rd_reg_q <= '0;
      endcase
    end
  end

  always_comb begin
    hrsp.rdata = rd_reg_q;
    if (rd_mem_q)
      for (int m = 0; m < NMEM; m++)
        if (32'(rd_idx_q) == m) hrsp.rdata = 32'(unsigned'(a_rdata[m]));
  end

endmodule
