// simd1d_core: SIMD one-dimensional accelerator core (GPU-like template).
//
// NPE processing elements form a one-dimensional array. All PEs execute the
// same operation on different windows (window-parallel scheduling, as the
// document chooses for both of its example applications). PE k owns two
// local memories, each with its own AGU:
//   memory 2k   (Mi) : image data
//   memory 2k+1 (Mc) : coefficient / template data, then results
// so every PE reaches exactly two memories, and the network between memories
// and PEs stays simple. In round r, PE k processes window w = r*NPE + k.
//
// Modes (cfg register 0):
//   filter (0): one MAC pass per round. acc = sum Mi*Mc over the window. The
//               sum is written to Mc[res_base + r].
//   SAD    (1): an absolute-difference pass writes |Mi - Mc| for every
//               window pixel to Mc[scratch_base + i]. An accumulation pass
//               then sums them into Mc[res_base + r].
// Switching the PE operation between the two SAD passes is the PE's dynamic
// reconfiguration. Reloading the image AGU base for each window is the AGU's.
//
// Timing: a pass issues one address per clock for len_x*len_y clocks, then
// idles one clock. A 16x16 window thus takes 257 clocks per pass, the step
// count the document gives for window-parallel filtering. A run takes
//   rounds * passes * (len_x*len_y + 1) + 4 clocks,
// where rounds = ceil(n_windows / NPE) and passes = 1 (filter) or 2 (SAD).
// The extra 4 clocks drain the memory, PE and write-back pipeline.
//
// Host interface (word addresses, core-local, see hmp_pkg):
//   RGN_MEM   index m, offset a : memory m, word a (16-bit, read/write)
//   RGN_PACK4 index g, offset a : write bytes 0..3 of wdata to memories
//                                 4g..4g+3 at word a (8-bit pixels, zero
//                                 extended): four pixels per 32-bit transfer
//   RGN_CFG   offset n          : configuration register n (list below)
//   RGN_STAT  offset 0          : bit0 busy;  offset 1: clocks of last run
// Configuration: 0 mode, 1 len_x, 2 len_y, 3 image row stride, 4 image base
// of window 0 on PE 0, 5 base step per PE, 6 base step per round,
// 7 coef_base, 8 n_windows, 9 res_base, 10 scratch_base.
// Memories and configuration take host writes only while the core is idle.
// Reads return one clock after the request.
//
// The number of PEs, the two memories per PE, the operations and the
// 257-clock pass come from the document. The register map, the write-back
// placement of the SAD partial results, and the pack-4 region are choices of
// this design.
module simd1d_core
  import hmp_pkg::*;
#(
  parameter int unsigned NPE   = 4,
  parameter int unsigned DEPTH = 1024
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

  localparam int unsigned NMEM = 2 * NPE;
  localparam int unsigned MAW  = $clog2(DEPTH);

  // ----------------------------------------------------------- registers
  logic          mode_sad;
  logic [7:0]    len_x, len_y;
  logic [AW-1:0] stride, img_base, pe_step, round_step;
  logic [AW-1:0] coef_base, res_base, scratch_base;
  logic [15:0]   n_windows;
  logic [31:0]   cycles;

  // --------------------------------------------------------------- FSM
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e        state;
  logic [15:0]   round, nrounds, cnt, walk;
  logic          pass;         // 0: MAC or AD pass, 1: accumulation pass
  logic [2:0]    drain;
  pe_op_e        cur_op, op_q0, op_q, op_q2;

  assign walk    = 16'(len_x) * 16'(len_y);
  assign nrounds = 16'((32'(n_windows) + NPE - 1) / NPE);
  assign busy    = (state != S_IDLE);
  assign cur_op  = !mode_sad ? OP_MAC : (pass ? OP_ACC : OP_AD);

  logic agu_go;
  assign agu_go = (state == S_RUN) && (cnt == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      round  <= '0;
      cnt    <= '0;
      pass   <= 1'b0;
      drain  <= '0;
      done   <= 1'b0;
      cycles <= '0;
    end else begin
      done <= 1'b0;
      if (stop) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (start && n_windows != 0 && walk != 0) begin
            state  <= S_RUN;
            round  <= '0;
            cnt    <= '0;
            pass   <= 1'b0;
            cycles <= '0;
          end
          S_RUN: begin
            cycles <= cycles + 32'd1;
            if (cnt == walk) begin
              cnt <= '0;
              if (mode_sad && !pass) begin
                pass <= 1'b1;
              end else begin
                pass <= 1'b0;
                if (round + 16'd1 >= nrounds) begin
                  state <= S_DRAIN;
                  drain <= '0;
                end else begin
                  round <= round + 16'd1;
                end
              end
            end else begin
              cnt <= cnt + 16'd1;
            end
          end
          S_DRAIN: begin
            cycles <= cycles + 32'd1;
            drain  <= drain + 3'd1;
            if (drain == 3'd3) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // PE operation, delayed two clocks (AGU register, memory read) to line
  // up with the read data; op_q2 is the operation that produced the word now
  // at the PE output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q0 <= OP_NOP;
      op_q  <= OP_NOP;
      op_q2 <= OP_NOP;
    end else begin
      if (state == S_RUN) op_q0 <= cur_op;
      op_q  <= op_q0;
      op_q2 <= op_q;
    end
  end

  // ------------------------------------------------- memories, AGUs, PEs
  logic [AW-1:0] agu_addr  [NMEM];
  logic          agu_valid [NMEM];
  logic          agu_first [NMEM];
  logic          agu_last  [NMEM];
  logic          agu_busy  [NMEM];
  logic          tag_v [NMEM], tag_f [NMEM], tag_l [NMEM];
  data_t         a_rdata [NMEM], b_rdata [NMEM];
  logic          a_en [NMEM], a_we [NMEM];
  logic [MAW-1:0] a_addr [NMEM];
  data_t         a_wdata [NMEM];
  word_t         pe_out_a [NPE], pe_out_b [NPE];

  // write-back addressing (all PEs run in lock step; PE 0 is representative)
  logic [AW-1:0] sc_cnt, sc_idx;
  logic [15:0]   res_cnt;
  logic          wb_ad, wb_res;
  assign wb_ad  = (op_q2 == OP_AD) && pe_out_a[0].valid;
  assign wb_res = (op_q2 == OP_MAC || op_q2 == OP_ACC) && pe_out_a[0].valid
                  && pe_out_a[0].last;
  assign sc_idx = pe_out_a[0].first ? '0 : sc_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_cnt  <= '0;
      res_cnt <= '0;
    end else begin
      if (state == S_IDLE && start) res_cnt <= '0;
      else if (wb_res) res_cnt <= res_cnt + 16'd1;
      if (wb_ad) sc_cnt <= sc_idx + AW'(1);
    end
  end

  // host decode
  logic [1:0]  h_rgn;
  logic [4:0]  h_idx;
  logic [9:0]  h_off;
  assign h_rgn = hreq.addr[16:15];
  assign h_idx = hreq.addr[14:10];
  assign h_off = hreq.addr[9:0];

  for (genvar k = 0; k < NPE; k++) begin : g_lane
    agu_cfg_t cfg_i, cfg_c;
    word_t    in_w [2];
    pe_cfg_t  pcfg;
    logic     wmask;

    always_comb begin
      cfg_i.base     = img_base + AW'(k) * pe_step + AW'(round) * round_step;
      cfg_i.len_x    = len_x;
      cfg_i.len_y    = len_y;
      cfg_i.stride_y = stride;
      cfg_c.base     = pass ? scratch_base : coef_base;
      cfg_c.len_x    = len_x;
      cfg_c.len_y    = len_y;
      cfg_c.stride_y = AW'(len_x);
    end

    agu u_agu_i (
      .clk, .rst_n, .start(agu_go && !pass), .cfg(cfg_i),
      .addr(agu_addr[2*k]), .valid(agu_valid[2*k]), .first(agu_first[2*k]),
      .last(agu_last[2*k]), .busy(agu_busy[2*k]));

    agu u_agu_c (
      .clk, .rst_n, .start(agu_go), .cfg(cfg_c),
      .addr(agu_addr[2*k+1]), .valid(agu_valid[2*k+1]), .first(agu_first[2*k+1]),
      .last(agu_last[2*k+1]), .busy(agu_busy[2*k+1]));

    always_comb begin
      in_w[0] = '{valid: tag_v[2*k],   first: tag_f[2*k],   last: tag_l[2*k],
                  data: b_rdata[2*k]};
      in_w[1] = '{valid: tag_v[2*k+1], first: tag_f[2*k+1], last: tag_l[2*k+1],
                  data: b_rdata[2*k+1]};
      pcfg.op    = op_q;
      pcfg.sel_a = (op_q == OP_ACC) ? SELW'(1) : SELW'(0);
      pcfg.sel_b = SELW'(1);
      pcfg.swb   = SWB_RESULT;
    end

    pe #(.NIN(2)) u_pe (
      .clk, .rst_n, .cfg(pcfg), .in_a(in_w), .in_b(in_w),
      .out_a(pe_out_a[k]), .out_b(pe_out_b[k]));

    // windows beyond n_windows in the last round are not written back
    assign wmask = (32'(res_cnt) * NPE + k) < 32'(n_windows);

    // port A of the coefficient memory: write-back while busy, host if idle
    always_comb begin
      if (busy) begin
        a_en[2*k+1]    = wb_ad || (wb_res && wmask);
        a_we[2*k+1]    = a_en[2*k+1];
        a_addr[2*k+1]  = wb_ad ? MAW'(scratch_base + sc_idx)
                               : MAW'(res_base + AW'(res_cnt));
        a_wdata[2*k+1] = pe_out_a[k].data;
      end else begin
        a_en[2*k+1]    = hreq.req && (h_rgn == RGN_MEM && 32'(h_idx) == 2*k+1
                         || h_rgn == RGN_PACK4 && 32'(h_idx) == (2*k+1) / 4);
        a_we[2*k+1]    = hreq.we;
        a_addr[2*k+1]  = MAW'(h_off);
        a_wdata[2*k+1] = (h_rgn == RGN_PACK4)
                         ? data_t'(hreq.wdata[8*((2*k+1)%4) +: 8])
                         : data_t'(hreq.wdata[15:0]);
      end
      // port A of the image memory: host only
      a_en[2*k]    = !busy && hreq.req && (h_rgn == RGN_MEM && 32'(h_idx) == 2*k
                     || h_rgn == RGN_PACK4 && 32'(h_idx) == (2*k) / 4);
      a_we[2*k]    = hreq.we;
      a_addr[2*k]  = MAW'(h_off);
      a_wdata[2*k] = (h_rgn == RGN_PACK4) ? data_t'(hreq.wdata[8*((2*k)%4) +: 8])
                                          : data_t'(hreq.wdata[15:0]);
    end
  end

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    local_mem #(.DEPTH(DEPTH)) u_mem (
      .clk,
      .a_en(a_en[m]), .a_we(a_we[m]), .a_addr(a_addr[m]), .a_wdata(a_wdata[m]),
      .a_rdata(a_rdata[m]),
      .b_en(agu_valid[m]), .b_addr(MAW'(agu_addr[m])), .b_rdata(b_rdata[m]));

    // tags follow the read data with the memory latency
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tag_v[m] <= 1'b0;
        tag_f[m] <= 1'b0;
        tag_l[m] <= 1'b0;
      end else begin
        tag_v[m] <= agu_valid[m];
        tag_f[m] <= agu_first[m];
        tag_l[m] <= agu_last[m];
      end
    end
  end

  // ------------------------------------------------------ host registers
  logic        h_wr_cfg;
  assign h_wr_cfg = hreq.req && hreq.we && !busy && h_rgn == RGN_CFG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_sad     <= 1'b0;
      len_x        <= 8'd16;
      len_y        <= 8'd16;
      stride       <= AW'(16);
      img_base     <= '0;
      pe_step      <= AW'(1);
      round_step   <= AW'(NPE);
      coef_base    <= '0;
      n_windows    <= '0;
      res_base     <= '0;
      scratch_base <= '0;
    end else if (h_wr_cfg) begin
      unique case (h_off)
        10'd0:  mode_sad     <= hreq.wdata[0];
        10'd1:  len_x        <= hreq.wdata[7:0];
        10'd2:  len_y        <= hreq.wdata[7:0];
        10'd3:  stride       <= hreq.wdata[AW-1:0];
        10'd4:  img_base     <= hreq.wdata[AW-1:0];
        10'd5:  pe_step      <= hreq.wdata[AW-1:0];
        10'd6:  round_step   <= hreq.wdata[AW-1:0];
        10'd7:  coef_base    <= hreq.wdata[AW-1:0];
        10'd8:  n_windows    <= hreq.wdata[15:0];
        10'd9:  res_base     <= hreq.wdata[AW-1:0];
        10'd10: scratch_base <= hreq.wdata[AW-1:0];
        default: ;
      endcase
    end
  end

  // read response, one clock after the request
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
        {RGN_CFG, 10'd0}:  rd_reg_q <= 32'(mode_sad);
        {RGN_CFG, 10'd1}:  rd_reg_q <= 32'(len_x);
        {RGN_CFG, 10'd2}:  rd_reg_q <= 32'(len_y);
        {RGN_CFG, 10'd8}:  rd_reg_q <= 32'(n_windows);
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
