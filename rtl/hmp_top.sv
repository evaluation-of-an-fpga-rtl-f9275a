// hmp_top: FPGA part of the heterogeneous multicore platform.
//
// The CPU (off this module) reaches every accelerator core and the control
// unit over one AXI4-lite port. Behind the bridge, a decoder routes each
// request by platform word-address bits [20:17]:
//   0                      control unit (start/stop of the cores)
//   1 .. N_MIMD            MIMD-2D cores (ROWS x COLS PEs, 8 memories each)
//   N_MIMD+1 .. +N_SIMD    SIMD-1D cores (SIMD_NPE PEs, 2 memories per PE)
// The control unit's start/stop outputs and the cores' busy/done signals form
// the start/stop network of the document's implemented platform. The default
// of four MIMD16 cores (4x4 PEs, 64 PEs in all) is the configuration the
// document implements. The added SIMD-1D core is the second accelerator
// template the document proposes; it is this design's choice to put one
// beside the MIMD cores by default. The AXI timer and the vendor interconnect
// of the document are not part of this module; a plain decoder stands in for
// the interconnect. Bus addresses are byte addresses: AXI address bit 2 is
// platform word-address bit 0.
//
// core_busy / core_done bring the per-core status out (bit k = core k of the
// control unit's numbering: MIMD cores first, then SIMD cores).
module hmp_top
  import hmp_pkg::*;
#(
  parameter int unsigned N_MIMD   = 4,
  parameter int unsigned N_SIMD   = 1,
  parameter int unsigned ROWS     = 4,
  parameter int unsigned COLS     = 4,
  parameter int unsigned SIMD_NPE = 4,
  parameter int unsigned DEPTH    = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [N_MIMD+N_SIMD-1:0] core_busy,
  output logic [N_MIMD+N_SIMD-1:0] core_done
);

  localparam int unsigned NCORE = N_MIMD + N_SIMD;
  localparam int unsigned NSLV  = NCORE + 1;

  host_req_t hreq;
  host_rsp_t hrsp;
  host_req_t sreq [NSLV];
  host_rsp_t srsp [NSLV];
  logic [NCORE-1:0] start, stop;

  axil_bridge u_bridge (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .hreq, .hrsp);

  // address decoder and response multiplexer
  always_comb begin
    for (int s = 0; s < NSLV; s++) begin
      sreq[s]     = hreq;
      sreq[s].req = hreq.req && (32'(hreq.addr[HAW-1:17]) == s);
    end
    hrsp = '0;
    for (int s = 0; s < NSLV; s++)
      if (srsp[s].rvalid) hrsp = srsp[s];
  end

  control_unit #(.NCORE(NCORE)) u_ctrl (
    .clk, .rst_n, .hreq(sreq[SLV_CTRL]), .hrsp(srsp[SLV_CTRL]),
    .start, .stop, .busy(core_busy), .done(core_done));

  for (genvar k = 0; k < N_MIMD; k++) begin : g_mimd
    mimd2d_core #(.ROWS(ROWS), .COLS(COLS), .NMEM(2 * ROWS), .DEPTH(DEPTH)) u_core (
      .clk, .rst_n, .hreq(sreq[1 + k]), .hrsp(srsp[1 + k]),
      .start(start[k]), .stop(stop[k]), .busy(core_busy[k]), .done(core_done[k]));
  end

  for (genvar k = 0; k < N_SIMD; k++) begin : g_simd
    simd1d_core #(.NPE(SIMD_NPE), .DEPTH(DEPTH)) u_core (
      .clk, .rst_n, .hreq(sreq[1 + N_MIMD + k]), .hrsp(srsp[1 + N_MIMD + k]),
      .start(start[N_MIMD + k]), .stop(stop[N_MIMD + k]),
      .busy(core_busy[N_MIMD + k]), .done(core_done[N_MIMD + k]));
  end

endmodule
