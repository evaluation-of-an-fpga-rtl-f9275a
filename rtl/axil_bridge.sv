// axil_bridge: AXI4-lite slave port of the accelerator platform.
//
// In the document the CPU reaches the accelerator cores and the control unit
// over a 32-bit AXI4-lite bus. This bridge turns AXI4-lite transactions into
// single-word requests on the platform's internal host bus (hmp_pkg::
// host_req_t / host_rsp_t). The internal bus uses word addresses: awaddr or
// araddr bits [HAW+1:2]. Byte strobes are ignored: every write is a full
// 32-bit word. One 32-bit write can thus carry four 8-bit pixels, the
// document's parallel transfer.
//
// Timing: one transaction at a time. A write is accepted when AWVALID and
// WVALID are both high (AWREADY = WREADY = 1 in that clock). The request
// goes out in the next clock, and BVALID follows until BREADY. A read is
// accepted on ARVALID. The request goes out in the next clock, and RVALID
// rises when the internal response arrives, one clock later. It stays high
// until RREADY. Responses are always OKAY.
module axil_bridge
  import hmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-lite slave
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
  // internal host bus
  output host_req_t   hreq,
  input  host_rsp_t   hrsp
);

  typedef enum logic [2:0] {B_IDLE, B_WREQ, B_WRESP, B_RREQ, B_RWAIT, B_RRESP} bstate_e;
  bstate_e     st;
  logic [31:0] addr_q, data_q;

  assign s_awready = (st == B_IDLE) && s_awvalid && s_wvalid;
  assign s_wready  = s_awready;
  assign s_arready = (st == B_IDLE) && !(s_awvalid && s_wvalid) && s_arvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_bvalid  = (st == B_WRESP);
  assign s_rvalid  = (st == B_RRESP);
  assign s_rdata   = data_q;

  always_comb begin
    hreq.req   = (st == B_WREQ) || (st == B_RREQ);
    hreq.we    = (st == B_WREQ);
    hreq.addr  = addr_q[HAW+1:2];
    hreq.wdata = data_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= B_IDLE;
      addr_q <= '0;
      data_q <= '0;
    end else begin
      unique case (st)
        B_IDLE: begin
          if (s_awready) begin
            addr_q <= s_awaddr;
            data_q <= s_wdata;
            st     <= B_WREQ;
          end else if (s_arready) begin
            addr_q <= s_araddr;
            st     <= B_RREQ;
          end
        end
        B_WREQ:  st <= B_WRESP;
        B_WRESP: if (s_bready) st <= B_IDLE;
        B_RREQ:  st <= B_RWAIT;
        B_RWAIT: if (hrsp.rvalid) begin
          data_q <= hrsp.rdata;
          st     <= B_RRESP;
        end
        B_RRESP: if (s_rready) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end

  // AXI4-lite rule: a valid response is held until it is accepted
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
