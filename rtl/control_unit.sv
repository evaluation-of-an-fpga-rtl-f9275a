// control_unit: start/stop control of the accelerator cores.
//
// The document's implemented platform places a small control unit on the
// same bus as the accelerator cores. It drives their start/stop signals so
// that the CPU can launch several cores together and see when they finish.
// Its register map is this design's choice:
//   offset 0 (write) : bit k = 1 pulses start of core k for one clock
//   offset 1 (write) : bit k = 1 pulses stop of core k (abort)
//   offset 2 (read)  : bit k = busy of core k
//   offset 3 (read)  : bit k = core k finished since last cleared (sticky);
//            (write) : bit k = 1 clears it
// A start pulse also clears the core's sticky done bit. Reads return one
// clock after the request. Only the low 10 offset bits are decoded.
module control_unit
  import hmp_pkg::*;
#(
  parameter int unsigned NCORE = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  host_req_t        hreq,
  output host_rsp_t        hrsp,
  output logic [NCORE-1:0] start,
  output logic [NCORE-1:0] stop,
  input  logic [NCORE-1:0] busy,
  input  logic [NCORE-1:0] done
);

  logic [NCORE-1:0] done_q;
  logic [9:0]       off;
  logic             wr;
  assign off = hreq.addr[9:0];
  assign wr  = hreq.req && hreq.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start       <= '0;
      stop        <= '0;
      done_q      <= '0;
      hrsp.rvalid <= 1'b0;
      hrsp.rdata  <= '0;
    end else begin
      start <= (wr && off == 10'd0) ? hreq.wdata[NCORE-1:0] : '0;
      stop  <= (wr && off == 10'd1) ? hreq.wdata[NCORE-1:0] : '0;
      done_q <= (done_q | done)
                & ~((wr && off == 10'd3) ? hreq.wdata[NCORE-1:0] : '0)
                & ~((wr && off == 10'd0) ? hreq.wdata[NCORE-1:0] : '0);
      hrsp.rvalid <= hreq.req && !hreq.we;
      unique case (off)
        10'd2:   hrsp.rdata <= 32'(busy);
        10'd3:   hrsp.rdata <= 32'(done_q);
        default: hrsp.rdata <= '0;
      endcase
    end
  end

endmodule
