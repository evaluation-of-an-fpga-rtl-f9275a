// agu: address generation unit of one local memory module.
//
// The document adds an AGU beside every memory module so that address
// arithmetic runs in parallel with the PE data processing: while the PE works
// on data n, the AGU already produces the address of data n+1. The document
// gives the function, not the insides. This design walks a two-dimensional
// window:
//   addr = base + y*stride_y + x,   x = 0..len_x-1 (inner), y = 0..len_y-1
// one address per clock. The base address is reloaded for every window; this
// is the document's dynamic reconfiguration of the AGU.
//
// Interface: a one-cycle pulse on start loads cfg (len_x, len_y >= 1) and
// begins a walk. addr/valid/first/last are registered. The first address
// appears the cycle after start. A walk of len_x*len_y addresses keeps valid
// high for exactly that many cycles. start may be pulsed in the cycle that
// shows the last address, which makes the next walk follow with no gap.
// A start pulse during a walk abandons it and begins the new one.
module agu
  import hmp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  agu_cfg_t      cfg,
  output logic [AW-1:0] addr,
  output logic          valid,
  output logic          first,
  output logic          last,
  output logic          busy    // more addresses of the current walk follow
);

  agu_cfg_t      c;
  logic [7:0]    x, y;
  logic [AW-1:0] row;
  logic [7:0]    nx, ny;
  logic          wrap;

  always_comb begin
    wrap = (x + 8'd1 >= c.len_x);
    nx   = wrap ? 8'd0 : x + 8'd1;
    ny   = wrap ? y + 8'd1 : y;
  end

  assign busy = valid && !last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c     <= '0;
      x     <= '0;
      y     <= '0;
      row   <= '0;
      addr  <= '0;
      valid <= 1'b0;
      first <= 1'b0;
      last  <= 1'b0;
    end else if (start) begin
      c     <= cfg;
      x     <= '0;
      y     <= '0;
      row   <= cfg.base;
      addr  <= cfg.base;
      valid <= 1'b1;
      first <= 1'b1;
      last  <= (cfg.len_x <= 8'd1) && (cfg.len_y <= 8'd1);
    end else if (valid && !last) begin
      x     <= nx;
      y     <= ny;
      first <= 1'b0;
      last  <= (nx + 8'd1 >= c.len_x) && (ny + 8'd1 >= c.len_y);
      if (wrap) begin
        row  <= row + c.stride_y;
        addr <= row + c.stride_y;
      end else begin
        addr <= addr + AW'(1);
      end
    end else begin
      valid <= 1'b0;
      first <= 1'b0;
      last  <= 1'b0;
    end
  end

endmodule
