// local_mem: local memory module ("M") of an accelerator core.
//
// The document builds the local memories from FPGA block memories with a
// read latency of one cycle, and gives 8 modules of 16 kB in total for the
// 4-lane cores (2 kB each). This module is a dual-port RAM of DEPTH 16-bit
// words (default 1024 words = 2 kB).
// Port A reads and writes. It serves the host while the core is idle and the
// result write-back while the core runs.
// Port B only reads. It feeds the PE array at the address from the AGU.
// Both ports register their read data: rdata is valid one clock after the
// address. A read on port A of a word written in the same cycle on port A
// returns the old contents. Writing with port A and reading the same word
// with port B in the same cycle also returns the old word on port B.
// Contents are not cleared by reset.
module local_mem
  import hmp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  // port A: read/write
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  data_t                    a_wdata,
  output data_t                    a_rdata,
  // port B: read
  input  logic                     b_en,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output data_t                    b_rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
