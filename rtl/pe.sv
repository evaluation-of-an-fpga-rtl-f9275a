// pe: processing element of the SIMD-1D and MIMD-2D accelerators.
//
// Each PE has a 16-bit fixed-point ALU and a multiplier. Two input
// multiplexers pick operand A and operand B from NIN candidate words (a
// select value of NIN or more gives an idle word: not valid, data 0). A
// switch routes the ALU result, the product or an operand to the two outputs,
// and an output register holds both outputs. The operations and their
// latencies follow the document's operation table:
//   ADD, SUB, MUL, CMP, AD (absolute difference) : 1 cycle
//   ACC (acc += a), MAC (acc += a*b)             : 2 cycles
// MAC pipelines the multiplier and the adder: a new operand pair is accepted
// every cycle. The accumulator is the output register A itself, fed back into
// the ALU, as in the document's PE block diagram. The absolute difference is
// formed as in the document's ALU detail: subtract, negate, and select.
//
// Design choices: every data word carries valid/first/last tags. The result
// takes the tags of operand A. An accumulation restarts from zero on a word
// tagged "first". Arithmetic wraps at 16 bits; MUL and MAC keep the low 16
// bits of the product (integer scaling). CMP returns 1 when a < b (signed),
// else 0. The operation is selected by the cfg input. cfg may change on any
// cycle; this is the dynamic reconfiguration of the PE.
//
// Timing: for a 1-cycle operation, out_a holds f(a,b) one clock after the
// operands are presented. For ACC/MAC, out_a holds the updated sum two clocks
// after the operands.
module pe
  import hmp_pkg::*;
#(
  parameter int unsigned NIN = 8  // candidates per input multiplexer
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_cfg_t cfg,
  input  word_t   in_a [NIN],
  input  word_t   in_b [NIN],
  output word_t   out_a,
  output word_t   out_b
);

  word_t a, b;
  word_t stage_q;      // multiplier / operand register of ACC and MAC
  word_t stage_d;
  word_t nxt_a, nxt_b;
  data_t prod;

  // input multiplexers
  always_comb begin
    a = WORD_IDLE;
    b = WORD_IDLE;
    for (int i = 0; i < NIN; i++) begin
      if (32'(cfg.sel_a) == i) a = in_a[i];
      if (32'(cfg.sel_b) == i) b = in_b[i];
    end
  end

  assign prod = data_t'(a.data * b.data);

  // ALU, multiplier and switch
  always_comb begin
    nxt_a   = WORD_IDLE;
    stage_d = WORD_IDLE;
    nxt_a.first = a.first;
    nxt_a.last  = a.last;
    nxt_a.valid = a.valid;
    unique case (cfg.op)
      OP_NOP: nxt_a = WORD_IDLE;
      OP_ADD: nxt_a.data = a.data + b.data;
      OP_SUB: nxt_a.data = a.data - b.data;
      OP_MUL: nxt_a.data = prod;
      OP_CMP: nxt_a.data = (a.data < b.data) ? data_t'(1) : data_t'(0);
      OP_AD:  nxt_a.data = absdiff(a.data, b.data);
      OP_ACC, OP_MAC: begin
        stage_d      = a;
        stage_d.data = (cfg.op == OP_MAC) ? prod : a.data;
        // second stage: adder with the output register fed back
        nxt_a        = stage_q;
        nxt_a.data   = stage_q.valid
                       ? ((stage_q.first ? data_t'(0) : out_a.data) + stage_q.data)
                       : out_a.data;
      end
      default: nxt_a = WORD_IDLE;
    endcase

    unique case (cfg.swb)
      SWB_RESULT: nxt_b = nxt_a;
      SWB_PASS_A: nxt_b = a;
      SWB_PASS_B: nxt_b = b;
      SWB_MUL: begin
        nxt_b      = a;
        nxt_b.data = prod;
      end
      default: nxt_b = nxt_a;
    endcase
  end

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= WORD_IDLE;
      out_a   <= WORD_IDLE;
      out_b   <= WORD_IDLE;
    end else begin
      stage_q <= stage_d;
      out_a   <= nxt_a;
      out_b   <= nxt_b;
    end
  end

endmodule
