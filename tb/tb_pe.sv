// tb_pe: self-checking testbench of the processing element.
// Drives random operands through every operation and compares the outputs
// with a reference model written in the testbench: results and latencies
// (1 clock for ADD/SUB/MUL/CMP/AD, 2 clocks for ACC/MAC), accumulation that
// restarts on a word tagged first, a MAC stream accepted once per clock, the
// input multiplexers and the output-B switch.
module tb_pe;
  import hmp_pkg::*;

  localparam int NIN = 4;
  logic    clk = 1'b0, rst_n = 1'b0;
  pe_cfg_t cfg;
  word_t   in_a [NIN], in_b [NIN];
  word_t   out_a, out_b;
  int      checks = 0, failures = 0;

  pe #(.NIN(NIN)) dut (.clk, .rst_n, .cfg, .in_a, .in_b, .out_a, .out_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic data_t ref_op(pe_op_e op, data_t a, data_t b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return data_t'(32'(a) * 32'(b));
      OP_CMP: return (a < b) ? 16'sd1 : 16'sd0;
      OP_AD:  return (a > b) ? a - b : b - a;
      default: return '0;
    endcase
  endfunction

  task automatic drive(int sa, int sb, data_t a, data_t b, logic v, logic f, logic l);
    for (int i = 0; i < NIN; i++) begin
      in_a[i] = '{valid: 1'b1, first: 1'b0, last: 1'b0, data: data_t'($urandom)};
      in_b[i] = '{valid: 1'b1, first: 1'b0, last: 1'b0, data: data_t'($urandom)};
    end
    in_a[sa] = '{valid: v, first: f, last: l, data: a};
    in_b[sb] = '{valid: v, first: 1'b0, last: 1'b0, data: b};
  endtask

  initial begin
    static pe_op_e ops1 [5] = '{OP_ADD, OP_SUB, OP_MUL, OP_CMP, OP_AD};
    data_t  a, b, exp, acc;
    data_t  qa [$], qb [$];
    int     sa, sb;
    cfg = '0;
    drive(0, 0, '0, '0, 1'b0, 1'b0, 1'b0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // single-cycle operations: result one clock after the operands
    for (int n = 0; n < 400; n++) begin
      sa = $urandom_range(NIN - 1);
      sb = $urandom_range(NIN - 1);
      a  = data_t'($urandom_range(0, 600)) - 16'sd300;
      b  = data_t'($urandom_range(0, 600)) - 16'sd300;
      @(negedge clk);
      cfg.op    = ops1[n % 5];
      cfg.sel_a = SELW'(sa);
      cfg.sel_b = SELW'(sb);
      cfg.swb   = pe_swb_e'(n % 4);
      drive(sa, sb, a, b, 1'b1, n[0], n[1]);
      @(posedge clk);
      #1;
      exp = ref_op(cfg.op, a, b);
      check($sformatf("op %s result", cfg.op.name()), 32'(out_a.data), 32'(exp));
      check("tags follow operand A", 32'({out_a.valid, out_a.first, out_a.last}),
            32'({1'b1, n[0], n[1]}));
      case (cfg.swb)
        SWB_RESULT: check("out_b result", 32'(out_b.data), 32'(exp));
        SWB_PASS_A: check("out_b pass A", 32'(out_b.data), 32'(a));
        SWB_PASS_B: check("out_b pass B", 32'(out_b.data), 32'(b));
        SWB_MUL:    check("out_b product", 32'(out_b.data), 32'(data_t'(32'(a) * 32'(b))));
      endcase
    end

    // MAC and ACC: a window of 16 words back to back, sum two clocks after
    // the last operand, restart on first
    for (int rep = 0; rep < 6; rep++) begin
      pe_op_e op;
      op = rep[0] ? OP_ACC : OP_MAC;
      acc = '0;
      for (int i = 0; i < 16; i++) begin
        a = data_t'($urandom_range(0, 255));
        b = data_t'($urandom_range(0, 255));
        acc = acc + ((op == OP_MAC) ? data_t'(32'(a) * 32'(b)) : a);
        @(negedge clk);
        cfg.op = op; cfg.sel_a = SELW'(1); cfg.sel_b = SELW'(2); cfg.swb = SWB_RESULT;
        drive(1, 2, a, b, 1'b1, i == 0, i == 15);
      end
      @(posedge clk); #1;
      check("last not out after 1 clock", 32'(out_a.last && out_a.valid), 0);
      @(negedge clk);
      drive(1, 2, '0, '0, 1'b0, 1'b0, 1'b0);
      @(posedge clk); #1;
      check($sformatf("%s sum after 2 clocks", op.name()), 32'(out_a.data), 32'(acc));
      check("last tag", 32'({out_a.valid, out_a.last}), 32'(2'b11));
      @(posedge clk); #1;
      check("sum held, invalid", 32'({out_a.valid, out_a.data}), 32'({1'b0, acc}));
    end

    // NOP gives invalid words
    @(negedge clk);
    cfg.op = OP_NOP;
    drive(0, 0, 16'sd5, 16'sd6, 1'b1, 1'b0, 1'b0);
    @(posedge clk); #1;
    check("nop invalid", 32'(out_a.valid), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
