// tb_dnode: drives random operands and configuration words into a Dnode and
// compares its result and accumulator with a reference model of every
// operation, every operand source, the register file, the go/clear controls
// and the one-cycle token.
module tb_dnode;
  import dhm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dnode_cfg_t cfg;
  logic go = 1'b0, clear = 1'b0;
  logic [DW-1:0] sw_in [N_SW_IN];
  logic [DW-1:0] result, acc;
  logic vld;
  logic m_vld;
  int checks = 0, failures = 0;

  logic [DW-1:0] m_acc;
  logic [DW-1:0] m_rf [RF_DEPTH];

  dnode dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [DW-1:0] src(input int s, input logic [RFAW-1:0] ra);
    if (s < N_SW_IN) return sw_in[s];
    if (s == SRC_REG) return m_rf[ra];
    if (s == SRC_ACC) return m_acc;
    return '0;
  endfunction

  function automatic logic [DW-1:0] model(input op_e op, input logic [DW-1:0] a, b, ac);
    int sa, sb, d;
    sa = int'(signed'(a)); sb = int'(signed'(b)); d = sa - sb;
    if (d < 0) d = -d;
    case (op)
      OP_NOP:  return ac;
      OP_PASS: return a;
      OP_ADD:  return DW'(sa + sb);
      OP_SUB:  return DW'(sa - sb);
      OP_MUL:  return DW'(sa * sb);
      OP_MAC:  return DW'(int'(ac) + sa * sb);
      OP_ABSD: return DW'(d);
      OP_SAD:  return DW'(int'(ac) + d);
      OP_SHRA: return DW'(sa >>> b[3:0]);
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_ACC:  return DW'(int'(ac) + sa);
      default: return ac;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = DNODE_CFG_NOP;
    for (int k = 0; k < N_SW_IN; k++) sw_in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    m_acc = '0;
    for (int k = 0; k < RF_DEPTH; k++) m_rf[k] = '0;
    @(negedge clk);
    check(acc == '0, "acc reset");
    for (int c = 0; c < 3000; c++) begin
      automatic logic [DW-1:0] a, b, exp;
      cfg.op     = op_e'(4'($urandom_range(12)));
      cfg.src_a  = SRCW'($urandom_range(SRC_ZERO));
      cfg.src_b  = SRCW'($urandom_range(SRC_ZERO));
      cfg.rf_ra  = RFAW'($urandom);
      cfg.rf_wa  = RFAW'($urandom);
      cfg.rf_we  = 1'($urandom);
      for (int k = 0; k < N_SW_IN; k++)
        sw_in[k] = ($urandom_range(3) == 0) ? DW'($urandom_range(15)) : DW'($urandom);
      go    = ($urandom_range(4) != 0);
      clear = ($urandom_range(60) == 0);
      a   = src(int'(cfg.src_a), cfg.rf_ra);
      b   = src(int'(cfg.src_b), cfg.rf_ra);
      exp = model(cfg.op, a, b, m_acc);
      #1;
      check(result == exp, $sformatf("op %s a=%h b=%h acc=%h: %h exp %h",
                                     cfg.op.name(), a, b, m_acc, result, exp));
      @(negedge clk);
      m_vld = !clear && go && (cfg.op != OP_NOP);
      if (clear) begin
        m_acc = '0;
        for (int k = 0; k < RF_DEPTH; k++) m_rf[k] = '0;
      end else if (go) begin
        m_acc = exp;
        if (cfg.rf_we) m_rf[cfg.rf_wa] = a;
      end
      check(acc == m_acc, "accumulator");
      check(vld == m_vld, "token");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
