// tb_ring_switch: random configurations, FIFO states and results into one
// layer switch; checks the firing rule (operand tokens), operand wiring (previous layer, FIFO head, selected
// bus), the stall rules (empty input FIFO, full output FIFO, one push per
// cycle with the lowest index first), the FIFO pop/push strobes and the bus
// register against an independent model.
module tb_ring_switch;
  import dhm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [DW-1:0] prev_acc [D_PER_LAYER];
  logic prev_vld [D_PER_LAYER];
  logic bus_vld_all [L_LAYERS];
  logic bus_vld;
  logic [DW-1:0] fifo_head;
  logic fifo_empty, out_full;
  logic [DW-1:0] bus_all [L_LAYERS];
  dnode_cfg_t cfg [D_PER_LAYER];
  logic active [D_PER_LAYER];
  logic [DW-1:0] result [D_PER_LAYER];
  logic [DW-1:0] sw_in [D_PER_LAYER][N_SW_IN];
  logic go [D_PER_LAYER];
  logic fifo_pop, out_push, stalled;
  logic [DW-1:0] out_data, bus_q;
  int checks = 0, failures = 0;
  int n_stall = 0, n_push = 0;

  ring_switch dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit avail(input int s, input int sel);
    if (s < D_PER_LAYER) return prev_vld[s];
    if (s == SRC_FIFO) return !fifo_empty;
    if (s == SRC_BUS) return bus_vld_all[sel];
    return 1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [DW-1:0] m_bus = '0;
    fifo_head = '0; fifo_empty = 1'b1; out_full = 1'b0;
    for (int j = 0; j < D_PER_LAYER; j++) begin
      prev_acc[j] = '0; prev_vld[j] = 1'b0; cfg[j] = DNODE_CFG_NOP; active[j] = 1'b0; result[j] = '0;
    end
    for (int i = 0; i < L_LAYERS; i++) begin bus_all[i] = '0; bus_vld_all[i] = 1'b0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      automatic bit e_go [D_PER_LAYER];
      automatic bit pushed = 0, e_pop = 0, e_push = 0, e_bwe = 0, e_stall = 0;
      automatic logic [DW-1:0] e_out = '0, e_bus = '0;
      fifo_head  = DW'($urandom);
      fifo_empty = ($urandom_range(3) == 0);
      out_full   = ($urandom_range(3) == 0);
      for (int i = 0; i < L_LAYERS; i++) begin
        bus_all[i] = DW'($urandom); bus_vld_all[i] = ($urandom_range(3) != 0);
      end
      for (int j = 0; j < D_PER_LAYER; j++) begin
        prev_acc[j] = DW'($urandom);
        prev_vld[j] = ($urandom_range(3) != 0);
        result[j]   = DW'($urandom);
        active[j]   = ($urandom_range(4) != 0);
        cfg[j]          = DNODE_CFG_NOP;
        cfg[j].op       = OP_ADD;
        cfg[j].bus_sel  = LW'($urandom);
        cfg[j].src_a    = SRCW'($urandom_range(SRC_ZERO));
        cfg[j].src_b    = SRCW'($urandom_range(SRC_ZERO));
        cfg[j].fifo_pop = 1'($urandom);
        cfg[j].fifo_push= 1'($urandom);
        cfg[j].bus_wr   = 1'($urandom);
      end
      // model
      for (int j = 0; j < D_PER_LAYER; j++) begin
        e_go[j] = active[j] && !(cfg[j].fifo_pop && fifo_empty)
                  && avail(cfg[j].src_a, cfg[j].bus_sel) && avail(cfg[j].src_b, cfg[j].bus_sel);
        if (e_go[j] && cfg[j].fifo_push) begin
          if (out_full || pushed) e_go[j] = 0;
          else begin pushed = 1; e_push = 1; e_out = result[j]; end
        end
        if (active[j] && !e_go[j]) e_stall = 1;
        if (e_go[j] && cfg[j].fifo_pop) e_pop = 1;
        if (e_go[j] && cfg[j].bus_wr && !e_bwe) begin e_bwe = 1; e_bus = result[j]; end
      end
      #1;
      for (int j = 0; j < D_PER_LAYER; j++) begin
        for (int k = 0; k < D_PER_LAYER; k++)
          check(sw_in[j][k] == prev_acc[k], "previous-layer operand");
        check(sw_in[j][SRC_FIFO] == fifo_head, "FIFO operand");
        check(sw_in[j][SRC_BUS] == bus_all[cfg[j].bus_sel], "bus operand");
        check(go[j] == e_go[j], $sformatf("go[%0d]", j));
      end
      check(fifo_pop == e_pop, "fifo_pop");
      check(out_push == e_push, "out_push");
      if (e_push) check(out_data == e_out, "out_data");
      check(stalled == e_stall, "stalled");
      if (e_stall) n_stall++;
      if (e_push) n_push++;
      @(negedge clk);
      if (e_bwe) m_bus = e_bus;
      check(bus_q == m_bus, "bus register");
      check(bus_vld == e_bwe, "bus token");
    end
    check(n_stall > 0 && n_push > 0, "stalls and pushes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
