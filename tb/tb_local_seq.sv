// tb_local_seq: loads configuration slots, checks that the sequencer loops
// over slots 0..len-1 only on cycles with adv, that a write restarts it at slot
// 0 with the new length, and that clear makes it idle (NOP output).
module tb_local_seq;
  import dhm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, clr = 1'b0, adv = 1'b0;
  logic [SLOTW-1:0] wr_slot = '0;
  dnode_cfg_t wr_word, cfg;
  logic active;
  logic [SLOTW-1:0] slot;
  int checks = 0, failures = 0;

  local_seq dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dnode_cfg_t mk(input int k);
    dnode_cfg_t w;
    w = DNODE_CFG_NOP;
    w.op    = op_e'(4'(k % 12 + 1));
    w.src_a = SRCW'(k % 5);
    w.rf_wa = RFAW'(k);
    return w;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_word = DNODE_CFG_NOP;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(!active && cfg == DNODE_CFG_NOP, "idle after reset");
    // load 5 slots
    for (int s = 0; s < 5; s++) begin
      wr_en = 1'b1; wr_slot = SLOTW'(s); wr_word = mk(s);
      @(negedge clk);
    end
    wr_en = 1'b0;
    check(active, "active after load");
    // advance with random gaps; model the pointer
    begin
      automatic int p = 0;
      for (int c = 0; c < 60; c++) begin
        check(cfg == mk(p), $sformatf("slot %0d word", p));
        check(int'(slot) == p, "slot index");
        adv = ($urandom_range(3) != 0);
        @(negedge clk);
        if (adv) p = (p + 1) % 5;
      end
      adv = 1'b0;
    end
    // rewrite slot 0 only: length becomes 1, restart
    wr_en = 1'b1; wr_slot = '0; wr_word = mk(7);
    @(negedge clk);
    wr_en = 1'b0;
    for (int c = 0; c < 4; c++) begin
      adv = 1'b1;
      check(cfg == mk(7) && slot == '0, "single-slot loop");
      @(negedge clk);
    end
    // all 8 slots
    for (int s = 0; s < N_CFG; s++) begin
      wr_en = 1'b1; wr_slot = SLOTW'(s); wr_word = mk(s + 3);
      adv = 1'b0;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int c = 0; c < 20; c++) begin
      adv = 1'b1;
      check(cfg == mk((c % N_CFG) + 3), "8-slot loop");
      @(negedge clk);
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(!active && cfg == DNODE_CFG_NOP, "idle after clear");
    @(negedge clk);
    check(!active, "stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
