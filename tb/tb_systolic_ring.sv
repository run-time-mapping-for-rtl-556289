// tb_systolic_ring: configures kernels directly through the ring's
// configuration port at chosen rotations and streams data through them,
// comparing every output FIFO word with a software model of the kernel.
// Phase 1 runs the 1-Dnode absolute-difference accumulator on layer 0 and the
// 5-Dnode butterfly/MAC kernel rotated onto layers 1-3 at the same time; phase
// 2 releases them and runs the two-layer bus kernel rotated by 3 (layers 3 and
// 0, reading the bus of layer 3) and the 4-layer chain kernel. Input gaps make
// Dnodes wait on empty FIFOs; the waits are counted and must occur.
module tb_systolic_ring;
  import dhm_pkg::*;
  import dhm_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ring_cfg_t cfg;
  logic in_push [L_LAYERS];
  logic [DW-1:0] in_data [L_LAYERS];
  logic in_full [L_LAYERS];
  logic out_pop [L_LAYERS];
  logic [DW-1:0] out_data [L_LAYERS];
  logic out_empty [L_LAYERS];
  logic [N_PE-1:0] pe_active;
  logic [L_LAYERS-1:0] layer_stall;
  logic [DW-1:0] pe_acc [N_PE];

  int checks = 0, failures = 0, n_stall = 0;
  logic [DW-1:0] in_q  [L_LAYERS][$];
  logic [DW-1:0] exp_q [L_LAYERS][$];

  systolic_ring dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // feeders (random gaps) and output checkers, one per layer
  for (genvar i = 0; i < L_LAYERS; i++) begin : g_io
    always @(negedge clk) begin
      in_push[i] = 1'b0;
      if (rst_n && in_q[i].size() != 0 && !in_full[i] && $urandom_range(9) < 7) begin
        in_push[i] = 1'b1;
        in_data[i] = in_q[i].pop_front();
      end
      out_pop[i] = rst_n && !out_empty[i];
      if (out_pop[i]) begin
        if (exp_q[i].size() == 0) check(1'b0, $sformatf("unexpected output on layer %0d", i));
        else begin
          automatic logic [DW-1:0] e = exp_q[i].pop_front();
          check(out_data[i] == e, $sformatf("layer %0d out %h exp %h", i, out_data[i], e));
        end
      end
    end
  end
  always @(posedge clk) if (rst_n && layer_stall != 0) n_stall++;

  // write a kernel image through the configuration port, rotated by r layers
  task automatic place(input kernel_e k, input int r);
    logic [MEM_W-1:0] img [$];
    cfg_header_t h;
    image(k, 1, img);
    h = cfg_header_t'(img[0][HDR_W-1:0]);
    for (int n = 1; n < img.size(); n++) begin
      automatic cfg_line_t l = cfg_line_t'(img[n][LINE_W-1:0]);
      automatic int pl = (int'(l.layer) + r) % L_LAYERS;
      @(negedge clk);
      cfg = '0;
      cfg.we = 1'b1; cfg.layer = LW'(pl); cfg.slot = l.slot;
      for (int j = 0; j < D_PER_LAYER; j++) begin
        cfg.den[j]  = h.topology[int'(l.layer) * D_PER_LAYER + j];
        cfg.word[j] = l.word[j];
        cfg.word[j].bus_sel = LW'((int'(l.word[j].bus_sel) + r) % L_LAYERS);
      end
    end
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic wait_drained(input int limit);
    for (int c = 0; c < limit; c++) begin
      automatic bit busy = 0;
      for (int i = 0; i < L_LAYERS; i++) busy |= (in_q[i].size() != 0) || (exp_q[i].size() != 0);
      if (!busy) return;
      @(negedge clk);
    end
    check(1'b0, "outputs did not arrive");
  endtask

  function automatic logic [DW-1:0] rnd();
    return DW'($urandom_range(2000)) - DW'(1000);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] mad_acc, m0, m1;
    cfg = '0;
    for (int i = 0; i < L_LAYERS; i++) begin in_push[i] = 0; in_data[i] = '0; out_pop[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // ---------------- phase 1: MAD on layer 0, butterfly rotated by 1
    place(K_MAD, 0);
    place(K_BFLY, 1);
    check(pe_active == 8'b0111_1101,
          "Dnodes of both kernels active");
    mad_acc = '0; m0 = '0; m1 = '0;
    for (int k = 0; k < 40; k++) begin
      automatic logic [DW-1:0] r = rnd(), s = rnd();
      automatic int d = int'(signed'(r)) - int'(signed'(s));
      in_q[0].push_back(r); in_q[0].push_back(s);
      mad_acc = mad_acc + DW'(d < 0 ? -d : d);
      exp_q[0].push_back(mad_acc);
    end
    for (int chunk = 0; chunk < 8; chunk++) begin
      // coefficients first (layer 2), then the sample pairs (layer 1)
      logic [DW-1:0] cs [4];
      for (int k = 0; k < 4; k++) begin cs[k] = rnd(); in_q[2].push_back(cs[k]); end
      while (in_q[2].size() != 0) @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        automatic logic [DW-1:0] a = rnd(), b = rnd();
        in_q[1].push_back(a); in_q[1].push_back(b);
        m0 = m0 + (a + b) * cs[k];
        m1 = m1 + (a - b) * cs[k];
        exp_q[3].push_back(m0 + m1);
      end
      wait_drained(2000);
    end
    wait_drained(4000);
    check(pe_acc[0] == mad_acc, $sformatf("accumulator of Dnode 0 %0d, expected %0d", pe_acc[0], mad_acc));
    check(pe_acc[1] == '0 && pe_acc[7] == '0, "idle Dnodes keep a zero accumulator");
    // ---------------- phase 2: release, bus kernel rotated by 3, chain kernel
    @(negedge clk);
    cfg = '0; cfg.clr = '1;
    @(negedge clk);
    cfg = '0;
    check(pe_active == '0, "all Dnodes released");
    for (int p = 0; p < N_PE; p++)
      check(pe_acc[p] == '0, $sformatf("accumulator of released Dnode %0d cleared", p));
    place(K_BUS, 3);
    for (int chunk = 0; chunk < 6; chunk++) begin
      logic [DW-1:0] ys [6];
      for (int k = 0; k < 6; k++) begin ys[k] = rnd(); in_q[0].push_back(ys[k]); end
      while (in_q[0].size() != 0) @(negedge clk);
      for (int k = 0; k < 6; k++) begin
        automatic logic [DW-1:0] x = rnd();
        in_q[3].push_back(x);
        exp_q[0].push_back(x + ys[k]);
      end
      wait_drained(2000);
    end
    @(negedge clk);
    cfg = '0; cfg.clr = '1;
    @(negedge clk);
    cfg = '0;
    place(K_BIG, 2);    // layers 2,3,0,1; y enters at design layer 3 = layer 1
    for (int chunk = 0; chunk < 6; chunk++) begin
      logic [DW-1:0] ys [6];
      for (int k = 0; k < 6; k++) begin ys[k] = rnd(); in_q[1].push_back(ys[k]); end
      while (in_q[1].size() != 0) @(negedge clk);
      for (int k = 0; k < 6; k++) begin
        automatic logic [DW-1:0] x = rnd();
        in_q[2].push_back(x);
        exp_q[1].push_back(x + x + ys[k]);
      end
      wait_drained(2000);
    end
    check(n_stall > 0, "Dnodes waited on empty FIFOs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
