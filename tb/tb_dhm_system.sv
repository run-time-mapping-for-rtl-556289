// tb_dhm_system: end-to-end test of the co-processor at its default size
// (8 Dnodes, l = 4, d = 2). Task images are loaded into the programme memory,
// the OS side issues start/end requests, and sample streams are pushed into
// the layer FIFOs chosen from the reported rotation while every output word is
// compared with a software model of the kernel.
//
// Sequence: an absolute-difference accumulator maps directly and is duplicated
// in the background (both copies are fed and checked); a bus kernel arrives,
// the duplicate is suspended and the new task is rotated by one layer; a
// low-priority 5-Dnode task is refused; a high-priority 4-layer task stalls and
// then evicts the two running tasks (their contexts are checked: the
// accumulated sum of the first); it is released; the 5-Dnode task then
// maps, and a second accumulator is relocated next to it by three layers and
// runs alongside it. Last, the two-Dnode block-matching kernel is mapped and
// duplicated, and both instances compare an 8 x 8 block. Each mechanism (direct mapping, rotation, stall, eviction,
// refusal, release, duplication, duplicate suspension, FIFO wait, multi-slot
// local sequencing, bus network) is counted and must occur at least once;
// decision latencies are checked against the 6-cycle minimum and the 25-cycle
// maximum of the hardware controller.
module tb_dhm_system;
  import dhm_pkg::*;
  import dhm_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_wr_en = 1'b0;
  logic [CADDR_W-1:0] host_wr_addr = '0;
  logic [MEM_W-1:0] host_wr_data = '0;
  logic req_valid = 1'b0, req_ready;
  os_req_t req;
  logic resp_valid;
  dhm_resp_t resp;
  logic evict_valid;
  logic [TIDW-1:0] evict_task_id;
  logic [CADDR_W-1:0] evict_cfg_addr;
  logic [DW-1:0] evict_ctx [N_PE];
  logic in_push [L_LAYERS];
  logic [DW-1:0] in_data [L_LAYERS];
  logic in_full [L_LAYERS];
  logic out_pop [L_LAYERS];
  logic [DW-1:0] out_data [L_LAYERS];
  logic out_empty [L_LAYERS];
  logic [N_PE-1:0] pe_busy, dup_pe, pe_active;
  logic [L_LAYERS-1:0] ch_busy, layer_stall;
  dhm_events_t ev;

  int checks = 0, failures = 0, cyc = 0;
  logic [DW-1:0] in_q  [L_LAYERS][$];
  logic [DW-1:0] exp_q [L_LAYERS][$];
  int evicts [$];
  int ev_addr [$];
  logic [DW-1:0] ev_ctx [$][N_PE];
  // mechanism counters
  int n_direct = 0, n_rotated = 0, n_rot_step = 0, n_stall = 0, n_evict = 0,
      n_reject = 0, n_release = 0, n_dup = 0, n_dup_susp = 0, n_fifo_wait = 0,
      n_multislot = 0, n_bus = 0;

  dhm_system dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_direct   += ev.direct;   n_rotated += ev.rotated; n_rot_step += ev.rot_step;
    n_stall    += ev.stall;    n_evict   += ev.evict;   n_reject   += ev.reject;
    n_release  += ev.released; n_dup     += ev.dup;     n_dup_susp += ev.dup_suspend;
    if (layer_stall != 0) n_fifo_wait++;
    if (evict_valid) begin
      evicts.push_back(int'(evict_task_id));
      ev_addr.push_back(int'(evict_cfg_addr));
      ev_ctx.push_back(evict_ctx);
    end
  end

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

  task automatic load(input int addr, input kernel_e k, input int prio);
    logic [MEM_W-1:0] img [$];
    image(k, prio, img);
    foreach (img[n]) begin
      @(negedge clk);
      host_wr_en = 1'b1; host_wr_addr = CADDR_W'(addr + n); host_wr_data = img[n];
    end
    @(negedge clk);
    host_wr_en = 1'b0;
  endtask

  int lat_min = 1000, lat_max = 0;

  task automatic request(input bit on, input int id, input int addr,
                         output dhm_resp_t r, output int lat);
    int t0;
    @(negedge clk);
    req = '{on: on, task_id: TIDW'(id), cfg_addr: CADDR_W'(addr)};
    req_valid = 1'b1;
    while (!req_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    lat = cyc - t0;
    r = resp;
    if (lat < lat_min) lat_min = lat;
    if (lat > lat_max) lat_max = lat;
    check(lat >= 3 && lat <= 25, $sformatf("decision latency %0d within 25 cycles", lat));
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

  // absolute-difference accumulator on layer ly, n pairs, running sum in acc
  task automatic feed_mad(input int ly, input int n, inout logic [DW-1:0] acc);
    for (int k = 0; k < n; k++) begin
      automatic logic [DW-1:0] r = rnd(), s = rnd();
      automatic int d = int'(signed'(r)) - int'(signed'(s));
      in_q[ly].push_back(r); in_q[ly].push_back(s);
      acc = acc + DW'(d < 0 ? -d : d);
      exp_q[ly].push_back(acc);
    end
    n_multislot += n;
  endtask

  // x on layer xl, y on layer yl (pushed first), out = a*x + y on layer ol
  task automatic feed_xy(input int xl, input int yl, input int ol, input int a,
                         input int chunks, input int chunk_len);
    for (int c = 0; c < chunks; c++) begin
      logic [DW-1:0] ys [8];
      for (int k = 0; k < chunk_len; k++) begin ys[k] = rnd(); in_q[yl].push_back(ys[k]); end
      while (in_q[yl].size() != 0) @(negedge clk);
      for (int k = 0; k < chunk_len; k++) begin
        automatic logic [DW-1:0] x = rnd();
        in_q[xl].push_back(x);
        exp_q[ol].push_back(DW'(a) * x + ys[k]);
      end
      wait_drained(3000);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dhm_resp_t r;
    int lat;
    logic [DW-1:0] mad0, mad1;
    req = '0;
    for (int i = 0; i < L_LAYERS; i++) begin in_push[i] = 0; in_data[i] = '0; out_pop[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    load(0,  K_MAD,  2);
    load(8,  K_BUS,  3);
    load(16, K_BFLY, 1);
    load(32, K_BIG,  7);
    load(48, K_FSBM, 4);

    // 1. accumulator maps at its design-time place, then is duplicated
    request(1'b1, 1, 0, r, lat);
    check(r.accepted && r.rotation == 0, "task 1 mapped at layer 0");
    check(lat == 7, $sformatf("direct mapping of a 2-line task takes 7 cycles, got %0d", lat));
    repeat (20) @(negedge clk);
    check(dup_pe == 8'b0000_0100, "task 1 duplicated on Dnode (1,0)");
    mad0 = '0; mad1 = '0;
    feed_mad(0, 30, mad0);
    feed_mad(1, 30, mad1);
    wait_drained(5000);

    // 2. bus kernel: duplicate suspended, relocated by one layer
    request(1'b1, 2, 8, r, lat);
    check(r.accepted && r.rotation == 1, $sformatf("task 2 rotated by 1, got %0d", r.rotation));
    repeat (30) @(negedge clk);
    check(dup_pe == 8'b0100_0000, "task 1 duplicated again, on Dnode (3,0)");
    check(pe_busy == 8'b0101_0101 && ch_busy == 4'b1111, "resources of tasks 1, 2 and the duplicate");
    fork
      feed_mad(0, 30, mad0);
      feed_xy(1, 2, 2, 1, 5, 6);      // x at layer 1 (bus), y and output at layer 2
    join
    n_bus += 30;
    wait_drained(5000);

    // 3. low-priority 5-Dnode task refused
    evicts = {}; ev_addr = {}; ev_ctx = {};
    request(1'b1, 3, 16, r, lat);
    check(!r.accepted, "task 3 refused");
    check(evicts.size() == 0, "refusal evicts nothing");
    repeat (30) @(negedge clk);

    // 4. high-priority chain kernel pre-empts tasks 1 and 2
    request(1'b1, 4, 32, r, lat);
    check(r.accepted && r.rotation == 0, "task 4 mapped after pre-emption");
    check(evicts.size() == 2 && evicts[0] == 1 && evicts[1] == 2, "tasks 1 and 2 evicted");
    if (evicts.size() == 2) begin
      check(ev_addr[0] == 0 && ev_addr[1] == 8, "evicted tasks' programme addresses");
      check(ev_ctx[0][0] == mad0,
            $sformatf("context of task 1: accumulated sum %0d, expected %0d", ev_ctx[0][0], mad0));
      for (int p = 1; p < N_PE; p++)
        check(ev_ctx[0][p] == '0, $sformatf("context of task 1 empty at Dnode %0d", p));
      for (int p = 0; p < N_PE; p++)
        if (p != 0 && p != 2)
          check(ev_ctx[1][p] == '0, $sformatf("context of task 2 empty at Dnode %0d", p));
    end
    check(pe_busy == 8'b0101_0101 && ch_busy == 4'b1001, "task 4 alone on column 0");
    feed_xy(0, 3, 3, 2, 5, 6);        // 2x + y: x at layer 0, y and output at layer 3

    // 5. task 4 ends
    request(1'b0, 4, 0, r, lat);
    check(!r.on && r.accepted && pe_busy == '0, "task 4 released");
    check(pe_active == '0, "ring idle after release");

    // 6. butterfly maps directly; a second accumulator is relocated by 3 beside it
    request(1'b1, 5, 16, r, lat);
    check(r.accepted && r.rotation == 0, "task 5 mapped");
    request(1'b1, 6, 0, r, lat);
    check(r.accepted && r.rotation == 3, $sformatf("task 6 rotated by 3, got %0d", r.rotation));
    begin
      logic [DW-1:0] m0, m1, mad3;
      m0 = '0; m1 = '0; mad3 = '0;
      feed_mad(3, 40, mad3);
      for (int c = 0; c < 6; c++) begin
        logic [DW-1:0] cs [4];
        for (int k = 0; k < 4; k++) begin cs[k] = rnd(); in_q[1].push_back(cs[k]); end
        while (in_q[1].size() != 0) @(negedge clk);
        for (int k = 0; k < 4; k++) begin
          automatic logic [DW-1:0] a = rnd(), b = rnd();
          in_q[0].push_back(a); in_q[0].push_back(b);
          m0 = m0 + (a + b) * cs[k];
          m1 = m1 + (a - b) * cs[k];
          exp_q[2].push_back(m0 + m1);
        end
        while (exp_q[2].size() != 0) @(negedge clk);
      end
      n_multislot += 24;
      wait_drained(5000);
    end

    // 7. ends, including an unknown task
    request(1'b0, 5, 0, r, lat);
    check(r.accepted, "task 5 released");
    request(1'b0, 6, 0, r, lat);
    check(r.accepted, "task 6 released");
    request(1'b0, 99, 0, r, lat);
    check(!r.accepted, "task 99 unknown");
    check(pe_busy == '0 && pe_active == '0, "everything released");

    // 8. two-Dnode block-matching kernel: maps directly, is duplicated two
    //    layers on, and both instances run a block comparison
    request(1'b1, 7, 48, r, lat);
    check(r.accepted && r.rotation == 0, "task 7 mapped");
    repeat (30) @(negedge clk);
    check(dup_pe == 8'b0101_0000, $sformatf("task 7 duplicated on layers 2-3, dup_pe %b", dup_pe));
    begin
      logic [DW-1:0] sad [2];
      sad[0] = '0; sad[1] = '0;
      for (int k = 0; k < 64; k++)            // one 8 x 8 block per instance
        for (int inst = 0; inst < 2; inst++) begin
          automatic logic [DW-1:0] rr = DW'($urandom_range(255)), ss = DW'($urandom_range(255));
          automatic int d = int'(rr) - int'(ss);
          in_q[2 * inst].push_back(rr); in_q[2 * inst].push_back(ss);
          sad[inst] = sad[inst] + DW'(d < 0 ? -d : d);
          exp_q[2 * inst + 1].push_back(sad[inst]);
        end
      n_multislot += 128;
      wait_drained(5000);
    end
    request(1'b0, 7, 0, r, lat);
    check(r.accepted && pe_busy == '0 && pe_active == '0, "task 7 and its duplicate released");

    $display("mechanisms: direct=%0d rotated=%0d rot_step=%0d stall=%0d evict=%0d reject=%0d release=%0d dup=%0d dup_suspend=%0d fifo_wait=%0d multislot=%0d bus=%0d",
             n_direct, n_rotated, n_rot_step, n_stall, n_evict, n_reject, n_release, n_dup,
             n_dup_susp, n_fifo_wait, n_multislot, n_bus);
    $display("decision latency: min=%0d max=%0d cycles", lat_min, lat_max);
    check(n_direct > 0,    "direct mapping happened");
    check(n_rotated > 0,   "relocation by rotation happened");
    check(n_rot_step > 0,  "rotation search happened");
    check(n_stall > 0,     "stall of a running task happened");
    check(n_evict > 0,     "eviction happened");
    check(n_reject > 0,    "refusal happened");
    check(n_release > 0,   "release happened");
    check(n_dup > 0,       "duplication happened");
    check(n_dup_susp > 0,  "duplicate suspension happened");
    check(n_fifo_wait > 0, "FIFO wait happened");
    check(n_multislot > 0, "multi-slot sequencing exercised");
    check(n_bus > 0,       "bus network exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
