// tb_dhm_campaign: random task-scenario campaign on the 8-Dnode ring, run on
// two copies of the DHM controller, one with task duplication (TD) and one
// without, each with its own programme memory.
//
// How it works: 300 scenarios are run back to back. A scenario is a random set of 2..30 hardware tasks over
// n = 100 scheduling ticks. Each task has a random start tick, a duration of
// 4..40 ticks, a priority and a shape. The shape uses 1..3 consecutive layers
// from layer 0 at design time, with a random non-empty Dnode subset per layer
// and a random non-empty subset of those layers' FIFO channels. At each tick
// the ending tasks are released first, then the starting ones are requested,
// on both controllers. The OS side follows the controllers' answers. An
// evicted or refused task is taken to run on the CPU, and no end request is
// sent for it.
//
// Every decision is compared with a reference model of the mapping written
// here independently of the RTL. The model covers Lemma 1 and Lemma 2 over
// rotations 0..3, pre-emption of the lowest-priority task until the new one
// fits, eviction order and table placement. For each decision it checks:
//   * accepted, rotation and the evicted task ids;
//   * the exact decision latency, from the rotations tried, stalls, evictions
//     and configuration lines, plus one cycle when duplicates had to be
//     suspended first;
//   * after the background work settles, the busy and duplicate masks of both
//     controllers against the model's primary and duplicate placement.
//
// It reports, per scenario set:
//   * the multi-tasking efficiency MT_eff = accepted / requested, with the
//     controller and for a baseline model without relocation or pre-emption;
//   * the processing efficiency P_eff = busy Dnode-ticks / (n * 8), with and
//     without duplication;
//   * the offered workload WL = sum of Dnodes x duration / (n * 8) and the
//     time usage R = share of ticks with the co-processor in use.
// It also checks that duplication never changes acceptance and never lowers
// P_eff, and that the controller accepts at least as many tasks over the
// campaign as the baseline.
//
// Taken from the published evaluation: the 8-Dnode instance, random scenarios
// with variable task count, duration, size and priority, the three mapping
// procedures compared and the MT_eff and P_eff metrics. This design's own
// choices: the scenario sizes, the random shapes and a fixed linear
// congruential generator, so every run is the same.
module tb_dhm_campaign;
  import dhm_pkg::*;
  import dhm_tb_pkg::*;

  localparam int N_SCEN  = 300;
  localparam int N_TICKS = 100;
  localparam int MAX_T   = 30;
  localparam int SETTLE  = 70;   // cycles for background duplication to finish

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [CADDR_W-1:0] host_addr = '0;
  logic [MEM_W-1:0]   host_data = '0;

  // index 0: controller with duplication, index 1: without
  logic               req_valid [2];
  logic               req_ready [2];
  os_req_t            req       [2];
  logic               resp_valid[2];
  dhm_resp_t          resp      [2];
  logic               evict_valid[2];
  logic [TIDW-1:0]    evict_id  [2];
  logic [CADDR_W-1:0] evict_addr[2];
  logic [DW-1:0]      evict_ctx [2][N_PE];
  logic [DW-1:0]      acc_none  [N_PE];
  logic               mem_rd_en [2];
  logic [CADDR_W-1:0] mem_rd_addr[2];
  logic [MEM_W-1:0]   mem_rd_data[2];
  ring_cfg_t          ring_cfg  [2];
  logic [N_PE-1:0]    pe_busy   [2];
  logic [N_PE-1:0]    dup_pe    [2];
  logic [L_LAYERS-1:0] ch_busy  [2];
  dhm_events_t        ev        [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    cfg_mem u_mem (.clk, .wr_en(host_we), .wr_addr(host_addr), .wr_data(host_data),
                   .rd_en(mem_rd_en[g]), .rd_addr(mem_rd_addr[g]), .rd_data(mem_rd_data[g]));
    dhm_saturn #(.TD_EN(g == 0)) u_dhm (
      .clk, .rst_n,
      .req_valid(req_valid[g]), .req_ready(req_ready[g]), .req(req[g]),
      .resp_valid(resp_valid[g]), .resp(resp[g]),
      .evict_valid(evict_valid[g]), .evict_task_id(evict_id[g]),
      .evict_cfg_addr(evict_addr[g]), .evict_ctx(evict_ctx[g]), .pe_acc(acc_none),
      .mem_rd_en(mem_rd_en[g]), .mem_rd_addr(mem_rd_addr[g]), .mem_rd_data(mem_rd_data[g]),
      .ring_cfg(ring_cfg[g]), .pe_busy(pe_busy[g]), .ch_busy(ch_busy[g]),
      .dup_pe(dup_pe[g]), .ev(ev[g]));
  end

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // no ring here: the accumulators read as zero, so a context is all zero
  always_comb for (int p = 0; p < N_PE; p++) acc_none[p] = '0;

  int evq0 [$], evq1 [$];
  int bad_ctx = 0;
  always @(posedge clk) begin
    for (int g = 0; g < 2; g++)
      if (rst_n && evict_valid[g]) begin
        if (int'(evict_addr[g]) != int'(evict_id[g]) * 8) bad_ctx <= bad_ctx + 1;
        for (int p = 0; p < N_PE; p++) if (evict_ctx[g][p] != '0) bad_ctx <= bad_ctx + 1;
      end
    if (rst_n && evict_valid[0]) evq0.push_back(int'(evict_id[0]));
    if (rst_n && evict_valid[1]) evq1.push_back(int'(evict_id[1]));
  end

  // ------------------------------------------------------------ random numbers
  int unsigned seed = 32'h1234_5678;
  function automatic int rnd(input int n);
    seed = seed * 32'd1664525 + 32'd1013904223;
    return int'((seed >> 8) % n);
  endfunction

  // ------------------------------------------------------------ scenario
  typedef struct {
    int start, stop, prio, nl, nop, nch;
    bit [N_PE-1:0] topo;
    bit [L_LAYERS-1:0] chm;
    int where;          // 0 not started, 1 co-processor, 2 CPU
  } stask_t;
  stask_t st [MAX_T];
  int ntask;

  // ------------------------------------------------------------ reference model
  typedef struct {
    bit valid; int id; int prio; int nl; int nop; int nch;
    bit [N_PE-1:0] topo; bit [L_LAYERS-1:0] chm;
    bit [N_PE-1:0] pe; bit [L_LAYERS-1:0] ch;
    bit dup; bit [N_PE-1:0] dpe; bit [L_LAYERS-1:0] dch;
  } mtask_t;
  mtask_t mt [NTASK];

  function automatic bit [N_PE-1:0] m_rot_pe(input bit [N_PE-1:0] m, input int r);
    return (m << (D_PER_LAYER * r)) | (m >> (N_PE - D_PER_LAYER * r));
  endfunction
  function automatic bit [L_LAYERS-1:0] m_rot_ch(input bit [L_LAYERS-1:0] m, input int r);
    return (m << r) | (m >> (L_LAYERS - r));
  endfunction
  function automatic int ones(input bit [N_PE-1:0] m);
    int n = 0;
    for (int i = 0; i < N_PE; i++) n += int'(m[i]);
    return n;
  endfunction

  // Search rotations 0..3; returns fit, the rotation and the cycles spent.
  function automatic bit m_search(input int nop, input int nch, input bit [N_PE-1:0] topo,
                                  input bit [L_LAYERS-1:0] chm, input bit [N_PE-1:0] busy,
                                  input bit [L_LAYERS-1:0] chb, output int rot, output int ncheck);
    ncheck = 0; rot = 0;
    for (int r = 0; r < L_LAYERS; r++) begin
      bit [N_PE-1:0] p; bit [L_LAYERS-1:0] c; bit l1, l2;
      ncheck++;
      p  = m_rot_pe(topo, r);
      c  = m_rot_ch(chm, r);
      l1 = nop <= N_PE - ones(busy) && nch <= L_LAYERS - ones(N_PE'(chb));
      l2 = (p & busy) == 0 && (c & chb) == 0;
      if (l1 && l2) begin rot = r; return 1'b1; end
      if (!l1) return 1'b0;
    end
    return 1'b0;
  endfunction

  function automatic void m_busy(input bit [N_PE-1:0] skip, output bit [N_PE-1:0] b, output bit [L_LAYERS-1:0] c,
                                 input bit with_dup);
    b = '0; c = '0;
    for (int t = 0; t < NTASK; t++)
      if (mt[t].valid && !skip[t]) begin
        b |= mt[t].pe; c |= mt[t].ch;
        if (with_dup && mt[t].dup) begin b |= mt[t].dpe; c |= mt[t].dch; end
      end
  endfunction

  // Start request; returns accepted, rotation, evicted ids, base latency
  // (without the duplicate-suspension cycle).
  function automatic bit m_start(input int id, output int rot, output int evl [$], output int lat);
    bit [N_PE-1:0] stalled = '0;
    int nchk_total = 0, nstall = 0;
    bit [N_PE-1:0] b; bit [L_LAYERS-1:0] c;
    int nchk;
    evl = {};
    forever begin
      m_busy(stalled, b, c, 1'b0);
      if (m_search(st[id].nop, st[id].nch, st[id].topo, st[id].chm, b, c, rot, nchk)) begin
        nchk_total += nchk;
        break;
      end
      nchk_total += nchk;
      nstall++;
      begin
        int v = -1;
        for (int t = 0; t < NTASK; t++)
          if (mt[t].valid && !stalled[t] && (v < 0 || mt[t].prio < mt[v].prio)) v = t;
        if (v >= 0 && mt[v].prio < st[id].prio) stalled[v] = 1'b1;
        else begin
          lat = 1 + 1 + nchk_total + nstall + 1;
          return 1'b0;
        end
      end
    end
    // accepted: stalled tasks leave in table order, the new one takes the first free entry
    for (int t = 0; t < NTASK; t++)
      if (stalled[t]) begin evl.push_back(mt[t].id); mt[t].valid = 1'b0; end
    for (int t = 0; t < NTASK; t++)
      if (!mt[t].valid) begin
        mt[t] = '{valid: 1'b1, id: id, prio: st[id].prio, nl: st[id].nl, nop: st[id].nop,
                  nch: st[id].nch, topo: st[id].topo, chm: st[id].chm,
                  pe: m_rot_pe(st[id].topo, rot), ch: m_rot_ch(st[id].chm, rot),
                  dup: 1'b0, dpe: '0, dch: '0};
        break;
      end
    lat = 1 + 1 + nchk_total + nstall + (nstall > 0 ? evl.size() + 1 : 0) + 1 + st[id].nl + 1;
    return 1'b1;
  endfunction

  function automatic void m_stop(input int id);
    for (int t = 0; t < NTASK; t++)
      if (mt[t].valid && mt[t].id == id) mt[t].valid = 1'b0;
  endfunction

  function automatic void m_suspend_dups();
    for (int t = 0; t < NTASK; t++) mt[t].dup = 1'b0;
  endfunction

  // Background duplication: highest priority first, first table entry on ties.
  function automatic void m_duplicate();
    bit [N_PE-1:0] tried = '0;
    forever begin
      int cnd = -1;
      bit [N_PE-1:0] b; bit [L_LAYERS-1:0] c;
      int rot, nchk;
      for (int t = 0; t < NTASK; t++)
        if (mt[t].valid && !mt[t].dup && !tried[t] && (cnd < 0 || mt[t].prio > mt[cnd].prio))
          cnd = t;
      if (cnd < 0) return;
      tried[cnd] = 1'b1;
      m_busy('0, b, c, 1'b1);
      if (m_search(mt[cnd].nop, mt[cnd].nch, mt[cnd].topo, mt[cnd].chm, b, c, rot, nchk)) begin
        mt[cnd].dup = 1'b1;
        mt[cnd].dpe = m_rot_pe(mt[cnd].topo, rot);
        mt[cnd].dch = m_rot_ch(mt[cnd].chm, rot);
      end
    end
  endfunction

  // Baseline without DHM: design-time placement only, no pre-emption.
  bit [N_PE-1:0] base_busy;
  bit [L_LAYERS-1:0] base_ch;
  bit       base_on [MAX_T];

  // ------------------------------------------------------------ stimulus
  task automatic load_images();
    for (int k = 0; k < ntask; k++) begin
      logic [MEM_W-1:0] img [$];
      img = {header(st[k].nop, st[k].nch, st[k].topo, st[k].chm, st[k].prio, st[k].nl)};
      for (int i = 0; i < st[k].nl; i++)
        img.push_back(line(i, 0, w(OP_PASS, SRC_FIFO, SRC_ZERO, 1'b1),
                              w(OP_PASS, SRC_FIFO, SRC_ZERO, 1'b1)));
      foreach (img[i]) begin
        @(negedge clk);
        host_we = 1'b1; host_addr = CADDR_W'(k * 8 + i); host_data = img[i];
      end
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic request(input int g, input bit on, input int id,
                         output dhm_resp_t r, output int lat, output bit had_dup);
    int t0;
    @(negedge clk);
    req[g] = '{on: on, task_id: TIDW'(id), cfg_addr: CADDR_W'(id * 8)};
    req_valid[g] = 1'b1;
    while (!req_ready[g]) @(negedge clk);
    had_dup = dup_pe[g] != '0;
    t0 = cyc;
    @(negedge clk);
    req_valid[g] = 1'b0;
    while (!resp_valid[g]) @(negedge clk);
    lat = cyc - t0;
    r = resp[g];
  endtask

  // campaign totals
  int tot_lines = 0;
  int tot_req = 0, tot_acc = 0, tot_base = 0, tot_evict = 0, tot_rot = 0, tot_rej = 0;
  longint busy_td = 0, busy_smt = 0, wl_sum = 0;
  int used_ticks = 0;
  int lat_max = 0, lat_over = 0, n_dec = 0, n_dup = 0, n_lines = 0;
  always @(posedge clk) begin
    if (rst_n && ev[0].dup) n_dup <= n_dup + 1;
    if (rst_n && ring_cfg[1].we) n_lines <= n_lines + 1;
  end

  task automatic decide_start(input int id);
    int rot, lat_m, lat0, lat1;
    int evm [$];
    bit acc, susp, nd;
    dhm_resp_t r0, r1;
    m_suspend_dups();
    acc = m_start(id, rot, evm, lat_m);
    evq0 = {}; evq1 = {};
    fork
      request(0, 1'b1, id, r0, lat0, susp);
      request(1, 1'b1, id, r1, lat1, nd);
    join
    @(negedge clk);
    check(!nd, "no duplicate without TD");
    check(r0.accepted == acc && r1.accepted == acc,
          $sformatf("task %0d: accepted td=%0d smt=%0d model=%0d", id, r0.accepted, r1.accepted, acc));
    if (acc)
      check(int'(r0.rotation) == rot && int'(r1.rotation) == rot,
            $sformatf("task %0d: rotation td=%0d smt=%0d model=%0d", id, r0.rotation, r1.rotation, rot));
    check(evq0 == evm && evq1 == evm, $sformatf("task %0d: evicted tasks", id));
    check(lat1 == lat_m && lat0 == lat_m + int'(susp),
          $sformatf("task %0d: latency td=%0d smt=%0d model=%0d+%0d", id, lat0, lat1, lat_m, susp));
    foreach (evm[i]) st[evm[i]].where = 2;
    st[id].where = acc ? 1 : 2;
    tot_req++;
    tot_evict += evm.size();
    if (acc) begin tot_acc++; tot_lines += st[id].nl; if (rot != 0) tot_rot++; end
    else tot_rej++;
    n_dec++;
    if (lat0 > lat_max) lat_max = lat0;
    if (lat0 > 25) lat_over++;
    // baseline
    begin
      bit [N_PE-1:0] p; bit [L_LAYERS-1:0] c;
      p = st[id].topo; c = st[id].chm;
      if ((p & base_busy) == 0 && (c & base_ch) == 0) begin
        base_busy |= p; base_ch |= c; base_on[id] = 1'b1; tot_base++;
      end
    end
  endtask

  task automatic decide_stop(input int id);
    int lat0, lat1;
    bit susp, nd;
    dhm_resp_t r0, r1;
    m_suspend_dups();
    m_stop(id);
    fork
      request(0, 1'b0, id, r0, lat0, susp);
      request(1, 1'b0, id, r1, lat1, nd);
    join
    check(r0.accepted && r1.accepted, $sformatf("task %0d released", id));
    check(lat1 == 3 && lat0 == 3 + int'(susp), $sformatf("task %0d: release latency %0d/%0d", id, lat0, lat1));
    st[id].where = 2;
    if (base_on[id]) begin
      base_busy &= ~st[id].topo; base_ch &= ~st[id].chm; base_on[id] = 1'b0;
    end
  endtask

  task automatic settle_and_compare(input int s, input int tick);
    bit [N_PE-1:0] b, d; bit [L_LAYERS-1:0] c;
    repeat (SETTLE) @(negedge clk);
    m_duplicate();
    m_busy('0, b, c, 1'b0);
    d = '0;
    for (int t = 0; t < NTASK; t++) if (mt[t].valid && mt[t].dup) d |= mt[t].dpe;
    check(ch_busy[1] == c, $sformatf("scenario %0d tick %0d: channels without TD", s, tick));
    check(pe_busy[1] == b && dup_pe[1] == '0,
          $sformatf("scenario %0d tick %0d: busy without TD %b, model %b", s, tick, pe_busy[1], b));
    check(pe_busy[0] == (b | d) && dup_pe[0] == d,
          $sformatf("scenario %0d tick %0d: TD busy %b dup %b, model %b dup %b",
                    s, tick, pe_busy[0], dup_pe[0], b | d, d));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 2; g++) begin req_valid[g] = 1'b0; req[g] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < N_SCEN; s++) begin
      // scenario
      ntask = 2 + rnd(MAX_T - 1);
      for (int k = 0; k < ntask; k++) begin
        int nl;
        nl = 1 + rnd(3);
        st[k].nl = nl;
        st[k].topo = '0;
        for (int i = 0; i < nl; i++)
          st[k].topo[D_PER_LAYER * i +: D_PER_LAYER] = D_PER_LAYER'(1 + rnd((1 << D_PER_LAYER) - 1));
        do st[k].chm = L_LAYERS'(rnd(1 << L_LAYERS)) & L_LAYERS'((1 << nl) - 1); while (st[k].chm == 0);
        st[k].nop   = ones(st[k].topo);
        st[k].nch   = ones(N_PE'(st[k].chm));
        st[k].prio  = rnd(8);
        st[k].start = rnd(N_TICKS - 4);
        st[k].stop  = st[k].start + 4 + rnd(37);
        st[k].where = 0;
        wl_sum += longint'(st[k].nop * ((st[k].stop < N_TICKS ? st[k].stop : N_TICKS) - st[k].start));
        base_on[k]  = 1'b0;
      end
      for (int t = 0; t < NTASK; t++) mt[t].valid = 1'b0;
      base_busy = '0; base_ch = '0;
      load_images();
      for (int tick = 0; tick < N_TICKS; tick++) begin
        bit any;
        any = 1'b0;
        for (int k = 0; k < ntask; k++)
          if (st[k].stop == tick && st[k].where == 1) begin decide_stop(k); any = 1'b1; end
          else if (st[k].stop == tick && base_on[k]) begin
            base_busy &= ~st[k].topo; base_ch &= ~st[k].chm; base_on[k] = 1'b0;
          end
        for (int k = 0; k < ntask; k++)
          if (st[k].start == tick) begin decide_start(k); any = 1'b1; end
        if (any) settle_and_compare(s, tick);
        busy_td  += longint'(ones(pe_busy[0]));
        if (pe_busy[1] != '0) used_ticks++;
        busy_smt += longint'(ones(pe_busy[1]));
      end
      // end of scenario: release what is still running
      for (int k = 0; k < ntask; k++)
        if (st[k].where == 1) decide_stop(k);
      settle_and_compare(s, N_TICKS);
      check(pe_busy[0] == '0 && pe_busy[1] == '0, $sformatf("scenario %0d: ring empty at the end", s));
    end

    $display("campaign: %0d scenarios x %0d ticks, %0d requests", N_SCEN, N_TICKS, tot_req);
    $display("  MT_eff  DHM %0d%% (rotated %0d, evicted %0d, refused %0d), without DHM %0d%%",
             100 * tot_acc / tot_req, tot_rot, tot_evict, tot_rej, 100 * tot_base / tot_req);
    $display("  P_eff   SMT %0d%%, SMT+TD %0d%%",
             int'(100 * busy_smt / (N_SCEN * N_TICKS * N_PE)), int'(100 * busy_td / (N_SCEN * N_TICKS * N_PE)));
    $display("  workload WL %0d%%, time usage R %0d%%",
             int'(100 * wl_sum / (N_SCEN * N_TICKS * N_PE)), 100 * used_ticks / (N_SCEN * N_TICKS));
    $display("  duplicates placed %0d, configuration lines written without TD %0d", n_dup, n_lines);
    $display("  decision latency max %0d cycles, %0d of %0d decisions over 25", lat_max, lat_over, n_dec);
    check(bad_ctx == 0, "every eviction reported the task's programme address");
    check(n_lines == tot_lines, "every accepted task's configuration lines were written once");
    check(busy_td >= busy_smt, "duplication never lowers processing efficiency");
    check(busy_td > busy_smt, "duplication raised processing efficiency");
    check(tot_acc >= tot_base, "DHM accepts at least as many tasks as the fixed placement");
    check(tot_rot > 0 && tot_evict > 0 && tot_rej > 0 && n_dup > 0,
          "relocation, eviction, refusal and duplication all happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
