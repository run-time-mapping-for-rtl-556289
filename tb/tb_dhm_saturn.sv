// tb_dhm_saturn: drives the DHM controller (with its programme memory) through
// the relocation example of the document and through pre-emption, refusal,
// duplication and release, checking every decision, rotation, eviction and the
// context handed over for it (programme address and accumulators put back at
// their design-time Dnodes, from stand-in accumulator values), ring
// configuration write and clear, the resource registers and the decision
// latency (6 cycles for a task that fits at once with one configuration line).
//
// Example (relocation figure): a 4-Dnode task holding layers 0-1 is running; a
// second 4-Dnode task with the same design-time placement arrives. Condition 2
// fails at rotation 0 and 1 and holds at rotation 2, so it lands on layers 2-3.
module tb_dhm_saturn;
  import dhm_pkg::*;
  import dhm_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready;
  os_req_t req;
  logic resp_valid;
  dhm_resp_t resp;
  logic evict_valid;
  logic [TIDW-1:0] evict_task_id;
  logic [CADDR_W-1:0] evict_cfg_addr;
  logic [DW-1:0] evict_ctx [N_PE];
  logic [DW-1:0] pe_acc [N_PE];
  logic mem_rd_en;
  logic [CADDR_W-1:0] mem_rd_addr;
  logic [MEM_W-1:0] mem_rd_data;
  ring_cfg_t ring_cfg;
  logic [N_PE-1:0] pe_busy, dup_pe;
  logic [L_LAYERS-1:0] ch_busy;
  dhm_events_t ev;
  logic host_we = 1'b0;
  logic [CADDR_W-1:0] host_addr = '0;
  logic [MEM_W-1:0] host_data = '0;

  int checks = 0, failures = 0;
  int cyc = 0;

  cfg_mem u_mem (.clk, .wr_en(host_we), .wr_addr(host_addr), .wr_data(host_data),
                 .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data));
  dhm_saturn dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ring configuration monitor
  typedef struct { int layer; int slot; logic [1:0] den; int bus0; } wr_t;
  wr_t writes [$];
  logic [N_PE-1:0] clears;
  int evicts [$];
  int ev_addr [$];
  logic [DW-1:0] ev_ctx [$][N_PE];
  always @(posedge clk) begin
    if (rst_n && ring_cfg.we)
      writes.push_back('{int'(ring_cfg.layer), int'(ring_cfg.slot), ring_cfg.den,
                         int'(ring_cfg.word[0].bus_sel)});
    if (rst_n) clears |= ring_cfg.clr;
    if (evict_valid) begin
      evicts.push_back(int'(evict_task_id));
      ev_addr.push_back(int'(evict_cfg_addr));
      ev_ctx.push_back(evict_ctx);
    end
  end

  task automatic load(input int addr, input logic [MEM_W-1:0] img [$]);
    foreach (img[i]) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = CADDR_W'(addr + i); host_data = img[i];
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // Issue a request and wait for the decision; returns the latency in cycles
  // from the handshake cycle to the response cycle, both included.
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
  endtask

  task automatic settle();   // let background duplication finish
    repeat (30) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MEM_W-1:0] img [$];
    dhm_resp_t r;
    int lat;
    req = '0;
    clears = '0;
    for (int p = 0; p < N_PE; p++) pe_acc[p] = DW'(16'h0100 + p);   // stand-in accumulators
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // task images
    img = {header(4, 2, 8'b0000_1111, 4'b0011, 2, 1),
           line(0, 0, w(OP_ADD, 0, 1), w(OP_SUB, 0, 1))};
    load(0, img);                                           // "MAD", 1 line
    img = {header(4, 2, 8'b0000_1111, 4'b0011, 3, 2),
           line(0, 0, w(OP_ADD, SRC_FIFO, SRC_FIFO, 1), w(OP_SUB, 0, 1)),
           line(1, 0, w(OP_MAC, SRC_BUS, 0, 0, 1, 0, 1), w(OP_MAC, 1, 1))};
    load(8, img);                                           // "DCT", 2 lines, bus 1
    img = {header(6, 3, 8'b0011_1111, 4'b0111, 5, 1),
           line(0, 0, w(OP_PASS, 0, 0), w(OP_PASS, 0, 0))};
    load(16, img);                                          // big, high priority
    img = {header(4, 2, 8'b0000_1111, 4'b0011, 1, 1),
           line(0, 0, w(OP_PASS, 0, 0), w(OP_PASS, 0, 0))};
    load(24, img);                                          // low priority
    repeat (2) @(negedge clk);

    // ---- 1: first task maps directly, 6-cycle decision
    writes = {};
    request(1'b1, 10, 0, r, lat);
    check(r.on && r.accepted && r.task_id == 10 && r.rotation == 0, "task 10 accepted unrotated");
    check(lat == 6, $sformatf("minimum decision latency 6 cycles, got %0d", lat));
    check(writes.size() == 1 && writes[0].layer == 0 && writes[0].den == 2'b11, "task 10 line at layer 0");
    check(pe_busy[3:0] == 4'b1111, "task 10 holds layers 0-1");
    // ---- duplication in the background: rotation 2 is the first that fits
    writes = {};
    settle();
    check(dup_pe == 8'b1111_0000, "task 10 duplicated onto layers 2-3");
    check(writes.size() == 1 && writes[0].layer == 2, "duplicate line moved to layer 2");
    check(pe_busy == 8'hFF && ch_busy == 4'hF, "ring full with the duplicate");

    // ---- 2: relocation example: duplicates suspended, rotation by 2
    writes = {}; clears = '0;
    request(1'b1, 11, 8, r, lat);
    check(r.accepted && r.rotation == 2, $sformatf("task 11 rotated by 2 (got %0d)", r.rotation));
    check(clears == 8'b1111_0000, "duplicate suspended before the analysis");
    check(lat == 10, $sformatf("latency with suspension and 2 rotations: 10, got %0d", lat));
    check(writes.size() == 2 && writes[0].layer == 2 && writes[1].layer == 3,
          "task 11 lines moved to layers 2 and 3");
    check(writes.size() == 2 && writes[1].bus0 == 3, "bus selection rotated from 1 to 3");
    check(pe_busy == 8'hFF && dup_pe == '0, "both tasks resident, no duplicate");
    settle();
    check(dup_pe == '0, "no room for duplicates");

    // ---- 3: pre-emption: needs 6 Dnodes, priority 5 stalls 10 (prio 2) then 11 (prio 3)
    evicts = {}; ev_addr = {}; ev_ctx = {}; clears = '0; writes = {};
    request(1'b1, 12, 16, r, lat);
    check(r.accepted && r.rotation == 0, "task 12 accepted after pre-emption");
    check(evicts.size() == 2 && evicts[0] == 10 && evicts[1] == 11, "tasks 10 and 11 evicted to the CPU");
    // contexts: task 10 ran unrotated on Dnodes 0-3, task 11 rotated by 2 on Dnodes 4-7;
    // both are reported at their design-time Dnodes 0-3
    if (evicts.size() == 2) begin
      check(ev_addr[0] == 0 && ev_addr[1] == 8, "evicted tasks' programme addresses");
      for (int p = 0; p < N_PE; p++) begin
        check(ev_ctx[0][p] == (p < 4 ? DW'(16'h0100 + p) : '0),
              $sformatf("task 10 context at Dnode %0d: %h", p, ev_ctx[0][p]));
        check(ev_ctx[1][p] == (p < 4 ? DW'(16'h0104 + p) : '0),
              $sformatf("task 11 context at Dnode %0d: %h (undone rotation)", p, ev_ctx[1][p]));
      end
    end
    check(clears == 8'hFF, "evicted Dnodes released");
    check(pe_busy == 8'b0011_1111 && ch_busy == 4'b0111, "task 12 resources");
    check(lat <= 25, $sformatf("pre-emption latency within 25 cycles, got %0d", lat));
    settle();

    // ---- 4: refusal: priority 1 cannot displace anything, nothing changes
    evicts = {}; clears = '0; writes = {};
    request(1'b1, 13, 24, r, lat);
    check(!r.accepted && r.task_id == 13, "task 13 refused (runs on the CPU)");
    check(evicts.size() == 0 && clears == '0 && writes.size() == 0, "refusal touches nothing");
    check(pe_busy == 8'b0011_1111, "task 12 still resident");
    settle();
    check(dup_pe == '0, "six-Dnode task cannot be duplicated");

    // ---- 5: release, then unknown task end
    clears = '0;
    request(1'b0, 12, 0, r, lat);
    check(!r.on && r.accepted, "task 12 released");
    check(clears == 8'b0011_1111 && pe_busy == '0, "task 12 Dnodes freed");
    request(1'b0, 99, 0, r, lat);
    check(!r.on && !r.accepted, "unknown task end reported as not found");

    // ---- 6: priority rule on equal priority: 13 (prio 1) cannot evict prio-1 task
    request(1'b1, 20, 24, r, lat);
    check(r.accepted && r.rotation == 0, "task 20 accepted");
    settle();
    request(1'b1, 21, 24, r, lat);
    check(r.accepted && r.rotation == 2, "task 21 rotated by 2 after duplicate suspension");
    request(1'b1, 22, 24, r, lat);
    check(!r.accepted, "equal priority does not pre-empt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
