// dhm_saturn: hardware DHM (dynamic hardware multiplexing) controller.
//
// A configuration processor that maps hardware tasks onto the systolic ring at
// run time. On a task-start request from the OS it reads the task header from
// the programme memory, tests Lemma 1 (enough free Dnodes and FIFO channels) and
// Lemma 2 (no overlap with running tasks) at the design-time placement and then
// at each rotation r = 1..l-1 of the configuration along the ring. When no
// rotation fits and the new task has a higher priority than a running one, the
// lowest-priority running task is stalled (left out of the analysis) and the
// rotations are tried again; this repeats until the task fits or no
// lower-priority task remains. On success the stalled tasks are removed and
// reported to the OS (evict_*) so that they continue on the CPU; on failure
// the stalled tasks simply keep running and the request is refused (the task
// runs on the CPU). A mapped task's configuration lines are then read one per
// cycle and written to the ring, moved to layer (layer + r) mod l and with their
// bus selections rotated by r as well. A task-end request releases the task.
//
// Task duplication (TD_EN): whenever the controller is idle after a request,
// it tries, in decreasing priority order, to map a second instance of each
// running task on the free resources with the same rotation search. A new
// request first suspends every duplicate.
//
// Interface: OS requests with a valid/ready handshake (req_ready is high only
// when idle); one resp_valid strobe per request, the interrupt to the micro
// kernel; evict_valid strobes once per removed task, with evict_task_id,
// evict_cfg_addr and evict_ctx (indexed by design-time Dnode, zero outside the
// task's topology) valid in the same cycle; a synchronous-read port to
// cfg_mem; the ring configuration port. pe_busy/ch_busy/dup_pe are the
// resource state registers seen from outside.
//
// Timing: a request whose task fits at its design-time placement and has one
// configuration line completes in 6 cycles counted from the handshake cycle to
// the resp_valid cycle, both included (the minimum latency reported for the
// hardware controller). Each extra rotation adds 1 cycle, each extra line 1
// cycle, each stalled task 1 cycle plus its re-analysis, each eviction 1 cycle.
//
// From the document: the lemmas, the rotation transform, priority-based
// pre-emption, task duplication with suspension on a new request, the FSM with
// a programme counter reading headers and configuration words, and handing a
// CPU-equivalent context to the OS for a removed task. This design's own: the
// header and line encodings, the state encoding, the task table, the
// tie-breaking rules (lowest table index first), keeping stalled tasks
// running until the analysis has succeeded, and the content of the context
// (programme address plus accumulators).
module dhm_saturn
  import dhm_pkg::*;
#(
  parameter bit TD_EN = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  // OS request / interrupt
  input  logic               req_valid,
  output logic               req_ready,
  input  os_req_t            req,
  output logic               resp_valid,
  output dhm_resp_t          resp,
  output logic               evict_valid,
  output logic [TIDW-1:0]    evict_task_id,
  output logic [CADDR_W-1:0] evict_cfg_addr,
  output logic [DW-1:0]      evict_ctx [N_PE],
  // accumulators of the ring's Dnodes, for the context of a removed task
  input  logic [DW-1:0]      pe_acc [N_PE],
  // programme memory
  output logic               mem_rd_en,
  output logic [CADDR_W-1:0] mem_rd_addr,
  input  logic [MEM_W-1:0]   mem_rd_data,
  // ring configuration
  output ring_cfg_t          ring_cfg,
  // state
  output logic [N_PE-1:0]     pe_busy,
  output logic [L_LAYERS-1:0] ch_busy,
  output logic [N_PE-1:0]     dup_pe,
  output dhm_events_t         ev
);
  localparam int unsigned TW = (NTASK > 1) ? $clog2(NTASK) : 1;

  typedef struct packed {
    logic                valid;
    logic [TIDW-1:0]     id;
    cfg_header_t         hdr;
    logic [CADDR_W-1:0]  addr;
    logic [LW-1:0]       rot;
    logic [N_PE-1:0]     pe;
    logic [L_LAYERS-1:0] ch;
    logic                dup;
    logic [N_PE-1:0]     dpe;
    logic [L_LAYERS-1:0] dch;
  } task_t;

  typedef enum logic [3:0] {
    S_IDLE, S_SUSP, S_HDR, S_CHECK, S_STALL, S_EVICT, S_MAP, S_LOAD,
    S_OFF, S_DONE, S_TD_PICK, S_TD_CHECK
  } state_e;

  state_e             state;
  task_t              tbl [NTASK];
  os_req_t            req_q;
  cfg_header_t        hdr_q;
  logic [LW-1:0]      r;
  logic [NTASK-1:0]   stalled, tried;
  logic [TW-1:0]      cur;
  logic               ld_dup;
  logic [LW-1:0]      ld_rot;
  logic [N_PE-1:0]    ld_pe;
  logic [CADDR_W-1:0] ld_base;
  logic [NLINEW-1:0]  ld_idx, ld_n;
  logic               td_pending;
  dhm_resp_t          resp_d;

  // ------------------------------------------------------------ resource state
  logic [N_PE-1:0]     busy_eff, busy_all, dup_all;
  logic [L_LAYERS-1:0] chb_eff, chb_all;
  logic                any_dup;
  always_comb begin
    busy_eff = '0; busy_all = '0; dup_all = '0; chb_eff = '0; chb_all = '0; any_dup = 1'b0;
    for (int t = 0; t < NTASK; t++) begin
      if (tbl[t].valid) begin
        busy_all |= tbl[t].pe | (tbl[t].dup ? tbl[t].dpe : '0);
        chb_all  |= tbl[t].ch | (tbl[t].dup ? tbl[t].dch : '0);
        dup_all  |= tbl[t].dup ? tbl[t].dpe : '0;
        any_dup  |= tbl[t].dup;
        if (!stalled[t]) begin
          busy_eff |= tbl[t].pe | (tbl[t].dup ? tbl[t].dpe : '0);
          chb_eff  |= tbl[t].ch | (tbl[t].dup ? tbl[t].dch : '0);
        end
      end
    end
  end
  assign pe_busy = busy_all;
  assign ch_busy = chb_all;
  assign dup_pe  = dup_all;

  // ------------------------------------------------------------ selections
  // Lowest-priority running task not yet stalled (pre-emption victim), highest-
  // priority running task without a duplicate not yet tried (TD candidate),
  // first free table entry, and the entry of the task named by a request.
  logic          vic_ok, cand_ok, free_ok, hit_ok, stall_any;
  logic [TW-1:0] vic, cand, free_i, hit, stall_i;
  always_comb begin
    vic_ok = 1'b0; vic = '0; cand_ok = 1'b0; cand = '0;
    free_ok = 1'b0; free_i = '0; hit_ok = 1'b0; hit = '0;
    stall_any = 1'b0; stall_i = '0;
    for (int t = 0; t < NTASK; t++) begin
      if (tbl[t].valid && !stalled[t] &&
          (!vic_ok || tbl[t].hdr.prio < tbl[vic].hdr.prio)) begin
        vic_ok = 1'b1; vic = TW'(t);
      end
      if (tbl[t].valid && !tbl[t].dup && !tried[t] &&
          (!cand_ok || tbl[t].hdr.prio > tbl[cand].hdr.prio)) begin
        cand_ok = 1'b1; cand = TW'(t);
      end
      if (!tbl[t].valid && !free_ok) begin
        free_ok = 1'b1; free_i = TW'(t);
      end
      if (tbl[t].valid && tbl[t].id == req_q.task_id && !hit_ok) begin
        hit_ok = 1'b1; hit = TW'(t);
      end
      if (tbl[t].valid && stalled[t] && !stall_any) begin
        stall_any = 1'b1; stall_i = TW'(t);
      end
    end
  end

  // ------------------------------------------------------------ fit check
  logic                td_mode;
  cfg_header_t         fc_hdr;
  logic [N_PE-1:0]     fc_pe;
  logic [L_LAYERS-1:0] fc_ch;
  logic                fc_l1, fc_l2, fc_fit;
  assign td_mode = (state == S_TD_CHECK);
  assign fc_hdr  = td_mode ? tbl[cur].hdr : hdr_q;

  dhm_fit_check u_fit (
    .hdr(fc_hdr), .rot(r),
    .pe_busy(td_mode ? busy_all : busy_eff),
    .ch_busy(td_mode ? chb_all  : chb_eff),
    .pe_mask(fc_pe), .ch_mask(fc_ch),
    .lemma1(fc_l1), .lemma2(fc_l2), .fit(fc_fit));

  // ------------------------------------------------------------ memory and ring ports
  cfg_line_t line;
  assign line      = cfg_line_t'(mem_rd_data[LINE_W-1:0]);
  assign req_ready = (state == S_IDLE);

  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = '0;
    ring_cfg    = '0;
    unique case (state)
      S_IDLE: if (req_valid && !any_dup && req.on) begin
        mem_rd_en = 1'b1; mem_rd_addr = req.cfg_addr;
      end
      S_SUSP: begin
        ring_cfg.clr = dup_all;
        if (req_q.on) begin mem_rd_en = 1'b1; mem_rd_addr = req_q.cfg_addr; end
      end
      S_MAP: if (hdr_q.n_lines != 0) begin
        mem_rd_en = 1'b1; mem_rd_addr = req_q.cfg_addr + 1'b1;
      end
      S_TD_CHECK: if (fc_fit && tbl[cur].hdr.n_lines != 0) begin
        mem_rd_en = 1'b1; mem_rd_addr = tbl[cur].addr + 1'b1;
      end
      S_LOAD: begin
        ring_cfg.we    = 1'b1;
        ring_cfg.layer = add_layer(line.layer, ld_rot);
        ring_cfg.slot  = line.slot;
        for (int j = 0; j < D_PER_LAYER; j++) begin
          ring_cfg.den[j]          = ld_pe[int'(ring_cfg.layer) * D_PER_LAYER + j];
          ring_cfg.word[j]         = line.word[j];
          ring_cfg.word[j].bus_sel = add_layer(line.word[j].bus_sel, ld_rot);
        end
        if (ld_idx + 1'b1 < ld_n) begin
          mem_rd_en   = 1'b1;
          mem_rd_addr = ld_base + CADDR_W'(ld_idx) + CADDR_W'(2);
        end
      end
      S_EVICT: if (stall_any) ring_cfg.clr = tbl[stall_i].pe | (tbl[stall_i].dup ? tbl[stall_i].dpe : '0);
      S_OFF:   if (hit_ok) ring_cfg.clr = tbl[hit].pe | (tbl[hit].dup ? tbl[hit].dpe : '0);
      default: ;
    endcase
  end

  // ------------------------------------------------------------ controller FSM
  always_ff @(posedge clk) begin
    ev          <= '0;
    evict_valid <= 1'b0;
    resp_valid  <= 1'b0;
    if (!rst_n) begin
      state      <= S_IDLE;
      for (int t = 0; t < NTASK; t++) tbl[t] <= '0;
      req_q      <= '0;
      hdr_q      <= '0;
      r          <= '0;
      stalled    <= '0;
      tried      <= '0;
      cur        <= '0;
      ld_dup     <= 1'b0;
      ld_rot     <= '0;
      ld_pe      <= '0;
      ld_base    <= '0;
      ld_idx     <= '0;
      ld_n       <= '0;
      td_pending <= 1'b0;
      resp       <= '0;
      resp_d     <= '0;
      evict_task_id <= '0;
      evict_cfg_addr <= '0;
      for (int p = 0; p < N_PE; p++) evict_ctx[p] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            req_q   <= req;
            stalled <= '0;
            if (any_dup)     state <= S_SUSP;
            else if (req.on) state <= S_HDR;
            else             state <= S_OFF;
          end else if (td_pending) begin
            state <= S_TD_PICK;
          end
        end
        S_SUSP: begin
          for (int t = 0; t < NTASK; t++) tbl[t].dup <= 1'b0;
          ev.dup_suspend <= 1'b1;
          state <= req_q.on ? S_HDR : S_OFF;
        end
        S_HDR: begin
          hdr_q <= cfg_header_t'(mem_rd_data[HDR_W-1:0]);
          r     <= '0;
          state <= S_CHECK;
        end
        S_CHECK: begin
          if (fc_fit) begin
            state <= stall_any ? S_EVICT : S_MAP;
          end else if (!fc_l1 || int'(r) == L_LAYERS - 1) begin
            state <= S_STALL;
          end else begin
            r           <= r + 1'b1;
            ev.rot_step <= 1'b1;
          end
        end
        S_STALL: begin
          if (vic_ok && tbl[vic].hdr.prio < hdr_q.prio) begin
            stalled[vic] <= 1'b1;
            r            <= '0;
            ev.stall     <= 1'b1;
            state        <= S_CHECK;
          end else begin
            stalled   <= '0;
            ev.reject <= 1'b1;
            resp_d    <= '{on: 1'b1, accepted: 1'b0, task_id: req_q.task_id, rotation: '0};
            state     <= S_DONE;
          end
        end
        S_EVICT: begin
          if (stall_any) begin
            tbl[stall_i].valid <= 1'b0;
            stalled[stall_i]   <= 1'b0;
            evict_valid        <= 1'b1;
            evict_task_id      <= tbl[stall_i].id;
            evict_cfg_addr     <= tbl[stall_i].addr;
            for (int i = 0; i < L_LAYERS; i++)
              for (int j = 0; j < D_PER_LAYER; j++)
                evict_ctx[i * D_PER_LAYER + j] <= tbl[stall_i].hdr.topology[i * D_PER_LAYER + j]
                    ? pe_acc[int'(add_layer(LW'(i), tbl[stall_i].rot)) * D_PER_LAYER + j] : '0;
            ev.evict           <= 1'b1;
          end else begin
            state <= S_MAP;
          end
        end
        S_MAP: begin
          tbl[free_i] <= '{valid: 1'b1, id: req_q.task_id, hdr: hdr_q, addr: req_q.cfg_addr,
                           rot: r, pe: fc_pe, ch: fc_ch, dup: 1'b0, dpe: '0, dch: '0};
          if (r == '0) ev.direct  <= 1'b1;
          else         ev.rotated <= 1'b1;
          resp_d  <= '{on: 1'b1, accepted: 1'b1, task_id: req_q.task_id, rotation: r};
          cur     <= free_i;
          ld_dup  <= 1'b0;
          ld_rot  <= r;
          ld_pe   <= fc_pe;
          ld_base <= req_q.cfg_addr;
          ld_idx  <= '0;
          ld_n    <= hdr_q.n_lines;
          state   <= (hdr_q.n_lines != 0) ? S_LOAD : S_DONE;
        end
        S_LOAD: begin
          if (ld_idx + 1'b1 < ld_n) begin
            ld_idx <= ld_idx + 1'b1;
          end else if (ld_dup) begin
            tried[cur] <= 1'b1;
            state      <= S_TD_PICK;
          end else begin
            state <= S_DONE;
          end
        end
        S_OFF: begin
          if (hit_ok) begin
            tbl[hit].valid <= 1'b0;
            ev.released    <= 1'b1;
          end
          resp_d <= '{on: 1'b0, accepted: hit_ok, task_id: req_q.task_id, rotation: '0};
          state  <= S_DONE;
        end
        S_DONE: begin
          resp_valid <= 1'b1;
          resp       <= resp_d;
          td_pending <= TD_EN;
          tried      <= '0;
          state      <= S_IDLE;
        end
        S_TD_PICK: begin
          if (req_valid) begin
            state <= S_IDLE;
          end else if (!cand_ok) begin
            td_pending <= 1'b0;
            state      <= S_IDLE;
          end else begin
            cur   <= cand;
            r     <= '0;
            state <= S_TD_CHECK;
          end
        end
        S_TD_CHECK: begin
          if (fc_fit) begin
            tbl[cur].dup <= 1'b1;
            tbl[cur].dpe <= fc_pe;
            tbl[cur].dch <= fc_ch;
            ev.dup       <= 1'b1;
            if (r != '0) ev.rotated <= 1'b1;
            ld_dup  <= 1'b1;
            ld_rot  <= r;
            ld_pe   <= fc_pe;
            ld_base <= tbl[cur].addr;
            ld_idx  <= '0;
            ld_n    <= tbl[cur].hdr.n_lines;
            if (tbl[cur].hdr.n_lines != 0) state <= S_LOAD;
            else begin
              tried[cur] <= 1'b1;
              state      <= S_TD_PICK;
            end
          end else if (!fc_l1 || int'(r) == L_LAYERS - 1) begin
            tried[cur] <= 1'b1;
            state      <= S_TD_PICK;
          end else begin
            r           <= r + 1'b1;
            ev.rot_step <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Invariant of the mapping: no Dnode is owned by two instances.
  logic overlap;
  always_comb begin
    logic [N_PE-1:0] seen;
    seen = '0;
    overlap = 1'b0;
    for (int t = 0; t < NTASK; t++) begin
      if (tbl[t].valid) begin
        overlap |= |(seen & tbl[t].pe);
        seen    |= tbl[t].pe;
        if (tbl[t].dup) begin
          overlap |= |(seen & tbl[t].dpe);
          seen    |= tbl[t].dpe;
        end
      end
    end
  end
  always_ff @(posedge clk) begin
    if (rst_n) assert (!overlap) else $error("dhm_saturn: two task instances share a Dnode");
  end
endmodule
