// systolic_ring: the operating layer of the reconfigurable co-processor.
//
// L_LAYERS layers of D_PER_LAYER Dnodes are closed into a ring: the Dnodes of
// layer i take their neighbour operands from the Dnodes of layer (i-1) mod l,
// through the switch of layer i, so a pipelined kernel flows around the ring in
// one direction. Every layer also has an input FIFO and an output FIFO towards
// the data access side and a bus that any switch can read (the bus network used
// to feed data back to earlier layers). Dnodes fire in dataflow order: each
// value a Dnode or a bus produces carries a one-cycle token, and a Dnode
// executes when the operands it names are fresh (see ring_switch). Each Dnode has its own 8-word
// configuration bank and local sequencer.
//
// Configuration port (cfg): with cfg.we, configuration slot cfg.slot of every
// Dnode j of physical layer cfg.layer with cfg.den[j] set is loaded with
// cfg.word[j]; writing slot 0 also clears that Dnode's accumulator and register
// file. cfg.clr[p] empties Dnode p (it becomes idle). A whole layer can be
// configured in one cycle, as in the ring described for this controller.
//
// Data ports: in_push/in_data write layer i's input FIFO (in_full is its full
// flag); out_pop/out_data/out_empty read layer i's output FIFO (first-word
// fall-through). pe_active shows which Dnodes hold a configuration,
// layer_stall which layers had a Dnode waiting on a FIFO this cycle, and
// pe_acc[p] is the accumulator of Dnode p = i*d + j (read by the controller to
// build the context of a task it removes).
module systolic_ring
  import dhm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  ring_cfg_t     cfg,
  input  logic          in_push  [L_LAYERS],
  input  logic [DW-1:0] in_data  [L_LAYERS],
  output logic          in_full  [L_LAYERS],
  input  logic          out_pop  [L_LAYERS],
  output logic [DW-1:0] out_data [L_LAYERS],
  output logic          out_empty[L_LAYERS],
  output logic [N_PE-1:0] pe_active,
  output logic [L_LAYERS-1:0] layer_stall,
  output logic [DW-1:0] pe_acc [N_PE]
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [DW-1:0] acc      [L_LAYERS][D_PER_LAYER];
  logic          vld      [L_LAYERS][D_PER_LAYER];
  logic          bus_vld  [L_LAYERS];
  logic [DW-1:0] result   [L_LAYERS][D_PER_LAYER];
  dnode_cfg_t    pe_cfg   [L_LAYERS][D_PER_LAYER];
  logic          pe_act   [L_LAYERS][D_PER_LAYER];
  logic          pe_go    [L_LAYERS][D_PER_LAYER];
  logic [DW-1:0] sw_in    [L_LAYERS][D_PER_LAYER][N_SW_IN];
  logic [DW-1:0] bus_q    [L_LAYERS];
  logic [DW-1:0] fin_head [L_LAYERS];
  logic          fin_empty[L_LAYERS];
  logic          fin_pop  [L_LAYERS];
  logic          fout_full[L_LAYERS];
  logic          fout_push[L_LAYERS];
  logic [DW-1:0] fout_data[L_LAYERS];

  for (genvar i = 0; i < L_LAYERS; i++) begin : g_layer
    localparam int unsigned PREV = (i + L_LAYERS - 1) % L_LAYERS;
    logic [CW-1:0] fin_cnt, fout_cnt;
    logic          fin_full_l, fout_empty_l;

    sync_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_fin (
      .clk, .rst_n,
      .wr_en(in_push[i]), .wr_data(in_data[i]),
      .rd_en(fin_pop[i]), .rd_data(fin_head[i]),
      .empty(fin_empty[i]), .full(fin_full_l), .count(fin_cnt));

    sync_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_fout (
      .clk, .rst_n,
      .wr_en(fout_push[i]), .wr_data(fout_data[i]),
      .rd_en(out_pop[i]), .rd_data(out_data[i]),
      .empty(fout_empty_l), .full(fout_full[i]), .count(fout_cnt));

    assign in_full[i]   = fin_full_l;
    assign out_empty[i] = fout_empty_l;

    ring_switch u_sw (
      .clk, .rst_n,
      .prev_acc(acc[PREV]), .prev_vld(vld[PREV]),
      .fifo_head(fin_head[i]), .fifo_empty(fin_empty[i]),
      .out_full(fout_full[i]),
      .bus_all(bus_q), .bus_vld_all(bus_vld),
      .cfg(pe_cfg[i]), .active(pe_act[i]), .result(result[i]),
      .sw_in(sw_in[i]), .go(pe_go[i]),
      .fifo_pop(fin_pop[i]),
      .out_push(fout_push[i]), .out_data(fout_data[i]),
      .bus_q(bus_q[i]), .bus_vld(bus_vld[i]),
      .stalled(layer_stall[i]));

    for (genvar j = 0; j < D_PER_LAYER; j++) begin : g_pe
      localparam int unsigned P = i * D_PER_LAYER + j;
      logic wr, clr;
      logic [SLOTW-1:0] seq_slot;  // current slot, kept for waveform inspection
      assign wr  = cfg.we && (int'(cfg.layer) == i) && cfg.den[j];
      assign clr = cfg.clr[P];

      local_seq u_seq (
        .clk, .rst_n,
        .wr_en(wr), .wr_slot(cfg.slot), .wr_word(cfg.word[j]),
        .clr(clr), .adv(pe_go[i][j]),
        .cfg(pe_cfg[i][j]), .active(pe_act[i][j]), .slot(seq_slot));

      dnode u_dn (
        .clk, .rst_n,
        .cfg(pe_cfg[i][j]), .go(pe_go[i][j]),
        .clear(clr || (wr && cfg.slot == '0)),
        .sw_in(sw_in[i][j]),
        .result(result[i][j]), .acc(acc[i][j]), .vld(vld[i][j]));

      assign pe_active[P] = pe_act[i][j];
      assign pe_acc[P]    = acc[i][j];
    end
  end
endmodule
