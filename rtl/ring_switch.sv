// ring_switch: the switch in front of one layer of the systolic ring.
//
// The switch gives every Dnode of its layer full connectivity to the d Dnode
// outputs of the previous layer, to the head of the layer's input FIFO and to
// the global bus network: each Dnode reads one bus, chosen by the bus_sel field
// of its configuration word, and every switch can read every switch's bus. The
// switch also owns its layer's bus register and controls the layer's FIFOs.
//
// Firing and stall rules (this design's own): a Dnode executes only when every
// operand it names is fresh: a previous-layer Dnode or a bus operand needs that
// producer's one-cycle token (the producer executed in the previous cycle), a
// FIFO operand or a pop needs a non-empty input FIFO. A Dnode waits while an
// operand is missing, so kernels fire in dataflow order whatever the start-up
// or the input rate; a token not consumed in its cycle is gone (the ring has no
// back-pressure towards earlier layers, so output FIFOs must be drained).
// Further, a Dnode that pushes into the output FIFO
// waits while it is full, and when several Dnodes of the layer push in the same
// cycle the lowest-index one goes first and the others wait. All Dnodes of the
// layer that pop in the same cycle share the one head word, which is removed
// once. The bus of the layer is written with the result of the lowest-index
// executing Dnode whose word has bus_wr set.
//
// Timing: go, the FIFO strobes and the operand wiring are combinational; the
// bus register and its token update at the clock edge, so a bus value is seen one cycle
// after it was produced, like a Dnode output.
module ring_switch
  import dhm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] prev_acc [D_PER_LAYER],
  input  logic          prev_vld [D_PER_LAYER],
  input  logic [DW-1:0] fifo_head,
  input  logic          fifo_empty,
  input  logic          out_full,
  input  logic [DW-1:0] bus_all [L_LAYERS],
  input  logic          bus_vld_all [L_LAYERS],
  input  dnode_cfg_t    cfg [D_PER_LAYER],
  input  logic          active [D_PER_LAYER],
  input  logic [DW-1:0] result [D_PER_LAYER],
  output logic [DW-1:0] sw_in [D_PER_LAYER][N_SW_IN],
  output logic          go [D_PER_LAYER],
  output logic          fifo_pop,
  output logic          out_push,
  output logic [DW-1:0] out_data,
  output logic [DW-1:0] bus_q,
  output logic          bus_vld,
  output logic          stalled
);
  localparam int unsigned DIW = (D_PER_LAYER > 1) ? $clog2(D_PER_LAYER) : 1;

  logic          ready [D_PER_LAYER];
  logic          bus_we;
  logic [DW-1:0] bus_d;

  always_comb begin
    for (int j = 0; j < D_PER_LAYER; j++) begin
      for (int k = 0; k < D_PER_LAYER; k++) sw_in[j][k] = prev_acc[k];
      sw_in[j][SRC_FIFO] = fifo_head;
      sw_in[j][SRC_BUS]  = bus_all[cfg[j].bus_sel];
    end
  end

  // An operand is available when its producer delivered a fresh value: a
  // previous-layer Dnode or a bus with its token set, or a non-empty FIFO.
  function automatic logic src_ok(input logic [SRCW-1:0] s, input dnode_cfg_t c,
                                  input logic pv [D_PER_LAYER], input logic bv [L_LAYERS],
                                  input logic fe);
    if (int'(s) < D_PER_LAYER) return pv[DIW'(s)];
    if (int'(s) == SRC_FIFO)   return !fe;
    if (int'(s) == SRC_BUS)    return bv[c.bus_sel];
    return 1'b1;
  endfunction

  always_comb begin
    logic pushed;
    pushed   = 1'b0;
    fifo_pop = 1'b0;
    out_push = 1'b0;
    out_data = '0;
    bus_we   = 1'b0;
    bus_d    = '0;
    stalled  = 1'b0;
    for (int j = 0; j < D_PER_LAYER; j++) begin
      ready[j] = active[j] && src_ok(cfg[j].src_a, cfg[j], prev_vld, bus_vld_all, fifo_empty)
                           && src_ok(cfg[j].src_b, cfg[j], prev_vld, bus_vld_all, fifo_empty)
                           && (!cfg[j].fifo_pop || !fifo_empty);
      go[j]    = ready[j];
      if (ready[j] && cfg[j].fifo_push) begin
        if (out_full || pushed) go[j] = 1'b0;
        else begin
          pushed   = 1'b1;
          out_push = 1'b1;
          out_data = result[j];
        end
      end
      if (active[j] && !go[j]) stalled = 1'b1;
      if (go[j] && cfg[j].fifo_pop) fifo_pop = 1'b1;
      if (go[j] && cfg[j].bus_wr && !bus_we) begin
        bus_we = 1'b1;
        bus_d  = result[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_q   <= '0;
      bus_vld <= 1'b0;
    end else begin
      bus_vld <= bus_we;
      if (bus_we) bus_q <= bus_d;
    end
  end
endmodule
