// dhm_tb_pkg: task images (headers and configuration lines) and helpers shared
// by the controller, ring and system testbenches.
//
// Five small kernels in the spirit of the image-processing kernels mapped on
// the systolic ring, each at its design-time placement (layer 0 upwards):
//   K_MAD  1 Dnode  p(0,0), channel 0: loads R into rf[0] (slot 0), then
//          accumulates |R - S| (slot 1) and pushes the running sum.
//   K_BUS  2 Dnodes p(0,0), p(1,0), channels 0,1: layer 0 passes x to the bus of
//          its layer, layer 1 adds the bus value to y from its FIFO: x + y.
//   K_BFLY 5 Dnodes layers 0..2, channels 0..2: even/odd butterfly a+b and a-b
//          (two slots each), two MACs with a coefficient stream, final sum.
//   K_BIG  4 Dnodes p(i,0) for all layers, channels 0 and 3: 2*x + y.
//   K_FSBM 2 Dnodes p(0,0), p(1,0), channels 0,1: the two-Dnode block-matching
//          mapping, a difference Dnode followed by an accumulator. Layer 0
//          loads R (slot 0) and sends |R - S| (slot 1); layer 1 accumulates it
//          and pushes the running sum into its output FIFO.
package dhm_tb_pkg;
  import dhm_pkg::*;

  function automatic dnode_cfg_t w(input op_e op, input int a, input int b,
                                   input bit pop = 0, input bit push = 0,
                                   input bit rf_we = 0, input int bus_sel = 0,
                                   input bit bus_wr = 0);
    dnode_cfg_t c;
    c = DNODE_CFG_NOP;
    c.op = op; c.src_a = SRCW'(a); c.src_b = SRCW'(b);
    c.fifo_pop = pop; c.fifo_push = push; c.rf_we = rf_we;
    c.rf_wa = '0; c.rf_ra = '0; c.bus_sel = LW'(bus_sel); c.bus_wr = bus_wr;
    return c;
  endfunction

  function automatic logic [MEM_W-1:0] line(input int layer, input int slot,
                                            input dnode_cfg_t w0, input dnode_cfg_t w1);
    cfg_line_t l;
    l.layer = LW'(layer); l.slot = SLOTW'(slot);
    l.word[0] = w0; l.word[1] = w1;
    return MEM_W'(l);
  endfunction

  function automatic logic [MEM_W-1:0] header(input int n_op, input int n_chan,
                                              input logic [N_PE-1:0] topo,
                                              input logic [L_LAYERS-1:0] ch,
                                              input int prio, input int n_lines);
    cfg_header_t h;
    h.n_op = NOPW'(n_op); h.n_chan = NCHW'(n_chan); h.topology = topo;
    h.channels = ch; h.prio = PRIOW'(prio); h.n_lines = NLINEW'(n_lines);
    return MEM_W'(h);
  endfunction

  typedef enum int {K_MAD, K_BUS, K_BFLY, K_BIG, K_FSBM} kernel_e;

  localparam dnode_cfg_t NOPW_ = DNODE_CFG_NOP;

  // Image of kernel k with priority prio; returns its words in img.
  function automatic void image(input kernel_e k, input int prio, output logic [MEM_W-1:0] img [$]);
    img = {};
    case (k)
      K_MAD: begin
        img.push_back(header(1, 1, 8'b0000_0001, 4'b0001, prio, 2));
        img.push_back(line(0, 0, w(OP_NOP, SRC_FIFO, SRC_ZERO, 1, 0, 1), NOPW_));
        img.push_back(line(0, 1, w(OP_SAD, SRC_REG, SRC_FIFO, 1, 1), NOPW_));
      end
      K_BUS: begin
        img.push_back(header(2, 2, 8'b0000_0101, 4'b0011, prio, 2));
        img.push_back(line(0, 0, w(OP_PASS, SRC_FIFO, SRC_ZERO, 1, 0, 0, 0, 1), NOPW_));
        img.push_back(line(1, 0, w(OP_ADD, SRC_BUS, SRC_FIFO, 1, 1, 0, 0), NOPW_));
      end
      K_BFLY: begin
        img.push_back(header(5, 3, 8'b0001_1111, 4'b0111, prio, 4));
        img.push_back(line(0, 0, w(OP_NOP, SRC_FIFO, SRC_ZERO, 1, 0, 1),
                                 w(OP_NOP, SRC_FIFO, SRC_ZERO, 1, 0, 1)));
        img.push_back(line(0, 1, w(OP_ADD, SRC_FIFO, SRC_REG, 1),
                                 w(OP_SUB, SRC_REG, SRC_FIFO, 1)));
        img.push_back(line(1, 0, w(OP_MAC, 0, SRC_FIFO, 1),
                                 w(OP_MAC, 1, SRC_FIFO, 1)));
        img.push_back(line(2, 0, w(OP_ADD, 0, 1, 0, 1), NOPW_));
      end
      K_BIG: begin
        img.push_back(header(4, 2, 8'b0101_0101, 4'b1001, prio, 4));
        img.push_back(line(0, 0, w(OP_PASS, SRC_FIFO, SRC_ZERO, 1), NOPW_));
        img.push_back(line(1, 0, w(OP_ADD, 0, 0), NOPW_));
        img.push_back(line(2, 0, w(OP_PASS, 0, SRC_ZERO), NOPW_));
        img.push_back(line(3, 0, w(OP_ADD, 0, SRC_FIFO, 1, 1), NOPW_));
      end
      K_FSBM: begin
        img.push_back(header(2, 2, 8'b0000_0101, 4'b0011, prio, 3));
        img.push_back(line(0, 0, w(OP_NOP, SRC_FIFO, SRC_ZERO, 1, 0, 1), NOPW_));
        img.push_back(line(0, 1, w(OP_ABSD, SRC_REG, SRC_FIFO, 1), NOPW_));
        img.push_back(line(1, 0, w(OP_ACC, 0, SRC_ZERO, 0, 1), NOPW_));
      end
      default: ;
    endcase
  endfunction
endpackage
