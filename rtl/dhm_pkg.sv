// dhm_pkg: sizes, encodings and record types shared by the systolic ring and
// the hardware DHM (dynamic hardware multiplexing) controller.
//
// The co-processor is a ring of L_LAYERS layers, each holding D_PER_LAYER
// Dnodes (l = 4, d = 2: the 8-Dnode instance the hardware controller was built
// for). Dnode p(i,j) is bit i*D_PER_LAYER+j of every Dnode mask; layer i is bit i
// of every channel mask (one FIFO pair per layer). The operation set, the
// configuration word layout, the 16-bit data width, the header encoding and the
// sizes of the register file and the programme memory are this design's own
// choices; the 8 configurations per Dnode follow the Dnode figure of the
// systolic ring.
package dhm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned L_LAYERS    = 4;   // l: layers in the ring
  localparam int unsigned D_PER_LAYER = 2;   // d: Dnodes per layer
  localparam int unsigned N_PE        = L_LAYERS * D_PER_LAYER;
  localparam int unsigned DW          = 16;  // datapath width (16-bit samples)
  localparam int unsigned N_CFG       = 8;   // configuration registers per Dnode
  localparam int unsigned RF_DEPTH    = 4;   // Dnode register file words
  localparam int unsigned FIFO_DEPTH  = 8;   // per-layer input/output FIFO words
  localparam int unsigned TIDW        = 8;   // OS task identifier width
  localparam int unsigned PRIOW       = 4;   // task priority width
  localparam int unsigned CADDR_W     = 8;   // programme memory address width
  localparam int unsigned NTASK       = N_PE; // task table entries (>= 1 PE per task)

  localparam int unsigned LW      = (L_LAYERS > 1) ? $clog2(L_LAYERS) : 1;
  localparam int unsigned SLOTW   = $clog2(N_CFG);
  localparam int unsigned RFAW    = $clog2(RF_DEPTH);
  localparam int unsigned NOPW    = $clog2(N_PE + 1);
  localparam int unsigned NCHW    = $clog2(L_LAYERS + 1);
  localparam int unsigned NLINEW  = $clog2(L_LAYERS * N_CFG + 1);

  // Operand sources of a Dnode: 0..D-1 are the Dnodes of the previous layer
  // (dataflow direction), then the layer's input FIFO head, the selected global
  // bus, the register file, the Dnode's own accumulator and zero.
  localparam int unsigned SRC_FIFO = D_PER_LAYER;
  localparam int unsigned SRC_BUS  = D_PER_LAYER + 1;
  localparam int unsigned SRC_REG  = D_PER_LAYER + 2;
  localparam int unsigned SRC_ACC  = D_PER_LAYER + 3;
  localparam int unsigned SRC_ZERO = D_PER_LAYER + 4;
  localparam int unsigned N_SW_IN  = D_PER_LAYER + 2;  // inputs delivered by the switch
  localparam int unsigned SRCW     = $clog2(D_PER_LAYER + 5);

  // ---------------------------------------------------------------- Dnode
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // hold the accumulator
    OP_PASS = 4'd1,   // acc = a
    OP_ADD  = 4'd2,   // acc = a + b
    OP_SUB  = 4'd3,   // acc = a - b
    OP_MUL  = 4'd4,   // acc = a * b (low DW bits)
    OP_MAC  = 4'd5,   // acc = acc + a * b
    OP_ABSD = 4'd6,   // acc = |a - b|
    OP_SAD  = 4'd7,   // acc = acc + |a - b|
    OP_SHRA = 4'd8,   // acc = a >>> b[3:0]
    OP_AND  = 4'd9,
    OP_OR   = 4'd10,
    OP_XOR  = 4'd11,
    OP_ACC  = 4'd12   // acc = acc + a
  } op_e;

  typedef struct packed {
    op_e              op;
    logic [SRCW-1:0]  src_a;
    logic [SRCW-1:0]  src_b;
    logic [LW-1:0]    bus_sel;   // absolute layer whose bus is read; rotated on relocation
    logic [RFAW-1:0]  rf_ra;     // register file read address (SRC_REG)
    logic [RFAW-1:0]  rf_wa;     // register file write address
    logic             rf_we;     // rf[rf_wa] <= operand a
    logic             fifo_pop;  // consume the head of the layer's input FIFO
    logic             fifo_push; // push the result into the layer's output FIFO
    logic             bus_wr;    // drive the layer's bus with the result
  } dnode_cfg_t;

  localparam dnode_cfg_t DNODE_CFG_NOP = '{op: OP_NOP, src_a: '0, src_b: '0, bus_sel: '0,
                                           rf_ra: '0, rf_wa: '0, rf_we: 1'b0, fifo_pop: 1'b0,
                                           fifo_push: 1'b0, bus_wr: 1'b0};

  // ---------------------------------------------------------------- programme memory
  // A task's image in the programme memory: one header word at the task's
  // configuration address, followed by n_lines configuration lines. A line
  // sets one configuration slot of every Dnode of one layer.
  typedef struct packed {
    logic [LW-1:0]                    layer;   // design-time layer of the line
    logic [SLOTW-1:0]                 slot;    // configuration register index
    dnode_cfg_t [D_PER_LAYER-1:0]     word;    // word[j] for Dnode j of the layer
  } cfg_line_t;

  typedef struct packed {
    logic [NOPW-1:0]     n_op;      // card(P_k): Dnodes required
    logic [NCHW-1:0]     n_chan;    // card(C_k): FIFO channels required
    logic [N_PE-1:0]     topology;  // P_k at its design-time placement
    logic [L_LAYERS-1:0] channels;  // C_k at its design-time placement
    logic [PRIOW-1:0]    prio;      // larger value = higher priority
    logic [NLINEW-1:0]   n_lines;   // configuration lines following the header
  } cfg_header_t;

  localparam int unsigned LINE_W = $bits(cfg_line_t);
  localparam int unsigned HDR_W  = $bits(cfg_header_t);
  localparam int unsigned MEM_W  = (LINE_W > HDR_W) ? LINE_W : HDR_W;

  // ---------------------------------------------------------------- OS interface
  typedef struct packed {
    logic               on;        // 1: task start, 0: task end
    logic [TIDW-1:0]    task_id;   // identifier given by the OS
    logic [CADDR_W-1:0] cfg_addr;  // address of the task header
  } os_req_t;

  typedef struct packed {
    logic               on;        // echo of the request kind
    logic               accepted;  // on: 1 = co-executing, 0 = run on the CPU
                                   // off: 1 = task was found and released
    logic [TIDW-1:0]    task_id;
    logic [LW-1:0]      rotation;  // layers the configuration was rotated by
  } dhm_resp_t;

  // ---------------------------------------------------------------- ring configuration port
  typedef struct packed {
    logic                             we;      // write one configuration line
    logic [LW-1:0]                    layer;   // physical layer
    logic [SLOTW-1:0]                 slot;
    logic [D_PER_LAYER-1:0]           den;     // Dnodes of the layer that take the word
    dnode_cfg_t [D_PER_LAYER-1:0]     word;
    logic [N_PE-1:0]                  clr;     // Dnodes released (sequencer emptied)
  } ring_cfg_t;

  // One-cycle event strobes of the controller, for monitoring.
  typedef struct packed {
    logic direct;       // a task was mapped at its design-time placement
    logic rotated;      // a task (or duplicate) was mapped after a rotation
    logic rot_step;     // a rotation was tried
    logic stall;        // a running task was stalled for the analysis
    logic evict;        // a stalled task was removed (migrated to the CPU)
    logic reject;       // a request was refused (task runs on the CPU)
    logic released;     // a task end released its resources
    logic dup;          // a duplicate of a running task was mapped
    logic dup_suspend;  // duplicates were suspended for a new request
  } dhm_events_t;

  // Rotate a Dnode mask by r layers along the dataflow: p(i,j) -> p((i+r)%l, j).
  function automatic logic [N_PE-1:0] rot_pe(input logic [N_PE-1:0] m, input logic [LW-1:0] r);
    logic [N_PE-1:0] o;
    o = '0;
    for (int i = 0; i < L_LAYERS; i++)
      for (int j = 0; j < D_PER_LAYER; j++)
        o[((i + int'(r)) % L_LAYERS) * D_PER_LAYER + j] = m[i * D_PER_LAYER + j];
    return o;
  endfunction

  // Rotate a layer (channel) mask by r layers.
  function automatic logic [L_LAYERS-1:0] rot_layer(input logic [L_LAYERS-1:0] m, input logic [LW-1:0] r);
    logic [L_LAYERS-1:0] o;
    o = '0;
    for (int i = 0; i < L_LAYERS; i++)
      o[(i + int'(r)) % L_LAYERS] = m[i];
    return o;
  endfunction

  function automatic logic [LW-1:0] add_layer(input logic [LW-1:0] a, input logic [LW-1:0] r);
    return LW'((int'(a) + int'(r)) % L_LAYERS);
  endfunction

endpackage
