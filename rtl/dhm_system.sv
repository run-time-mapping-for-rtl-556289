// dhm_system: reconfigurable co-processor with run-time mapping.
//
// Joins the three parts of the co-processor: the programme memory holding the
// headers and configuration lines of the hardware tasks, the hardware DHM
// controller that decides at run time where (and whether) each task runs, and
// the 8-Dnode systolic ring (l = 4 layers of d = 2 Dnodes) that executes the
// mapped configurations. The CPU, its memory, the DMA controller and the data
// access mechanism that moves samples between data memory and the ring FIFOs
// are outside this module: their connections are the ports below.
//
// Ports:
//   host_wr_*       load task images (header + lines) into the programme memory
//   req_* / resp_*  OS task start/end requests and the decision interrupt
//   evict_*         a running task removed from the ring (continue it on the CPU),
//                   with its programme address and its accumulator context
//   in_* / out_*    per-layer input and output FIFOs of the ring
//   pe_busy, ch_busy, dup_pe, pe_active, layer_stall, ev   status and events
//
// Timing: see dhm_saturn (decision latency) and systolic_ring (one-cycle
// Dnode-to-Dnode latency, FIFO stalls).
module dhm_system
  import dhm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_wr_en,
  input  logic [CADDR_W-1:0] host_wr_addr,
  input  logic [MEM_W-1:0]   host_wr_data,
  input  logic               req_valid,
  output logic               req_ready,
  input  os_req_t            req,
  output logic               resp_valid,
  output dhm_resp_t          resp,
  output logic               evict_valid,
  output logic [TIDW-1:0]    evict_task_id,
  output logic [CADDR_W-1:0] evict_cfg_addr,
  output logic [DW-1:0]      evict_ctx [N_PE],
  input  logic               in_push  [L_LAYERS],
  input  logic [DW-1:0]      in_data  [L_LAYERS],
  output logic               in_full  [L_LAYERS],
  input  logic               out_pop  [L_LAYERS],
  output logic [DW-1:0]      out_data [L_LAYERS],
  output logic               out_empty[L_LAYERS],
  output logic [N_PE-1:0]     pe_busy,
  output logic [L_LAYERS-1:0] ch_busy,
  output logic [N_PE-1:0]     dup_pe,
  output logic [N_PE-1:0]     pe_active,
  output logic [L_LAYERS-1:0] layer_stall,
  output dhm_events_t         ev
);
  logic               mem_rd_en;
  logic [CADDR_W-1:0] mem_rd_addr;
  logic [MEM_W-1:0]   mem_rd_data;
  ring_cfg_t          ring_cfg;
  logic [DW-1:0]      pe_acc [N_PE];

  cfg_mem u_mem (
    .clk,
    .wr_en(host_wr_en), .wr_addr(host_wr_addr), .wr_data(host_wr_data),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data));

  dhm_saturn u_dhm (
    .clk, .rst_n,
    .req_valid, .req_ready, .req,
    .resp_valid, .resp,
    .evict_valid, .evict_task_id, .evict_cfg_addr, .evict_ctx,
    .pe_acc,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .ring_cfg,
    .pe_busy, .ch_busy, .dup_pe, .ev);

  systolic_ring u_ring (
    .clk, .rst_n,
    .cfg(ring_cfg),
    .in_push, .in_data, .in_full,
    .out_pop, .out_data, .out_empty,
    .pe_active, .layer_stall, .pe_acc);
endmodule
