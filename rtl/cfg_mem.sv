// cfg_mem: programme memory of the DHM controller.
//
// Holds the image of every hardware task: a header word followed by its
// configuration lines (dhm_pkg::cfg_header_t / cfg_line_t, packed into
// MEM_W-bit words). The host (the loader of the executable that links object
// code and configuration bitstreams) fills it through the write port; the
// controller's programme counter reads it. One synchronous write port, one
// synchronous read port: rd_data holds the word at the rd_addr presented in
// the previous cycle while rd_en was high. The depth (256 words) and the
// single-cycle read are this design's choices.
module cfg_mem
  import dhm_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** CADDR_W
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [CADDR_W-1:0] wr_addr,
  input  logic [MEM_W-1:0]   wr_data,
  input  logic               rd_en,
  input  logic [CADDR_W-1:0] rd_addr,
  output logic [MEM_W-1:0]   rd_data
);
  logic [MEM_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
