// sync_fifo: single-clock first-in first-out buffer, used for the input and
// output FIFO of every systolic-ring layer.
//
// A circular buffer of DEPTH words with separate read and write pointers and an
// occupancy counter. The head word is visible on rd_data whenever empty is low
// (first-word fall-through); rd_en removes it at the clock edge. Reset is
// synchronous and active low. A write to a
// full FIFO and a read from an empty one are ignored, and assertions flag both.
// A simultaneous read and write of a full FIFO is accepted. The ring only names
// these FIFOs; depth and the fall-through behaviour are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  logic do_rd, do_wr;
  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      if (do_wr && !do_rd) count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  // Overflow and underflow are configuration errors of the ring.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(wr_en && full && !do_rd))
      else $error("sync_fifo: write to a full FIFO dropped");
  end
endmodule
