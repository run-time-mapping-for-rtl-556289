// local_seq: configuration register bank and local sequencer of one Dnode.
//
// The bank holds N_CFG (8) configuration words. A Dnode runs a loop over slots
// 0..len-1: every cycle in which the Dnode executes (adv), the sequencer steps
// to the next slot and wraps after the last one, so a kernel such as a lifting
// step or an operand load followed by an operation can use several
// micro-instructions. Writing slot s loads the word and sets the loop length to
// s+1 (lines of a task are written in slot order) and restarts at slot 0;
// clr empties the bank (len = 0), after which the Dnode sees a NOP and is idle.
// The 8-word bank and the local sequencer come from the Dnode figure; the
// length rule and the restart on write are this design's choices.
//
// Timing: cfg and active reflect the current slot combinationally from
// registers; writes, clears and steps take effect at the next clock edge.
module local_seq
  import dhm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [SLOTW-1:0] wr_slot,
  input  dnode_cfg_t       wr_word,
  input  logic             clr,
  input  logic             adv,
  output dnode_cfg_t       cfg,
  output logic             active,
  output logic [SLOTW-1:0] slot
);
  dnode_cfg_t         bank [N_CFG];
  logic [SLOTW:0]     len;
  logic [SLOTW-1:0]   ptr;

  assign active = (len != 0);
  assign cfg    = active ? bank[ptr] : DNODE_CFG_NOP;
  assign slot   = ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      len <= '0;
      ptr <= '0;
    end else if (clr) begin
      len <= '0;
      ptr <= '0;
    end else if (wr_en) begin
      len <= {1'b0, wr_slot} + 1'b1;
      ptr <= '0;
    end else if (adv && active) begin
      ptr <= ({1'b0, ptr} + 1'b1 == len) ? '0 : ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !clr) bank[wr_slot] <= wr_word;
  end
endmodule
