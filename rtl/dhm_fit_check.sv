// dhm_fit_check: topology matching logic of the DHM controller.
//
// For a task header and a candidate rotation r it produces the relocated
// resource masks and the two admission tests of the mapping analysis:
//   Lemma 1 (resources): card(P_k) <= free Dnodes and card(C_k) <= free channels,
//                        using the n_op / n_chan counts of the header;
//   Lemma 2 (topology):  the rotated masks do not overlap the Dnodes and channels
//                        already in use.
// The relocation is the ring's modulo rotation along the dataflow:
// p(i,j) -> p((i+r) mod l, j) and channel c(i) -> c((i+r) mod l), which keeps the
// function of a configuration because every Dnode implements the same
// operations and every layer is wired alike. Purely combinational.
module dhm_fit_check
  import dhm_pkg::*;
(
  input  cfg_header_t         hdr,
  input  logic [LW-1:0]       rot,
  input  logic [N_PE-1:0]     pe_busy,
  input  logic [L_LAYERS-1:0] ch_busy,
  output logic [N_PE-1:0]     pe_mask,
  output logic [L_LAYERS-1:0] ch_mask,
  output logic                lemma1,
  output logic                lemma2,
  output logic                fit
);
  logic [NOPW-1:0] pe_free;
  logic [NCHW-1:0] ch_free;

  always_comb begin
    pe_free = NOPW'(N_PE);
    for (int p = 0; p < N_PE; p++) if (pe_busy[p]) pe_free = pe_free - 1'b1;
    ch_free = NCHW'(L_LAYERS);
    for (int c = 0; c < L_LAYERS; c++) if (ch_busy[c]) ch_free = ch_free - 1'b1;
  end

  assign pe_mask = rot_pe(hdr.topology, rot);
  assign ch_mask = rot_layer(hdr.channels, rot);
  assign lemma1  = (hdr.n_op <= pe_free) && (hdr.n_chan <= ch_free);
  assign lemma2  = ((pe_mask & pe_busy) == '0) && ((ch_mask & ch_busy) == '0);
  assign fit     = lemma1 && lemma2;
endmodule
