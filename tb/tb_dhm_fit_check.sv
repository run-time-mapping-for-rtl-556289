// tb_dhm_fit_check: checks the rotation and the Lemma 1 / Lemma 2 tests,
// first on the MAD + DCT example of the relocation figure (DCT fits only after
// a rotation by two layers), then on random headers and occupancy against a
// model written with explicit layer/column indices and population counts.
module tb_dhm_fit_check;
  import dhm_pkg::*;
  cfg_header_t hdr;
  logic [LW-1:0] rot;
  logic [N_PE-1:0] pe_busy, pe_mask;
  logic [L_LAYERS-1:0] ch_busy, ch_mask;
  logic lemma1, lemma2, fit;
  int checks = 0, failures = 0;

  dhm_fit_check dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example: MAD holds layers 0 and 1 ({1,1},{1,1},{0,0},{0,0}); DCT needs the
    // same four Dnodes at design time.
    hdr = '0;
    hdr.n_op = 4; hdr.n_chan = 2;
    hdr.topology = 8'b0000_1111; hdr.channels = 4'b0011;
    pe_busy = 8'b0000_1111; ch_busy = 4'b0011;
    rot = 0; #1;
    check(lemma1 && !lemma2 && !fit, "step 1: condition 1 true, condition 2 false");
    rot = 1; #1;
    check(pe_mask == 8'b0011_1100 && !fit, "step 2: rotation by one overlaps layer 1");
    rot = 2; #1;
    check(pe_mask == 8'b1111_0000 && ch_mask == 4'b1100 && fit, "step 3: rotation by two fits");
    // too many Dnodes requested
    hdr.n_op = 5; #1;
    check(!lemma1 && !fit, "lemma 1 refuses five Dnodes with four free");
    for (int c = 0; c < 5000; c++) begin
      automatic int nb = 0, nc = 0, e_l1, e_l2;
      automatic logic [N_PE-1:0] e_pe = '0;
      automatic logic [L_LAYERS-1:0] e_ch = '0;
      hdr.topology = N_PE'($urandom);
      hdr.channels = L_LAYERS'($urandom);
      hdr.n_op     = NOPW'($urandom_range(N_PE));
      hdr.n_chan   = NCHW'($urandom_range(L_LAYERS));
      pe_busy      = N_PE'($urandom) & N_PE'($urandom);
      ch_busy      = L_LAYERS'($urandom) & L_LAYERS'($urandom);
      rot          = LW'($urandom);
      for (int i = 0; i < L_LAYERS; i++) begin
        for (int j = 0; j < D_PER_LAYER; j++) begin
          e_pe[((i + rot) % L_LAYERS) * D_PER_LAYER + j] = hdr.topology[i * D_PER_LAYER + j];
          nb += pe_busy[i * D_PER_LAYER + j];
        end
        e_ch[(i + rot) % L_LAYERS] = hdr.channels[i];
        nc += ch_busy[i];
      end
      e_l1 = (hdr.n_op <= N_PE - nb) && (hdr.n_chan <= L_LAYERS - nc);
      e_l2 = ((e_pe & pe_busy) == 0) && ((e_ch & ch_busy) == 0);
      #1;
      check(pe_mask == e_pe && ch_mask == e_ch, "rotated masks");
      check(lemma1 == 1'(e_l1), "lemma 1");
      check(lemma2 == 1'(e_l2), "lemma 2");
      check(fit == 1'(e_l1 && e_l2), "fit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
