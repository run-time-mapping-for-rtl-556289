// tb_cfg_mem: writes random words to random addresses, then reads them back
// in random order, checking the one-cycle read latency, that rd_data holds
// while rd_en is low, and a read of a word written in the same cycle.
module tb_cfg_mem;
  import dhm_pkg::*;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [CADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [MEM_W-1:0] wr_data = '0, rd_data;
  logic [MEM_W-1:0] model [2**CADDR_W];
  int checks = 0, failures = 0;

  cfg_mem dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [MEM_W-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 2**CADDR_W; a++) begin
      wr_en = 1'b1; wr_addr = CADDR_W'(a); wr_data = rnd(); model[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      automatic logic [MEM_W-1:0] last;
      rd_en = 1'b1; rd_addr = CADDR_W'($urandom);
      wr_en = ($urandom_range(3) == 0); wr_addr = CADDR_W'($urandom); wr_data = rnd();
      @(negedge clk);
      check(rd_data == model[rd_addr], $sformatf("read %0d", rd_addr));
      if (wr_en) model[wr_addr] = wr_data;
      last = rd_data;
      rd_en = 1'b0; wr_en = 1'b0; rd_addr = CADDR_W'($urandom);
      @(negedge clk);
      check(rd_data == last, "hold while rd_en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
