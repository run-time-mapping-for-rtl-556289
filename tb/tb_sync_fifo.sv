// tb_sync_fifo: random pushes and pops against a queue model of the FIFO;
// checks the head word, empty, full and count every cycle, and that writes to
// a full FIFO are dropped.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit full_seen = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases favour filling, then draining
      automatic int pw = ((cyc / 200) % 2 == 0) ? 75 : 30;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(rd_data == model[0], $sformatf("head %h exp %h", rd_data, model[0]));
      wr_en   = ($urandom_range(99) < pw);
      rd_en   = ($urandom_range(99) < 100 - pw);
      wr_data = W'($urandom);
      if (full && wr_en && !rd_en) wr_en = 1'b0;  // never overflow on purpose
      @(posedge clk);
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en && (model.size() < D)) model.push_back(wr_data);
      if (model.size() == D) full_seen = 1;
    end
    check(full_seen, "FIFO reached full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
