// tb_event_fifo: random writes and reads against a queue model of the
// event FIFO. Checks the head word, count, empty/full and the sticky
// overflow flag every clock, including writes while full and simultaneous
// read and write when full.
module tb_event_fifo;
  localparam int W = 13, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  bit exp_ovf = 0;
  int saw_full = 0, saw_ovf = 0, saw_rw_full = 0;

  event_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (count=%0d model=%0d ovf=%0b)", what, $time, count, model.size(), overflow);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // phases: fill-biased, drain-biased, mixed
      int pw;
      pw = (cyc % 600 < 200) ? 80 : (cyc % 600 < 400) ? 20 : 50;
      @(negedge clk);
      wr_en   = ($urandom_range(99) < pw);
      rd_en   = ($urandom_range(99) < 100 - pw);
      wr_data = W'($urandom);
      // checks of the settled state before the edge
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == D), "full");
      check(count == model.size(), "count");
      check(overflow == exp_ovf, "overflow");
      if (model.size() > 0) check(rd_data == model[0], "head");
      if (full) saw_full++;
      if (full && wr_en && rd_en) saw_rw_full++;
      @(posedge clk);
      begin
        bit r, w;
        r = rd_en && model.size() > 0;
        w = wr_en && (model.size() < D || r);
        if (wr_en && !w) begin exp_ovf = 1; saw_ovf++; end
        if (r) void'(model.pop_front());
        if (w) model.push_back(wr_data);
      end
    end
    check(saw_full > 0 && saw_ovf > 0 && saw_rw_full > 0, "coverage of full/overflow/rw-when-full");
    $display("full=%0d overflow_writes=%0d rw_when_full=%0d", saw_full, saw_ovf, saw_rw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
