// Testbench of sample_fifo (depth 16): random writes and reads against a
// queue model, overflow (writes into a full FIFO are dropped), underflow
// (reads of an empty FIFO do nothing), the flags, the count, clr, and the
// one-clock read latency.
module tb_sample_fifo;
  localparam int W = 16, D = 16;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, n_full = 0, n_drop = 0, n_empty_rd = 0;
  logic [W-1:0] model [$];
  logic         exp_rd_valid = 1'b0;
  logic [W-1:0] exp_rd;

  sample_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases that favour filling, draining and mixing
      automatic int pw = (cyc / 300) % 3 == 0 ? 80 : ((cyc / 300) % 3 == 1 ? 20 : 50);
      @(negedge clk);
      // flags and data of the previous read, before this cycle's actions
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (exp_rd_valid) check(rdata == exp_rd, "rdata");
      wr_en = ($urandom % 100) < pw;
      rd_en = ($urandom % 100) < (100 - pw);
      clr   = (cyc == 2500);
      wdata = W'($urandom);
      @(posedge clk); #1;
      exp_rd_valid = 1'b0;
      if (clr) model.delete();
      else begin
        if (rd_en && model.size() > 0) begin exp_rd = model.pop_front(); exp_rd_valid = 1'b1; end
        else if (rd_en) n_empty_rd++;
        // the write happened on the same edge against the old contents
        if (wr_en && (model.size() + (exp_rd_valid ? 1 : 0)) < D) model.push_back(wdata);
        else if (wr_en) n_drop++;
      end
      if (model.size() == D) n_full++;
    end
    check(n_full > 0, "FIFO never became full");
    check(n_drop > 0, "no write was dropped");
    check(n_empty_rd > 0, "no read of an empty FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
