// Testbench of seq_div: signed divisions with round-to-nearest (halves away
// from zero) against an independent integer computation, including exact
// halves and both signs, and the latency: done rises W+3 clocks after the edge that takes start.
module tb_seq_div;
  localparam int W = 64;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [W-1:0] num = '0, den = 1, quot;
  logic busy, done;
  int checks = 0, failures = 0;

  seq_div #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint ref_div(longint a, longint b);
    longint qa, ra, aa, bb;
    aa = a < 0 ? -a : a;
    bb = b < 0 ? -b : b;
    qa = aa / bb;
    ra = aa % bb;
    if (2 * ra >= bb) qa++;
    return ((a < 0) != (b < 0)) ? -qa : qa;
  endfunction

  task automatic one(longint a, longint b);
    int lat;
    @(negedge clk);
    num = a; den = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (quot != ref_div(a, b) || lat != W + 4) begin
      failures++;
      $display("FAIL %0d / %0d = %0d (exp %0d), latency %0d", a, b, quot, ref_div(a, b), lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    one(7, 2); one(-7, 2); one(5, -2); one(-5, -2); one(6, 4); one(1, 3); one(0, 9);
    one(100000, 20000); one(-32000 * 16, 20000); one(64'sd1 <<< 40, 3);
    for (int i = 0; i < 300; i++) begin
      automatic longint a = longint'({$urandom, $urandom}) >>> ($urandom % 40);
      automatic longint b = longint'({$urandom, $urandom}) >>> (20 + $urandom % 40);
      if (b == 0) b = 1;
      one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
