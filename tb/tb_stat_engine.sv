// Testbench of stat_engine (M = 4, 8-bit samples, N up to 400 per channel).
// Random samples stream in two per channel per clock, sometimes with gaps
// in x_valid.  A reference model in the testbench recomputes, from the beats
// the engine should take (the first valid beat after start only supplies
// x_{M-1}[-1]), the per-channel sum, the sum of |16*x - O_k| and the
// adjacent-channel products, including the wrap-around pair (M-1, next 0),
// and compares them at done.  With x_valid always high, done must come
// N/2 + 3 clocks after the clock edge that took start.
module tb_stat_engine;
  import tiadc_pkg::*;
  localparam int MM = 4, W = 8, NMAX = 400;
  localparam int CW = $clog2(NMAX / 2 + 1);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, x_valid = 1'b0;
  logic [CW-1:0] n_half = '0;
  logic signed [W-1:0] x [MM][2];
  logic signed [W+O_FRAC:0] ofs [MM];
  logic busy, done;
  logic signed [ACC_W-1:0] sum [MM], abs_sum [MM], prod_sum [MM];
  int checks = 0, failures = 0;

  stat_engine #(.M_P(MM), .DATA_W_P(W), .N_CAL_P(NMAX)) dut (.*);
  always #5 clk = ~clk;

  // reference model
  longint e_sum [MM], e_abs [MM], e_prod [MM];
  int     taken;            // valid beats since the start edge
  int     jh;               // beats to accumulate
  bit     counting = 0;
  longint prev3;
  int     edges_since_start;

  always @(posedge clk) begin
    edges_since_start++;
    if (counting && x_valid) begin
      if (taken == 0) prev3 = x[MM-1][1];
      else if (taken <= jh) begin
        for (int k = 0; k < MM; k++) begin
          for (int l = 0; l < 2; l++) begin
            automatic longint d = 16 * longint'(x[k][l]) - longint'(ofs[k]);
            e_sum[k] += x[k][l];
            e_abs[k] += d < 0 ? -d : d;
          end
          if (k < MM - 1) e_prod[k] += longint'(x[k][0]) * x[k+1][0] + longint'(x[k][1]) * x[k+1][1];
          else            e_prod[k] += prev3 * x[0][0] + longint'(x[k][0]) * x[0][1];
        end
        prev3 = x[MM-1][1];
      end
      taken++;
    end
    if (start && !busy) begin
      counting = 1; taken = 0; edges_since_start = 0;
      for (int k = 0; k < MM; k++) begin e_sum[k] = 0; e_abs[k] = 0; e_prod[k] = 0; end
    end
  end

  // stimulus: new random samples every clock
  int gap_pct = 0;
  always @(negedge clk) begin
    for (int k = 0; k < MM; k++) for (int l = 0; l < 2; l++) x[k][l] = W'($urandom);
    x_valid = rst_n && (($urandom % 100) >= gap_pct);
  end

  task automatic pass(int n, int gaps, bit check_lat);
    gap_pct = gaps;
    for (int k = 0; k < MM; k++) ofs[k] = (W+O_FRAC+1)'($signed($urandom % 1024) - 512);
    @(negedge clk);
    n_half = CW'(n / 2); jh = n / 2; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    for (int k = 0; k < MM; k++) begin
      checks += 3;
      if (sum[k] != e_sum[k])      begin failures++; $display("FAIL sum[%0d] %0d exp %0d", k, sum[k], e_sum[k]); end
      if (abs_sum[k] != e_abs[k])  begin failures++; $display("FAIL abs[%0d] %0d exp %0d", k, abs_sum[k], e_abs[k]); end
      if (prod_sum[k] != e_prod[k]) begin failures++; $display("FAIL prod[%0d] %0d exp %0d", k, prod_sum[k], e_prod[k]); end
    end
    if (check_lat) begin
      checks++;
      if (edges_since_start != n / 2 + 3) begin
        failures++; $display("FAIL latency %0d exp %0d", edges_since_start, n / 2 + 3);
      end
    end
    counting = 0;
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL done/busy after pass"); end
  endtask

  initial begin
    for (int k = 0; k < MM; k++) ofs[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    pass(400, 0, 1);
    pass(20, 0, 1);
    pass(400, 30, 0);
    pass(2, 50, 0);
    pass(256, 10, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
