// Testbench of iddr_rx: random DDR data, centre-aligned to both clock edges.
// Each pair (rising-edge word, falling-edge word) must appear one clock later
// on q[0]/q[1] with the MSB inverted (offset binary to two's complement), and
// q_valid must follow en with the same latency.
module tb_iddr_rx;
  localparam int W = 8, NW = 300;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0;
  logic signed [W-1:0] q [2];
  logic q_valid;
  int checks = 0, failures = 0;
  logic [W-1:0] a [NW], b [NW];
  logic         e [NW];

  iddr_rx #(.DATA_W_P(W)) dut (.clk, .rst_n, .en, .din, .q, .q_valid);

  always #10 clk = ~clk;

  initial begin
    for (int i = 0; i < NW; i++) begin
      a[i] = W'($urandom); b[i] = W'($urandom); e[i] = (i % 37) < 30;
    end
    a[5] = 8'h00; b[5] = 8'hFF; a[6] = 8'h80; b[6] = 8'h7F;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // cycle i: a[i] is on the bus at rising edge i, b[i] at the falling edge after it
    for (int i = 0; i < NW; i++) begin
      @(negedge clk); #5 din = a[i]; en = e[i];
      @(posedge clk); #5 din = b[i];
    end
  end

  // rising edge i+1 presents pair i (i counts rising edges after the driver started)
  int edge_n = -1;
  initial begin
    @(posedge rst_n);
    @(negedge clk);
    forever begin
      @(posedge clk); #1;
      if (edge_n >= 0 && edge_n < NW) begin
        automatic int i = edge_n;
        checks++;
        if (q[0] !== signed'({~a[i][W-1], a[i][W-2:0]}) || q[1] !== signed'({~b[i][W-1], b[i][W-2:0]}) ||
            q_valid !== e[i]) begin
          failures++;
          $display("FAIL pair %0d: q=%0d,%0d v=%0b exp %0d,%0d v=%0b", i, q[0], q[1], q_valid,
                   signed'({~a[i][W-1], a[i][W-2:0]}), signed'({~b[i][W-1], b[i][W-2:0]}), e[i]);
        end
      end
      edge_n++;
      if (edge_n == NW) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
