// Testbench of adc_spi_ctrl (CLK_DIV = 2 and the default 4 in two
// instances).  An SPI receiver model samples mosi on the rising edges of
// sclk while cs_n is low and rebuilds each 24-bit frame; every frame must
// equal {0, address(kind, channel), 16-bit DCW} of the request sent, have
// exactly 24 rising edges, and last 49*CLK_DIV clocks from acceptance to
// cs_n rising.  Requests are offered back to back, so some wait while busy.
module tb_adc_spi_ctrl;
  import tiadc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    localparam int DIV = (g == 0) ? 2 : 4;
    dcw_req_t req;
    logic req_valid = 1'b0, req_ready, busy, sclk, mosi, cs_n;
    adc_spi_ctrl #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .req, .req_valid, .req_ready, .busy,
                                       .sclk, .mosi, .cs_n);
    dcw_req_t sent [$];
    int       t_acc [$];
    int       cyc = 0;
    int       nframes = 0;
    always @(posedge clk) begin
      cyc++;
      if (req_valid && req_ready) begin sent.push_back(req); t_acc.push_back(cyc); end
    end

    // receiver
    logic [31:0] sh;
    int          nb;
    always @(negedge cs_n) begin sh = 0; nb = 0; end
    always @(posedge sclk) if (!cs_n) begin sh = {sh[30:0], mosi}; nb++; end
    always @(posedge cs_n) if (rst_n) begin
      automatic dcw_req_t r = sent.pop_front();
      automatic int t0 = t_acc.pop_front();
      automatic logic [23:0] exp_f = {1'b0, 3'b001, r.kind, r.ch, 6'b0, r.value};
      checks++;
      if (nb != 24 || sh[23:0] != exp_f || (cyc - t0) != 49 * DIV) begin
        failures++;
        $display("FAIL div %0d: frame %h bits %0d exp %h, length %0d exp %0d", DIV, sh[23:0], nb, exp_f,
                 cyc - t0, 49 * DIV);
      end
      nframes++;
    end

    initial begin
      @(posedge rst_n);
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        req.kind  = dcw_kind_e'($urandom % 3);
        req.ch    = 2'($urandom);
        req.value = DCW_W'($urandom);
        if (i == 0) req.value = '1;
        req_valid = 1'b1;
        @(posedge clk);
        while (!req_ready) @(posedge clk);
        #1 req_valid = 1'b0;
      end
      while (busy) @(posedge clk);
      repeat (4) @(posedge clk);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (g_dut[0].nframes == 40 && g_dut[1].nframes == 40);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
