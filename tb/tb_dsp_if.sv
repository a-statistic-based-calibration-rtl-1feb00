// Testbench of dsp_if.  The FIFOs and the calibration side are stand-in
// signals driven by the testbench.  Checked through the bus: the start
// pulses of CTRL, capture (FIFO clear, writes gated by capture and receiver
// valid, capture done and irq once all FIFOs are full, irq clear), RX_EN,
// a hand-written DCW (decoded fields, refused while calibrating), a FIFO
// read (one pop, data one clock later), and the read-back of DCWs,
// statistics, step counts and status bits.
module tb_dsp_if;
  import tiadc_pkg::*;
  localparam int MM = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] dsp_addr = '0;
  logic dsp_wr = 1'b0, dsp_rd = 1'b0;
  logic [31:0] dsp_wdata = '0, dsp_rdata;
  logic dsp_rvalid, irq, rx_en, rx_valid = 1'b1, fifo_clr, fifo_wr;
  logic [MM-1:0] fifo_rd, fifo_full = '0, fifo_empty = '1;
  logic [15:0] fifo_rdata [MM];
  logic cal_start, cal_busy = 1'b0, cal_done = 1'b0, cal_err = 1'b0, man_valid;
  dcw_req_t man_req;
  dcw_t dcw_off [MM], dcw_gain [MM], dcw_phase [MM];
  logic signed [ACC_W-1:0] st_sum [MM], st_abs [MM], st_prod [MM];
  logic [15:0] iters [MM-1];
  int checks = 0, failures = 0;

  dsp_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // pulse monitors
  int n_cal_start = 0, n_clr = 0, n_man = 0, n_wr = 0;
  int n_rd [MM] = '{0, 0, 0, 0};
  dcw_req_t last_man;
  always @(posedge clk) if (rst_n) begin
    if (cal_start) n_cal_start++;
    if (fifo_clr) n_clr++;
    if (man_valid) begin n_man++; last_man = man_req; end
    if (fifo_wr) n_wr++;
    for (int k = 0; k < MM; k++) if (fifo_rd[k]) n_rd[k]++;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); dsp_addr = a; dsp_wdata = d; dsp_wr = 1'b1;
    @(negedge clk); dsp_wr = 1'b0;
    @(negedge clk);
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); dsp_addr = a; dsp_rd = 1'b1;
    @(negedge clk); dsp_rd = 1'b0;
    check(dsp_rvalid, "rvalid one clock after rd");
    d = dsp_rdata;
  endtask

  logic [31:0] d;
  initial begin
    for (int k = 0; k < MM; k++) begin
      dcw_off[k] = dcw_t'(100 + k); dcw_gain[k] = dcw_t'(200 + k); dcw_phase[k] = dcw_t'(300 + k);
      st_sum[k] = ACC_W'(-1000 - k); st_abs[k] = ACC_W'(5000 + k); st_prod[k] = ACC_W'(70000 + k);
      fifo_rdata[k] = 16'hA000 + 16'(k);
    end
    for (int i = 0; i < MM - 1; i++) iters[i] = 16'(10 + i);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(rx_en == 1'b1 && !irq, "reset state");

    // calibration start, refused while busy
    wr(8'h00, 32'h1);
    check(n_cal_start == 1, "cal start pulse");
    cal_busy = 1'b1;
    wr(8'h00, 32'h1);
    check(n_cal_start == 1, "no start while busy");
    wr(8'h04, 32'h0021_0155);
    check(n_man == 0, "no hand DCW while calibrating");
    rd(8'h01, d);
    check(d[0] == 1'b1, "status busy");
    cal_err = 1'b1;
    @(negedge clk); cal_done = 1'b1; @(negedge clk); cal_done = 1'b0; cal_busy = 1'b0;
    check(irq, "irq after cal done");
    rd(8'h01, d);
    check(d[2:0] == 3'b110, "status done and err");
    wr(8'h03, 32'h2);
    check(!irq, "irq cleared");
    cal_err = 1'b0;

    // hand-written DCW: value 0x155, channel 1, kind 2 (phase)
    wr(8'h04, 32'h0021_0155);
    check(n_man == 1 && last_man.value == 10'h155 && last_man.ch == 2'd1 && last_man.kind == DCW_PHASE,
          "hand DCW fields");

    // capture
    rx_valid = 1'b1;
    repeat (3) @(negedge clk);
    check(n_wr == 0, "no FIFO writes before capture");
    wr(8'h00, 32'h2);
    check(n_clr == 1, "FIFO clear on capture start");
    fifo_empty = '0;
    repeat (9) @(negedge clk);
    rx_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(n_wr == 10, "FIFO writes follow rx_valid while capturing");
    rx_valid = 1'b1;
    rd(8'h01, d);
    check(d[3] && !d[4], "capture active");
    fifo_full = 4'b0111;
    repeat (3) @(negedge clk);
    check(!irq, "no capture done until all FIFOs full");
    fifo_full = 4'b1111;
    repeat (2) @(negedge clk);
    check(irq, "irq on capture done");
    begin
      automatic int w = n_wr;
      repeat (4) @(negedge clk);
      check(n_wr == w, "writes stop after capture done");
    end
    rd(8'h01, d);
    check(!d[3] && d[4] && d[11:8] == 4'hF, "status capture done, FIFOs full");
    wr(8'h03, 32'h10);
    check(!irq, "capture irq cleared");

    // RX_EN
    wr(8'h02, 32'h0);
    check(!rx_en, "rx disabled");
    rd(8'h02, d);
    check(d == 0, "rx_en read back");
    wr(8'h02, 32'h1);

    // FIFO reads pop exactly one word of the addressed channel
    for (int k = 0; k < MM; k++) begin
      rd(8'h08 + 8'(k), d);
      check(d == 32'hA000 + 32'(k) && n_rd[k] == 1 && n_rd.sum() == k + 1, "FIFO read");
    end

    // read-back
    for (int k = 0; k < MM; k++) begin
      rd(8'h10 + 8'(k), d); check(d == 100 + k, "offset DCW read");
      rd(8'h14 + 8'(k), d); check(d == 200 + k, "gain DCW read");
      rd(8'h18 + 8'(k), d); check(d == 300 + k, "phase DCW read");
      rd(8'h20 + 8'(k), d); check(int'(d) == -1000 - k, "sum read");
      rd(8'h24 + 8'(k), d); check(d == 5000 + k, "abs read");
      rd(8'h28 + 8'(k), d); check(d == 70000 + k, "prod read");
    end
    for (int i = 0; i < MM - 1; i++) begin rd(8'h30 + 8'(i), d); check(d == 10 + i, "steps read"); end
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
