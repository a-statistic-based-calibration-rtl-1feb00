// End-to-end testbench of tiadc_cal_top at its default parameters
// (M = 4, N = 20000 samples per channel per statistic, 16384-word FIFOs).
//
// A behavioural four-core ADC (ev8aq160_model) with the offset, gain and
// timing mismatches of the published simulation (offset [0, 0.5, 1.6, -2.2]
// LSB, gain [1, 1.06, 1.13, 0.91], skew [0, 0.02, 0.03, -0.03] Ts), a
// 600 MHz, 100 LSB sine and 45 dB SNR feeds the design; the testbench plays
// the DSP on the register bus.  It
//  1. writes a DCW by hand and reads it back (bus, SPI, ADC);
//  2. captures a record with the receivers disabled (nothing may be stored),
//     then enables them: the four FIFOs fill, further samples are dropped,
//     and every stored word must equal what the ADC sent (MSB inverted:
//     offset binary becomes two's complement); from the record it
//     measures the mismatch spurs (at fs/4, fs/2, fs/4 +- fin, fs/2 - fin);
//  3. runs a calibration (a capture request meanwhile must be ignored, and
//     every statistics pass must work on its own FIFO record) and checks the ADC's DCWs against the read-back
//     ones, that every stage ran, and the residual offset, gain and timing
//     mismatches left in the ADC;
//  4. captures again: the largest spur must have dropped by at least 20 dB.
module tb_tiadc_cal_top;
  import tiadc_pkg::*;
  localparam int  MM = 4;
  localparam int  DEPTH = 16384;
  localparam int  NS = MM * 2 * DEPTH;           // interleaved samples per record
  localparam real PI = 3.14159265358979;
  localparam real DU = 110.0e-15 / 200.0e-12;

  logic clk, rst_n = 1'b0;
  logic [7:0] adc_d [MM];
  logic spi_sclk, spi_mosi, spi_cs_n;
  logic [7:0] dsp_addr = '0;
  logic dsp_wr = 1'b0, dsp_rd = 1'b0;
  logic [31:0] dsp_wdata = '0, dsp_rdata;
  logic dsp_rvalid, dsp_irq;
  int checks = 0, failures = 0;

  ev8aq160_model adc (.clk, .d(adc_d), .spi_sclk, .spi_mosi, .spi_cs_n);
  tiadc_cal_top dut (.clk, .rst_n, .adc_d, .spi_sclk, .spi_mosi, .spi_cs_n, .dsp_addr, .dsp_wr,
                     .dsp_rd, .dsp_wdata, .dsp_rdata, .dsp_rvalid, .dsp_irq);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] dat);
    @(negedge clk); dsp_addr = a; dsp_wdata = dat; dsp_wr = 1'b1;
    @(negedge clk); dsp_wr = 1'b0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] dat);
    @(negedge clk); dsp_addr = a; dsp_rd = 1'b1;
    @(negedge clk); dsp_rd = 1'b0;
    dat = dsp_rdata;
  endtask

  // mechanisms seen
  int n_capture = 0, n_drop = 0, n_rx_off = 0, n_man = 0, n_irq = 0, n_cap_blocked = 0;
  int n_rec = 0, n_pass = 0;                     // calibration records and engine passes
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cal.rec_clr) n_rec++;
    if (dut.u_stat.start)  n_pass++;
  end

  real xs [NS];
  // read a whole record, check it against the ADC's history, fill xs
  task automatic read_record(longint n_cap);
    logic [31:0] dat;
    logic [15:0] w [MM][$];
    longint n0 = -1;
    int bad = 0;
    for (int j = 0; j < DEPTH; j++)
      for (int k = 0; k < MM; k++) begin
        rd(8'h08 + 8'(k), dat);
        w[k].push_back(dat[15:0]);
      end
    rd(8'h01, dat);
    check(dat[19:16] == 4'hF, "FIFOs empty after DEPTH words");
    // where in the ADC's sample stream the record starts
    for (longint c = n_cap - 64; c <= n_cap + 64 && n0 < 0; c++) begin
      automatic bit ok = 1;
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < MM; k++)
          if (w[k][j] != ({adc.hist[k][(c + 2*j + 1) % (1 << 20)], adc.hist[k][(c + 2*j) % (1 << 20)]} ^ 16'h8080)) ok = 0;
      if (ok) n0 = c;
    end
    check(n0 >= 0, "record found in the ADC's sample stream");
    for (int j = 0; j < DEPTH; j++)
      for (int k = 0; k < MM; k++) begin
        if (n0 >= 0 && w[k][j] != ({adc.hist[k][(n0 + 2*j + 1) % (1 << 20)], adc.hist[k][(n0 + 2*j) % (1 << 20)]} ^ 16'h8080))
          bad++;
        // two's complement view of the interleaved record: x[4n + k] = x_k[n]
        xs[(2*j) * MM + k]     = real'(int'(signed'(w[k][j][7:0])));
        xs[(2*j + 1) * MM + k] = real'(int'(signed'(w[k][j][15:8])));
      end
    check(bad == 0, "every stored word equals the ADC's output");
    if (bad != 0) $display("  %0d words differ", bad);
  endtask

  // amplitude at frequency f (in units of fs) with a Hann window
  function automatic real amp(real f);
    real re = 0.0, im = 0.0, win;
    for (int i = 0; i < NS; i++) begin
      win = 0.5 - 0.5 * $cos(2.0 * PI * i / NS);
      re += win * xs[i] * $cos(2.0 * PI * f * i);
      im += win * xs[i] * $sin(2.0 * PI * f * i);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real worst_spur_dbc();
    real fin = 600.0 / 5000.0;
    real sig = amp(fin);
    real f [5] = '{0.25, 0.5, 0.25 - fin, 0.25 + fin, 0.5 - fin};
    real worst = -200.0;
    for (int i = 0; i < 5; i++) begin
      automatic real db = 20.0 * $log10(amp(f[i]) / sig + 1e-12);
      if (db > worst) worst = db;
    end
    return worst;
  endfunction

  task automatic capture();
    logic [31:0] dat;
    longint n_cap;
    n_cap = adc.n_now;
    wr(8'h00, 32'h2);
    while (!dsp_irq) @(negedge clk);
    n_irq++;
    n_capture++;
    rd(8'h01, dat);
    check(dat[4] && !dat[3] && dat[11:8] == 4'hF, "capture done, all FIFOs full");
    // the FIFOs stay full while samples keep coming: they are dropped
    repeat (20) @(negedge clk);
    rd(8'h01, dat);
    if (dat[11:8] == 4'hF) n_drop++;
    wr(8'h03, 32'h10);
    check(!dsp_irq, "irq cleared");
    read_record(n_cap + 1);
  endtask

  real spur_before, spur_after;
  logic [31:0] dat;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // 1. hand-written DCW: phase of channel 1 to 515
    wr(8'h04, 32'h0021_0203);
    repeat (300) @(negedge clk);
    rd(8'h19, dat);
    check(dat == 32'h203 && adc.dcw_ph[1] == 32'h203, "hand DCW stored and sent");
    if (adc.n_kind[2] == 1) n_man++;

    // 2. receivers off: a capture stores nothing
    wr(8'h02, 32'h0);
    wr(8'h00, 32'h2);
    repeat (200) @(negedge clk);
    rd(8'h01, dat);
    check(dat[3] && dat[19:16] == 4'hF && !dsp_irq, "nothing captured while receivers are off");
    if (dat[19:16] == 4'hF) n_rx_off++;
    wr(8'h02, 32'h1);
    while (!dsp_irq) @(negedge clk);
    wr(8'h03, 32'h10);
    // drain that record, then take a fresh one
    for (int j = 0; j < DEPTH; j++) for (int k = 0; k < MM; k++) rd(8'h08 + 8'(k), dat);
    capture();
    spur_before = worst_spur_dbc();
    $display("largest mismatch spur before calibration: %0.1f dBc", spur_before);

    // 3. calibration
    wr(8'h00, 32'h1);
    rd(8'h01, dat);
    check(dat[0], "calibration busy");
    wr(8'h00, 32'h2);                      // the FIFOs belong to the calibration now
    rd(8'h01, dat);
    check(dat[0] && !dat[4], "capture request ignored during calibration");
    if (dat[0] && !dat[4]) n_cap_blocked++;
    while (!dsp_irq) @(negedge clk);
    n_irq++;
    rd(8'h01, dat);
    check(dat[1] && !dat[0] && !dat[2], "calibration done without error");
    wr(8'h03, 32'h2);
    for (int k = 0; k < MM; k++) begin
      rd(8'h10 + 8'(k), dat); check(int'(dat) == adc.dcw_off[k], "offset DCW in the ADC");
      rd(8'h14 + 8'(k), dat); check(int'(dat) == adc.dcw_gain[k], "gain DCW in the ADC");
      rd(8'h18 + 8'(k), dat); check(int'(dat) == adc.dcw_ph[k], "phase DCW in the ADC");
    end
    for (int i = 0; i < MM - 1; i++) begin
      rd(8'h30 + 8'(i), dat);
      $display("timing stage %0d: %0d steps", i, dat);
      check(dat > 0, "timing stage stepped");
    end
    check(adc.n_kind[0] > 0 && adc.n_kind[1] > 0 && adc.n_kind[2] > 1, "DCWs of every kind sent");
    for (int k = 1; k < MM; k++) begin
      automatic real ro = adc.eff_off(k) - adc.eff_off(0);
      automatic real rg = adc.eff_gain(k) / adc.eff_gain(0) - 1.0;
      automatic real rt = (adc.eff_dt(k) - adc.eff_dt(0)) / DU;
      $display("ch%0d residual: offset %0.3f LSB, gain %0.5f, skew %0.2f steps (%0.5f Ts)", k, ro, rg, rt, rt * DU);
      check(ro < 0.3 && ro > -0.3, "residual offset");
      check(rg < 0.003 && rg > -0.003, "residual gain");
      check(rt < 6.0 && rt > -6.0, "residual skew");
    end

    // 4. spurs after calibration
    capture();
    spur_after = worst_spur_dbc();
    $display("largest mismatch spur after calibration: %0.1f dBc", spur_after);
    check(spur_after < spur_before - 20.0, "spurs reduced by 20 dB");

    $display("mechanisms: captures %0d, dropped-while-full %0d, receivers-off %0d, hand DCW %0d, irq %0d, blocked capture %0d, calibration records %0d, engine passes %0d",
             n_capture, n_drop, n_rx_off, n_man, n_irq, n_cap_blocked, n_rec, n_pass);
    check(n_rec > 0 && n_rec == n_pass, "one FIFO record per engine pass");
    check(n_capture >= 2 && n_drop > 0 && n_rx_off > 0 && n_man > 0 && n_irq >= 3 && n_cap_blocked > 0,
          "every mechanism seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
