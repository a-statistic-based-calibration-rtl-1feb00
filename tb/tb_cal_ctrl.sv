// Testbench of cal_ctrl at its default parameters (M = 4, N = 20000).
// The statistics engine and the ADC are replaced by an arithmetic plant:
// four channels with offset [0, 0.5, 1.6, -2.2] LSB, gain [1, 1.06, 1.13,
// 0.91] (the gain element adds 0.14 % of nominal per code) and timing skew [0, 0.02, 0.03, -0.03] Ts, a 100 LSB sine at
// 600 MHz sampled at 5 GS/s, and adjustment steps of 0.2 LSB, 0.14 % and
// 110 fs per DCW code.  For each pass it returns the expected values of the
// three statistics over N samples for the DCWs the controller has written.
// Checked: the offset and gain DCWs against the two correction formulas
// evaluated here on the statistics that were returned; the mean offsets
// handed to the engine; that no pass starts while a DCW write is in flight;
// that every timing stage stepped at least once; that the residual skews
// after calibration are equal to that of channel 0 within (k+1) steps; that
// a hand-written DCW while idle is stored and sent; and that a stage that
// cannot converge stops after MAX_ITER steps with err set.
module tb_cal_ctrl;
  import tiadc_pkg::*;
  localparam int MM = 4;
  localparam real PI = 3.14159265358979;
  localparam real A = 100.0;
  localparam real W0 = 2.0 * PI * 600.0 / 5000.0;
  localparam real DU = 110.0e-15 / 200.0e-12;   // phase step in units of Ts

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, man_valid = 1'b0;
  dcw_req_t man_req = '0;
  logic st_start, st_done = 1'b0;
  logic rec_clr, rec_wr_en, rec_rd, st_x_valid, rec_full = 1'b0;
  logic [$clog2(N_CAL / 2 + 1)-1:0] st_n_half;
  logic signed [ACC_W-1:0] st_sum [MM], st_abs [MM], st_prod [MM];
  ofs_t st_ofs [MM];
  dcw_req_t dcw_req;
  logic dcw_valid, dcw_ready, spi_busy;
  dcw_t dcw_off [MM], dcw_gain [MM], dcw_phase [MM];
  logic busy, done, err;
  logic [15:0] iters [MM-1];
  int checks = 0, failures = 0;

  cal_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // plant
  real o [MM] = '{0.0, 0.5, 1.6, -2.2};
  real g [MM] = '{1.0, 1.06, 1.13, 0.91};
  real t [MM] = '{0.0, 0.02, 0.03, -0.03};
  int  a_off [MM], a_gain [MM], a_ph [MM];      // DCWs the ADC holds
  int  spi_cnt = 0;
  int  passes = 0;
  int  n_man = 0;

  function automatic real oe(int k); return o[k] + 0.2 * (a_off[k] - 512); endfunction
  function automatic real ge(int k); return g[k] + 0.0014 * (a_gain[k] - 512); endfunction
  bit  dead_phase = 0;                        // channel 2's phase element stops working
  function automatic real te(int k); return t[k] + ((dead_phase && k == 2) ? 0.0 : DU * (a_ph[k] - 512)); endfunction

  assign dcw_ready = (spi_cnt == 0);
  assign spi_busy  = (spi_cnt != 0);

  always @(posedge clk) begin
    if (spi_cnt > 0) spi_cnt <= spi_cnt - 1;
    if (rst_n && dcw_valid && dcw_ready) begin
      spi_cnt <= 30;
      case (dcw_req.kind)
        DCW_OFFSET: a_off[dcw_req.ch] = dcw_req.value;
        DCW_GAIN:   a_gain[dcw_req.ch] = dcw_req.value;
        default:    a_ph[dcw_req.ch] = dcw_req.value;
      endcase
    end
  end

  // record FIFOs: full 20 clocks after a clear; counts the words read per pass
  int fill_cnt = 0, rd_words = 0, xv_words = 0, n_cap = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      rec_full <= 1'b0; fill_cnt = 0;
    end else if (rec_clr) begin
      checks++;
      if (spi_busy) begin failures++; $display("FAIL record cleared during a DCW write"); end
      rec_full <= 1'b0; fill_cnt = 0; n_cap++;
      if (n_cap > 1) begin
        checks++;
        if (rd_words != N_CAL / 2 + 1 || xv_words != N_CAL / 2 + 1) begin
          failures++; $display("FAIL read %0d/%0d record words", rd_words, xv_words);
        end
      end
      rd_words = 0; xv_words = 0;
    end else begin
      if (rec_wr_en && fill_cnt < 20) fill_cnt++;
      if (fill_cnt == 20) rec_full <= 1'b1;
      if (rec_rd) begin
        rd_words++;
        if (!rec_full) begin checks++; failures++; $display("FAIL record read before it was full"); end
      end
      if (st_x_valid) xv_words++;
    end
  end

  // statistics of one pass, 3 clocks after the record has been read out
  real last_o [MM];
  initial begin
    for (int k = 0; k < MM; k++) begin
      a_off[k] = 512; a_gain[k] = 512; a_ph[k] = 512;
      st_sum[k] = '0; st_abs[k] = '0; st_prod[k] = '0;
    end
    forever begin
      @(posedge clk);
      if (rst_n && st_start) begin
        checks++;
        if (spi_busy) begin failures++; $display("FAIL pass started during a DCW write"); end
        for (int k = 0; k < MM; k++) begin
          automatic int kn = (k + 1) % MM;
          automatic real ivl = (k < MM - 1) ? 1.0 + te(kn) - te(k) : 1.0 + te(0) - te(k);
          st_sum[k]  = ACC_W'($rtoi(N_CAL * oe(k) + (oe(k) >= 0 ? 0.5 : -0.5)));
          st_abs[k]  = ACC_W'($rtoi(16.0 * N_CAL * 2.0 * A * ge(k) / PI + 0.5));
          st_prod[k] = ACC_W'($rtoi(N_CAL * (0.5 * A * A * ge(k) * ge(kn) * $cos(W0 * ivl) + oe(k) * oe(kn))));
        end
        repeat (2) @(posedge clk);
        while (rec_rd || st_x_valid) @(posedge clk);
        repeat (3) @(posedge clk);
        st_done <= 1'b1;
        @(posedge clk);
        st_done <= 1'b0;
        passes++;
      end
    end
  end

  function automatic longint rdiv(longint a, longint b);
    longint aa = a < 0 ? -a : a, bb = b < 0 ? -b : b, q;
    q = (2 * aa + bb) / (2 * bb);
    return ((a < 0) != (b < 0)) ? -q : q;
  endfunction

  // follow the passes: the offset DCWs computed from pass 1 and the means of
  // pass 2 are checked when pass 3 starts, the gain DCWs from pass 3 when
  // pass 4 starts
  longint s1 [MM], s2 [MM], a3 [MM];
  int nd = 0, ns = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (st_start) ns++;
      if (st_done) begin
        nd++;
        for (int k = 0; k < MM; k++) begin
          if (nd == 1) s1[k] = st_sum[k];
          if (nd == 2) s2[k] = st_sum[k];
          if (nd == 3) a3[k] = st_abs[k];
        end
      end
      if (st_start && ns == 3) begin
        for (int k = 1; k < MM; k++)
          check(int'(dcw_off[k]) == 512 - rdiv(5 * (s1[k] - s1[0]), N_CAL), "offset DCW");
        check(dcw_off[0] == 512, "reference offset DCW untouched");
        for (int k = 0; k < MM; k++)
          check(longint'(st_ofs[k]) == rdiv(16 * s2[k], N_CAL), "mean offset to engine");
      end
      if (st_start && ns == 4) begin
        for (int k = 1; k < MM; k++)
          check(int'(dcw_gain[k]) == 512 + rdiv((a3[0] - a3[k]) * 5000, 7 * a3[0]), "gain DCW");
        check(dcw_gain[0] == 512, "reference gain DCW untouched");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    // a hand-written DCW while idle
    @(negedge clk);
    man_req = '{kind: DCW_PHASE, ch: 2'd0, value: 10'd512};
    man_valid = 1'b1;
    @(negedge clk);
    man_valid = 1'b0;
    repeat (50) @(posedge clk);
    check(a_ph[0] == 512 && !busy, "hand-written DCW reached the ADC");
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (!done) @(posedge clk);
    $display("passes %0d, stage steps %0d %0d %0d, phase DCWs %0d %0d %0d %0d", passes,
             iters[0], iters[1], iters[2], a_ph[0], a_ph[1], a_ph[2], a_ph[3]);
    check(!err, "iteration limit reached");
    for (int i = 0; i < MM - 1; i++) check(iters[i] > 0, "timing stage never stepped");
    for (int k = 1; k < MM; k++) begin
      automatic real r = (te(k) - te(0)) / DU;
      $display("ch%0d residual skew %0.2f steps, gain %0.4f, offset %0.2f", k, r, ge(k) / ge(0), oe(k) - oe(0));
      check(r < k + 1.0 && r > -(k + 1.0), "residual timing skew");
      check((ge(k) / ge(0) - 1.0) < 0.0014 && (ge(k) / ge(0) - 1.0) > -0.0014, "residual gain error");
      check((oe(k) - oe(0)) < 0.2 && (oe(k) - oe(0)) > -0.2, "residual offset error");
    end
    check(int'(dcw_phase[0]) == 512, "reference phase DCW untouched");

    // a second calibration with a phase element that does nothing: the first
    // timing stage can never cross its reference and must stop at MAX_ITER
    // with err set, after which the sequence still finishes
    dead_phase = 1;
    t[2] = 0.05;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(posedge clk);
    $display("with a dead phase element: err %0b, stage steps %0d %0d %0d", err, iters[0], iters[1], iters[2]);
    check(err, "err after the iteration limit");
    check(iters[0] == 511, "first stage stopped at MAX_ITER");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
