// Calibration across input conditions: four copies of the full design, each
// with its own behavioural ADC (the mismatches of the published simulation)
// and a different sine frequency and SNR: 600 MHz at 20 dB and at 60 dB
// (ends of the SNR sweep), 150 MHz and 350 MHz at 45 dB (points of the
// frequency sweep).  Each copy runs one calibration from its register bus.
// Checked per copy: the calibration ends without error, every timing stage
// stepped, and the mismatches left in the ADC are below 0.3 LSB offset,
// 0.3 % gain and a skew bound (0.004 Ts at 600 MHz, 0.01 Ts at 150 and
// 350 MHz, where the product metric is flatter and the bias term of the
// finite sum larger), against initial mismatches of up to 2.2 LSB, 13 %
// and 0.06 Ts.
module tb_workload_sweep;
  import tiadc_pkg::*;
  localparam int  MM = 4;
  localparam real DU = 110.0e-15 / 200.0e-12;
  localparam int  NCFG = 4;
  localparam real FIN [NCFG] = '{600.0, 600.0, 150.0, 350.0};
  localparam real SNR [NCFG] = '{20.0, 60.0, 45.0, 45.0};
  localparam real TOL [NCFG] = '{0.004, 0.004, 0.01, 0.01};

  int checks = 0, failures = 0;
  logic rst_n = 1'b0;
  bit   fin_done [NCFG];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic clk;
    logic [7:0] adc_d [MM];
    logic spi_sclk, spi_mosi, spi_cs_n;
    logic [7:0] dsp_addr = '0;
    logic dsp_wr = 1'b0, dsp_rd = 1'b0;
    logic [31:0] dsp_wdata = '0, dsp_rdata;
    logic dsp_rvalid, dsp_irq;

    ev8aq160_model #(.FIN_MHZ(FIN[c]), .SNR_DB(SNR[c])) adc (.clk, .d(adc_d), .spi_sclk, .spi_mosi, .spi_cs_n);
    tiadc_cal_top dut (.clk, .rst_n, .adc_d, .spi_sclk, .spi_mosi, .spi_cs_n, .dsp_addr, .dsp_wr,
                       .dsp_rd, .dsp_wdata, .dsp_rdata, .dsp_rvalid, .dsp_irq);

    task automatic wr(logic [7:0] a, logic [31:0] dat);
      @(negedge clk); dsp_addr = a; dsp_wdata = dat; dsp_wr = 1'b1;
      @(negedge clk); dsp_wr = 1'b0;
    endtask
    task automatic rd(logic [7:0] a, output logic [31:0] dat);
      @(negedge clk); dsp_addr = a; dsp_rd = 1'b1;
      @(negedge clk); dsp_rd = 1'b0;
      dat = dsp_rdata;
    endtask

    initial begin
      logic [31:0] dat;
      fin_done[c] = 0;
      @(posedge rst_n);
      repeat (4) @(posedge clk);
      wr(8'h00, 32'h1);
      while (!dsp_irq) @(negedge clk);
      rd(8'h01, dat);
      check(dat[1] && !dat[2], "calibration done without error");
      for (int i = 0; i < MM - 1; i++) begin
        rd(8'h30 + 8'(i), dat);
        check(dat > 0, "timing stage stepped");
      end
      for (int k = 1; k < MM; k++) begin
        automatic real ro = adc.eff_off(k) - adc.eff_off(0);
        automatic real rg = adc.eff_gain(k) / adc.eff_gain(0) - 1.0;
        automatic real rt = adc.eff_dt(k) - adc.eff_dt(0);
        $display("%0.0f MHz %0.0f dB ch%0d residual: offset %0.3f LSB, gain %0.5f, skew %0.5f Ts",
                 FIN[c], SNR[c], k, ro, rg, rt);
        check(ro < 0.3 && ro > -0.3, "residual offset");
        check(rg < 0.003 && rg > -0.003, "residual gain");
        check(rt < TOL[c] && rt > -TOL[c], "residual skew");
      end
      fin_done[c] = 1;
    end
  end

  initial begin
    #20;
    rst_n = 1'b1;
    wait (fin_done[0] && fin_done[1] && fin_done[2] && fin_done[3]);
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
