// FPGA side of a four-channel time-interleaved ADC (TIADC) data acquisition
// system with statistic-based mismatch calibration.
//
// The ADC's M cores each drive a DDR bus.  Per channel an IDDR receiver turns
// it into two samples per clock, which are stored in that channel's FIFO.
// The FIFOs serve two users: the DSP, which captures records and reads them
// out, and the calibration sequencer, which for every pass captures a record
// and streams it from the FIFOs into the statistics engine (the adder and
// multiplier unit).  The sequencer runs the engine pass after pass and sends the resulting offset, gain and phase DCWs
// to the ADC's adjustment elements through the SPI master; the ADC applies
// them, and the next pass measures the effect, so calibration is a closed
// loop through the ADC.  The DSP reaches everything through the register
// interface (see dsp_if for the map) and is interrupted when a capture or a
// calibration is complete.
//
// Everything runs on one clock, the ADC data clock (625 MHz for 1.25 GS/s
// cores).  The partition into IDDR, FIFO, addition/multiplication unit, ADC
// control and DSP interface follows the published system; running the
// calibration sequence in the FPGA rather than in DSP software, the single
// clock domain and all widths and maps are this design's choices.
module tiadc_cal_top
  import tiadc_pkg::*;
#(
  parameter int unsigned M_P        = M,
  parameter int unsigned DATA_W_P   = DATA_W,
  parameter int unsigned N_CAL_P    = N_CAL,
  parameter int unsigned FIFO_DEPTH = 16384,
  parameter int unsigned SPI_DIV    = 4,
  parameter int unsigned SETTLE     = 64,
  parameter int unsigned MAX_ITER   = 511
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W_P-1:0] adc_d [M_P],
  output logic                spi_sclk,
  output logic                spi_mosi,
  output logic                spi_cs_n,
  input  logic [7:0]          dsp_addr,
  input  logic                dsp_wr,
  input  logic                dsp_rd,
  input  logic [31:0]         dsp_wdata,
  output logic [31:0]         dsp_rdata,
  output logic                dsp_rvalid,
  output logic                dsp_irq
);

  localparam int unsigned FIFO_W = 2 * DATA_W_P;
  localparam int unsigned CNT_W  = $clog2(N_CAL_P / 2 + 1);

  // receivers
  logic                       rx_en;
  logic signed [DATA_W_P-1:0] rx_q [M_P][2];
  logic [M_P-1:0]             rx_v;

  for (genvar k = 0; k < M_P; k++) begin : g_rx
    logic signed [DATA_W_P-1:0] q [2];
    iddr_rx #(.DATA_W_P(DATA_W_P)) u_iddr (
      .clk, .rst_n, .en(rx_en), .din(adc_d[k]), .q(q), .q_valid(rx_v[k])
    );
    assign rx_q[k][0] = q[0];
    assign rx_q[k][1] = q[1];
  end

  // FIFOs, shared by DSP captures and calibration records
  logic                       fifo_clr, fifo_wr, dsp_fifo_clr, dsp_fifo_wr;
  logic                       rec_clr, rec_wr_en, rec_rd;
  logic [M_P-1:0]             fifo_rd, dsp_fifo_rd, fifo_full, fifo_empty;
  logic [FIFO_W-1:0]          fifo_rdata [M_P];

  // a calibration record of N/2 + 1 words per channel must fit
  if (FIFO_DEPTH < N_CAL_P / 2 + 1) begin : g_depth_check
    $error("FIFO_DEPTH too small for N_CAL_P");
  end

  assign fifo_clr = dsp_fifo_clr | rec_clr;
  assign fifo_wr  = dsp_fifo_wr | (rec_wr_en & (&rx_v));
  assign fifo_rd  = dsp_fifo_rd | {M_P{rec_rd}};

  for (genvar k = 0; k < M_P; k++) begin : g_fifo
    logic [$clog2(FIFO_DEPTH):0] count;
    sample_fifo #(.WIDTH(FIFO_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clr(fifo_clr), .wr_en(fifo_wr), .wdata({rx_q[k][1], rx_q[k][0]}),
      .rd_en(fifo_rd[k]), .rdata(fifo_rdata[k]), .empty(fifo_empty[k]), .full(fifo_full[k]),
      .count(count)
    );
  end

  // statistics
  logic                     st_start, st_busy, st_done, st_x_valid;
  logic signed [DATA_W_P-1:0] st_x [M_P][2];
  logic [CNT_W-1:0]         st_n_half;
  logic signed [ACC_W-1:0]  st_sum [M_P], st_abs [M_P], st_prod [M_P];
  ofs_t                     st_ofs [M_P];

  for (genvar k = 0; k < M_P; k++) begin : g_stx
    assign st_x[k][0] = fifo_rdata[k][DATA_W_P-1:0];
    assign st_x[k][1] = fifo_rdata[k][FIFO_W-1:DATA_W_P];
  end

  stat_engine #(.M_P(M_P), .DATA_W_P(DATA_W_P), .N_CAL_P(N_CAL_P)) u_stat (
    .clk, .rst_n, .start(st_start), .n_half(st_n_half), .x(st_x), .x_valid(st_x_valid),
    .ofs(st_ofs), .busy(st_busy), .done(st_done),
    .sum(st_sum), .abs_sum(st_abs), .prod_sum(st_prod)
  );

  // calibration sequencer
  logic      cal_start, cal_busy, cal_done, cal_err, man_valid;
  dcw_req_t  man_req, dcw_req;
  logic      dcw_valid, dcw_ready, spi_busy;
  dcw_t      dcw_off [M_P], dcw_gain [M_P], dcw_phase [M_P];
  logic [15:0] iters [M_P-1];

  cal_ctrl #(.M_P(M_P), .N_CAL_P(N_CAL_P), .MAX_ITER(MAX_ITER), .SETTLE(SETTLE)) u_cal (
    .clk, .rst_n, .start(cal_start), .man_valid, .man_req,
    .rec_clr, .rec_wr_en, .rec_full(&fifo_full), .rec_rd, .st_x_valid, .st_start, .st_n_half, .st_done, .st_sum, .st_abs, .st_prod, .st_ofs,
    .dcw_req, .dcw_valid, .dcw_ready, .spi_busy,
    .dcw_off, .dcw_gain, .dcw_phase, .busy(cal_busy), .done(cal_done), .err(cal_err), .iters
  );

  // ADC control
  adc_spi_ctrl #(.CLK_DIV(SPI_DIV)) u_spi (
    .clk, .rst_n, .req(dcw_req), .req_valid(dcw_valid), .req_ready(dcw_ready), .busy(spi_busy),
    .sclk(spi_sclk), .mosi(spi_mosi), .cs_n(spi_cs_n)
  );

  // DSP interface
  dsp_if #(.M_P(M_P), .FIFO_W(FIFO_W)) u_dsp (
    .clk, .rst_n, .dsp_addr, .dsp_wr, .dsp_rd, .dsp_wdata, .dsp_rdata, .dsp_rvalid, .irq(dsp_irq),
    .rx_en, .rx_valid(&rx_v), .fifo_clr(dsp_fifo_clr), .fifo_wr(dsp_fifo_wr), .fifo_rd(dsp_fifo_rd), .fifo_rdata, .fifo_full, .fifo_empty,
    .cal_start, .cal_busy, .cal_done, .cal_err, .man_valid, .man_req,
    .dcw_off, .dcw_gain, .dcw_phase, .st_sum, .st_abs, .st_prod, .iters
  );

endmodule
