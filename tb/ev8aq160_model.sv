// Behavioural model of a four-core 5 GS/s ADC of the EV8AQ160 kind, for
// simulation only.  It samples an internal sine source,
//   x_k[n] = (G_k + 0.0014*(gain DCW - 512)) * A * sin(w0*(nM + k + dt_k) + phi)
//          + O_k + 0.2*(offset DCW - 512) + noise,
//   dt_k   = DT_k + 0.00055*(phase DCW - 512)   (110 fs steps at Ts = 200 ps),
// quantises it to 8 bits (offset binary, clipped) and drives sample n of
// every core on its DDR bus: even n around the rising edge, odd n around the
// falling edge of the 625 MHz data clock it generates (data change a quarter
// period before each edge).  The gain, offset and phase DCWs of each core are
// written over SPI (mode 0) with the 24-bit frames of adc_spi_ctrl.  Noise is
// a sum of four uniform variables scaled for the SNR asked for.  The model
// keeps the last 2^20 codes of each core so that a testbench can compare
// captured data with what was sent.  None of this describes the real part's
// register map or timing.
module ev8aq160_model #(
  parameter real FIN_MHZ = 600.0,
  parameter real AMP     = 100.0,
  parameter real SNR_DB  = 45.0,
  parameter real PHI     = 0.3
) (
  output logic       clk,
  output logic [7:0] d [4],
  input  logic       spi_sclk,
  input  logic       spi_mosi,
  input  logic       spi_cs_n
);
  localparam real PI  = 3.14159265358979;
  localparam real W0  = 2.0 * PI * FIN_MHZ / 5000.0;
  localparam real DU  = 110.0e-15 / 200.0e-12;
  localparam int  HB  = 20;

  // mismatches of the cores (the values of the published simulation)
  real o  [4] = '{0.0, 0.5, 1.6, -2.2};
  real g  [4] = '{1.0, 1.06, 1.13, 0.91};
  real dt [4] = '{0.0, 0.02, 0.03, -0.03};
  int  dcw_off [4] = '{512, 512, 512, 512};
  int  dcw_gain [4] = '{512, 512, 512, 512};
  int  dcw_ph [4] = '{512, 512, 512, 512};
  int  n_frames = 0;
  int  n_kind [3] = '{0, 0, 0};

  longint n_now = 0;                 // index of the next sample per core
  logic [7:0] hist [4][1 << HB];

  function automatic real eff_off(int k);  return o[k] + 0.2 * (dcw_off[k] - 512); endfunction
  function automatic real eff_gain(int k); return g[k] + 0.0014 * (dcw_gain[k] - 512); endfunction
  function automatic real eff_dt(int k);   return dt[k] + DU * (dcw_ph[k] - 512); endfunction

  function automatic real noise();
    real s = 0.0;
    real sigma = AMP / $sqrt(2.0) / $pow(10.0, SNR_DB / 20.0);
    for (int i = 0; i < 4; i++) s += (real'($urandom % 65536) / 65536.0 - 0.5);
    return s * sigma * $sqrt(3.0);    // four U(-1/2,1/2) have variance 1/3
  endfunction

  function automatic logic [7:0] code(int k, longint n);
    real v;
    int  c;
    v = eff_gain(k) * AMP * $sin(W0 * (real'(n) * 4.0 + k + eff_dt(k)) + PHI) + eff_off(k) + noise();
    c = $rtoi(v + 128.5 + 1000.0) - 1000;      // round to nearest
    if (c < 0) c = 0;
    if (c > 255) c = 255;
    return 8'(c);
  endfunction

  task automatic drive();
    for (int k = 0; k < 4; k++) begin
      d[k] = code(k, n_now);
      hist[k][n_now[HB-1:0]] = d[k];
    end
    n_now++;
  endtask

  initial begin
    clk = 1'b0;
    for (int k = 0; k < 4; k++) d[k] = 8'h80;
    forever begin
      #0.4 drive();
      #0.4 clk = 1'b1;
      #0.4 drive();
      #0.4 clk = 1'b0;
    end
  end

  // SPI receiver
  logic [23:0] sh;
  int          nb;
  always @(negedge spi_cs_n) begin sh = '0; nb = 0; end
  always @(posedge spi_sclk) if (!spi_cs_n) begin sh = {sh[22:0], spi_mosi}; nb++; end
  always @(posedge spi_cs_n) begin
    if (nb == 24 && !sh[23] && sh[22:20] == 3'b001) begin
      automatic int k = int'(sh[17:16]);
      automatic int v = int'(sh[15:0]);
      case (sh[19:18])
        2'd0: dcw_off[k] = v;
        2'd1: dcw_gain[k] = v;
        2'd2: dcw_ph[k] = v;
        default: ;
      endcase
      if (sh[19:18] != 2'd3) n_kind[sh[19:18]]++;
      n_frames++;
    end
  end
endmodule
