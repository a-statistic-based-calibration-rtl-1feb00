// DSP interface: the register bus through which the DSP runs the system.
//
// The DSP starts a record capture or a calibration, reads the captured
// samples out of the channel FIFOs, reads the statistics, DCWs and iteration
// counts, and can write a DCW by hand.  Register map (word addresses):
//   0x00 W  CTRL     bit0: start calibration, bit1: start capture (pulses)
//   0x01 R  STATUS   bit0 cal busy, bit1 cal done (sticky), bit2 cal error,
//                    bit3 capture active, bit4 capture done (sticky),
//                    bits 8+k FIFO k full, bits 16+k FIFO k empty
//   0x02 RW RX_EN    bit0: IDDR receivers enabled (1 after reset)
//   0x03 W  IRQCLR   write 1 to bit1 / bit4 to clear the sticky flags
//   0x04 W  DCW      bits 9:0 value, 17:16 channel, 21:20 kind (0 offset,
//                    1 gain, 2 phase); taken only while no calibration runs
//   0x08+k R FIFO k  pops one word: {x_k[2j+1], x_k[2j]} in bits 15:0
//   0x10+k R offset DCW k, 0x14+k gain DCW k, 0x18+k phase DCW k
//   0x20+k R sum_k, 0x24+k abs sum_k, 0x28+k product sum_k (bits 31:0)
//   0x30+i R steps of timing stage i
// A capture empties the FIFOs and writes every received sample pair until
// all FIFOs are full; then capture done is set.  While a calibration runs it
// owns the FIFOs: capture starts and FIFO pops from the bus are ignored.  irq is high while either
// sticky flag is set.
//
// Timing: dsp_wr and dsp_rd are one-clock strobes with dsp_addr (and
// dsp_wdata) valid; read data appear with dsp_rvalid one clock after dsp_rd.
// The existence of a DSP interface that lets the DSP control the ADC and the
// IDDRs and read the FIFOs follows the published system; the bus and the
// register map are this design's.
module dsp_if
  import tiadc_pkg::*;
#(
  parameter int unsigned M_P     = M,
  parameter int unsigned ACC_W_P = ACC_W,
  parameter int unsigned FIFO_W  = 2 * DATA_W,
  parameter int unsigned CNT_W   = 15
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // DSP bus
  input  logic [7:0]                dsp_addr,
  input  logic                      dsp_wr,
  input  logic                      dsp_rd,
  input  logic [31:0]               dsp_wdata,
  output logic [31:0]               dsp_rdata,
  output logic                      dsp_rvalid,
  output logic                      irq,
  // receivers and FIFOs
  output logic                      rx_en,
  input  logic                      rx_valid,
  output logic                      fifo_clr,
  output logic                      fifo_wr,
  output logic [M_P-1:0]            fifo_rd,
  input  logic [FIFO_W-1:0]         fifo_rdata [M_P],
  input  logic [M_P-1:0]            fifo_full,
  input  logic [M_P-1:0]            fifo_empty,
  // calibration
  output logic                      cal_start,
  input  logic                      cal_busy,
  input  logic                      cal_done,
  input  logic                      cal_err,
  output logic                      man_valid,
  output dcw_req_t                  man_req,
  input  dcw_t                      dcw_off   [M_P],
  input  dcw_t                      dcw_gain  [M_P],
  input  dcw_t                      dcw_phase [M_P],
  input  logic signed [ACC_W_P-1:0] st_sum  [M_P],
  input  logic signed [ACC_W_P-1:0] st_abs  [M_P],
  input  logic signed [ACC_W_P-1:0] st_prod [M_P],
  input  logic [CNT_W:0]            iters [M_P-1]
);

  logic       cap_active, cap_done_f, cal_done_f;
  logic [7:0] raddr;

  assign fifo_wr = cap_active && rx_valid;
  assign irq     = cap_done_f || cal_done_f;

  // a FIFO pops on the clock edge that takes the read, so that its
  // synchronous read data are there with dsp_rvalid
  always_comb begin
    fifo_rd = '0;
    if (dsp_rd && !cal_busy && dsp_addr[7:2] == 6'h02 && int'(dsp_addr[1:0]) < M_P)
      fifo_rd[dsp_addr[1:0]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_en <= 1'b1; cap_active <= 1'b0; cap_done_f <= 1'b0; cal_done_f <= 1'b0;
      cal_start <= 1'b0; fifo_clr <= 1'b0; man_valid <= 1'b0; man_req <= '0;
      raddr <= '0; dsp_rvalid <= 1'b0;
    end else begin
      cal_start <= 1'b0;
      fifo_clr  <= 1'b0;
      man_valid <= 1'b0;
      dsp_rvalid <= dsp_rd;

      if (cal_done) cal_done_f <= 1'b1;
      if (cap_active && (&fifo_full)) begin
        cap_active <= 1'b0;
        cap_done_f <= 1'b1;
      end

      if (dsp_wr) begin
        unique case (dsp_addr)
          8'h00: begin
            cal_start <= dsp_wdata[0] && !cal_busy;
            if (dsp_wdata[1] && !cal_busy) begin
              fifo_clr   <= 1'b1;
              cap_active <= 1'b1;
              cap_done_f <= 1'b0;
            end
          end
          8'h02: rx_en <= dsp_wdata[0];
          8'h03: begin
            if (dsp_wdata[1]) cal_done_f <= 1'b0;
            if (dsp_wdata[4]) cap_done_f <= 1'b0;
          end
          8'h04: if (!cal_busy) begin
            man_valid     <= 1'b1;
            man_req.value <= dsp_wdata[DCW_W-1:0];
            man_req.ch    <= dsp_wdata[17:16];
            man_req.kind  <= dcw_kind_e'(dsp_wdata[21:20]);
          end
          default: ;
        endcase
      end

      if (dsp_rd) raddr <= dsp_addr;
    end
  end

  // read data: selected by the address of the read one clock earlier
  always_comb begin
    logic [1:0] c;
    c = raddr[1:0];
    dsp_rdata = '0;
    if (raddr == 8'h01) begin
      dsp_rdata[0] = cal_busy;
      dsp_rdata[1] = cal_done_f;
      dsp_rdata[2] = cal_err;
      dsp_rdata[3] = cap_active;
      dsp_rdata[4] = cap_done_f;
      dsp_rdata[8 +: M_P]  = fifo_full;
      dsp_rdata[16 +: M_P] = fifo_empty;
    end else if (raddr == 8'h02) dsp_rdata[0] = rx_en;
    else if (int'(c) < M_P) begin
      unique case (raddr[7:2])
        6'h02: dsp_rdata = 32'(fifo_rdata[c]);
        6'h04: dsp_rdata = 32'(dcw_off[c]);
        6'h05: dsp_rdata = 32'(dcw_gain[c]);
        6'h06: dsp_rdata = 32'(dcw_phase[c]);
        6'h08: dsp_rdata = st_sum[c][31:0];
        6'h09: dsp_rdata = st_abs[c][31:0];
        6'h0A: dsp_rdata = st_prod[c][31:0];
        6'h0C: if (int'(c) < M_P - 1) dsp_rdata = 32'(iters[c]);
        default: ;
      endcase
    end
  end

endmodule
