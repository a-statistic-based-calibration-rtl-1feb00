// Calibration sequencer: offset, then gain, then timing skew.
//
// The sequencer drives the statistics engine through a series of passes of
// N samples per channel and turns the results into new digital control words
// (DCWs) for the ADC's offset, gain and phase adjustment elements.  Channel 0
// is the reference throughout and its DCWs are never changed by calibration.
//
//  1. OFS1: offset error  dO_k = (sum_k - sum_0) / N  (Eq. 12); new offset
//     DCW = old - dO_k / 0.2 LSB  (Eq. 33), i.e. old - round(5*(sum_k-sum_0)/N).
//  2. OFS2: a second pass measures each channel's mean O_k again (with O_FRAC
//     fraction bits); it is handed to the engine for the absolute sums.
//  3. GAIN: gain error dg_k = S_k / S_0 with S_k = sum |x_k - O_k| (Eq. 19);
//     new gain DCW = old + (1 - dg_k) / 0.14 %  (Eq. 34), evaluated as
//     old + round((S_0 - S_k) * 5000 / (7 * S_0)).
//  4. TIME1, for k = 1 .. M-2 in turn: compare P_k = sum x_k x_{k+1} with
//     P_0 = sum x_0 x_1.  If P_k > P_0 the interval between channels k and
//     k+1 is too short and the phase DCW of channel k+1 goes up one step,
//     otherwise it goes down one step (Eq. 29), one pass per step.
//  5. TIME2: compare P_{M-1} (channels M-1 and the next channel 0) with P_0.
//     If P_{M-1} > P_0, d = -1, else d = +1, and every channel k moves by
//     k*d steps (Eq. 32), which keeps the intervals equalised in step 4.
// A timing stage ends when the metrics are equal, or when the direction d
// reverses (the metric has crossed the reference and is within one step of
// it; the last step is kept), or after MAX_ITER steps, which also sets err.
//
// Every pass works on a record: after every batch of DCW writes the
// sequencer waits until the SPI master is idle and SETTLE more clocks, so
// that the samples are taken with the new setting, then clears the channel
// FIFOs (rec_clr), lets them fill (rec_wr_en) until all are full (rec_full),
// starts the statistics engine and reads the first N/2 + 1 words of every
// FIFO into it (rec_rd; st_x_valid marks the read data one clock later; the
// first word only supplies the engine's x_{M-1}[-1]).  All divisions share one
// sequential divider.  While idle, a DCW written by hand (man_valid/man_req)
// is stored and forwarded to the ADC; calibration starts from the stored
// DCWs, as Eqs. 33 and 34 update the original DCW.
//
// The FIFOs must hold at least N/2 + 1 words.  st_n_half is the constant
// N/2: the engine accepts any pass length, this sequencer always uses N.
//
// Interface: start (idle only) begins a calibration; busy is high until done
// pulses.  dcw_valid/dcw_ready is a valid/ready handshake toward the SPI
// master.  iters[i] counts the steps of timing stage i (i < M-2: pair
// (i+1, i+2); i = M-2: the final stage).  The order of the steps and the
// equations follow the published method; the stopping rule, the settling
// wait, the mid-scale reset value of the DCWs and the sign of the phase DCW
// (a larger code delays the channel's sampling instant) are this design's.
module cal_ctrl
  import tiadc_pkg::*;
#(
  parameter int unsigned M_P      = M,
  parameter int unsigned ACC_W_P  = ACC_W,
  parameter int unsigned N_CAL_P  = N_CAL,
  parameter int unsigned MAX_ITER = 511,
  parameter int unsigned SETTLE   = 64,
  localparam int unsigned CNT_W   = $clog2(N_CAL_P / 2 + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  // hand-written DCWs (from the DSP), taken while idle
  input  logic                       man_valid,
  input  dcw_req_t                   man_req,
  // statistics engine
  // record capture into the FIFOs and read-out into the statistics engine
  output logic                       rec_clr,
  output logic                       rec_wr_en,
  input  logic                       rec_full,
  output logic                       rec_rd,
  output logic                       st_x_valid,
  output logic                       st_start,
  output logic [CNT_W-1:0]           st_n_half,
  input  logic                       st_done,
  input  logic signed [ACC_W_P-1:0]  st_sum  [M_P],
  input  logic signed [ACC_W_P-1:0]  st_abs  [M_P],
  input  logic signed [ACC_W_P-1:0]  st_prod [M_P],
  output ofs_t                       st_ofs  [M_P],
  // DCW writes toward the ADC
  output dcw_req_t                   dcw_req,
  output logic                       dcw_valid,
  input  logic                       dcw_ready,
  input  logic                       spi_busy,
  // state
  output dcw_t                       dcw_off   [M_P],
  output dcw_t                       dcw_gain  [M_P],
  output dcw_t                       dcw_phase [M_P],
  output logic                       busy,
  output logic                       done,
  output logic                       err,
  output logic [15:0]                iters [M_P-1]
);

  localparam int unsigned DW = 64;

  typedef enum logic [2:0] {PH_OFS1, PH_OFS2, PH_GAIN, PH_TIME1, PH_TIME2} phase_e;
  typedef enum logic [3:0] {
    S_IDLE, S_SETTLE, S_CLR, S_CAP, S_READ, S_MEAS, S_DIV_START, S_DIV_WAIT, S_EVAL, S_WRITE, S_WRITE_WAIT, S_MAN_WAIT
  } state_e;

  state_e  state;
  phase_e  ph;
  logic [$clog2(M_P+1)-1:0] k;        // channel index of the divisions / writes
  logic [$clog2(M_P+1)-1:0] tk;       // pair under adjustment in TIME1
  logic [M_P-1:0]           pend;     // channels whose DCW must be written
  dcw_kind_e                wkind;
  logic [15:0]              settle_cnt;
  logic [15:0]              it;       // steps in the current timing stage
  logic                     first;
  logic                     prev_up;
  localparam int unsigned   RD_W = $clog2(N_CAL_P / 2 + 2);
  logic [RD_W-1:0]          rd_cnt;     // FIFO words still to read into the engine

  // divider
  logic                 div_start, div_busy, div_done;
  logic signed [DW-1:0] div_num, div_den, div_q;

  seq_div #(.W(DW)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  localparam logic signed [DW-1:0] NCAL_S = DW'(N_CAL_P);

  always_comb begin
    div_num = '0;
    div_den = NCAL_S;
    unique case (ph)
      PH_OFS1: div_num = (DW'(st_sum[k]) - DW'(st_sum[0])) * DW'(OFS_CODES_PER_LSB);
      PH_OFS2: div_num = DW'(st_sum[k]) <<< O_FRAC;
      PH_GAIN: begin
        div_num = (DW'(st_abs[0]) - DW'(st_abs[k])) * DW'(GAIN_NUM);
        div_den = DW'(st_abs[0]) * DW'(GAIN_DEN);
      end
      default: ;
    endcase
  end

  function automatic dcw_t sat_add(dcw_t v, logic signed [DW-1:0] d);
    logic signed [DW-1:0] r;
    r = DW'(v) + d;
    if (r < 0) return '0;
    if (r > DW'((1 << DCW_W) - 1)) return '1;
    return DCW_W'(r);
  endfunction

  // the channel being written and its value
  always_comb begin
    dcw_req.kind = wkind;
    dcw_req.ch   = 2'(k);
    unique case (wkind)
      DCW_OFFSET: dcw_req.value = dcw_off[k];
      DCW_GAIN:   dcw_req.value = dcw_gain[k];
      default:    dcw_req.value = dcw_phase[k];
    endcase
  end

  assign st_n_half = CNT_W'(N_CAL_P / 2);
  assign rec_clr   = (state == S_CLR);
  assign rec_wr_en = (state == S_CAP);
  assign rec_rd    = (state == S_READ);

  // FIFO read data arrive one clock after the read
  always_ff @(posedge clk) begin
    if (!rst_n) st_x_valid <= 1'b0;
    else        st_x_valid <= rec_rd;
  end
  assign busy      = (state != S_IDLE) && (state != S_MAN_WAIT);

  // comparison of the product metrics
  logic signed [ACC_W_P-1:0] p_cmp;
  assign p_cmp = (ph == PH_TIME2) ? st_prod[M_P-1] : st_prod[tk];

  // up: the phase DCW(s) move up one step; stop: the timing stage ends
  logic up, stop;
  assign up   = (ph == PH_TIME2) ? (p_cmp <= st_prod[0]) : (p_cmp > st_prod[0]);
  assign stop = (p_cmp == st_prod[0]) || (!first && (up != prev_up)) || (it == 16'(MAX_ITER));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; ph <= PH_OFS1; k <= '0; tk <= '0; pend <= '0; wkind <= DCW_OFFSET;
      settle_cnt <= '0; it <= '0; first <= 1'b1; prev_up <= 1'b0; rd_cnt <= '0;
      st_start <= 1'b0; div_start <= 1'b0; dcw_valid <= 1'b0; done <= 1'b0; err <= 1'b0;
      for (int i = 0; i < M_P; i++) begin
        dcw_off[i] <= dcw_t'(DCW_MID); dcw_gain[i] <= dcw_t'(DCW_MID); dcw_phase[i] <= dcw_t'(DCW_MID);
        st_ofs[i] <= '0;
      end
      for (int i = 0; i < M_P - 1; i++) iters[i] <= '0;
    end else begin
      st_start  <= 1'b0;
      div_start <= 1'b0;
      done      <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            ph <= PH_OFS1; err <= 1'b0; settle_cnt <= '0;
            for (int i = 0; i < M_P - 1; i++) iters[i] <= '0;
            for (int i = 0; i < M_P; i++) st_ofs[i] <= '0;
            state <= S_SETTLE;
          end else if (man_valid) begin
            unique case (man_req.kind)
              DCW_OFFSET: dcw_off[man_req.ch]   <= man_req.value;
              DCW_GAIN:   dcw_gain[man_req.ch]  <= man_req.value;
              default:    dcw_phase[man_req.ch] <= man_req.value;
            endcase
            wkind     <= man_req.kind;
            k         <= ($clog2(M_P+1))'(man_req.ch);
            dcw_valid <= 1'b1;
            state     <= S_MAN_WAIT;
          end
        end

        S_MAN_WAIT: if (dcw_ready) begin
          dcw_valid <= 1'b0;
          state     <= S_IDLE;
        end

        S_SETTLE: begin
          if (spi_busy) settle_cnt <= '0;
          else if (settle_cnt == 16'(SETTLE)) state <= S_CLR;
          else settle_cnt <= settle_cnt + 1'b1;
        end

        S_CLR: state <= S_CAP;

        S_CAP: if (rec_full) begin
          st_start <= 1'b1;
          rd_cnt   <= RD_W'(N_CAL_P / 2 + 1);
          state    <= S_READ;
        end

        S_READ: begin
          rd_cnt <= rd_cnt - 1'b1;
          if (rd_cnt == RD_W'(1)) state <= S_MEAS;
        end

        S_MEAS: if (st_done) begin
          unique case (ph)
            PH_OFS1, PH_GAIN: begin k <= 1; pend <= '0; state <= S_DIV_START; end
            PH_OFS2:          begin k <= 0; pend <= '0; state <= S_DIV_START; end
            default:          state <= S_EVAL;
          endcase
        end

        S_DIV_START: begin
          div_start <= 1'b1;
          state     <= S_DIV_WAIT;
        end

        S_DIV_WAIT: if (div_done) begin
          unique case (ph)
            PH_OFS1: begin
              dcw_off[k] <= sat_add(dcw_off[k], -div_q);
              pend[k]    <= 1'b1;
            end
            PH_GAIN: begin
              dcw_gain[k] <= sat_add(dcw_gain[k], div_q);
              pend[k]     <= 1'b1;
            end
            default: st_ofs[k] <= ofs_t'(div_q);
          endcase
          if (k == M_P - 1) begin
            k <= 0;
            unique case (ph)
              PH_OFS1: begin wkind <= DCW_OFFSET; ph <= PH_OFS2; state <= S_WRITE; end
              PH_OFS2: begin ph <= PH_GAIN; settle_cnt <= '0; state <= S_SETTLE; end
              default: begin
                wkind <= DCW_GAIN; ph <= PH_TIME1; tk <= 1; first <= 1'b1; it <= '0;
                state <= S_WRITE;
              end
            endcase
          end else begin
            k     <= k + 1'b1;
            state <= S_DIV_START;
          end
        end

        S_EVAL: begin
          if (stop) begin
            if (it == 16'(MAX_ITER) && !(p_cmp == st_prod[0]) && (first || up == prev_up))
              err <= 1'b1;
            first <= 1'b1;
            it    <= '0;
            if (ph == PH_TIME1 && tk < M_P - 2) begin
              tk <= tk + 1'b1;                 // next pair, same measurement
            end else if (ph == PH_TIME1) begin
              ph <= PH_TIME2;                  // last interval, same measurement
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else begin
            first   <= 1'b0;
            prev_up <= up;
            it      <= it + 1'b1;
            wkind   <= DCW_PHASE;
            k       <= 0;
            pend    <= '0;
            if (ph == PH_TIME1) begin
              iters[tk-1]    <= iters[tk-1] + 1'b1;
              dcw_phase[tk+1] <= sat_add(dcw_phase[tk+1], up ? 64'sd1 : -64'sd1);
              pend[tk+1]     <= 1'b1;
            end else begin
              iters[M_P-2] <= iters[M_P-2] + 1'b1;
              for (int i = 1; i < M_P; i++) begin
                dcw_phase[i] <= sat_add(dcw_phase[i], up ? DW'(i) : -DW'(i));
                pend[i]      <= 1'b1;
              end
            end
            state <= S_WRITE;
          end
        end

        // send every pending DCW of kind wkind, lowest channel first
        S_WRITE: begin
          if (k == M_P) begin
            settle_cnt <= '0;
            state      <= S_SETTLE;
          end else if (pend[k]) begin
            dcw_valid <= 1'b1;
            state     <= S_WRITE_WAIT;
          end else k <= k + 1'b1;
        end

        S_WRITE_WAIT: if (dcw_ready) begin
          dcw_valid <= 1'b0;
          k         <= k + 1'b1;
          state     <= S_WRITE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
