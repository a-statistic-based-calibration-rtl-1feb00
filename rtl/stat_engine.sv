// Addition and multiplication engine of the calibration (the statistics).
//
// One pass takes N samples of every channel (N = n_samples, even, at most
// N_CAL_P) and accumulates for each channel k:
//   sum[k]      = sum of x_k[n]                       (offset, Eq. 12)
//   abs_sum[k]  = sum of |x_k[n] - O_k|  (O_FRAC fraction bits kept)  (gain, Eq. 19)
//   prod_sum[k] = sum of x_k[n] * x_{k+1}[n]  for k < M-1   (timing, Eq. 28)
//   prod_sum[M-1] = sum of x_{M-1}[n-1] * x_0[n]
// The last product pairs channel M-1 with the next sample in time, which is
// the following sample of channel 0; x_{M-1}[-1] is the sample just before
// the pass, so after start the engine first waits for one valid input beat
// (ARM) to hold it.  The samples arrive two per channel per clock: x[k][0]
// is x_k[2j] and x[k][1] is x_k[2j+1].
//
// Each channel uses its own multiply-accumulate slices, as DSP48E slices
// would: the products and absolute values are registered (one stage), then
// added into ACC_W-bit accumulators.  The samples, offsets and accumulators
// are all signed.  start is taken only while idle; the results stay valid
// from done until the next start.
//
// Timing: with the input valid every clock, done pulses 1 + N/2 + 2 clocks
// after start.  What is summed follows the published method; the pipeline,
// widths and the pairing of the two samples per clock are this design's.
module stat_engine
  import tiadc_pkg::*;
#(
  parameter int unsigned M_P     = M,
  parameter int unsigned DATA_W_P = DATA_W,
  parameter int unsigned ACC_W_P = ACC_W,
  parameter int unsigned O_FRAC_P = O_FRAC,
  parameter int unsigned N_CAL_P = N_CAL,
  localparam int unsigned OFS_W_P = DATA_W_P + O_FRAC_P + 1,
  localparam int unsigned CNT_W   = $clog2(N_CAL_P / 2 + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [CNT_W-1:0]            n_half,      // N/2: clock beats per pass
  input  logic signed [DATA_W_P-1:0]  x [M_P][2],
  input  logic                        x_valid,
  input  logic signed [OFS_W_P-1:0]   ofs [M_P],
  output logic                        busy,
  output logic                        done,
  output logic signed [ACC_W_P-1:0]   sum      [M_P],
  output logic signed [ACC_W_P-1:0]   abs_sum  [M_P],
  output logic signed [ACC_W_P-1:0]   prod_sum [M_P]
);

  localparam int unsigned ABS_W  = DATA_W_P + O_FRAC_P + 2;
  localparam int unsigned PROD_W = 2 * DATA_W_P;

  typedef enum logic [1:0] {S_IDLE, S_ARM, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [CNT_W-1:0] beats;
  logic [1:0]       drain;
  logic signed [DATA_W_P-1:0] last_prev;   // x_{M-1} of the previous beat

  // Stage 1 registers: per channel the terms of this beat, both lanes added.
  logic signed [DATA_W_P+1:0] t_sum  [M_P];
  logic signed [ABS_W+1:0]    t_abs  [M_P];
  logic signed [PROD_W+1:0]   t_prod [M_P];
  logic                       t_valid;

  function automatic logic signed [ABS_W-1:0] abs_dev(logic signed [DATA_W_P-1:0] s,
                                                       logic signed [OFS_W_P-1:0]  o);
    logic signed [ABS_W-1:0] d;
    d = ABS_W'(s) * (ABS_W'(1) <<< O_FRAC_P) - ABS_W'(o);
    return (d < 0) ? -d : d;
  endfunction

  function automatic logic signed [PROD_W-1:0] mul(logic signed [DATA_W_P-1:0] a,
                                                   logic signed [DATA_W_P-1:0] b);
    return PROD_W'(a) * PROD_W'(b);
  endfunction

  logic accept;
  assign accept = (state == S_RUN) && x_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      beats     <= '0;
      drain     <= '0;
      done      <= 1'b0;
      last_prev <= '0;
      t_valid   <= 1'b0;
      for (int k = 0; k < M_P; k++) begin
        t_sum[k] <= '0; t_abs[k] <= '0; t_prod[k] <= '0;
        sum[k] <= '0; abs_sum[k] <= '0; prod_sum[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (x_valid) last_prev <= x[M_P-1][1];

      // stage 1: terms of one beat
      t_valid <= accept;
      if (accept) begin
        for (int k = 0; k < M_P; k++) begin
          t_sum[k] <= (DATA_W_P+2)'(x[k][0]) + (DATA_W_P+2)'(x[k][1]);
          t_abs[k] <= (ABS_W+2)'(abs_dev(x[k][0], ofs[k])) + (ABS_W+2)'(abs_dev(x[k][1], ofs[k]));
          if (k < M_P - 1)
            t_prod[k] <= (PROD_W+2)'(mul(x[k][0], x[k+1][0])) + (PROD_W+2)'(mul(x[k][1], x[k+1][1]));
          else
            t_prod[k] <= (PROD_W+2)'(mul(last_prev, x[0][0])) + (PROD_W+2)'(mul(x[k][0], x[0][1]));
        end
      end

      // stage 2: accumulate
      if (t_valid) begin
        for (int k = 0; k < M_P; k++) begin
          sum[k]      <= sum[k]      + ACC_W_P'(t_sum[k]);
          abs_sum[k]  <= abs_sum[k]  + ACC_W_P'(t_abs[k]);
          prod_sum[k] <= prod_sum[k] + ACC_W_P'(t_prod[k]);
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ARM;
          for (int k = 0; k < M_P; k++) begin
            sum[k] <= '0; abs_sum[k] <= '0; prod_sum[k] <= '0;
          end
        end
        S_ARM: if (x_valid) begin
          state <= S_RUN;
          beats <= '0;
        end
        S_RUN: if (x_valid) begin
          if (beats == n_half - 1'b1) begin
            state <= S_DRAIN;
            drain <= 2'd1;
          end
          beats <= beats + 1'b1;
        end
        S_DRAIN: begin
          if (drain == 2'd0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
          drain <= drain - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
