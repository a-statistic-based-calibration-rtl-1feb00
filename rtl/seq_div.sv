// Sequential signed divider, rounding to nearest (halves away from zero).
//
// The calibration needs a few divisions per pass (mean offset, offset and
// gain corrections), none of them urgent, so one restoring divider that
// produces one quotient bit per clock is shared by all of them.  It divides
// the magnitudes of (2*num + den) by (2*den) and then restores the sign,
// which rounds |num/den| to the nearest integer.
//
// Interface: start (while idle) loads num and den; done pulses W+3 clocks
// after the edge that takes start, with quot valid until the next start.  den must not be zero (a zero
// divisor gives an all-ones magnitude).  This block is this design's own
// means of doing the divisions the method calls for.
module seq_div #(
  parameter int unsigned W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] quot
);

  logic [W+1:0] dividend, divisor, rem, q;
  logic         neg;
  logic [$clog2(W+3)-1:0] cnt;

  function automatic logic [W+1:0] mag(logic signed [W-1:0] v);
    return (v < 0) ? (W+2)'(-v) : (W+2)'(v);
  endfunction

  logic [W+2:0] trial;
  assign trial = {rem[W+1:0], dividend[W+1]} - {1'b0, divisor};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quot <= '0;
      dividend <= '0; divisor <= '0; rem <= '0; q <= '0; neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy     <= 1'b1;
        neg      <= (num < 0) != (den < 0);
        dividend <= (mag(num) << 1) + mag(den);
        divisor  <= mag(den) << 1;
        rem      <= '0;
        q        <= '0;
        cnt      <= ($clog2(W+3))'(W + 2);
      end else if (busy) begin
        if (cnt != 0) begin
          if (!trial[W+2]) begin
            rem <= trial[W+1:0];
            q   <= {q[W:0], 1'b1};
          end else begin
            rem <= {rem[W:0], dividend[W+1]};
            q   <= {q[W:0], 1'b0};
          end
          dividend <= dividend << 1;
          cnt      <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= neg ? -W'(q) : W'(q);
        end
      end
    end
  end

endmodule
