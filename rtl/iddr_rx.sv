// Input DDR receiver for one ADC core.
//
// The ADC core drives one DATA_W-bit sample on every edge of its data clock.
// This block registers the bus on the rising edge and on the falling edge and,
// on the next rising edge, hands both samples over together in the rising-edge
// clock domain (the "same edge, pipelined" arrangement of an FPGA IDDR cell):
// q[0] is the earlier sample (taken at the rising edge), q[1] the later one.
// The ADC's offset-binary code is turned into two's complement by inverting
// the MSB.  While en is low nothing is captured and q_valid stays low.
//
// Timing: a pair whose first sample was on the bus at rising edge t appears
// on q with q_valid high after rising edge t+1 (one cycle of latency).
// That the received data enters through IDDR elements follows the published
// system; the offset-binary input code and the enable are this design's
// choices.
module iddr_rx
  import tiadc_pkg::*;
#(
  parameter int unsigned DATA_W_P = DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [DATA_W_P-1:0]        din,
  output logic signed [DATA_W_P-1:0] q [2],
  output logic                       q_valid
);

  logic [DATA_W_P-1:0] rise_r, fall_r;
  logic                en_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rise_r <= '0;
      en_r   <= 1'b0;
    end else begin
      rise_r <= din;
      en_r   <= en;
    end
  end

  always_ff @(negedge clk) begin
    if (!rst_n) fall_r <= '0;
    else        fall_r <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q[0]    <= '0;
      q[1]    <= '0;
      q_valid <= 1'b0;
    end else begin
      q[0]    <= signed'({~rise_r[DATA_W_P-1], rise_r[DATA_W_P-2:0]});
      q[1]    <= signed'({~fall_r[DATA_W_P-1], fall_r[DATA_W_P-2:0]});
      q_valid <= en_r;
    end
  end

endmodule
