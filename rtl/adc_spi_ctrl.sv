// ADC control: SPI master that writes digital control words into the ADC.
//
// Each accepted request becomes one 24-bit write frame, sent MSB first:
//   bit 23      : 0 (write)
//   bits 22..16 : register address, dcw_addr(kind, channel) of tiadc_pkg
//   bits 15..0  : the DCW, zero-extended
// SPI mode 0: cs_n falls, mosi is set up half an SCLK period before each
// rising edge of sclk (where the ADC samples it) and changes after each
// falling edge; cs_n rises half a period after the last falling edge.
// sclk runs at clk / (2*CLK_DIV).
//
// Interface: req/req_valid/req_ready is a valid/ready handshake; a request is
// taken in a cycle where both are high, and req_ready is high only while no
// frame is being sent.  busy is high from acceptance until cs_n has risen.
// From the clock edge that accepts a request to cs_n rising takes 49*CLK_DIV
// clocks.  That the DCWs reach the
// ADC over SPI from an "ADC control" block follows the published system; the
// frame format and register map are this design's own (the ADC's real map is
// given by its data sheet).
module adc_spi_ctrl
  import tiadc_pkg::*;
#(
  parameter int unsigned CLK_DIV = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dcw_req_t req,
  input  logic     req_valid,
  output logic     req_ready,
  output logic     busy,
  output logic     sclk,
  output logic     mosi,
  output logic     cs_n
);

  typedef enum logic [1:0] {S_IDLE, S_LEAD, S_SHIFT, S_TRAIL} state_e;
  state_e state;

  logic [SPI_FRAME_W-1:0]           shreg;
  logic [$clog2(SPI_FRAME_W+1)-1:0] bits;
  logic [$clog2(CLK_DIV+1)-1:0]     div;

  assign req_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign mosi      = shreg[SPI_FRAME_W-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; shreg <= '0; bits <= '0; div <= '0; sclk <= 1'b0; cs_n <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          shreg <= {1'b0, dcw_addr(req.kind, req.ch), 16'(req.value)};
          cs_n  <= 1'b0;
          div   <= '0;
          bits  <= '0;
          state <= S_LEAD;
        end
        // half an SCLK period of set-up before the first rising edge
        S_LEAD: begin
          if (div == CLK_DIV - 1) begin
            div <= '0; sclk <= 1'b1; state <= S_SHIFT;
          end else div <= div + 1'b1;
        end
        S_SHIFT: begin
          if (div == CLK_DIV - 1) begin
            div  <= '0;
            sclk <= ~sclk;
            if (sclk) begin                       // falling edge: next bit
              shreg <= shreg << 1;
              bits  <= bits + 1'b1;
              if (bits == SPI_FRAME_W - 1) state <= S_TRAIL;
            end
          end else div <= div + 1'b1;
        end
        S_TRAIL: begin
          if (div == CLK_DIV - 1) begin
            div <= '0; cs_n <= 1'b1; state <= S_IDLE;
          end else div <= div + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a request must not change while it waits to be accepted
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n) (req_valid && !req_ready) |=> $stable(req);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
