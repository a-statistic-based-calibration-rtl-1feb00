// Sample record FIFO of one channel, held in block RAM.
//
// The IDDR output of a channel (two samples per clock, WIDTH bits per word)
// is written while wr_en is high and the FIFO is not full; writes into a full
// FIFO are dropped, which is how a capture stops once the record is complete.
// The DSP, or during calibration the statistics engine, empties it word by
// word.  The read port is synchronous like a block
// RAM: rdata holds the word popped by rd_en from the cycle after rd_en on.
// clr empties the FIFO in one cycle.  A memory FIFO per channel follows the
// published system; the depth and the word layout are this design's choices.
module sample_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign count = wptr - rptr;
  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (do_rd) rdata <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

endmodule
