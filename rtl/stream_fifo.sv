// stream_fifo: order-preserving, lossless queue between two streaming actors.
//
// A circular buffer of DEPTH words with binary read and write pointers one bit
// wider than the address, so that full and empty can be told apart. It raises
// FULL when DEPTH words are stored and ALMOST-FULL when AF_LEVEL or more are
// stored; these two flags are what the clock enabler watches. Both ends use a
// valid/ready handshake: a word is written on a wclk edge with wr_valid and
// wr_ready high, and read on an rclk edge with rd_valid and rd_ready high.
// rd_data shows the oldest word whenever rd_valid is high (show-ahead).
//
// The write side and the read side have clocks of their own because in the
// clock-gated design one of them runs on the gated copy of the system clock.
// Both clocks must come from the same source with aligned edges (the gated
// clock only drops pulses); no synchronisers are used, and the flags are
// combinational functions of both pointers. Reset is asynchronous, active low.
// The queue, its FULL and ALMOST-FULL flags follow the source description; depth, flag
// level and handshake are this design's choice.
module stream_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned AF_LEVEL = 15
) (
  input  logic             wclk,
  input  logic             rclk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             almost_full,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;

  assign count       = wptr - rptr;
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(AF_LEVEL));
  assign wr_ready    = !full;
  assign rd_valid    = (count != '0);
  assign rd_data     = mem[rptr[AW-1:0]];

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
    end else if (wr_valid && wr_ready) begin
      wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_valid && wr_ready) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0;
    end else if (rd_valid && rd_ready) begin
      rptr <= rptr + 1'b1;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("stream_fifo: DEPTH must be a power of two");
    assert (AF_LEVEL >= 1 && AF_LEVEL <= DEPTH)
      else $error("stream_fifo: AF_LEVEL out of range");
  end

  // The stored count never exceeds the depth.
  a_count: assert property (@(posedge wclk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
