// cg_deblock_top: a streaming de-blocking filter whose actors are clock-gated
// from the fill state of their output queues, plus the double-edge-triggered
// flip-flop of the low-clock-rate extension, side by side.
//
// Data path, twice: a luma lane and a chroma lane, each input stream ->
// queue 1 -> de-blocking filter actor -> queue 2 -> output stream, running at
// the same time. The clock enabler watches FULL and ALMOST-FULL of both
// queues 2 (ORed); when either is raised a consumer is slower than the
// filters, and the enabler drops EN, so the single clock gate stops gclk for
// both lanes. gclk clocks the read side of
// queue 1, the whole actor and the write side of queue 2: everything that
// only works when the actor can make progress. The write side of queue 1, the
// read side of queue 2 and the enabler stay on the free-running clk, so the
// consumer keeps draining queue 2 and the producer keeps filling queue 1; when
// both flags fall the enabler raises EN again. Gating only freezes state, and
// the actor also obeys queue 2's ready signal, so no word is lost or
// repeated and the output order is unchanged.
//
// Interface: in_*/out_* (luma) and c_in_*/c_out_* (chroma) are valid/ready
// streams of 32-bit words in the format given in dbf_pkg (33 words in, 32
// words out per 8x8 block), all on clk. Status outputs: clk_en is the gate
// enable, gated_cycles counts clk cycles with the actors' clock stopped,
// active_cycles those with it running, q2_count/c_q2_count the fill levels of
// the output queues; blocks_done, lines_filtered and lines_strong come from
// the luma actor, c_blocks_done and c_lines_filtered from the chroma actor. det_clk/det_d/det_q are the separate
// double-edge-triggered register. Reset is asynchronous, active low.
//
// The structure (queues, actor, enabler sensing F and AF of the second queue,
// a clock buffer driven by EN, luma and chroma filters side by side) follows
// the source. Keeping the far ends of the queues on the free-running clock,
// one enable shared by both lanes, queue sizes, the almost-full level and the
// status counters are this design's choices.
module cg_deblock_top
  import dbf_pkg::*;
#(
  parameter int unsigned Q1_DEPTH    = 16,
  parameter int unsigned Q2_DEPTH    = 16,
  parameter int unsigned Q2_AF_LEVEL = 15,
  parameter int unsigned BM_DEPTH    = 32,
  parameter int unsigned DET_WIDTH   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_en,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic        clk_en,
  output logic [31:0] gated_cycles,
  output logic [31:0] active_cycles,
  output logic [$clog2(Q2_DEPTH):0] q2_count,
  output logic [15:0] blocks_done,
  output logic [15:0] lines_filtered,
  output logic [15:0] lines_strong,
  input  logic        c_in_valid,
  output logic        c_in_ready,
  input  word_t       c_in_data,
  output logic        c_out_valid,
  input  logic        c_out_ready,
  output word_t       c_out_data,
  output logic [$clog2(Q2_DEPTH):0] c_q2_count,
  output logic [15:0] c_blocks_done,
  output logic [15:0] c_lines_filtered,
  input  logic                 det_clk,
  input  logic [DET_WIDTH-1:0] det_d,
  output logic [DET_WIDTH-1:0] det_q
);

  logic  gclk;
  logic  a_in_valid, a_in_ready, a_out_valid, a_out_ready;
  word_t a_in_data, a_out_data;
  logic  q2_full, q2_af;
  logic  q1_full_unused, q1_af_unused;
  logic [$clog2(Q1_DEPTH):0] q1_count_unused;

  stream_fifo #(.WIDTH(WORD_W), .DEPTH(Q1_DEPTH), .AF_LEVEL(Q1_DEPTH)) u_q1 (
    .wclk(clk), .rclk(gclk), .rst_n,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(in_data),
    .rd_valid(a_in_valid), .rd_ready(a_in_ready), .rd_data(a_in_data),
    .full(q1_full_unused), .almost_full(q1_af_unused), .count(q1_count_unused));

  dbf_actor #(.BM_DEPTH(BM_DEPTH)) u_actor (
    .clk(gclk), .rst_n,
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_data(a_in_data),
    .out_valid(a_out_valid), .out_ready(a_out_ready), .out_data(a_out_data),
    .blocks_done, .lines_filtered, .lines_strong);

  stream_fifo #(.WIDTH(WORD_W), .DEPTH(Q2_DEPTH), .AF_LEVEL(Q2_AF_LEVEL)) u_q2 (
    .wclk(gclk), .rclk(clk), .rst_n,
    .wr_valid(a_out_valid), .wr_ready(a_out_ready), .wr_data(a_out_data),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_data(out_data),
    .full(q2_full), .almost_full(q2_af), .count(q2_count));

  // chroma lane
  logic  c_a_in_valid, c_a_in_ready, c_a_out_valid, c_a_out_ready;
  word_t c_a_in_data, c_a_out_data;
  logic  c_q2_full, c_q2_af;
  logic  c_q1_full_unused, c_q1_af_unused;
  logic [$clog2(Q1_DEPTH):0] c_q1_count_unused;
  logic [15:0] c_lines_strong_unused;

  stream_fifo #(.WIDTH(WORD_W), .DEPTH(Q1_DEPTH), .AF_LEVEL(Q1_DEPTH)) u_cq1 (
    .wclk(clk), .rclk(gclk), .rst_n,
    .wr_valid(c_in_valid), .wr_ready(c_in_ready), .wr_data(c_in_data),
    .rd_valid(c_a_in_valid), .rd_ready(c_a_in_ready), .rd_data(c_a_in_data),
    .full(c_q1_full_unused), .almost_full(c_q1_af_unused), .count(c_q1_count_unused));

  dbf_actor #(.BM_DEPTH(BM_DEPTH), .CHROMA(1'b1)) u_cactor (
    .clk(gclk), .rst_n,
    .in_valid(c_a_in_valid), .in_ready(c_a_in_ready), .in_data(c_a_in_data),
    .out_valid(c_a_out_valid), .out_ready(c_a_out_ready), .out_data(c_a_out_data),
    .blocks_done(c_blocks_done), .lines_filtered(c_lines_filtered),
    .lines_strong(c_lines_strong_unused));

  stream_fifo #(.WIDTH(WORD_W), .DEPTH(Q2_DEPTH), .AF_LEVEL(Q2_AF_LEVEL)) u_cq2 (
    .wclk(gclk), .rclk(clk), .rst_n,
    .wr_valid(c_a_out_valid), .wr_ready(c_a_out_ready), .wr_data(c_a_out_data),
    .rd_valid(c_out_valid), .rd_ready(c_out_ready), .rd_data(c_out_data),
    .full(c_q2_full), .almost_full(c_q2_af), .count(c_q2_count));

  clock_enabler u_en (.clk, .rst_n, .f(q2_full || c_q2_full), .af(q2_af || c_q2_af), .en(clk_en));

  clock_gate u_cg (.clk, .en(clk_en), .test_en, .gclk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gated_cycles  <= '0;
      active_cycles <= '0;
    end else if (clk_en || test_en) begin
      active_cycles <= active_cycles + 1'b1;
    end else begin
      gated_cycles  <= gated_cycles + 1'b1;
    end
  end

  det_ff #(.WIDTH(DET_WIDTH)) u_det (.clk(det_clk), .d(det_d), .q(det_q));

endmodule
