// dbf_actor: the parallel de-blocking filter, the actor between the two
// queues of the clock-gated stream.
//
// It smooths the artificial edges that block-based video coding leaves at the
// left and top border of every 8x8 block. Per block it reads 33 words from
// its input stream (see dbf_pkg for the format): a header with QP and bS, the
// 8 left-neighbour lines into Block Memory 1, the 8 top-neighbour lines into
// Block Memory 2 and the 16 block words into the RAM transposer. It then
//   - filters the vertical left edge: in four steps, horizontal filters HF1
//     and HF2 each take one row (rows k and k+4), p from Block Memory 1 and q
//     from the transposer in row mode, and write both sides back;
//   - filters the horizontal top edge: in four steps, vertical filters VF3
//     and VF4 each take one column (k and k+4), p from Block Memory 2 and q
//     from the transposer in column mode, so they see the pixels already
//     changed by HF1/HF2;
//   - sends 32 words: the filtered left lines, top lines and block.
// Thresholds beta and tC come from dbf_threshold, fed by the header.
//
// Timing: one word per cycle while loading, two cycles per pair of lines
// (memory read, then filter and write back), two cycles per output word
// (memory read, then send); about 130 cycles per block when neither stream
// stalls. Both streams use valid/ready and may stall at any time. The actor
// holds all its state in flip-flops and memories clocked by clk, so stopping
// clk (clock gating) simply freezes it. Reset is asynchronous, active low.
//
// The source description gives the parts (two 32x32-bit dual-port block memories for
// left and top neighbours, two horizontal and two vertical filter units, the
// threshold derivation from QP and the transposer) and their roles. The
// 8x8-block stream format, the row/column pairing of the filter units, the
// schedule, the HEVC filter arithmetic and the use of luma only are this
// design's choices. Only 8 of the 32 words of each block memory are used.
// CHROMA = 1 makes the same actor the chroma filter (an 8x8 block of one
// chroma component, filtered with the chroma rules of dbf_filter_unit); the
// top runs a luma and a chroma actor side by side, as the source describes.
module dbf_actor
  import dbf_pkg::*;
#(
  parameter int unsigned BM_DEPTH = 32,
  parameter bit          CHROMA   = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic [15:0] blocks_done,
  output logic [15:0] lines_filtered,
  output logic [15:0] lines_strong
);

  localparam int unsigned BAW = $clog2(BM_DEPTH);

  typedef enum logic [3:0] {
    S_HDR, S_LDE, S_LDF, S_LDB, S_HRD, S_HWR, S_VRD, S_VWR, S_ORD, S_OSEND
  } state_t;

  state_t     state;
  logic [4:0] k;
  logic [5:0] qp_r;
  logic [1:0] bs_r;
  thr_t       thr;

  // block memories
  logic [BAW-1:0] bm1_a_addr, bm1_b_addr, bm2_a_addr, bm2_b_addr;
  logic           bm1_a_we, bm1_b_we, bm2_a_we, bm2_b_we;
  word_t          bm1_a_wd, bm1_b_wd, bm2_a_wd, bm2_b_wd;
  word_t          bm1_a_rd, bm1_b_rd, bm2_a_rd, bm2_b_rd;

  // transposer
  logic   tr_ld_we, tr_col, tr_line_we;
  line4_t tr_q_a, tr_q_b, tr_wq_a, tr_wq_b;
  word_t  tr_rd;

  // filter units
  line4_t hf1_p, hf1_q, hf2_p, hf2_q, vf3_p, vf3_q, vf4_p, vf4_q;
  logic   hf1_f, hf2_f, vf3_f, vf4_f, hf1_s, hf2_s, vf3_s, vf4_s;

  logic in_hs, out_hs;
  hdr_t in_hdr;
  assign in_hdr = hdr_t'(in_data);
  assign in_hs  = in_valid && in_ready;
  assign out_hs = out_valid && out_ready;

  dbf_threshold #(.CHROMA(CHROMA)) u_thr (.qp(qp_r), .bs(bs_r), .thr(thr));

  block_ram #(.WIDTH(WORD_W), .DEPTH(BM_DEPTH)) u_bm1 (
    .clk, .a_addr(bm1_a_addr), .a_we(bm1_a_we), .a_wdata(bm1_a_wd), .a_rdata(bm1_a_rd),
          .b_addr(bm1_b_addr), .b_we(bm1_b_we), .b_wdata(bm1_b_wd), .b_rdata(bm1_b_rd));

  block_ram #(.WIDTH(WORD_W), .DEPTH(BM_DEPTH)) u_bm2 (
    .clk, .a_addr(bm2_a_addr), .a_we(bm2_a_we), .a_wdata(bm2_a_wd), .a_rdata(bm2_a_rd),
          .b_addr(bm2_b_addr), .b_we(bm2_b_we), .b_wdata(bm2_b_wd), .b_rdata(bm2_b_rd));

  ram_transposer u_tr (
    .clk, .ld_we(tr_ld_we), .ld_idx(k[3:0]), .ld_data(in_data),
    .col_mode(tr_col), .line_a({1'b0, k[1:0]}), .line_b({1'b1, k[1:0]}),
    .q_a(tr_q_a), .q_b(tr_q_b), .line_we(tr_line_we), .wq_a(tr_wq_a), .wq_b(tr_wq_b),
    .rd_idx(k[3:0]), .rd_data(tr_rd));

  assign hf1_p = line4_t'(bm1_a_rd);
  assign hf2_p = line4_t'(bm1_b_rd);
  assign vf3_p = line4_t'(bm2_a_rd);
  assign vf4_p = line4_t'(bm2_b_rd);

  line4_t hf1_po, hf1_qo, hf2_po, hf2_qo, vf3_po, vf3_qo, vf4_po, vf4_qo;

  assign hf1_q = tr_q_a;
  assign hf2_q = tr_q_b;
  assign vf3_q = tr_q_a;
  assign vf4_q = tr_q_b;

  dbf_filter_unit #(.CHROMA(CHROMA)) u_hf1 (.p(hf1_p), .q(hf1_q), .thr(thr), .p_o(hf1_po), .q_o(hf1_qo),
                         .filtered(hf1_f), .is_strong(hf1_s));
  dbf_filter_unit #(.CHROMA(CHROMA)) u_hf2 (.p(hf2_p), .q(hf2_q), .thr(thr), .p_o(hf2_po), .q_o(hf2_qo),
                         .filtered(hf2_f), .is_strong(hf2_s));
  dbf_filter_unit #(.CHROMA(CHROMA)) u_vf3 (.p(vf3_p), .q(vf3_q), .thr(thr), .p_o(vf3_po), .q_o(vf3_qo),
                         .filtered(vf3_f), .is_strong(vf3_s));
  dbf_filter_unit #(.CHROMA(CHROMA)) u_vf4 (.p(vf4_p), .q(vf4_q), .thr(thr), .p_o(vf4_po), .q_o(vf4_qo),
                         .filtered(vf4_f), .is_strong(vf4_s));

  // datapath control
  always_comb begin
    in_ready  = (state == S_HDR) || (state == S_LDE) || (state == S_LDF) || (state == S_LDB);
    out_valid = (state == S_OSEND);

    // loading and output use port A for word k; the filter steps use port A
    // for line k and port B for line k + 4 (k = 0..3)
    bm1_a_addr = BAW'(k[2:0]);
    bm2_a_addr = BAW'(k[2:0]);
    if (state inside {S_HRD, S_HWR, S_VRD, S_VWR}) begin
      bm1_a_addr = BAW'({1'b0, k[1:0]});
      bm2_a_addr = BAW'({1'b0, k[1:0]});
    end
    bm1_b_addr = BAW'({1'b1, k[1:0]});
    bm2_b_addr = BAW'({1'b1, k[1:0]});
    bm1_a_we = 1'b0; bm1_b_we = 1'b0; bm2_a_we = 1'b0; bm2_b_we = 1'b0;
    bm1_a_wd = in_data; bm2_a_wd = in_data;
    bm1_b_wd = word_t'(hf2_po);
    bm2_b_wd = word_t'(vf4_po);

    tr_ld_we   = 1'b0;
    tr_line_we = 1'b0;
    tr_col     = (state == S_VRD) || (state == S_VWR);
    tr_wq_a    = tr_col ? vf3_qo : hf1_qo;
    tr_wq_b    = tr_col ? vf4_qo : hf2_qo;

    unique case (state)
      S_LDE: bm1_a_we = in_hs;
      S_LDF: bm2_a_we = in_hs;
      S_LDB: tr_ld_we = in_hs;
      S_HWR: begin
        bm1_a_we = 1'b1; bm1_b_we = 1'b1; bm1_a_wd = word_t'(hf1_po);
        tr_line_we = 1'b1;
      end
      S_VWR: begin
        bm2_a_we = 1'b1; bm2_b_we = 1'b1; bm2_a_wd = word_t'(vf3_po);
        tr_line_we = 1'b1;
      end
      default: ;
    endcase

    unique case (k[4:3])
      2'd0:    out_data = bm1_a_rd;
      2'd1:    out_data = bm2_a_rd;
      default: out_data = tr_rd;
    endcase
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HDR;
      k     <= '0;
      qp_r  <= '0;
      bs_r  <= '0;
      blocks_done    <= '0;
      lines_filtered <= '0;
      lines_strong   <= '0;
    end else begin
      unique case (state)
        S_HDR: if (in_hs) begin
          qp_r  <= in_hdr.qp;
          bs_r  <= in_hdr.bs;
          k     <= '0;
          state <= S_LDE;
        end
        S_LDE: if (in_hs) begin
          k <= (k == 5'(NB_WORDS - 1)) ? '0 : k + 1'b1;
          if (k == 5'(NB_WORDS - 1)) state <= S_LDF;
        end
        S_LDF: if (in_hs) begin
          k <= (k == 5'(NB_WORDS - 1)) ? '0 : k + 1'b1;
          if (k == 5'(NB_WORDS - 1)) state <= S_LDB;
        end
        S_LDB: if (in_hs) begin
          k <= (k == 5'(BLK_WORDS - 1)) ? '0 : k + 1'b1;
          if (k == 5'(BLK_WORDS - 1)) state <= S_HRD;
        end
        S_HRD: state <= S_HWR;
        S_HWR: begin
          lines_filtered <= lines_filtered + 16'(hf1_f) + 16'(hf2_f);
          lines_strong   <= lines_strong + 16'(hf1_s) + 16'(hf2_s);
          k     <= (k == 5'd3) ? '0 : k + 1'b1;
          state <= (k == 5'd3) ? S_VRD : S_HRD;
        end
        S_VRD: state <= S_VWR;
        S_VWR: begin
          lines_filtered <= lines_filtered + 16'(vf3_f) + 16'(vf4_f);
          lines_strong   <= lines_strong + 16'(vf3_s) + 16'(vf4_s);
          k     <= (k == 5'd3) ? '0 : k + 1'b1;
          state <= (k == 5'd3) ? S_ORD : S_VRD;
        end
        S_ORD: state <= S_OSEND;
        S_OSEND: if (out_hs) begin
          k     <= k + 1'b1;
          state <= (k == 5'd31) ? S_HDR : S_ORD;
          if (k == 5'd31) blocks_done <= blocks_done + 1'b1;
        end
        default: state <= S_HDR;
      endcase
    end
  end

  // Output data is held while the consumer stalls.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

  initial assert (BM_DEPTH >= 8) else $error("dbf_actor: BM_DEPTH must be at least 8");

endmodule
