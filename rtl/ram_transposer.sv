// ram_transposer: 8x8 pixel buffer for the block being filtered, readable and
// writable by rows and by columns.
//
// The block is loaded row-wise, one four-pixel block word per cycle (word k is
// row k/2, columns 4*(k%2)..+3). For filtering, two lines are accessed at once:
// in row mode (col_mode = 0) lines are rows and the four pixels returned for a
// line are its columns 0..3, i.e. q0..q3 of the block's left edge; in column
// mode lines are columns and the pixels are rows 0..3, i.e. q0..q3 of the top
// edge. Writing back (line_we) replaces those four pixels of both lines. This
// lets the vertical filters work on the output of the horizontal filters
// without a trip through the block memories. Reads are combinational, writes
// take effect on the rising edge. Word read-out for the output stream uses the
// same row-wise word numbering as loading.
//
// The source description asks for a transposer that turns the 8x8 data flow from rows
// into columns; a register array with row and column ports is this design's
// form of it.
module ram_transposer
  import dbf_pkg::*;
(
  input  logic        clk,
  // row-wise word load
  input  logic        ld_we,
  input  logic [3:0]  ld_idx,
  input  word_t       ld_data,
  // two-line access for the filters
  input  logic        col_mode,
  input  logic [2:0]  line_a,
  input  logic [2:0]  line_b,
  output line4_t      q_a,
  output line4_t      q_b,
  input  logic        line_we,
  input  line4_t      wq_a,
  input  line4_t      wq_b,
  // row-wise word read-out
  input  logic [3:0]  rd_idx,
  output word_t       rd_data
);

  pix_t m [BLK][BLK];   // m[row][col]

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      q_a[i] = col_mode ? m[i][line_a] : m[line_a][i];
      q_b[i] = col_mode ? m[i][line_b] : m[line_b][i];
    end
    for (int i = 0; i < 4; i++) begin
      rd_data[8*i +: 8] = m[rd_idx[3:1]][{rd_idx[0], 2'(i)}];
    end
  end

  always_ff @(posedge clk) begin
    if (ld_we) begin
      for (int i = 0; i < 4; i++) m[ld_idx[3:1]][{ld_idx[0], 2'(i)}] <= ld_data[8*i +: 8];
    end else if (line_we) begin
      for (int i = 0; i < 4; i++) begin
        if (col_mode) begin
          m[i][line_a] <= wq_a[i];
          m[i][line_b] <= wq_b[i];
        end else begin
          m[line_a][i] <= wq_a[i];
          m[line_b][i] <= wq_b[i];
        end
      end
    end
  end

  a_lines_differ: assert property (@(posedge clk) line_we |-> line_a != line_b);

endmodule
