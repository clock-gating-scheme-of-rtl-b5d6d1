// tb_cg_throughput: measures what clock gating costs in throughput. Two
// copies of the top get the same luma block stream and the same consumer,
// which takes a word whenever a shared random ready bit is high. In one copy
// test_en is held high, so its actor clock never stops; the other gates
// normally. Both must deliver identical words. Two runs, with a reset between:
//   run 0: consumer takes a word with probability 1/10, far below the
//          filter's rate (32 words per 113 cycles): the gated copy must stop
//          its clock for at least half the cycles and finish in the same
//          cycle as the ungated one (slack 2 cycles);
//   run 1: consumer at 1/4, just below the filter's rate, where queue 2 has
//          to absorb every load and filter phase of the actor: the gated copy
//          may finish at most 3% later.
module tb_cg_throughput;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  localparam int NBLK = 30, NIN = NBLK * 33, NOUT = NBLK * 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] stim [NIN];
  logic [31:0] expw [NOUT];
  int checks = 0, failures = 0, cyc = 0;
  bit rdy;
  int run = 0, t0 = 0;

  // per-copy signals: index 0 gated, index 1 never gated
  logic        in_valid [2], in_ready [2], out_valid [2], clk_en [2];
  word_t       in_data [2], out_data [2];
  logic [31:0] gated [2], active [2];
  int          in_idx [2], out_idx [2], done_cyc [2];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    logic [4:0]  q2c, cq2c;
    logic [15:0] bd, lf, ls, cbd, clf;
    logic        c_in_ready, c_out_valid;
    word_t       c_out_data;
    logic [7:0]  det_q;
    assign in_valid[g] = in_idx[g] < NIN;
    assign in_data[g]  = stim[in_idx[g] < NIN ? in_idx[g] : 0];
    cg_deblock_top dut (.clk, .rst_n, .test_en(1'(g)), .in_valid(in_valid[g]),
      .in_ready(in_ready[g]), .in_data(in_data[g]), .out_valid(out_valid[g]), .out_ready(rdy),
      .out_data(out_data[g]), .clk_en(clk_en[g]), .gated_cycles(gated[g]),
      .active_cycles(active[g]), .q2_count(q2c), .blocks_done(bd), .lines_filtered(lf),
      .lines_strong(ls), .c_in_valid(1'b0), .c_in_ready(c_in_ready), .c_in_data('0),
      .c_out_valid(c_out_valid), .c_out_ready(1'b1), .c_out_data(c_out_data),
      .c_q2_count(cq2c), .c_blocks_done(cbd), .c_lines_filtered(clf),
      .det_clk(1'b0), .det_d('0), .det_q(det_q));
    always @(posedge clk) if (rst_n) begin
      if (in_valid[g] && in_ready[g]) in_idx[g] <= in_idx[g] + 1;
      if (out_valid[g] && rdy) begin
        checks++;
        if (out_data[g] != expw[out_idx[g]]) begin
          failures++;
          if (failures < 10) $display("FAIL copy %0d word %0d", g, out_idx[g]);
        end
        out_idx[g] <= out_idx[g] + 1;
        if (out_idx[g] == NOUT - 1) done_cyc[g] <= cyc - t0;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nf, ns;
    for (int b = 0; b < NBLK; b++) begin
      logic [31:0] iw [33];
      logic [31:0] ow [32];
      gen_block(iw);
      ref_block(iw, ow, nf, ns);
      for (int w = 0; w < 33; w++) stim[b*33 + w] = iw[w];
      for (int w = 0; w < 32; w++) expw[b*32 + w] = ow[w];
    end
  end

  // shared consumer ready bit, changed away from the clock edge
  initial begin
    rdy = 0;
    forever begin
      @(negedge clk);
      rdy = (run == 0) ? ($urandom_range(9) == 0) : ($urandom_range(3) == 0);
    end
  end

  initial begin
    for (run = 0; run < 2; run++) begin
      rst_n = 0;
      in_idx = '{0, 0}; out_idx = '{0, 0}; done_cyc = '{0, 0};
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      t0 = cyc;
      wait (out_idx[0] == NOUT && out_idx[1] == NOUT);
      repeat (2) @(posedge clk);
      checks++;
      if (gated[1] != 0 || (run == 0 && gated[0] * 2 < gated[0] + active[0]) || gated[0] == 0) begin
        failures++;
        $display("FAIL gating share: gated copy %0d of %0d, ungated copy %0d", gated[0],
                 gated[0] + active[0], gated[1]);
      end
      checks++;
      if ((run == 0 && done_cyc[0] > done_cyc[1] + 2) ||
          (run == 1 && done_cyc[0] * 100 > done_cyc[1] * 103)) begin
        failures++;
        $display("FAIL run %0d: gated copy finished at %0d, ungated at %0d", run, done_cyc[0],
                 done_cyc[1]);
      end
      $display("run %0d: gated copy done at cycle %0d, ungated at %0d; clock stopped %0d of %0d cycles",
               run, done_cyc[0], done_cyc[1], gated[0], gated[0] + active[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
