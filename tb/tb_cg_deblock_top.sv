// tb_cg_deblock_top: end-to-end test of the clock-gated de-blocking filter at
// its default sizes. Producers stream random 8x8 blocks into the luma and the
// chroma lane; consumers drain the output queues in alternating fast and slow
// phases (the chroma consumer slow when the luma one is fast and the other
// way round), so a queue fills, the enabler stops the actors' clock and
// later restarts it. All
// output words are compared with the reference model, in order. A phase with
// test_en high keeps the clock running into a full queue 2, so the actor's
// own back-pressure is exercised too. Counted mechanisms, each of which must
// occur: clock stopped, clock restarted, queue 2 full, queue 2 almost full,
// queue 1 full (input stall), test_en override against a full queue, normal
// and strong filtering, chroma filtering, a stop caused by the chroma queue
// alone. The double-edge flip-flop is clocked on the side and
// checked at both edges. Finally the clock-gating counters are checked
// against the enable seen by the testbench.
module tb_cg_deblock_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  localparam int NBLK = 40;
  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready, clk_en;
  word_t in_data, out_data;
  logic [31:0] gated_cycles, active_cycles;
  logic [4:0]  q2_count;
  logic [15:0] blocks_done, lines_filtered, lines_strong;
  logic c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  word_t c_in_data, c_out_data;
  logic [4:0]  c_q2_count;
  logic [15:0] c_blocks_done, c_lines_filtered;
  int exp_cnf = 0, n_cstop = 0;
  logic [31:0] cstim [NBLK][33];
  logic [31:0] cexpw [NBLK][32];
  logic det_clk = 1'b0;
  logic [7:0] det_d, det_q;
  int checks = 0, failures = 0, exp_nf = 0, exp_ns = 0;
  int n_stop = 0, n_restart = 0, n_q2full = 0, n_q2af = 0, n_q1full = 0, n_test = 0;
  int n_off = 0, n_on = 0, det_edges = 0;
  logic [31:0] stim [NBLK][33];
  logic [31:0] expw [NBLK][32];
  logic prev_en;
  bit sink_slow;

  cg_deblock_top dut (.clk, .rst_n, .test_en, .in_valid, .in_ready, .in_data, .out_valid,
    .out_ready, .out_data, .clk_en, .gated_cycles, .active_cycles, .q2_count, .blocks_done,
    .lines_filtered, .lines_strong, .c_in_valid, .c_in_ready, .c_in_data, .c_out_valid,
    .c_out_ready, .c_out_data, .c_q2_count, .c_blocks_done, .c_lines_filtered,
    .det_clk, .det_d, .det_q);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
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
      exp_nf += nf; exp_ns += ns;
      for (int w = 0; w < 33; w++) stim[b][w] = iw[w];
      for (int w = 0; w < 32; w++) expw[b][w] = ow[w];
      gen_block(iw);
      ref_block(iw, ow, nf, ns, 1'b1);
      exp_cnf += nf;
      for (int w = 0; w < 33; w++) cstim[b][w] = iw[w];
      for (int w = 0; w < 32; w++) cexpw[b][w] = ow[w];
    end
  end

  // mechanism counters, sampled on the free-running clock
  always @(negedge clk) if (rst_n) begin
    if (prev_en && !clk_en) n_stop++;
    if (!prev_en && clk_en) n_restart++;
    if (q2_count == 5'd16) n_q2full++;
    if (q2_count >= 5'd15) n_q2af++;
    if (in_valid && !in_ready) n_q1full++;
    if (test_en && q2_count == 5'd16) n_test++;
    if (prev_en && !clk_en && c_q2_count >= 5'd15 && q2_count < 5'd15) n_cstop++;
    prev_en = clk_en;
  end

  // cycles with the actor clock running or stopped, as the DUT counts them:
  // the enable seen before each rising edge after reset
  bit s_en, s_rst;
  always @(negedge clk) begin s_en = clk_en || test_en; s_rst = rst_n; end
  always @(posedge clk) if (s_rst) begin if (s_en) n_on++; else n_off++; end

  // producer: always ready to send
  initial begin
    in_valid = 0; in_data = 0; prev_en = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int w = 0; w < 33; w++) begin
        @(negedge clk);
        in_valid = 1;
        in_data  = stim[b][w];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // chroma producer and consumer
  initial begin
    c_in_valid = 0; c_in_data = 0;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++)
      for (int w = 0; w < 33; w++) begin
        @(negedge clk);
        c_in_valid = 1;
        c_in_data  = cstim[b][w];
        @(posedge clk);
        while (!c_in_ready) @(posedge clk);
      end
    @(negedge clk);
    c_in_valid = 0;
  end

  bit c_done = 0;
  initial begin
    c_out_ready = 0;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++)
      for (int w = 0; w < 32; w++) begin
        do begin
          @(negedge clk);
          c_out_ready = !sink_slow ? ($urandom_range(15) == 0) : 1'b1;
          @(posedge clk);
        end while (!(c_out_valid && c_out_ready));
        checks++;
        if (c_out_data != cexpw[b][w]) begin
          failures++;
          if (failures < 10) $display("FAIL chroma block %0d word %0d: %h exp %h", b, w, c_out_data, cexpw[b][w]);
        end
      end
    @(negedge clk);
    c_out_ready = 0;
    c_done = 1;
  end

  // consumer: fast and slow phases of 600 cycles; test_en in one slow phase
  initial begin
    out_ready = 0;
    sink_slow = 0;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      for (int w = 0; w < 32; w++) begin
        do begin
          @(negedge clk);
          out_ready = sink_slow ? ($urandom_range(15) == 0) : 1'b1;
          @(posedge clk);
        end while (!(out_valid && out_ready));
        checks++;
        if (out_data != expw[b][w]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d word %0d: %h exp %h", b, w, out_data, expw[b][w]);
        end
      end
    end
    @(negedge clk);
    out_ready = 0;
    wait (c_done);
    repeat (4) @(posedge clk);
    #1;
    chk(int'(blocks_done) == NBLK, "blocks_done");
    chk(int'(lines_filtered) == exp_nf && int'(lines_strong) == exp_ns, "filter counters");
    chk(int'(gated_cycles) == n_off && int'(active_cycles) == n_on, $sformatf("gating counters %0d/%0d %0d/%0d", gated_cycles, n_off, active_cycles, n_on));
    chk(n_stop > 0,    "clock stopped");
    chk(n_restart > 0, "clock restarted");
    chk(n_q2full > 0,  "queue 2 full");
    chk(n_q2af > 0,    "queue 2 almost full");
    chk(n_q1full > 0,  "queue 1 full");
    chk(n_test > 0,    "test_en against full queue 2");
    chk(exp_ns > 0 && exp_nf > exp_ns, "normal and strong filtering");
    chk(det_edges > 100, "det_ff edges");
    chk(int'(c_blocks_done) == NBLK && int'(c_lines_filtered) == exp_cnf && exp_cnf > 0,
        "chroma lane blocks and filtered lines");
    chk(n_cstop > 0, "stop caused by the chroma queue alone");
    $display("clock stopped %0d times, restarted %0d; gated %0d of %0d cycles",
             n_stop, n_restart, gated_cycles, gated_cycles + active_cycles);
    $display("q2 full %0d, q2 almost full %0d, q1 full %0d, test_en vs full %0d cycles",
             n_q2full, n_q2af, n_q1full, n_test);
    $display("lines filtered %0d, strong %0d; chroma lines filtered %0d, chroma-only stops %0d",
             exp_nf, exp_ns, exp_cnf, n_cstop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      repeat (600) @(posedge clk);
      @(negedge clk);
      sink_slow = !sink_slow;
      if (sink_slow && !test_en && n_test == 0 && n_stop > 0) test_en = 1'b1;
      else test_en = 1'b0;
    end
  end

  // double-edge flip-flop on its own slow clock
  initial begin
    logic [7:0] held;
    det_d = 0;
    forever begin
      #7 det_d = 8'($urandom);
      held = det_d;
      #6 det_clk = ~det_clk;
      #1;
      checks++;
      det_edges++;
      if (det_q != held) begin failures++; $display("FAIL det_ff"); end
      det_d = ~held;
    end
  end
endmodule
