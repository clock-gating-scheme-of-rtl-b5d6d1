// tb_dbf_actor_chroma: the chroma variant of the filter actor (CHROMA = 1).
// Streams random 8x8 chroma blocks through it and
// compares all 32 output words of each block with the reference model, as
// well as the filtered/strong line counters. The first blocks run with an
// always-ready source and sink and check the block period of 113 cycles
// (33 load, 8 + 8 filter, 64 output); the rest run with random stalls on
// both streams.
module tb_dbf_actor_chroma;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  localparam int NBLK = 60, NFAST = 6, PERIOD = 113;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  word_t in_data, out_data;
  logic [15:0] blocks_done, lines_filtered, lines_strong;
  int checks = 0, failures = 0, exp_nf = 0, exp_ns = 0, cyc = 0;
  logic [31:0] stim [NBLK][33];
  logic [31:0] expw [NBLK][32];
  int done_cyc [NBLK];

  dbf_actor #(.CHROMA(1'b1)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
                 .out_data, .blocks_done, .lines_filtered, .lines_strong);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
      ref_block(iw, ow, nf, ns, 1'b1);
      exp_nf += nf; exp_ns += ns;
      for (int w = 0; w < 33; w++) stim[b][w] = iw[w];
      for (int w = 0; w < 32; w++) expw[b][w] = ow[w];
    end
  end

  // source
  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int w = 0; w < 33; w++) begin
        @(negedge clk);
        in_valid = (b < NFAST) || ($urandom_range(3) != 0);
        while (!in_valid) begin @(negedge clk); in_valid = ($urandom_range(3) != 0); end
        in_data = stim[b][w];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // sink
  initial begin
    out_ready = 0;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      for (int w = 0; w < 32; w++) begin
        @(negedge clk);
        out_ready = (b < NFAST) || ($urandom_range(2) != 0);
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = (b < NFAST) || ($urandom_range(2) != 0);
          @(posedge clk);
        end
        checks++;
        if (out_data != expw[b][w]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d word %0d: %h exp %h", b, w, out_data, expw[b][w]);
        end
      end
      done_cyc[b] = cyc;
    end
    @(negedge clk);
    out_ready = 0;
    repeat (3) @(posedge clk);
    for (int b = 1; b < NFAST; b++) begin
      checks++;
      if (done_cyc[b] - done_cyc[b-1] != PERIOD) begin
        failures++;
        $display("FAIL block period %0d, expected %0d", done_cyc[b] - done_cyc[b-1], PERIOD);
      end
    end
    checks++;
    if (int'(blocks_done) != NBLK) begin failures++; $display("FAIL blocks_done %0d", blocks_done); end
    checks++;
    if (int'(lines_filtered) != exp_nf || int'(lines_strong) != exp_ns) begin
      failures++;
      $display("FAIL counters %0d/%0d %0d/%0d", lines_filtered, exp_nf, lines_strong, exp_ns);
    end
    checks++;
    if (exp_ns != 0 || exp_nf == 0) begin failures++; $display("FAIL chroma filtering not seen"); end
    $display("chroma filtered lines %0d (strong %0d) of %0d", exp_nf, exp_ns, NBLK * 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
