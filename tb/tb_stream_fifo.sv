// tb_stream_fifo: self-checking test of stream_fifo on one clock.
// Random pushes and pops against a software queue; checks data order, the
// FULL and ALMOST-FULL flags and the count after every cycle, and that both
// full and almost-full states are reached.
module tb_stream_fifo;
  localparam int unsigned W = 32, D = 8, AF = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid, wr_ready, rd_valid, rd_ready, full, almost_full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, n_full = 0, n_af = 0;
  logic [W-1:0] model [$];

  stream_fifo #(.WIDTH(W), .DEPTH(D), .AF_LEVEL(AF)) dut (
    .wclk(clk), .rclk(clk), .rst_n, .wr_valid, .wr_ready, .wr_data,
    .rd_valid, .rd_ready, .rd_data, .full, .almost_full, .count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int bias;
      bias = (cyc / 500) % 2 == 0 ? 70 : 30;   // alternate fill and drain phases
      @(negedge clk);
      check(count == model.size(), "count");
      check(full == (model.size() == D), "full flag");
      check(almost_full == (model.size() >= AF), "almost-full flag");
      check(rd_valid == (model.size() != 0), "rd_valid");
      if (model.size() != 0) check(rd_data == model[0], "rd_data order");
      if (full) n_full++;
      if (almost_full) n_af++;
      wr_valid = ($urandom_range(99) < bias);
      rd_ready = ($urandom_range(99) >= bias);
      wr_data  = $urandom;
      @(posedge clk);
      #1;
      if (rd_valid_q && rd_ready_q) void'(model.pop_front());
      if (wr_valid_q && wr_ready_q) model.push_back(wr_data_q);
    end
    check(n_full > 0, "full reached");
    check(n_af > 0, "almost-full reached");
    $display("full cycles %0d, almost-full cycles %0d", n_full, n_af);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample handshakes at the clock edge
  logic rd_valid_q, rd_ready_q, wr_valid_q, wr_ready_q;
  logic [W-1:0] wr_data_q;
  always @(posedge clk) begin
    rd_valid_q <= rd_valid; rd_ready_q <= rd_ready;
    wr_valid_q <= wr_valid; wr_ready_q <= wr_ready; wr_data_q <= wr_data;
  end
endmodule
