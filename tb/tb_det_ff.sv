// tb_det_ff: drives new data before every rising and every falling clock edge
// and checks that q takes the value d had at that edge, and that q does not
// follow d between edges (the flip-flop is not transparent).
module tb_det_ff;
  localparam int W = 8;
  logic clk = 1'b0;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  det_ff #(.WIDTH(W)) dut (.clk, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'h00;
    #5;
    for (int i = 0; i < 2000; i++) begin
      d = W'($urandom);
      held = d;
      #4 clk = ~clk;           // edge: q must become held
      #1;
      checks++;
      if (q != held) begin failures++; $display("FAIL edge %0d q=%h exp %h", i, q, held); end
      d = ~held;               // change d between edges
      #2;
      checks++;
      if (q != held) begin failures++; $display("FAIL transparent %0d", i); end
      #3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
