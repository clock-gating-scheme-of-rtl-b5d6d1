// tb_clock_enabler: drives all combinations of F and AF and compares the
// enable with a reference state machine (stop on F or AF, restart only when
// both are low; output registered).
module tb_clock_enabler;
  logic clk = 1'b0, rst_n = 1'b0, f, af, en;
  int checks = 0, failures = 0;
  bit ref_en;

  clock_enabler dut (.clk, .rst_n, .f, .af, .en);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f = 0; af = 0;
    #12;
    checks++; if (en !== 1'b1) begin failures++; $display("FAIL reset state"); end
    rst_n = 1;
    ref_en = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (en != ref_en) begin failures++; $display("FAIL cycle %0d en=%b exp %b", i, en, ref_en); end
      // F implies AF in a real queue; also test AF alone and F alone
      case ($urandom_range(3))
        0: begin f = 0; af = 0; end
        1: begin f = 0; af = 1; end
        2: begin f = 1; af = 1; end
        default: begin f = 1; af = 0; end
      endcase
      @(posedge clk);
      if (ref_en && (f || af)) ref_en = 0;
      else if (!ref_en && !f && !af) ref_en = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
