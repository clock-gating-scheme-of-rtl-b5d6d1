// tb_block_ram: random reads and writes on both ports against a reference
// array; checks the one-cycle read latency and that the two ports address
// the same storage.
module tb_block_ram;
  localparam int W = 32, D = 32;
  logic clk = 1'b0;
  logic [4:0] a_addr, b_addr;
  logic a_we, b_we;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0] refm [D];
  logic [W-1:0] exp_a, exp_b;
  bit   chk_a, chk_b;
  int checks = 0, failures = 0;

  block_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata,
                                         .b_addr, .b_we, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    chk_a = 0; chk_b = 0;
    // initialise through port A, then B
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 5'(i); a_wdata = $urandom; refm[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (a_rdata != exp_a) begin failures++; $display("FAIL A"); end end
      if (chk_b) begin checks++; if (b_rdata != exp_b) begin failures++; $display("FAIL B"); end end
      a_addr = 5'($urandom_range(D-1));
      b_addr = 5'($urandom_range(D-1));
      a_we = ($urandom_range(3) == 0);
      b_we = ($urandom_range(3) == 0) && !(a_we && a_addr == b_addr);
      a_wdata = $urandom; b_wdata = $urandom;
      chk_a = !a_we; chk_b = !b_we;
      exp_a = refm[a_addr]; exp_b = refm[b_addr];
      if (a_we) refm[a_addr] = a_wdata;
      if (b_we) refm[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
