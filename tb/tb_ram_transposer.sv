// tb_ram_transposer: loads random blocks row-wise, then checks two-line reads
// and write-backs in row and column mode and the row-wise word read-out
// against a reference 8x8 array.
module tb_ram_transposer;
  import dbf_pkg::*;
  logic clk = 1'b0;
  logic ld_we, col_mode, line_we;
  logic [3:0] ld_idx, rd_idx;
  word_t ld_data, rd_data;
  logic [2:0] line_a, line_b;
  line4_t q_a, q_b, wq_a, wq_b;
  int refm [8][8];
  int checks = 0, failures = 0;

  ram_transposer dut (.clk, .ld_we, .ld_idx, .ld_data, .col_mode, .line_a, .line_b,
                      .q_a, .q_b, .line_we, .wq_a, .wq_b, .rd_idx, .rd_data);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int pix(bit cm, int line, int i);
    return cm ? refm[i][line] : refm[line][i];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; line_we = 0; col_mode = 0; line_a = 0; line_b = 4; ld_idx = 0; rd_idx = 0;
    ld_data = 0; wq_a = 0; wq_b = 0;
    for (int blk = 0; blk < 50; blk++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        ld_we = 1; ld_idx = 4'(k); ld_data = $urandom;
        for (int i = 0; i < 4; i++) refm[k/2][4*(k%2)+i] = int'(ld_data[8*i +: 8]);
      end
      @(negedge clk); ld_we = 0;
      for (int s = 0; s < 16; s++) begin
        bit ok;
        int la, lb;
        @(negedge clk);
        col_mode = s >= 8;
        la = s % 4; lb = la + 4;
        line_a = 3'(la); line_b = 3'(lb);
        #1;
        ok = 1;
        for (int i = 0; i < 4; i++) ok &= (int'(q_a[i]) == pix(col_mode, la, i)) &&
                                           (int'(q_b[i]) == pix(col_mode, lb, i));
        chk(ok, $sformatf("line read s=%0d", s));
        line_we = 1;
        for (int i = 0; i < 4; i++) begin wq_a[i] = pix_t'($urandom); wq_b[i] = pix_t'($urandom); end
        @(posedge clk); #1;
        for (int i = 0; i < 4; i++) begin
          if (col_mode) begin refm[i][la] = int'(wq_a[i]); refm[i][lb] = int'(wq_b[i]); end
          else          begin refm[la][i] = int'(wq_a[i]); refm[lb][i] = int'(wq_b[i]); end
        end
        line_we = 0;
      end
      for (int k = 0; k < 16; k++) begin
        bit ok;
        rd_idx = 4'(k);
        #1;
        ok = 1;
        for (int i = 0; i < 4; i++) ok &= int'(rd_data[8*i +: 8]) == refm[k/2][4*(k%2)+i];
        chk(ok, $sformatf("read-out word %0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
