// tb_dbf_threshold: all QP values 0..63 and bS 0..3 against the HEVC beta and
// tC tables of the reference package, for the luma and the chroma variant.
module tb_dbf_threshold;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  logic [5:0] qp;
  logic [1:0] bs;
  thr_t thr, thr_c;
  int checks = 0, failures = 0;

  dbf_threshold dut (.qp, .bs, .thr);
  dbf_threshold #(.CHROMA(1'b1)) dut_c (.qp, .bs, .thr(thr_c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) begin
      for (int q = 0; q < 64; q++) begin
        qp = 6'(q); bs = 2'(b);
        #1;
        checks++;
        if (int'(thr.beta) != ref_beta(q) || int'(thr.tc) != ref_tc(q, b) || thr.en != (b != 0)) begin
          failures++;
          $display("FAIL qp=%0d bs=%0d beta=%0d/%0d tc=%0d/%0d", q, b, thr.beta, ref_beta(q),
                   thr.tc, ref_tc(q, b));
        end
        checks++;
        if (int'(thr_c.tc) != ref_tc_chroma(q) || thr_c.en != (b >= 2)) begin
          failures++;
          $display("FAIL chroma qp=%0d bs=%0d tc=%0d/%0d", q, b, thr_c.tc, ref_tc_chroma(q));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
