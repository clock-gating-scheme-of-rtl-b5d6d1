// tb_dbf_filter_unit: random lines across an edge, mostly smooth sides with a
// step at the edge (so that every filter decision occurs), against the
// reference filter. Counts untouched, normal and strong cases; each must occur.
// A second instance in chroma mode is checked against the chroma reference.
module tb_dbf_filter_unit;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  line4_t p, q, p_o, q_o, pc_o, qc_o;
  thr_t thr_c;
  logic filtered_c, is_strong_c;
  int n_chroma = 0;
  thr_t thr;
  logic filtered, is_strong;
  int checks = 0, failures = 0;
  int n_kind [3] = '{0, 0, 0};

  dbf_filter_unit dut (.p, .q, .thr, .p_o, .q_o, .filtered, .is_strong);
  dbf_filter_unit #(.CHROMA(1'b1)) dut_c (.p, .q, .thr(thr_c), .p_o(pc_o), .q_o(qc_o),
                                          .filtered(filtered_c), .is_strong(is_strong_c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int P[4], Q[4], PC[4], QC[4], kind, qpv, bsv, base, step, noise;
    for (int n = 0; n < 20000; n++) begin
      qpv  = $urandom_range(51);
      bsv  = $urandom_range(2);
      base = $urandom_range(255);
      step = int'($urandom_range(40)) - 20;
      noise = $urandom_range(3) == 0 ? 30 : 3;
      for (int i = 0; i < 4; i++) begin
        P[i] = clamp(base + int'($urandom_range(noise)), 0, 255);
        Q[i] = clamp(base + step + int'($urandom_range(noise)), 0, 255);
        p[i] = pix_t'(P[i]);
        q[i] = pix_t'(Q[i]);
      end
      thr.beta = 7'(ref_beta(qpv));
      thr.tc   = 5'(ref_tc(qpv, bsv));
      thr.en   = (bsv != 0);
      thr_c.beta = 7'(ref_beta(qpv));
      thr_c.tc   = 5'(ref_tc_chroma(qpv));
      thr_c.en   = (bsv == 2);
      PC = P; QC = Q;
      #1;
      n_chroma += ref_filter_chroma(PC, QC, ref_tc_chroma(qpv), bsv == 2);
      checks++;
      begin
        bit okc;
        okc = (filtered_c == (bsv == 2)) && !is_strong_c;
        for (int i = 0; i < 4; i++) okc &= (int'(pc_o[i]) == PC[i]) && (int'(qc_o[i]) == QC[i]);
        if (!okc) begin
          failures++;
          if (failures < 10) $display("FAIL chroma n=%0d p=%h q=%h -> %h %h", n, p, q, pc_o, qc_o);
        end
      end
      kind = ref_filter(P, Q, ref_beta(qpv), ref_tc(qpv, bsv), bsv != 0);
      n_kind[kind]++;
      checks++;
      begin
        bit ok;
        ok = (filtered == (kind != 0)) && (is_strong == (kind == 2));
        for (int i = 0; i < 4; i++) ok &= (int'(p_o[i]) == P[i]) && (int'(q_o[i]) == Q[i]);
        if (!ok) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d kind=%0d p=%h q=%h -> %h %h", n, kind, p, q, p_o, q_o);
        end
      end
    end
    $display("untouched %0d normal %0d strong %0d", n_kind[0], n_kind[1], n_kind[2]);
    checks++;
    if (n_chroma == 0) failures++;
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_kind[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
