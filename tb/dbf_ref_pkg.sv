// dbf_ref_pkg: reference model of the de-blocking arithmetic for the
// testbenches, written from the HEVC tables and equations, independently of
// the RTL (tables as literal lists, filter on plain integers).
package dbf_ref_pkg;

  const int BETA_TAB [52] = '{
    0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    6,7,8,9,10,11,12,13,14,15,16,17,18,
    20,22,24,26,28,30,32,34,36,38,40,42,44,46,48,50,52,54,56,58,60,62,64};

  const int TC_TAB [54] = '{
    0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,3,4,4,4,5,5,6,6,
    7,8,9,10,11,13,14,16,18,20,22,24};

  // 4:2:0 chroma QP for QP = 30..43 (below: QP, above: QP - 6)
  const int QPC_TAB [14] = '{29,30,31,32,33,33,34,34,35,35,36,36,37,37};

  function automatic int ref_tc_chroma(int qp);
    int qc;
    if (qp > 51) qp = 51;
    qc = (qp < 30) ? qp : (qp > 43) ? qp - 6 : QPC_TAB[qp - 30];
    return TC_TAB[(qc + 2 > 53) ? 53 : qc + 2];
  endfunction

  // chroma line filter: only p0 and q0 change, only for bS = 2
  function automatic int ref_filter_chroma(ref int P[4], ref int Q[4], input int tc, input bit en);
    int delta;
    if (!en) return 0;
    delta = clamp(int'($floor(real'(4*(Q[0]-P[0]) + P[1] - Q[1] + 4) / 8.0)), -tc, tc);
    P[0] = clamp(P[0] + delta, 0, 255);
    Q[0] = clamp(Q[0] - delta, 0, 255);
    return 1;
  endfunction

  function automatic int ref_beta(int qp);
    if (qp > 51) qp = 51;
    return BETA_TAB[qp];
  endfunction

  function automatic int ref_tc(int qp, int bs);
    int q;
    if (qp > 51) qp = 51;
    q = qp + ((bs >= 2) ? 2 : 0);
    if (q > 53) q = 53;
    return TC_TAB[q];
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic int absv(int v);
    return v < 0 ? -v : v;
  endfunction

  // Filters one line in place. P[i], Q[i]: pixel i away from the edge.
  // Returns 0 = untouched, 1 = normal filter, 2 = strong filter.
  function automatic int ref_filter(ref int P[4], ref int Q[4], input int beta, input int tc,
                                    input bit en);
    int dp, dq, d, delta, side, o[6];
    dp = absv(P[2] - 2*P[1] + P[0]);
    dq = absv(Q[2] - 2*Q[1] + Q[0]);
    d  = dp + dq;
    if (!en || !(2*d < beta)) return 0;
    if (4*d < beta/4 && absv(P[3]-P[0]) + absv(Q[0]-Q[3]) < beta/8 &&
        absv(P[0]-Q[0]) < (5*tc + 1)/2) begin
      o[0] = clamp((P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) / 8, P[0]-2*tc, P[0]+2*tc);
      o[1] = clamp((P[2] + P[1] + P[0] + Q[0] + 2) / 4,              P[1]-2*tc, P[1]+2*tc);
      o[2] = clamp((2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) / 8,   P[2]-2*tc, P[2]+2*tc);
      o[3] = clamp((P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) / 8, Q[0]-2*tc, Q[0]+2*tc);
      o[4] = clamp((P[0] + Q[0] + Q[1] + Q[2] + 2) / 4,              Q[1]-2*tc, Q[1]+2*tc);
      o[5] = clamp((P[0] + Q[0] + Q[1] + 3*Q[2] + 2*Q[3] + 4) / 8,   Q[2]-2*tc, Q[2]+2*tc);
      P[0] = o[0]; P[1] = o[1]; P[2] = o[2]; Q[0] = o[3]; Q[1] = o[4]; Q[2] = o[5];
      return 2;
    end
    // arithmetic shift = floor division; emulate with an offset for negatives
    delta = int'($floor(real'(9*(Q[0]-P[0]) - 3*(Q[1]-P[1]) + 8) / 16.0));
    if (!(absv(delta) < 10*tc)) return 0;
    delta = clamp(delta, -tc, tc);
    side  = (beta + beta/2) / 8;
    o[0] = P[1]; o[1] = Q[1];
    if (2*dp < side)
      o[0] = clamp(P[1] + clamp(int'($floor(real'((P[2] + P[0] + 1)/2 - P[1] + delta) / 2.0)),
                                -(tc/2), tc/2), 0, 255);
    if (2*dq < side)
      o[1] = clamp(Q[1] + clamp(int'($floor(real'((Q[2] + Q[0] + 1)/2 - Q[1] - delta) / 2.0)),
                                -(tc/2), tc/2), 0, 255);
    P[0] = clamp(P[0] + delta, 0, 255);
    Q[0] = clamp(Q[0] - delta, 0, 255);
    P[1] = o[0]; Q[1] = o[1];
    return 1;
  endfunction

  // Reference for one 8x8 block. in_w[0] is the header, in_w[1..8] the left
  // neighbour lines, in_w[9..16] the top neighbour lines, in_w[17..32] the
  // block words. Fills out_w[0..31]; returns the number of filtered lines in
  // nf and of strong-filtered lines in ns.
  function automatic void ref_block(input logic [31:0] in_w[33], output logic [31:0] out_w[32],
                                    output int nf, output int ns, input bit chroma = 0);
    int qp, bs, beta, tc, kind;
    int E[8][4], F[8][4], B[8][8], P[4], Q[4];
    qp = int'(in_w[0][5:0]);
    bs = int'(in_w[0][9:8]);
    beta = ref_beta(qp);
    tc   = chroma ? ref_tc_chroma(qp) : ref_tc(qp, bs);
    nf = 0; ns = 0;
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < 4; i++) begin
        E[r][i] = int'(in_w[1 + r][8*i +: 8]);
        F[r][i] = int'(in_w[9 + r][8*i +: 8]);
      end
    for (int w = 0; w < 16; w++)
      for (int i = 0; i < 4; i++) B[w/2][4*(w%2) + i] = int'(in_w[17 + w][8*i +: 8]);
    // left (vertical) edge, row by row
    for (int r = 0; r < 8; r++) begin
      for (int i = 0; i < 4; i++) begin P[i] = E[r][i]; Q[i] = B[r][i]; end
      kind = chroma ? ref_filter_chroma(P, Q, tc, bs >= 2) : ref_filter(P, Q, beta, tc, bs != 0);
      if (kind != 0) nf++;
      if (kind == 2) ns++;
      for (int i = 0; i < 4; i++) begin E[r][i] = P[i]; B[r][i] = Q[i]; end
    end
    // top (horizontal) edge, column by column
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 4; i++) begin P[i] = F[c][i]; Q[i] = B[i][c]; end
      kind = chroma ? ref_filter_chroma(P, Q, tc, bs >= 2) : ref_filter(P, Q, beta, tc, bs != 0);
      if (kind != 0) nf++;
      if (kind == 2) ns++;
      for (int i = 0; i < 4; i++) begin F[c][i] = P[i]; B[i][c] = Q[i]; end
    end
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < 4; i++) begin
        out_w[r][8*i +: 8]     = 8'(E[r][i]);
        out_w[8 + r][8*i +: 8] = 8'(F[r][i]);
      end
    for (int w = 0; w < 16; w++)
      for (int i = 0; i < 4; i++) out_w[16 + w][8*i +: 8] = 8'(B[w/2][4*(w%2) + i]);
  endfunction

  // Random test block: smooth areas with a step at each edge, sometimes noisy,
  // so that all filter decisions occur.
  function automatic void gen_block(output logic [31:0] in_w[33]);
    int base, sl, st, nz, v;
    base = $urandom_range(40, 215);
    sl = int'($urandom_range(24)) - 12;
    st = int'($urandom_range(24)) - 12;
    nz = ($urandom_range(3) == 0) ? 40 : 2;
    in_w[0] = {22'd0, 2'($urandom_range(2)), 2'd0, 6'($urandom_range(20, 51))};
    for (int w = 1; w < 33; w++)
      for (int i = 0; i < 4; i++) begin
        v = base + int'($urandom_range(nz));
        if (w <= 8) v += sl;
        else if (w <= 16) v += st;
        in_w[w][8*i +: 8] = 8'(clamp(v, 0, 255));
      end
  endfunction

endpackage
