// dbf_threshold: derivation of the threshold variables beta and tC from the
// quantisation parameter QP and the boundary strength bS of an edge.
//
// beta limits the local activity across an edge for which filtering is still
// applied; tC limits how far a pixel may be moved. Both grow with QP, since
// coarser quantisation leaves stronger block artefacts. The values are those
// of the HEVC luma de-blocking filter at 8-bit depth with zero offsets:
//   beta = 0 for Q < 16, Q - 10 for 16 <= Q <= 28, 2*Q - 38 above, Q = QP;
//   tC   = table below at Q = QP + 2*(bS - 1), clipped to 0..53.
// bS = 0 turns the filter off (en = 0). The unit is combinational.
// With CHROMA = 1 it serves the chroma filter instead: only bS = 2 edges are
// filtered, and tC is looked up at QpC + 2, where QpC is the 4:2:0 chroma QP
// (QpC = QP below 30, QP - 6 above 43, and 29,30,31,32,33,33,34,34,35,35,36,
// 36,37,37 for QP = 30..43). beta is not used by the chroma filter.
//
// The source description names this unit and its inputs and outputs (QP in, beta and tC
// out); the formulas are taken from the HEVC de-blocking filter, which is this
// design's choice of filter.
module dbf_threshold
  import dbf_pkg::*;
#(
  parameter bit CHROMA = 1'b0
) (
  input  logic [5:0] qp,
  input  logic [1:0] bs,
  output thr_t       thr
);

  logic [5:0] qb, qc;
  logic [6:0] qt;

  always_comb begin
    qb = (qp > 6'd51) ? 6'd51 : qp;
    if (qb < 6'd30)       qc = qb;
    else if (qb > 6'd43)  qc = qb - 6'd6;
    else if (qb < 6'd35)  qc = qb - 6'd1;
    else                  qc = 6'd33 + 6'((qb - 6'd34) >> 1);
    if (CHROMA) begin
      qt     = 7'(qc) + 7'd2;
      thr.en = (bs >= 2'd2);
    end else begin
      qt     = 7'(qb) + ((bs >= 2'd2) ? 7'd2 : 7'd0);
      thr.en = (bs != 2'd0);
    end
    if (qt > 7'd53) qt = 7'd53;

    if (qb < 6'd16)       thr.beta = 7'd0;
    else if (qb <= 6'd28) thr.beta = 7'(qb) - 7'd10;
    else                  thr.beta = 7'({qb, 1'b0}) - 7'd38;

    if (qt < 7'd18)       thr.tc = 5'd0;
    else if (qt <= 7'd26) thr.tc = 5'd1;
    else if (qt <= 7'd30) thr.tc = 5'd2;
    else if (qt <= 7'd34) thr.tc = 5'd3;
    else if (qt <= 7'd37) thr.tc = 5'd4;
    else if (qt <= 7'd39) thr.tc = 5'd5;
    else if (qt <= 7'd41) thr.tc = 5'd6;
    else begin
      unique case (qt)
        7'd42: thr.tc = 5'd7;
        7'd43: thr.tc = 5'd8;
        7'd44: thr.tc = 5'd9;
        7'd45: thr.tc = 5'd10;
        7'd46: thr.tc = 5'd11;
        7'd47: thr.tc = 5'd13;
        7'd48: thr.tc = 5'd14;
        7'd49: thr.tc = 5'd16;
        7'd50: thr.tc = 5'd18;
        7'd51: thr.tc = 5'd20;
        7'd52: thr.tc = 5'd22;
        default: thr.tc = 5'd24;
      endcase
    end
  end

endmodule
