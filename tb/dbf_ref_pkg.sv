// Reference model of HEVC deblocking used by the testbenches.
//
// Written directly from the standard's equations with plain integers and
// literal tables, independently of the RTL's structure: boundary strength,
// beta/tC tables, chroma QP mapping, the luma decision with strong and normal
// filters and the chroma filter, each for one four-line segment.
package dbf_ref_pkg;

  // beta' for Q = 0..51
  localparam int BETA_TAB [52] = '{
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18,
    20, 22, 24, 26, 28, 30, 32, 34, 36, 38, 40, 42, 44, 46, 48, 50, 52, 54, 56, 58, 60, 62, 64};
  // tC' for Q = 0..53
  localparam int TC_TAB [54] = '{
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 3, 4, 4, 4,
    5, 5, 6, 6, 7, 8, 9, 10, 11, 13, 14, 16, 18, 20, 22, 24};
  // 4:2:0 chroma QP for qPi = 30..43
  localparam int QPC_TAB [14] = '{29, 30, 31, 32, 33, 33, 34, 34, 35, 35, 36, 36, 37, 37};

  localparam int M_NONE = 0, M_WEAK = 1, M_STRONG = 2, M_CHROMA = 3;

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction
  function automatic int clip(int lo, int hi, int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic int ref_bs(bit fe, bit ip, bit iq, bit cp, bit cq,
                                int mvpx, int mvpy, int mvqx, int mvqy);
    if (fe) return 0;
    if (ip | iq) return 2;
    if (cp | cq) return 1;
    if (iabs(mvpx - mvqx) >= 4 || iabs(mvpy - mvqy) >= 4) return 1;
    return 0;
  endfunction

  function automatic void ref_params(int bs, int qpp, int qpq, bit chroma,
                                     output int beta, output int tc);
    int qpl;
    qpl = (qpp + qpq + 1) / 2;
    if (chroma) begin
      if (qpl >= 30 && qpl <= 43) qpl = QPC_TAB[qpl - 30];
      else if (qpl > 43) qpl = qpl - 6;
    end
    beta = BETA_TAB[clip(0, 51, qpl)];
    tc   = (bs == 0) ? 0 : TC_TAB[clip(0, 53, qpl + 2 * (bs - 1))];
  endfunction

  // Luma segment. p[l][i] / q[l][i]: pixel i away from the edge on line l.
  function automatic int ref_luma_seg(inout int p [4][4], inout int q [4][4],
                                      input int bs, input int beta, input int tc);
    int dp0, dp3, dq0, dq3, d;
    bit s0, s3, dep, deq;
    int delta, dl;
    int np [3], nq [3];
    if (bs == 0) return M_NONE;
    dp0 = iabs(p[0][2] - 2 * p[0][1] + p[0][0]);
    dp3 = iabs(p[3][2] - 2 * p[3][1] + p[3][0]);
    dq0 = iabs(q[0][2] - 2 * q[0][1] + q[0][0]);
    dq3 = iabs(q[3][2] - 2 * q[3][1] + q[3][0]);
    d = dp0 + dq0 + dp3 + dq3;
    if (d >= beta) return M_NONE;
    s0 = (2 * (dp0 + dq0) < beta / 4) && (iabs(p[0][3] - p[0][0]) + iabs(q[0][0] - q[0][3]) < beta / 8)
         && (iabs(p[0][0] - q[0][0]) < (5 * tc + 1) / 2);
    s3 = (2 * (dp3 + dq3) < beta / 4) && (iabs(p[3][3] - p[3][0]) + iabs(q[3][0] - q[3][3]) < beta / 8)
         && (iabs(p[3][0] - q[3][0]) < (5 * tc + 1) / 2);
    dep = (dp0 + dp3) < (beta + beta / 2) / 8;
    deq = (dq0 + dq3) < (beta + beta / 2) / 8;
    for (int l = 0; l < 4; l++) begin
      if (s0 && s3) begin
        np[0] = clip(p[l][0] - 2*tc, p[l][0] + 2*tc, (p[l][2] + 2*p[l][1] + 2*p[l][0] + 2*q[l][0] + q[l][1] + 4) / 8);
        np[1] = clip(p[l][1] - 2*tc, p[l][1] + 2*tc, (p[l][2] + p[l][1] + p[l][0] + q[l][0] + 2) / 4);
        np[2] = clip(p[l][2] - 2*tc, p[l][2] + 2*tc, (2*p[l][3] + 3*p[l][2] + p[l][1] + p[l][0] + q[l][0] + 4) / 8);
        nq[0] = clip(q[l][0] - 2*tc, q[l][0] + 2*tc, (p[l][1] + 2*p[l][0] + 2*q[l][0] + 2*q[l][1] + q[l][2] + 4) / 8);
        nq[1] = clip(q[l][1] - 2*tc, q[l][1] + 2*tc, (p[l][0] + q[l][0] + q[l][1] + q[l][2] + 2) / 4);
        nq[2] = clip(q[l][2] - 2*tc, q[l][2] + 2*tc, (p[l][0] + q[l][0] + q[l][1] + 3*q[l][2] + 2*q[l][3] + 4) / 8);
        for (int i = 0; i < 3; i++) begin
          p[l][i] = np[i];
          q[l][i] = nq[i];
        end
      end else begin
        delta = (9 * (q[l][0] - p[l][0]) - 3 * (q[l][1] - p[l][1]) + 8) >>> 4;
        if (iabs(delta) < tc * 10) begin
          delta = clip(-tc, tc, delta);
          np[0] = clip(0, 255, p[l][0] + delta);
          nq[0] = clip(0, 255, q[l][0] - delta);
          np[1] = p[l][1];
          nq[1] = q[l][1];
          if (dep) begin
            dl = clip(-(tc >>> 1), tc >>> 1, ((((p[l][2] + p[l][0] + 1) >>> 1) - p[l][1] + delta) >>> 1));
            np[1] = clip(0, 255, p[l][1] + dl);
          end
          if (deq) begin
            dl = clip(-(tc >>> 1), tc >>> 1, ((((q[l][2] + q[l][0] + 1) >>> 1) - q[l][1] - delta) >>> 1));
            nq[1] = clip(0, 255, q[l][1] + dl);
          end
          p[l][0] = np[0]; p[l][1] = np[1];
          q[l][0] = nq[0]; q[l][1] = nq[1];
        end
      end
    end
    return (s0 && s3) ? M_STRONG : M_WEAK;
  endfunction

  function automatic int ref_chroma_seg(inout int p [4][4], inout int q [4][4],
                                        input int bs, input int tc);
    int delta;
    if (bs != 2) return M_NONE;
    for (int l = 0; l < 4; l++) begin
      delta = clip(-tc, tc, ((((q[l][0] - p[l][0]) * 4) + p[l][1] - q[l][1] + 4) >>> 3));
      p[l][0] = clip(0, 255, p[l][0] + delta);
      q[l][0] = clip(0, 255, q[l][0] - delta);
    end
    return M_CHROMA;
  endfunction

endpackage
