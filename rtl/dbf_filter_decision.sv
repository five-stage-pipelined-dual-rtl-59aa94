// Filter decision unit for one 4-line luma edge segment.
//
// Uses lines 0 and 3 of the segment, as the HEVC standard does:
//   dp_k = |p2 - 2 p1 + p0|, dq_k = |q2 - 2 q1 + q0| on line k (k = 0, 3)
//   the segment is filtered when BS > 0 and dp0+dq0+dp3+dq3 < beta;
//   it is strong when, on both lines, 2*(dp_k+dq_k) < beta>>2,
//   |p3-p0|+|q0-q3| < beta>>3 and |p0-q0| < (5 tC + 1)>>1;
//   otherwise weak, and dEp / dEq enable the second pixel on each side when
//   dp0+dp3 (dq0+dq3) < (beta + (beta>>1)) >> 3.
// Combinational. The document states only that the decision depends on beta,
// tC and the pixel values next to the edge; the equations are the standard's.
module dbf_filter_decision
  import dbf_pkg::*;
(
  input  pix_t       p_l0 [4],  // p0..p3 of line 0
  input  pix_t       q_l0 [4],  // q0..q3 of line 0
  input  pix_t       p_l3 [4],  // p0..p3 of line 3
  input  pix_t       q_l3 [4],  // q0..q3 of line 3
  input  logic [1:0] bs,
  input  logic [6:0] beta,
  input  logic [4:0] tc,
  output fmode_e     mode,      // FM_NONE, FM_WEAK or FM_STRONG
  output logic       dep,       // weak filter may modify p1
  output logic       deq        // weak filter may modify q1
);

  function automatic int second_diff(pix_t a2, pix_t a1, pix_t a0);
    int d;
    d = int'(a2) - 2 * int'(a1) + int'(a0);
    return (d < 0) ? -d : d;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic logic strong_line(pix_t pl [4], pix_t ql [4], int dpq, int b, int t);
    return (2 * dpq < (b >> 2)) &&
           (iabs(int'(pl[3]) - int'(pl[0])) + iabs(int'(ql[0]) - int'(ql[3])) < (b >> 3)) &&
           (iabs(int'(pl[0]) - int'(ql[0])) < ((5 * t + 1) >> 1));
  endfunction


  always_comb begin
    int dp0, dp3, dq0, dq3, b, t;
    dp0 = second_diff(p_l0[2], p_l0[1], p_l0[0]);
    dp3 = second_diff(p_l3[2], p_l3[1], p_l3[0]);
    dq0 = second_diff(q_l0[2], q_l0[1], q_l0[0]);
    dq3 = second_diff(q_l3[2], q_l3[1], q_l3[0]);
    b   = int'(beta);
    t   = int'(tc);
    mode = FM_NONE;
    dep  = 1'b0;
    deq  = 1'b0;
    if (bs != 2'd0 && (dp0 + dq0 + dp3 + dq3) < b) begin
      if (strong_line(p_l0, q_l0, dp0 + dq0, b, t) && strong_line(p_l3, q_l3, dp3 + dq3, b, t))
        mode = FM_STRONG;
      else
        mode = FM_WEAK;
      dep = (dp0 + dp3) < ((b + (b >> 1)) >> 3);
      deq = (dq0 + dq3) < ((b + (b >> 1)) >> 3);
    end
  end

endmodule
