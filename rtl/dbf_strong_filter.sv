// Strong luma filter for one line across an edge, built with shared adders.
//
// Computes the HEVC strong-filter values of p0..p2 and q0..q2 from p0..p3 and
// q0..q3, each clipped to +-2 tC around the input pixel. As the document does,
// the common terms are formed once and reused:
//   s   = p0 + q0        (used by all six outputs)
//   pp2 = p1 + 2, qp2 = q1 + 2   (each used twice)
//   P1s = p2 + pp2 + s            -> p1' = P1s >> 2
//   P0s = P1s + s + p1 + qp2      -> p0' = P0s >> 3
//   P2s = 2 (p3 + p2) + P1s + 2   -> p2' = P2s >> 3
// and the mirror terms for the Q side. The exact adder tree is this design's
// own arrangement. Combinational.
module dbf_strong_filter
  import dbf_pkg::*;
(
  input  pix_t       p_in  [4],
  input  pix_t       q_in  [4],
  input  logic [4:0] tc,
  output pix_t       p_out [3],  // p0'..p2'
  output pix_t       q_out [3]   // q0'..q2'
);

  logic [8:0]  s, pp2, qp2;
  logic [10:0] p1s, q1s;
  logic [11:0] p0s, q0s, p2s, q2s;
  logic [5:0]  tc2;

  function automatic pix_t clip_around(pix_t x, logic [9:0] v, logic [5:0] r);
    int lo, hi, val;
    lo  = int'(x) - int'(r);
    hi  = int'(x) + int'(r);
    val = int'(v);
    if (val < lo) val = lo;
    if (val > hi) val = hi;
    return pix_t'(val);
  endfunction

  always_comb begin
    tc2 = {tc, 1'b0};
    s   = {1'b0, p_in[0]} + {1'b0, q_in[0]};
    pp2 = {1'b0, p_in[1]} + 9'd2;
    qp2 = {1'b0, q_in[1]} + 9'd2;
    p1s = 11'(p_in[2]) + 11'(pp2) + 11'(s);
    q1s = 11'(q_in[2]) + 11'(qp2) + 11'(s);
    p0s = 12'(p1s) + 12'(s) + 12'(p_in[1]) + 12'(qp2);
    q0s = 12'(q1s) + 12'(s) + 12'(q_in[1]) + 12'(pp2);
    p2s = {2'b0, ({1'b0, p_in[3]} + {1'b0, p_in[2]}), 1'b0} + 12'(p1s) + 12'd2;
    q2s = {2'b0, ({1'b0, q_in[3]} + {1'b0, q_in[2]}), 1'b0} + 12'(q1s) + 12'd2;
    p_out[0] = clip_around(p_in[0], 10'(p0s >> 3), tc2);
    p_out[1] = clip_around(p_in[1], 10'(p1s >> 2), tc2);
    p_out[2] = clip_around(p_in[2], 10'(p2s >> 3), tc2);
    q_out[0] = clip_around(q_in[0], 10'(q0s >> 3), tc2);
    q_out[1] = clip_around(q_in[1], 10'(q1s >> 2), tc2);
    q_out[2] = clip_around(q_in[2], 10'(q2s >> 3), tc2);
  end

endmodule
