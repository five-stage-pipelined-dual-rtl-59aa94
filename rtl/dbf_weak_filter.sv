// Weak (normal) luma filter and chroma filter for one line across an edge.
//
// Luma (chroma = 0), HEVC normal filter:
//   delta = (9 (q0 - p0) - 3 (q1 - p1) + 8) >> 4
//   if |delta| < 10 tC: delta is clipped to +-tC, p0 += delta, q0 -= delta, and,
//   when dep (deq) is set, p1 (q1) moves by
//   clip(+-(tC>>1), (((p2 + p0 + 1) >> 1) - p1 + delta) >> 1)
//   (mirror with -delta for q1); otherwise the line is left unchanged.
// Chroma (chroma = 1):
//   delta = clip(+-tC, ((((q0 - p0) << 2) + p1 - q1 + 4) >> 3)), p0 += delta,
//   q0 -= delta.
// All results are clipped to 0..255. Combinational. The document names this
// unit and takes its equations from the standard; the shared datapath for the
// chroma case is this design's choice.
module dbf_weak_filter
  import dbf_pkg::*;
(
  input  pix_t       p_in  [3],  // p0..p2
  input  pix_t       q_in  [3],  // q0..q2
  input  logic [4:0] tc,
  input  logic       dep,
  input  logic       deq,
  input  logic       chroma,
  output pix_t       p_out [2],  // p0', p1'
  output pix_t       q_out [2]   // q0', q1'
);

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction


  always_comb begin
    int p0, p1, p2, q0, q1, q2, t, d, dp, dq;
    p0 = int'(p_in[0]); p1 = int'(p_in[1]); p2 = int'(p_in[2]);
    q0 = int'(q_in[0]); q1 = int'(q_in[1]); q2 = int'(q_in[2]);
    t  = int'(tc);
    p_out[0] = p_in[0]; p_out[1] = p_in[1];
    q_out[0] = q_in[0]; q_out[1] = q_in[1];
    dp = 0;
    dq = 0;
    if (chroma) begin
      d = clip3(-t, t, ((((q0 - p0) * 4) + p1 - q1 + 4) >>> 3));
      p_out[0] = pix_t'(clip3(0, 255, p0 + d));
      q_out[0] = pix_t'(clip3(0, 255, q0 - d));
    end else begin
      d = (9 * (q0 - p0) - 3 * (q1 - p1) + 8) >>> 4;
      if (((d < 0) ? -d : d) < 10 * t) begin
          d = clip3(-t, t, d);
        p_out[0] = pix_t'(clip3(0, 255, p0 + d));
        q_out[0] = pix_t'(clip3(0, 255, q0 - d));
        if (dep) begin
          dp = clip3(-(t >> 1), t >> 1, ((((p2 + p0 + 1) >> 1) - p1 + d) >>> 1));
          p_out[1] = pix_t'(clip3(0, 255, p1 + dp));
        end
        if (deq) begin
          dq = clip3(-(t >> 1), t >> 1, ((((q2 + q0 + 1) >> 1) - q1 - d) >>> 1));
          q_out[1] = pix_t'(clip3(0, 255, q1 + dq));
        end
      end
    end
  end

endmodule
