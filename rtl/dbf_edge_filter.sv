// Edge filter: filters one four-line segment between a P and a Q 4x4 block.
//
// The segment runs across a vertical edge: line y uses p_i = P(y, 3-i) and
// q_i = Q(y, i). Horizontal edges are fed as transposed blocks. For luma the
// filter decision unit picks strong, weak or no filtering from lines 0 and 3,
// then four strong filters and four weak filters work on the four lines and a
// multiplexer selects the result (no filtering bypasses the pixels). For chroma
// only the chroma filter is used, and only when BS = 2, as the document
// requires. The design uses four of these side by side, so that two 8-sample
// edges of 8 lines each are filtered in one step.
// Combinational; the caller registers the results.
module dbf_edge_filter
  import dbf_pkg::*;
(
  input  blk_t       p_blk,
  input  blk_t       q_blk,
  input  logic [1:0] bs,
  input  logic [6:0] beta,
  input  logic [4:0] tc,
  input  logic       chroma,
  output blk_t       p_blk_out,
  output blk_t       q_blk_out,
  output fmode_e     mode
);

  pix_t   p [4][4];  // [line][i]
  pix_t   q [4][4];
  pix_t   sp [4][3], sq [4][3];
  pix_t   wp [4][2], wq [4][2];
  pix_t   wpi [4][3], wqi [4][3];
  fmode_e lmode;
  logic   dep, deq;

  always_comb begin
    for (int y = 0; y < 4; y++)
      for (int i = 0; i < 4; i++) begin
        p[y][i] = get_pix(p_blk, y, 3 - i);
        q[y][i] = get_pix(q_blk, y, i);
      end
    for (int y = 0; y < 4; y++)
      for (int i = 0; i < 3; i++) begin
        wpi[y][i] = p[y][i];
        wqi[y][i] = q[y][i];
      end
  end

  dbf_filter_decision u_dec (
    .p_l0 (p[0]), .q_l0 (q[0]), .p_l3 (p[3]), .q_l3 (q[3]),
    .bs, .beta, .tc,
    .mode (lmode), .dep, .deq
  );

  for (genvar y = 0; y < 4; y++) begin : g_line
    dbf_strong_filter u_strong (
      .p_in (p[y]), .q_in (q[y]), .tc,
      .p_out (sp[y]), .q_out (sq[y])
    );
    dbf_weak_filter u_weak (
      .p_in (wpi[y]), .q_in (wqi[y]), .tc, .dep, .deq, .chroma,
      .p_out (wp[y]), .q_out (wq[y])
    );
  end

  always_comb begin
    if (chroma) mode = (bs == 2'd2) ? FM_CHROMA : FM_NONE;
    else        mode = lmode;
    p_blk_out = p_blk;
    q_blk_out = q_blk;
    for (int y = 0; y < 4; y++) begin
      unique case (mode)
        FM_STRONG: for (int i = 0; i < 3; i++) begin
          p_blk_out[8*(4*y+3-i) +: 8] = sp[y][i];
          q_blk_out[8*(4*y+i)   +: 8] = sq[y][i];
        end
        FM_WEAK, FM_CHROMA: for (int i = 0; i < 2; i++) begin
          p_blk_out[8*(4*y+3-i) +: 8] = wp[y][i];
          q_blk_out[8*(4*y+i)   +: 8] = wq[y][i];
        end
        default: ;
      endcase
    end
  end

endmodule
