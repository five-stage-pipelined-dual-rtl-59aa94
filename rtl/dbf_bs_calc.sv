// Boundary strength calculation for one 8-sample edge.
//
// Follows the decision flow of the document: an edge on the left or top picture
// border gets BS 0; otherwise an intra-coded neighbour gives BS 2; otherwise
// non-zero transform coefficients give BS 1; otherwise a motion-vector
// difference of 4 or more (quarter samples, i.e. one integer sample) gives BS 1;
// anything else is BS 0. Purely combinational.
//
// Own choices: "adjacent blocks are intra coded" and "have non-zero
// coefficients" are read as "either block", as in HEVC; the motion-vector test
// is applied per component (horizontal or vertical) on one motion vector per
// block.
module dbf_bs_calc
  import dbf_pkg::*;
(
  input  edge_info_t info,
  output logic [1:0] bs
);

  logic [MV_W:0] dx, dy;

  function automatic logic [MV_W:0] absdiff(logic signed [MV_W-1:0] a,
                                             logic signed [MV_W-1:0] b);
    logic signed [MV_W:0] d;
    d = {a[MV_W-1], a} - {b[MV_W-1], b};
    return d[MV_W] ? -d : d;
  endfunction

  always_comb begin
    dx = absdiff(info.mvp_x, info.mvq_x);
    dy = absdiff(info.mvp_y, info.mvq_y);
    if (info.frame_edge)                      bs = 2'd0;
    else if (info.intra_p || info.intra_q)    bs = 2'd2;
    else if (info.coef_p || info.coef_q)      bs = 2'd1;
    else if (dx >= 4 || dy >= 4)              bs = 2'd1;
    else                                      bs = 2'd0;
  end

endmodule
