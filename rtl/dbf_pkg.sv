// Shared types and helpers of the HEVC dual-edge deblocking filter.
//
// A 4x4 pixel block travels as one 128-bit word: pixel (row y, column x) of the
// block sits in bits [8*(4*y+x) +: 8]. Every 8x8-grid edge segment of four lines
// is filtered from a P block (left of / above the edge) and a Q block (right of /
// below it). Horizontal edges are filtered with the same hardware as vertical
// ones by transposing the blocks, so the edge filter only knows "lines across a
// vertical edge": in line y, p_i is P(y, 3-i) and q_i is Q(y, i).
//
// The 128-bit block word, the eight luma edges of a 16x16 unit (V1..V4, H1..H4)
// and the 0..2 boundary strength follow the document; the bit order inside the
// block word, the edge-information record and the sequencing phases are this
// design's own choices.
package dbf_pkg;

  typedef logic [7:0]   pix_t;
  typedef logic [127:0] blk_t;

  // Motion vector component width (quarter-sample units).
  localparam int unsigned MV_W = 16;

  // Information about the two 8x8 blocks on either side of one 8-sample edge.
  typedef struct packed {
    logic                   frame_edge;  // edge lies on the left or top picture border
    logic                   intra_p;     // P block is intra coded
    logic                   intra_q;     // Q block is intra coded
    logic                   coef_p;      // P block has non-zero transform coefficients
    logic                   coef_q;      // Q block has non-zero transform coefficients
    logic signed [MV_W-1:0] mvp_x;
    logic signed [MV_W-1:0] mvp_y;
    logic signed [MV_W-1:0] mvq_x;
    logic signed [MV_W-1:0] mvq_y;
    logic [5:0]             qp_p;        // luma QP of the P block
    logic [5:0]             qp_q;        // luma QP of the Q block
  } edge_info_t;

  // The eight luma edges of a 16x16 unit. V1/V2: left border (rows 0-7 / 8-15),
  // V3/V4: x=8 (rows 0-7 / 8-15), H1/H2: top border (columns 0-7 / 8-15),
  // H3/H4: y=8. Chroma edges V5/V6 and H5/H6 reuse the strengths of V1/V2, H1/H2.
  typedef enum logic [2:0] {
    E_V1 = 3'd0, E_V2 = 3'd1, E_V3 = 3'd2, E_V4 = 3'd3,
    E_H1 = 3'd4, E_H2 = 3'd5, E_H3 = 3'd6, E_H4 = 3'd7
  } edge_e;
  localparam int unsigned N_EDGES = 8;

  // Filter mode chosen for one segment.
  typedef enum logic [1:0] {
    FM_NONE   = 2'd0,
    FM_WEAK   = 2'd1,
    FM_STRONG = 2'd2,
    FM_CHROMA = 2'd3
  } fmode_e;

  // Sequencing phases of one 16x16 unit (input side). The write-out of the
  // luma blocks is a second activity (ctrl_t.lout) that runs alongside
  // PH_CLD, PH_CH and PH_WAIT.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,  // waiting for start
    PH_LLD  = 3'd1,  // read 16 luma blocks, vertical edges V1-V4 filtered on the fly
    PH_LH   = 3'd2,  // read internal memory column by column, edges H1-H4
    PH_CLD  = 3'd3,  // read 8 chroma blocks, edges V5/V6 (luma write-out running)
    PH_CH   = 3'd4,  // edges H5/H6 (luma write-out running)
    PH_WAIT = 3'd5,  // chroma filtered, luma write-out still running
    PH_COUT = 3'd6   // write 8 chroma blocks out
  } phase_e;

  // Control word from the control unit to the filter unit.
  typedef struct packed {
    phase_e     phase;
    logic [3:0] idx;    // step inside the phase
    logic       take;   // an input block is accepted this cycle
    logic       start;  // a unit starts this cycle (latch unit information)
    logic       lout;   // a luma block is written out this cycle
    logic [3:0] lidx;   // which luma block (0..15, column order)
  } ctrl_t;

  function automatic pix_t get_pix(blk_t b, int unsigned y, int unsigned x);
    return b[8*(4*y+x) +: 8];
  endfunction

  function automatic blk_t transpose(blk_t b);
    blk_t t;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        t[8*(4*y+x) +: 8] = b[8*(4*x+y) +: 8];
    return t;
  endfunction

endpackage
