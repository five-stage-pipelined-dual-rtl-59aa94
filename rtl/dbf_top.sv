// Dual-edge deblocking filter for HEVC (H.265), 8-bit 4:2:0 video.
//
// Top level: control unit, eight boundary-strength calculators (one per luma
// edge of a unit) and the filter unit, as in the document's block diagram.
// The picture is processed in 16x16 units (16x16 luma + 8x8 Cb + 8x8 Cr) in
// raster order along each picture row; the host starts each unit with its
// horizontal position unit_x and the information of its eight 8-sample luma
// edges (V1/V2 left border, V3/V4 x = 8, H1/H2 top border, H3/H4 y = 8). The
// edge information and unit_x are registered at start and held for the unit.
//
// Data interface: 128-bit 4x4 blocks in and out (pixel (y,x) in bits
// [8*(4y+x) +: 8]). Blocks are requested in the order 0..15 luma (column by
// column, top to bottom), 16..19 Cb, 20..23 Cr (each chroma component column
// by column) with in_valid/in_ready; filtered blocks leave in the same order
// with out_valid and wr_blk. See dbf_control_unit for the timing: 45 cycles
// per unit, 37 when no chroma edge has BS 2 (chroma skip mode).
//
// Taken from the document: the split into control, BS and filter units, the
// 128-bit block interface, the enable input and the skip mode. This design's
// own choices: unit order along picture rows (the document walks the 16x16
// units inside each 64x64 LCU), the edge information format, and the
// neighbour-context storage inside the filter unit.
module dbf_top
  import dbf_pkg::*;
#(
  parameter int unsigned UNITS_W = 512  // 16x16 units per picture row: 8192 / 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       dbf_en,
  input  logic                       start,
  input  logic [$clog2(UNITS_W)-1:0] unit_x,
  input  edge_info_t                 edge_info [N_EDGES],
  input  blk_t                       in_data,
  input  logic                       in_valid,
  output logic                       in_ready,
  output logic [4:0]                 rd_blk,
  output blk_t                       out_data,
  output logic                       out_valid,
  output logic [4:0]                 wr_blk,
  output logic                       busy,
  output logic                       done,
  output fmode_e                     filt_mode [4],  // mode of each edge filter this cycle
  output logic [3:0]                 filt_used       // edge filters working this cycle
);

  ctrl_t                      ctrl;
  edge_info_t                 info_q [N_EDGES];
  logic [$clog2(UNITS_W)-1:0] unit_x_q;
  logic [1:0]                 bs   [N_EDGES];
  logic [5:0]                 qp_p [N_EDGES];
  logic [5:0]                 qp_q [N_EDGES];
  logic                       chroma_skip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_EDGES; e++) info_q[e] <= '{frame_edge: 1'b1, default: '0};
      unit_x_q <= '0;
    end else if (ctrl.start) begin
      info_q   <= edge_info;
      unit_x_q <= unit_x;
    end
  end

  for (genvar e = 0; e < N_EDGES; e++) begin : g_bs
    dbf_bs_calc u_bs (.info (info_q[e]), .bs (bs[e]));
    assign qp_p[e] = info_q[e].qp_p;
    assign qp_q[e] = info_q[e].qp_q;
  end

  // chroma is filtered only across edges with BS = 2
  assign chroma_skip = (bs[E_V1] != 2'd2) && (bs[E_V2] != 2'd2) &&
                       (bs[E_H1] != 2'd2) && (bs[E_H2] != 2'd2);

  dbf_control_unit u_ctrl (
    .clk, .rst_n, .dbf_en, .start, .in_valid, .chroma_skip,
    .ctrl, .in_ready, .rd_blk, .out_valid, .wr_blk, .busy, .done
  );

  dbf_filter_unit #(.UNITS_W(UNITS_W)) u_filt (
    .clk, .rst_n, .ctrl, .bs, .qp_p, .qp_q, .unit_x (unit_x_q),
    .in_data, .out_data, .seg_mode (filt_mode), .seg_used (filt_used)
  );

endmodule
