// Filter unit: buffers, parameter calculation, four edge filters, internal
// memory and the neighbour context of one 16x16 unit (luma plus 8x8 Cb and Cr).
//
// Driven step by step by the control word of the control unit:
//  PH_LLD  the 16 luma blocks arrive in column order (block columns 0..3, four
//          rows each). Even columns go to Q1..Q4, odd ones to P1..P4. When the
//          first block of column 1 arrives, column 0 in Q is complete and edges
//          V1/V2 (x = 0) are filtered against the left context; when the first
//          block of column 3 arrives, V3/V4 (x = 8) are filtered between P
//          (column 1) and Q (column 2). Results are stored transposed in the
//          internal memory: RAM r holds block row r, the address is the column.
//  PH_LH   one block column per cycle (k = 0..3) is read from the four RAMs on
//          port A (column 3 straight from P1..P4), edges H1/H2 (y = 0, against
//          the top context) and H3/H4 (y = 8) are filtered and written back.
//  lout    the 16 luma blocks are read on port B, transposed back and written
//          out in input order, one per cycle, while
//  PH_CLD  the 8 chroma blocks arrive (Cb col 0 -> Q1,Q2, col 1 -> P1,P2; Cr
//          col 0 -> Q3,Q4, col 1 -> P3,P4) and edges V5/V6 are filtered, and
//  PH_CH   edges H5/H6 are filtered (chroma filter only where BS = 2). The
//          chroma data reuse addresses 0 and 1, whose luma columns have already
//          left by then.
//  PH_COUT the 8 chroma blocks are written out.
// All eight 8x8-grid edges of a unit (left and top border included) are
// filtered once per unit, with four edge filters working in parallel.
//
// Neighbour context (this design's addition; the document does not say where
// the neighbours of the left and top borders come from): the last block column
// of the previous unit, unfiltered, is kept as left context, and the bottom
// block row of every unit, vertically filtered, is kept per unit column of the
// picture (UNITS_W columns) as top context. Pixels on the neighbour side of the
// left and top borders are filtered for the decision but are not written back:
// each unit writes out only its own 24 blocks, as in the document.
//
// Timing: everything is combinational from registers to the RAM and buffer
// writes of the same cycle; out_data is valid in the cycle of a lout step or a
// PH_COUT step. Decision and filter form one combinational stage.
module dbf_filter_unit
  import dbf_pkg::*;
#(
  parameter int unsigned UNITS_W = 512  // 16x16 units per picture row (8192/16)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  ctrl_t                      ctrl,
  input  logic [1:0]                 bs   [N_EDGES],
  input  logic [5:0]                 qp_p [N_EDGES],
  input  logic [5:0]                 qp_q [N_EDGES],
  input  logic [$clog2(UNITS_W)-1:0] unit_x,
  input  blk_t                       in_data,
  output blk_t                       out_data,
  output fmode_e                     seg_mode [4],  // mode of each edge filter
  output logic [3:0]                 seg_used       // edge filter did a segment
);

  localparam int unsigned XW = $clog2(UNITS_W);

  // ---------------- parameter calculation (8 luma, 4 chroma edges) --------
  logic [6:0] beta_l [N_EDGES];
  logic [4:0] tc_l   [N_EDGES];
  logic [6:0] beta_c [4];
  logic [4:0] tc_c   [4];

  for (genvar e = 0; e < N_EDGES; e++) begin : g_par_l
    dbf_param_calc u_par (
      .bs (bs[e]), .qp_p (qp_p[e]), .qp_q (qp_q[e]), .chroma (1'b0),
      .beta (beta_l[e]), .tc (tc_l[e])
    );
  end
  // chroma edges take QP and BS of luma edges V1, V2, H1, H2
  for (genvar c = 0; c < 4; c++) begin : g_par_c
    localparam int E = (c < 2) ? c : c + 2;
    dbf_param_calc u_par (
      .bs (bs[E]), .qp_p (qp_p[E]), .qp_q (qp_q[E]), .chroma (1'b1),
      .beta (beta_c[c]), .tc (tc_c[c])
    );
  end

  // ---------------- buffers -------------------------------------------------
  logic       buf_we, buf_sel_p;
  logic [1:0] buf_row;
  blk_t       pbuf [4];
  blk_t       qbuf [4];

  dbf_buffers u_buf (
    .clk, .rst_n, .we (buf_we), .sel_p (buf_sel_p), .row (buf_row), .din (in_data),
    .p_buf (pbuf), .q_buf (qbuf)
  );

  // ---------------- internal memory -----------------------------------------
  logic [3:0] we_a, we_b;
  logic [1:0] addr_a [4], addr_b [4];
  blk_t       din_a [4], din_b [4], dout_a [4], dout_b [4];

  dbf_int_mem u_mem (
    .clk,
    .we_a, .addr_a, .din_a, .dout_a,
    .we_b, .addr_b, .din_b, .dout_b
  );

  // ---------------- edge filters --------------------------------------------
  blk_t       ef_p [4], ef_q [4], ef_po [4], ef_qo [4];
  logic [1:0] ef_bs [4];
  logic [6:0] ef_beta [4];
  logic [4:0] ef_tc [4];
  logic       ef_chroma [4];

  for (genvar j = 0; j < 4; j++) begin : g_ef
    dbf_edge_filter u_ef (
      .p_blk (ef_p[j]), .q_blk (ef_q[j]), .bs (ef_bs[j]), .beta (ef_beta[j]),
      .tc (ef_tc[j]), .chroma (ef_chroma[j]),
      .p_blk_out (ef_po[j]), .q_blk_out (ef_qo[j]), .mode (seg_mode[j])
    );
  end

  // ---------------- neighbour context ---------------------------------------
  blk_t lctx_l [4];            // previous unit, luma block column 3
  blk_t lctx_c [4];            // previous unit, Cb/Cr block column 1
  blk_t top_l  [UNITS_W*4];    // per unit column: luma block row 3 (transposed)
  blk_t top_cb [UNITS_W*2];    // per unit column: Cb block row 1 (transposed)
  blk_t top_cr [UNITS_W*2];    // per unit column: Cr block row 1 (transposed)

  logic           lctx_l_ld, lctx_c_ld;
  logic           top_l_we, top_c_we;
  logic [XW+1:0]  top_l_idx;
  logic [XW:0]    top_c_idx;
  blk_t           top_l_din, top_cb_din, top_cr_din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) begin
        lctx_l[r] <= '0;
        lctx_c[r] <= '0;
      end
    end else begin
      if (lctx_l_ld) lctx_l <= pbuf;
      if (lctx_c_ld) lctx_c <= pbuf;
    end
  end

  always_ff @(posedge clk) begin
    if (top_l_we) top_l[top_l_idx] <= top_l_din;
    if (top_c_we) begin
      top_cb[top_c_idx] <= top_cb_din;
      top_cr[top_c_idx] <= top_cr_din;
    end
  end

  // ---------------- step decoding -------------------------------------------
  // Three blocks: control (addresses, enables, edge selection), filter inputs,
  // write data. The split keeps the RAM read path free of false loops.
  blk_t       col [4];
  logic [1:0] k;
  logic       ev_v12, ev_v34, ev_c;

  always_comb begin : ctl
    edge_e ea, eb;
    int    cc;
    k         = ctrl.idx[1:0];
    ev_v12    = (ctrl.phase == PH_LLD) && ctrl.take && (ctrl.idx == 4'd4);
    ev_v34    = (ctrl.phase == PH_LLD) && ctrl.take && (ctrl.idx == 4'd12);
    ev_c      = (ctrl.phase == PH_CLD) && ctrl.take && (ctrl.idx == 4'd6);
    buf_we    = 1'b0;
    buf_sel_p = 1'b0;
    buf_row   = '0;
    we_a      = '0;
    we_b      = '0;
    lctx_l_ld = 1'b0;
    lctx_c_ld = 1'b0;
    top_l_we  = 1'b0;
    top_c_we  = 1'b0;
    top_l_idx = {unit_x, k};
    top_c_idx = {unit_x, ctrl.idx[0]};
    seg_used  = '0;
    ea        = E_V1;
    eb        = E_V1;
    cc        = 0;
    for (int r = 0; r < 4; r++) begin
      addr_a[r]    = '0;
      addr_b[r]    = '0;
      ef_bs[r]     = '0;
      ef_beta[r]   = '0;
      ef_tc[r]     = '0;
      ef_chroma[r] = 1'b0;
    end

    unique case (ctrl.phase)
      PH_LLD: if (ctrl.take) begin
        buf_we    = 1'b1;
        buf_sel_p = ctrl.idx[2];
        buf_row   = ctrl.idx[1:0];
        if (ev_v12 || ev_v34) begin
          seg_used = 4'hf;
          for (int r = 0; r < 4; r++) begin
            if (ev_v12) ea = (r < 2) ? E_V1 : E_V2;
            else        ea = (r < 2) ? E_V3 : E_V4;
            ef_bs[r]   = bs[ea];
            ef_beta[r] = beta_l[ea];
            ef_tc[r]   = tc_l[ea];
            we_a[r]    = 1'b1;
            addr_a[r]  = ev_v12 ? 2'd0 : 2'd1;
            we_b[r]    = ev_v34;
            addr_b[r]  = 2'd2;
          end
        end
      end

      PH_LH: begin
        ea = (k < 2) ? E_H1 : E_H2;
        eb = (k < 2) ? E_H3 : E_H4;
        ef_bs[0] = bs[ea]; ef_beta[0] = beta_l[ea]; ef_tc[0] = tc_l[ea];
        ef_bs[1] = bs[eb]; ef_beta[1] = beta_l[eb]; ef_tc[1] = tc_l[eb];
        seg_used = 4'h3;
        for (int r = 0; r < 4; r++) begin
          we_a[r]   = 1'b1;
          addr_a[r] = k;
        end
        top_l_we  = 1'b1;
        lctx_l_ld = (k == 2'd0);
      end

      PH_CLD: if (ctrl.take) begin
        buf_we    = 1'b1;
        buf_sel_p = ctrl.idx[1];
        buf_row   = {ctrl.idx[2], ctrl.idx[0]};
        if (ev_c) begin
          seg_used = 4'hf;
          for (int r = 0; r < 4; r++) begin
            cc = r % 2;                          // block row 0 -> V1, row 1 -> V2
            ef_chroma[r] = 1'b1;
            ef_bs[r]     = bs[cc];
            ef_beta[r]   = beta_c[cc];
            ef_tc[r]     = tc_c[cc];
            we_a[r]      = 1'b1;
            addr_a[r]    = 2'd0;
          end
        end
      end

      PH_CH: begin
        ea = ctrl.idx[0] ? E_H2 : E_H1;
        cc = ctrl.idx[0] ? 3 : 2;
        for (int j = 0; j < 2; j++) begin
          ef_chroma[j] = 1'b1;
          ef_bs[j]     = bs[ea];
          ef_beta[j]   = beta_c[cc];
          ef_tc[j]     = tc_c[cc];
        end
        seg_used = 4'h3;
        for (int r = 0; r < 4; r++) begin
          we_a[r]   = 1'b1;
          addr_a[r] = {1'b0, ctrl.idx[0]};
        end
        top_c_we  = 1'b1;
        lctx_c_ld = (ctrl.idx[0] == 1'b0);
      end

      PH_COUT: addr_b[{ctrl.idx[2], ctrl.idx[0]}] = {1'b0, ctrl.idx[1]};

      default: ;
    endcase
    // luma write-out, alongside the chroma phases: port B reads
    if (ctrl.lout) addr_b[ctrl.lidx[1:0]] = ctrl.lidx[3:2];
  end

  // Filter inputs: the block column read in the horizontal passes (the last
  // column comes from the P buffers, not yet in memory) and the P/Q blocks.
  always_comb begin : fin
    for (int r = 0; r < 4; r++) begin
      col[r]  = '0;
      ef_p[r] = '0;
      ef_q[r] = '0;
    end
    unique case (ctrl.phase)
      PH_LLD: for (int r = 0; r < 4; r++) begin
        ef_p[r] = ev_v12 ? lctx_l[r] : pbuf[r];
        ef_q[r] = qbuf[r];
      end
      PH_LH: begin
        for (int r = 0; r < 4; r++)
          col[r] = (k == 2'd3) ? transpose(pbuf[r]) : dout_a[r];
        ef_p[0] = top_l[top_l_idx]; ef_q[0] = col[0];  // y = 0: top context | row 0
        ef_p[1] = col[1];           ef_q[1] = col[2];  // y = 8: row 1 | row 2
      end
      PH_CLD: for (int r = 0; r < 4; r++) begin
        ef_p[r] = lctx_c[r];
        ef_q[r] = qbuf[r];
      end
      PH_CH: begin
        for (int r = 0; r < 4; r++)
          col[r] = ctrl.idx[0] ? transpose(pbuf[r]) : dout_a[r];
        ef_p[0] = top_cb[top_c_idx]; ef_q[0] = col[0];  // Cb
        ef_p[1] = top_cr[top_c_idx]; ef_q[1] = col[2];  // Cr
      end
      default: ;
    endcase
  end

  // Write data: internal memory, top context and the output block.
  always_comb begin : wdata
    for (int r = 0; r < 4; r++) begin
      din_a[r] = '0;
      din_b[r] = '0;
    end
    top_l_din  = '0;
    top_cb_din = '0;
    top_cr_din = '0;
    out_data   = '0;
    unique case (ctrl.phase)
      PH_LLD, PH_CLD: for (int r = 0; r < 4; r++) begin
        din_a[r] = (ctrl.phase == PH_LLD && ev_v34) ? transpose(ef_po[r]) : transpose(ef_qo[r]);
        din_b[r] = transpose(ef_qo[r]);
      end
      PH_LH, PH_CH: begin
        din_a[0]   = ef_qo[0];
        din_a[1]   = (ctrl.phase == PH_LH) ? ef_po[1] : col[1];
        din_a[2]   = ef_qo[1];
        din_a[3]   = col[3];
        top_l_din  = col[3];
        top_cb_din = col[1];
        top_cr_din = col[3];
      end
      PH_COUT: out_data = transpose(dout_b[{ctrl.idx[2], ctrl.idx[0]}]);
      default: ;
    endcase
    if (ctrl.lout) out_data = transpose(dout_b[ctrl.lidx[1:0]]);
  end

endmodule
