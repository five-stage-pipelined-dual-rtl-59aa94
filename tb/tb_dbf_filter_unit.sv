// Filter unit test: the control word is driven directly by the testbench, one
// phase after the other as the control unit would, for a picture of 4 x 4
// units with random edge strengths and QPs (BS and QP given to the unit
// directly). Every block written out (ctrl.lout steps and PH_COUT) is compared with the
// reference model of the per-unit processing (vertical edges with left
// context, horizontal edges with top context, own pixels written).
module tb_dbf_filter_unit;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int WU = 4;
  localparam int HU = 4;
  localparam int LW = WU * 16, LH = HU * 16, CW = WU * 8, CH = HU * 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  ctrl_t ctrl;
  logic [1:0] bs [N_EDGES];
  logic [5:0] qp_p [N_EDGES], qp_q [N_EDGES];
  logic [2:0] unit_x = '0;
  blk_t in_data = '0, out_data;
  fmode_e seg_mode [4];
  logic [3:0] seg_used;

  dbf_filter_unit #(.UNITS_W(8)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int Y [LH][LW];
  int C [2][CH][CW];
  int vY [LH][LW];
  int vC [2][CH][CW];
  int exp_blk [24][4][4];
  bit skip_exp;
  int n_bs [3] = '{0, 0, 0};

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic gen_picture();
    int base, rough;
    for (int by = 0; by < LH / 8; by++)
      for (int bx = 0; bx < LW / 8; bx++) begin
        base  = rnd(90, 140);
        rough = rnd(0, 5);
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            Y[by*8+y][bx*8+x] = clip(0, 255, base + (rough == 5 ? rnd(0, 60) : (rough > 2 ? rnd(0, 2) : 0)) + x / 4);
      end
    for (int c = 0; c < 2; c++)
      for (int by = 0; by < CH / 4; by++)
        for (int bx = 0; bx < CW / 4; bx++) begin
          base = rnd(100, 130);
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++)
              C[c][by*4+y][bx*4+x] = base + rnd(0, 3);
        end
  endtask

  function automatic edge_info_t gen_edge(bit fe);
    edge_info_t e;
    e.frame_edge = fe;
    e.intra_p = ($urandom % 4) == 0;
    e.intra_q = ($urandom % 5) == 0;
    e.coef_p  = ($urandom % 4) == 0;
    e.coef_q  = ($urandom % 4) == 0;
    e.mvp_x = 16'(rnd(-5, 5)); e.mvp_y = 16'(rnd(-5, 5));
    e.mvq_x = 16'(rnd(-5, 5)); e.mvq_y = 16'(rnd(-5, 5));
    e.qp_p = 6'(rnd(28, 51));
    e.qp_q = 6'(rnd(28, 51));
    return e;
  endfunction

  // reference processing of one unit; fills exp_blk and skip_exp
  task automatic model_unit(int ux, int uy, edge_info_t inf [N_EDGES]);
    int bs [8], beta [8], tc [8], cbeta [8], ctc [8];
    int cur [16][16];
    int cc [2][8][8];
    int p [4][4], q [4][4];
    int e, m, x0, y0, md;
    for (int i = 0; i < 8; i++) begin
      bs[i] = ref_bs(inf[i].frame_edge, inf[i].intra_p, inf[i].intra_q, inf[i].coef_p, inf[i].coef_q,
                     int'(inf[i].mvp_x), int'(inf[i].mvp_y), int'(inf[i].mvq_x), int'(inf[i].mvq_y));
      ref_params(bs[i], int'(inf[i].qp_p), int'(inf[i].qp_q), 1'b0, beta[i], tc[i]);
      ref_params(bs[i], int'(inf[i].qp_p), int'(inf[i].qp_q), 1'b1, cbeta[i], ctc[i]);
      n_bs[bs[i]]++;
    end
    x0 = ux * 16; y0 = uy * 16;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = Y[y0+y][x0+x];
    // luma vertical edges x = 0 and x = 8
    for (int s = 0; s < 4; s++) begin
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
        p[l][i] = (ux > 0) ? Y[y0+4*s+l][x0-1-i] : 0;
        q[l][i] = cur[4*s+l][i];
      end
      md = ref_luma_seg(p, q, bs[s < 2 ? 0 : 1], beta[s < 2 ? 0 : 1], tc[s < 2 ? 0 : 1]);
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) cur[4*s+l][i] = q[l][i];
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
        p[l][i] = cur[4*s+l][7-i];
        q[l][i] = cur[4*s+l][8+i];
      end
      e = s < 2 ? 2 : 3;
      md = ref_luma_seg(p, q, bs[e], beta[e], tc[e]);
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
        cur[4*s+l][7-i] = p[l][i];
        cur[4*s+l][8+i] = q[l][i];
      end
    end
    for (int y = 12; y < 16; y++) for (int x = 0; x < 16; x++) vY[y0+y][x0+x] = cur[y][x];
    // luma horizontal edges y = 0 and y = 8
    for (int s = 0; s < 4; s++) begin
      e = s < 2 ? 4 : 5;
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
        p[l][i] = (uy > 0) ? vY[y0-1-i][x0+4*s+l] : 0;
        q[l][i] = cur[i][4*s+l];
      end
      md = ref_luma_seg(p, q, bs[e], beta[e], tc[e]);
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) cur[i][4*s+l] = q[l][i];
      e = s < 2 ? 6 : 7;
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
        p[l][i] = cur[7-i][4*s+l];
        q[l][i] = cur[8+i][4*s+l];
      end
      md = ref_luma_seg(p, q, bs[e], beta[e], tc[e]);
      for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
        cur[7-i][4*s+l] = p[l][i];
        cur[8+i][4*s+l] = q[l][i];
      end
    end
    for (int b = 0; b < 16; b++)
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        exp_blk[b][y][x] = cur[4*(b%4)+y][4*(b/4)+x];
    // chroma: x = 0 then y = 0, only where BS = 2
    skip_exp = (bs[0] != 2) && (bs[1] != 2) && (bs[4] != 2) && (bs[5] != 2);
    for (int c = 0; c < 2; c++) begin
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) cc[c][y][x] = C[c][uy*8+y][ux*8+x];
      for (int s = 0; s < 2; s++) begin
        for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
          p[l][i] = (ux > 0) ? C[c][uy*8+4*s+l][ux*8-1-i] : 0;
          q[l][i] = cc[c][4*s+l][i];
        end
        md = ref_chroma_seg(p, q, bs[s], ctc[s]);
        for (int l = 0; l < 4; l++) cc[c][4*s+l][0] = q[l][0];
      end
      for (int y = 4; y < 8; y++) for (int x = 0; x < 8; x++) vC[c][uy*8+y][ux*8+x] = cc[c][y][x];
      for (int s = 0; s < 2; s++) begin
        for (int l = 0; l < 4; l++) for (int i = 0; i < 4; i++) begin
          p[l][i] = (uy > 0) ? vC[c][uy*8-1-i][ux*8+4*s+l] : 0;
          q[l][i] = cc[c][i][4*s+l];
        end
        md = ref_chroma_seg(p, q, bs[4+s], ctc[4+s]);
        for (int l = 0; l < 4; l++) cc[c][0][4*s+l] = q[l][0];
      end
      for (int b = 0; b < 4; b++)
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          exp_blk[16+4*c+b][y][x] = cc[c][4*(b%2)+y][4*(b/2)+x];
    end
    m = md;
  endtask

  function automatic blk_t in_block(int ux, int uy, int b);
    blk_t w;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        if (b < 16) w[8*(4*y+x) +: 8] = 8'(Y[uy*16 + 4*(b%4) + y][ux*16 + 4*(b/4) + x]);
        else        w[8*(4*y+x) +: 8] = 8'(C[(b-16)/4][uy*8 + 4*((b-16)%2) + y][ux*8 + 4*(((b-16)%4)/2) + x]);
    return w;
  endfunction


  task automatic step(phase_e ph, int idx, bit take);
    @(negedge clk);
    ctrl.phase = ph;
    ctrl.idx   = 4'(idx);
    ctrl.take  = take;
    ctrl.start = 1'b0;
    ctrl.lout  = 1'b0;
    ctrl.lidx  = '0;
  endtask

  task automatic check_out(int b);
    bit bad;
    #1;
    bad = 0;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
      if (int'(out_data[8*(4*y+x) +: 8]) != exp_blk[b][y][x]) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("block %0d mismatch", b);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0;
    gen_picture();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int uy = 0; uy < HU; uy++)
      for (int ux = 0; ux < WU; ux++) begin
        edge_info_t inf [N_EDGES];
        for (int e = 0; e < N_EDGES; e++) begin
          inf[e] = gen_edge(((e == 0 || e == 1) && ux == 0) || ((e == 4 || e == 5) && uy == 0));
          bs[e] = 2'(ref_bs(inf[e].frame_edge, inf[e].intra_p, inf[e].intra_q, inf[e].coef_p, inf[e].coef_q,
                        int'(inf[e].mvp_x), int'(inf[e].mvp_y), int'(inf[e].mvq_x), int'(inf[e].mvq_y)));
          qp_p[e] = inf[e].qp_p;
          qp_q[e] = inf[e].qp_q;
        end
        unit_x = 3'(ux);
        model_unit(ux, uy, inf);
        for (int i = 0; i < 16; i++) begin
          step(PH_LLD, i, 1'b1);
          in_data = in_block(ux, uy, i);
        end
        for (int i = 0; i < 4; i++) step(PH_LH, i, 1'b0);
        // luma write-out alongside the chroma read and chroma horizontal pass
        for (int t = 0; t < 16; t++) begin
          if (t < 8)       step(PH_CLD, t, 1'b1);
          else if (t < 10) step(PH_CH, t - 8, 1'b0);
          else             step(PH_WAIT, 0, 1'b0);
          ctrl.lout = 1'b1;
          ctrl.lidx = 4'(t);
          if (t < 8) in_data = in_block(ux, uy, 16 + t);
          check_out(t);
        end
        for (int i = 0; i < 8; i++) begin
          step(PH_COUT, i, 1'b0);
          check_out(16 + i);
        end
        step(PH_IDLE, 0, 1'b0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
