// Workload test: one 64x64 LCU (4 x 4 units of 16x16 luma with Cb and Cr) at
// the default parameters, with no input stall. The picture is 5 x 5 units and
// every chroma edge off the picture border is made intra (BS 2), so that all
// units away from the border filter chroma. The 4 x 4 units of rows and
// columns 1..4 form one LCU that does not touch the picture border; the sum of
// their cycle counts must be 16 x 45 = 720. Units are started back to back;
// the whole picture must take 45 cycles per unit, 37 for each border unit in
// chroma skip mode (only the corner unit here). Every written block is checked
// against the reference model.
module tb_dbf_lcu;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int WU = 5;          // picture width in units
  localparam int HU = 5;          // picture height in units
  localparam int STALL_1_IN = 0;  // input stalls 1 cycle in STALL_1_IN (0: never)
  localparam int PAUSE_1_IN = 0; // enable-low pause 1 cycle in PAUSE_1_IN (0: never)
  localparam int B2B = 1;         // 1: next start in the cycle done is seen
  localparam int CHECK_MECH = 0;  // require every mechanism to occur
  localparam int FORCE_CHROMA = 1; // 1: intra on every non-border chroma edge
  localparam int WATCHDOG = 20000;
  localparam int LW = WU * 16, LH = HU * 16, CW = WU * 8, CH = HU * 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dbf_en = 1'b1;
  logic start = 1'b0;
  logic [8:0] unit_x = '0;
  edge_info_t edge_info [N_EDGES];
  blk_t in_data = '0;
  logic in_valid = 1'b0;
  logic in_ready, out_valid, busy, done;
  logic [4:0] rd_blk, wr_blk;
  blk_t out_data;
  fmode_e filt_mode [4];
  logic [3:0] filt_used;

  dbf_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // picture
  int Y [LH][LW];
  int C [2][CH][CW];
  int vY [LH][LW];      // vertically filtered luma (bottom rows of units used)
  int vC [2][CH][CW];
  int exp_blk [24][4][4];
  bit skip_exp;

  // mechanism counters
  int n_strong = 0, n_weak = 0, n_chroma = 0, n_none = 0, n_skip = 0;
  int n_stall = 0, n_pause = 0, n_bs [3] = '{0, 0, 0};

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

  // input stimulus: blocks on request with random stalls; random enable pauses
  int cur_ux, cur_uy;
  bit running = 0;
  always @(negedge clk) begin
    if (PAUSE_1_IN != 0 && running && busy && ($urandom % PAUSE_1_IN) == 0) dbf_en <= 1'b0;
    else dbf_en <= 1'b1;
    in_valid <= running && (STALL_1_IN == 0 || ($urandom % STALL_1_IN) != 0);
    in_data  <= in_block(cur_ux, cur_uy, int'(rd_blk));
  end

  // monitor
  int n_out_l, n_out_c, stall_l, stall_c, unit_pauses, n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy && !dbf_en) unit_pauses++;
    if (dbf_en && dut.u_ctrl.phase == PH_LLD && !in_valid) stall_l++;
    if (dbf_en && dut.u_ctrl.phase == PH_CLD && !in_valid) stall_c++;
    if (dbf_en && out_valid && in_ready && in_valid) n_overlap++;
    if (dbf_en) for (int j = 0; j < 4; j++)
      if (filt_used[j]) begin
        case (filt_mode[j])
          FM_STRONG: n_strong++;
          FM_WEAK:   n_weak++;
          FM_CHROMA: n_chroma++;
          default:   n_none++;
        endcase
      end
    if (out_valid) begin
      bit bad;
      bad = 0;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        if (int'(out_data[8*(4*y+x) +: 8]) != exp_blk[wr_blk][y][x]) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("unit (%0d,%0d) block %0d mismatch: got %h", cur_ux, cur_uy, wr_blk, out_data);
      end
      if (wr_blk < 16) n_out_l++; else n_out_c++;
    end
  end

  initial begin : main
    int t0, t1, expc, tfirst, total_exp, lcu_cyc;
    t1 = 0; tfirst = 0; total_exp = 0; lcu_cyc = 0;
    gen_picture();
    for (int e = 0; e < N_EDGES; e++) edge_info[e] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int uy = 0; uy < HU; uy++)
      for (int ux = 0; ux < WU; ux++) begin
        edge_info_t inf [N_EDGES];
        for (int e = 0; e < N_EDGES; e++)
          inf[e] = gen_edge(((e == 0 || e == 1) && ux == 0) || ((e == 4 || e == 5) && uy == 0));
        if (FORCE_CHROMA != 0)
          for (int e = 0; e < N_EDGES; e++)
            if ((e == 0 || e == 1 || e == 4 || e == 5) && !inf[e].frame_edge) inf[e].intra_q = 1'b1;
        model_unit(ux, uy, inf);
        if (B2B == 0 || (ux == 0 && uy == 0)) begin
          @(negedge clk);
          while (busy || !dbf_en) @(negedge clk);
        end
        cur_ux = ux; cur_uy = uy;
        unit_x = 9'(ux);
        edge_info = inf;
        start = 1'b1;
        n_out_l = 0; n_out_c = 0; stall_l = 0; stall_c = 0; unit_pauses = 0;
        running = 1;
        t0 = cycle;                       // start is sampled at edge t0 + 1
        if (ux == 0 && uy == 0) tfirst = cycle;
        @(posedge clk);
        #1 start = 1'b0;
        @(negedge clk iff done);
        t1 = cycle;                       // done is sampled at edge t1 + 1
        total_exp += skip_exp ? 37 : 45;
        running = 0;
        expc = 21 + stall_l + ((10 + stall_c > 16) ? 10 + stall_c : 16) + (skip_exp ? 0 : 8) + unit_pauses;
        checks += 3;
        if (t1 - t0 != expc) begin
          failures++;
          $display("unit (%0d,%0d): %0d cycles, expected %0d", ux, uy, t1 - t0, expc);
        end
        if (n_out_l != 16) begin failures++; $display("unit (%0d,%0d): %0d luma blocks", ux, uy, n_out_l); end
        if (n_out_c != (skip_exp ? 0 : 8)) begin failures++; $display("unit (%0d,%0d): %0d chroma blocks", ux, uy, n_out_c); end
        if (skip_exp) n_skip++;
        if (ux > 0 && uy > 0) lcu_cyc += t1 - t0;
        n_stall += stall_l + stall_c;
        n_pause += unit_pauses;
      end
    $display("picture of %0d x %0d units: %0d cycles from first start to last done",
             WU, HU, t1 - tfirst);
    if (STALL_1_IN == 0 && PAUSE_1_IN == 0 && B2B != 0) begin
      checks++;
      if (t1 - tfirst != total_exp) begin
        failures++;
        $display("expected %0d cycles", total_exp);
      end
    end
    $display("LCU of units (1..4, 1..4): %0d cycles", lcu_cyc);
    checks++;
    if (lcu_cyc != 16 * 45) begin
      failures++;
      $display("expected 720 cycles for the LCU");
    end
    $display("overlapped read/write cycles=%0d", n_overlap);
    checks++;
    if (n_overlap == 0) failures++;
    $display("mechanisms: strong=%0d weak=%0d chroma=%0d unfiltered=%0d skip=%0d stall=%0d pause=%0d bs0=%0d bs1=%0d bs2=%0d",
             n_strong, n_weak, n_chroma, n_none, n_skip, n_stall, n_pause, n_bs[0], n_bs[1], n_bs[2]);
    if (CHECK_MECH != 0) begin
    checks += 10;
    if (n_strong == 0) failures++;
    if (n_weak == 0) failures++;
    if (n_chroma == 0) failures++;
    if (n_none == 0) failures++;
    if (n_skip == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_pause == 0) failures++;
    if (n_bs[0] == 0) failures++;
    if (n_bs[1] == 0) failures++;
    if (n_bs[2] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
