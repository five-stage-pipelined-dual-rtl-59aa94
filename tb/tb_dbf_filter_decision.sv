// Filter decision test: random smooth, stepped and textured segments with
// random BS, beta and tC; the mode must match the reference decision and dEp /
// dEq must match the side-activity thresholds whenever filtering is on.
module tb_dbf_filter_decision;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  pix_t p_l0 [4], q_l0 [4], p_l3 [4], q_l3 [4];
  logic [1:0] bs;
  logic [6:0] beta;
  logic [4:0] tc;
  fmode_e mode;
  logic dep, deq;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  dbf_filter_decision dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4][4], q [4][4], b, t, s, em, bp, bq, dpp, dqq;
    for (int n = 0; n < 20000; n++) begin
      int base, step, noise;
      base  = 20 + int'($urandom % 200);
      step  = int'($urandom % 16);
      noise = (n % 4 == 0) ? 20 : int'($urandom % 3);
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < 4; i++) begin
          p[l][i] = clip(0, 255, base + int'($urandom % (noise + 1)));
          q[l][i] = clip(0, 255, base + step + int'($urandom % (noise + 1)));
        end
      for (int i = 0; i < 4; i++) begin
        p_l0[i] = pix_t'(p[0][i]); q_l0[i] = pix_t'(q[0][i]);
        p_l3[i] = pix_t'(p[3][i]); q_l3[i] = pix_t'(q[3][i]);
      end
      s = int'($urandom % 3);
      b = int'($urandom % 65);
      t = int'($urandom % 25);
      bs = 2'(s); beta = 7'(b); tc = 5'(t);
      #1;
      em = ref_luma_seg(p, q, s, b, t);
      seen[em]++;
      checks++;
      if (int'(mode) != em) failures++;
      if (em != M_NONE) begin
        bp = iabs(int'(p_l0[2]) - 2 * int'(p_l0[1]) + int'(p_l0[0])) +
             iabs(int'(p_l3[2]) - 2 * int'(p_l3[1]) + int'(p_l3[0]));
        bq = iabs(int'(q_l0[2]) - 2 * int'(q_l0[1]) + int'(q_l0[0])) +
             iabs(int'(q_l3[2]) - 2 * int'(q_l3[1]) + int'(q_l3[0]));
        dpp = bp < (b + b / 2) / 8;
        dqq = bq < (b + b / 2) / 8;
        checks += 2;
        if (int'(dep) != dpp) failures++;
        if (int'(deq) != dqq) failures++;
      end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("modes: none=%0d weak=%0d strong=%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
