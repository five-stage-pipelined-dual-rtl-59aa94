// Edge filter test: random P/Q 4x4 blocks (smooth, stepped, textured), random
// BS and QP, luma and chroma; both output blocks must equal the reference
// segment filter applied line by line (p_i = P(y,3-i), q_i = Q(y,i)).
module tb_dbf_edge_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  blk_t p_blk, q_blk, p_blk_out, q_blk_out;
  logic [1:0] bs;
  logic [6:0] beta;
  logic [4:0] tc;
  logic chroma;
  fmode_e mode;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  dbf_edge_filter dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4][4], q [4][4], b, t, s, em, qp;
    for (int n = 0; n < 10000; n++) begin
      int base, step, noise;
      base  = 20 + int'($urandom % 200);
      step  = int'($urandom % 20);
      noise = (n % 5 == 0) ? 30 : int'($urandom % 3);
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          p_blk[8*(4*y+x) +: 8] = 8'(clip(0, 255, base + int'($urandom % (noise + 1))));
          q_blk[8*(4*y+x) +: 8] = 8'(clip(0, 255, base + step + int'($urandom % (noise + 1))));
        end
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < 4; i++) begin
          p[l][i] = int'(p_blk[8*(4*l+3-i) +: 8]);
          q[l][i] = int'(q_blk[8*(4*l+i) +: 8]);
        end
      s = int'($urandom % 3);
      chroma = ($urandom % 4) == 0;
      qp = 20 + int'($urandom % 32);
      ref_params(s, qp, qp, chroma, b, t);
      bs = 2'(s); beta = 7'(b); tc = 5'(t);
      #1;
      em = chroma ? ref_chroma_seg(p, q, s, t) : ref_luma_seg(p, q, s, b, t);
      seen[em]++;
      checks += 3;
      if (int'(mode) != em) failures++;
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < 4; i++) begin
          if (int'(p_blk_out[8*(4*l+3-i) +: 8]) != p[l][i]) begin failures++; break; end
          if (int'(q_blk_out[8*(4*l+i) +: 8]) != q[l][i]) begin failures++; break; end
        end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) failures++;
    $display("modes: none=%0d weak=%0d strong=%0d chroma=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
