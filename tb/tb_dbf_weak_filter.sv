// Weak (normal) and chroma filter test: random lines, tC and side enables
// against a one-line reference of the HEVC normal and chroma filters.
module tb_dbf_weak_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  pix_t p_in [3], q_in [3], p_out [2], q_out [2];
  logic [4:0] tc;
  logic dep, deq, chroma;
  int checks = 0, failures = 0, n_mod = 0, n_skip = 0;

  dbf_weak_filter dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [3], q [3], t, d, dl, e [4];
    for (int n = 0; n < 20000; n++) begin
      int base, spread;
      base   = int'($urandom % 256);
      spread = (n % 4 == 0) ? 255 : 30;
      for (int i = 0; i < 3; i++) begin
        p[i] = clip(0, 255, base + int'($urandom % (spread + 1)) - spread / 2);
        q[i] = clip(0, 255, base + int'($urandom % (spread + 1)) - spread / 2);
        p_in[i] = pix_t'(p[i]);
        q_in[i] = pix_t'(q[i]);
      end
      t = int'($urandom % 25);
      tc = 5'(t);
      dep = $urandom % 2; deq = $urandom % 2; chroma = ($urandom % 3) == 0;
      #1;
      e[0] = p[0]; e[1] = p[1]; e[2] = q[0]; e[3] = q[1];
      if (chroma) begin
        d = clip(-t, t, (((q[0] - p[0]) * 4 + p[1] - q[1] + 4) >>> 3));
        e[0] = clip(0, 255, p[0] + d);
        e[2] = clip(0, 255, q[0] - d);
      end else begin
        d = (9 * (q[0] - p[0]) - 3 * (q[1] - p[1]) + 8) >>> 4;
        if (iabs(d) < 10 * t) begin
          n_mod++;
          d = clip(-t, t, d);
          e[0] = clip(0, 255, p[0] + d);
          e[2] = clip(0, 255, q[0] - d);
          if (dep) begin
            dl = clip(-(t / 2), t / 2, (((p[2] + p[0] + 1) >>> 1) - p[1] + d) >>> 1);
            e[1] = clip(0, 255, p[1] + dl);
          end
          if (deq) begin
            dl = clip(-(t / 2), t / 2, (((q[2] + q[0] + 1) >>> 1) - q[1] - d) >>> 1);
            e[3] = clip(0, 255, q[1] + dl);
          end
        end else n_skip++;
      end
      checks += 4;
      if (int'(p_out[0]) != e[0]) failures++;
      if (int'(p_out[1]) != e[1]) failures++;
      if (int'(q_out[0]) != e[2]) failures++;
      if (int'(q_out[1]) != e[3]) failures++;
    end
    checks++;
    if (n_mod == 0 || n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
