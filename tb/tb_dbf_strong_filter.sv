// Strong filter test: random lines and tC against the direct HEVC strong-filter
// equations (no shared terms), including the +-2tC clipping.
module tb_dbf_strong_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  pix_t p_in [4], q_in [4], p_out [3], q_out [3];
  logic [4:0] tc;
  int checks = 0, failures = 0;

  dbf_strong_filter dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4], q [4], t, e [6];
    for (int n = 0; n < 20000; n++) begin
      int base;
      base = int'($urandom % 256);
      for (int i = 0; i < 4; i++) begin
        p[i] = (n % 3 == 0) ? int'($urandom % 256) : clip(0, 255, base + int'($urandom % 21) - 10);
        q[i] = (n % 3 == 0) ? int'($urandom % 256) : clip(0, 255, base + int'($urandom % 21) - 10);
        p_in[i] = pix_t'(p[i]);
        q_in[i] = pix_t'(q[i]);
      end
      t = int'($urandom % 25);
      tc = 5'(t);
      #1;
      e[0] = clip(p[0] - 2*t, p[0] + 2*t, (p[2] + 2*p[1] + 2*p[0] + 2*q[0] + q[1] + 4) >> 3);
      e[1] = clip(p[1] - 2*t, p[1] + 2*t, (p[2] + p[1] + p[0] + q[0] + 2) >> 2);
      e[2] = clip(p[2] - 2*t, p[2] + 2*t, (2*p[3] + 3*p[2] + p[1] + p[0] + q[0] + 4) >> 3);
      e[3] = clip(q[0] - 2*t, q[0] + 2*t, (p[1] + 2*p[0] + 2*q[0] + 2*q[1] + q[2] + 4) >> 3);
      e[4] = clip(q[1] - 2*t, q[1] + 2*t, (p[0] + q[0] + q[1] + q[2] + 2) >> 2);
      e[5] = clip(q[2] - 2*t, q[2] + 2*t, (p[0] + q[0] + q[1] + 3*q[2] + 2*q[3] + 4) >> 3);
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if (int'(p_out[i]) != e[i])   failures++;
        if (int'(q_out[i]) != e[3+i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
