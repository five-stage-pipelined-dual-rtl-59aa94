// Boundary strength unit test: random and directed edge information against
// the reference rule set (border -> 0, intra -> 2, coefficients -> 1,
// motion-vector difference >= 4 -> 1, else 0).
module tb_dbf_bs_calc;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  edge_info_t info;
  logic [1:0] bs;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  dbf_bs_calc dut (.info, .bs);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int e;
    #1;
    e = ref_bs(info.frame_edge, info.intra_p, info.intra_q, info.coef_p, info.coef_q,
               int'(info.mvp_x), int'(info.mvp_y), int'(info.mvq_x), int'(info.mvq_y));
    checks++;
    seen[e]++;
    if (int'(bs) != e) begin
      failures++;
      if (failures < 10) $display("bs=%0d expected %0d for %p", bs, e, info);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      info = '0;
      info.frame_edge = ($urandom % 6) == 0;
      info.intra_p = ($urandom % 5) == 0;
      info.intra_q = ($urandom % 5) == 0;
      info.coef_p  = ($urandom % 4) == 0;
      info.coef_q  = ($urandom % 4) == 0;
      info.mvp_x = 16'($signed(int'($urandom % 13)) - 6);
      info.mvp_y = 16'($signed(int'($urandom % 13)) - 6);
      info.mvq_x = 16'($signed(int'($urandom % 13)) - 6);
      info.mvq_y = 16'($signed(int'($urandom % 13)) - 6);
      if (n % 50 == 0) begin          // far apart, sign extremes
        info.mvp_x = 16'h7ff0;
        info.mvq_x = 16'h8010;
      end
      info.qp_p = 6'($urandom % 52);
      info.qp_q = 6'($urandom % 52);
      check_one();
    end
    // directed: difference of exactly 3 and 4
    info = '0; info.mvp_y = 16'sd3; check_one();
    if (bs != 2'd0) failures++;
    info = '0; info.mvq_y = -16'sd4; check_one();
    if (bs != 2'd1) failures++;
    checks += 3;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
