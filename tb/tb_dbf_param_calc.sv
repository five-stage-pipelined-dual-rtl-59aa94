// Parameter calculation test: every BS (0..2), QPp, QPq (0..51) for luma and
// chroma against the literal beta/tC and chroma-QP tables of the reference.
module tb_dbf_param_calc;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic [1:0] bs;
  logic [5:0] qp_p, qp_q;
  logic       chroma;
  logic [6:0] beta;
  logic [4:0] tc;
  int checks = 0, failures = 0;

  dbf_param_calc dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eb, et;
    for (int c = 0; c < 2; c++)
      for (int b = 0; b < 3; b++)
        for (int pp = 0; pp < 52; pp++)
          for (int qq = 0; qq < 52; qq += 1) begin
            bs = 2'(b); qp_p = 6'(pp); qp_q = 6'(qq); chroma = c[0];
            #1;
            ref_params(b, pp, qq, c[0], eb, et);
            checks++;
            if (int'(beta) != eb || int'(tc) != et) begin
              failures++;
              if (failures < 10)
                $display("bs=%0d qp=%0d/%0d chroma=%0d: beta %0d tc %0d, expected %0d %0d",
                         b, pp, qq, c, beta, tc, eb, et);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
