// Buffer test: all eight buffers read zero after reset, then random writes to
// random P/Q buffers are checked against a model after every cycle.
module tb_dbf_buffers;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, sel_p = 0;
  logic [1:0] row = 0;
  blk_t din = '0;
  blk_t p_buf [4], q_buf [4];
  blk_t mp [4], mq [4];
  int checks = 0, failures = 0;

  dbf_buffers dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      mp[i] = '0; mq[i] = '0;
      checks += 2;
      if (p_buf[i] != '0) failures++;
      if (q_buf[i] != '0) failures++;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom % 2; sel_p = $urandom % 2; row = 2'($urandom % 4);
      din = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (we) begin
        if (sel_p) mp[row] = din; else mq[row] = din;
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (p_buf[i] != mp[i]) failures++;
        if (q_buf[i] != mq[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
