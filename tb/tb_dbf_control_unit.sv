// Control unit test: units started back to back with random input stalls,
// random chroma skip and enable-low pauses. Checks the order of requested and
// written block indices, the length of each phase, the cycle count from start
// to done (45, or 37 in skip mode, plus stall and pause cycles; chroma read
// stalls count only beyond the 16-cycle luma write-out they overlap), that nothing
// moves while dbf_en is low and that a start while disabled is ignored.
module tb_dbf_control_unit;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0, dbf_en = 1, start = 0, in_valid = 0, chroma_skip = 0;
  ctrl_t ctrl;
  logic in_ready, out_valid, busy, done;
  logic [4:0] rd_blk, wr_blk;
  int checks = 0, failures = 0;

  dbf_control_unit dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    checks++;
    if (n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rd, n_wr, n_lh, n_ch, stalls, stall_c, pauses, cyc, n_overlap = 0;
  bit run;

  always @(negedge clk) begin
    in_valid <= ($urandom % 4) != 0;
    dbf_en   <= !(run && ($urandom % 30) == 0);
  end

  always @(posedge clk) if (run) begin
    cyc++;
    if (!dbf_en) begin
      pauses++;
      checks++;
      if (ctrl.phase != PH_IDLE || in_ready || out_valid || ctrl.take) failures++;
    end else begin
      if (ctrl.phase == PH_LLD && !in_valid) stalls++;
      if (ctrl.phase == PH_CLD && !in_valid) stall_c++;
      if (ctrl.take && out_valid) n_overlap++;
      if (ctrl.take) begin
        checks++;
        if (int'(rd_blk) != n_rd) failures++;
        n_rd++;
      end
      if (out_valid) begin
        checks++;
        if (int'(wr_blk) != n_wr) failures++;
        n_wr++;
      end
      if (ctrl.phase == PH_LH) n_lh++;
      if (ctrl.phase == PH_CH) n_ch++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a start while disabled is ignored
    @(negedge clk);
    force dbf_en = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    release dbf_en;
    checks++;
    if (busy) failures++;
    for (int u = 0; u < 40; u++) begin
      @(negedge clk);
      while (!dbf_en) @(negedge clk);
      chroma_skip = ($urandom % 3) == 0;
      n_rd = 0; n_wr = 0; n_lh = 0; n_ch = 0; stalls = 0; stall_c = 0; pauses = 0; cyc = 0;
      start = 1;
      run = 1;
      @(posedge clk);
      if (!dbf_en) begin
        // start was not seen; try again next cycle
        #1 start = 1;
        @(posedge clk iff dbf_en);
      end
      cyc = 0; stalls = 0; stall_c = 0; pauses = 0;
      #1 start = 0;
      @(posedge clk iff done);
      run = 0;
      checks += 6;
      if (cyc != 21 + stalls + ((10 + stall_c > 16) ? 10 + stall_c : 16) + (chroma_skip ? 0 : 8) + pauses) begin
        failures++;
        $display("unit %0d: %0d cycles, stalls %0d pauses %0d skip %0d", u, cyc, stalls, pauses, chroma_skip);
      end
      if (n_rd != 24) failures++;
      if (n_wr != (chroma_skip ? 16 : 24)) failures++;
      if (n_lh != 4) failures++;
      if (n_ch != 2) failures++;
      @(negedge clk);
      if (busy || done) failures++;
    end
    checks++;
    if (n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
