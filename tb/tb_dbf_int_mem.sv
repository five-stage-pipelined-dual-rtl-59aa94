// Internal memory test: the four dual-port RAMs are written through both ports
// at distinct random addresses and read back on both ports against a model.
module tb_dbf_int_mem;
  import dbf_pkg::*;

  logic clk = 0;
  logic [3:0] we_a = '0, we_b = '0;
  logic [1:0] addr_a [4], addr_b [4];
  blk_t din_a [4], din_b [4], dout_a [4], dout_b [4];
  blk_t m [4][4];
  int checks = 0, failures = 0;

  dbf_int_mem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < 4; a++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        we_a[r] = 1; addr_a[r] = 2'(a); din_a[r] = {$urandom, $urandom, $urandom, $urandom};
        we_b[r] = 0; addr_b[r] = 2'(a);
        m[r][a] = din_a[r];
      end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        addr_a[r] = 2'($urandom % 4);
        addr_b[r] = 2'($urandom % 4);
        we_a[r] = $urandom % 2;
        we_b[r] = ($urandom % 2) && (addr_b[r] != addr_a[r]);
        din_a[r] = {$urandom, $urandom, $urandom, $urandom};
        din_b[r] = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      for (int r = 0; r < 4; r++) begin
        checks += 2;
        if (dout_a[r] != m[r][addr_a[r]]) failures++;
        if (dout_b[r] != m[r][addr_b[r]]) failures++;
      end
      @(posedge clk);
      for (int r = 0; r < 4; r++) begin
        if (we_a[r]) m[r][addr_a[r]] = din_a[r];
        if (we_b[r]) m[r][addr_b[r]] = din_b[r];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
