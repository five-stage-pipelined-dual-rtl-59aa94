// Dual-port RAM of DEPTH words of 128 bits (one 4x4 block per word).
//
// Two independent ports, each with its own address, write enable and data.
// Writes happen at the clock edge; reads are asynchronous, so a word written on
// one port is visible on both ports from the next cycle. Writing the same
// address on both ports in one cycle is not allowed (port B wins).
// The document's internal RAMs are 64 bytes, i.e. DEPTH = 4.
module dbf_dp_ram
  import dbf_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  blk_t                     din_a,
  output blk_t                     dout_a,
  input  logic                     we_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  blk_t                     din_b,
  output blk_t                     dout_b
);

  blk_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

  assign dout_a = mem[addr_a];
  assign dout_b = mem[addr_b];

endmodule
