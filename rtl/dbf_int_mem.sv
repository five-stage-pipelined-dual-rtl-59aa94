// Internal memory unit: four dual-port RAMs (RAM1..RAM4) of four 128-bit words.
//
// Holds the 16 luma blocks (or 2 x 4 chroma blocks) of a unit between the
// vertical and the horizontal pass, stored transposed. RAM r holds block row r
// of the luma unit and the word address is the block column, so reading one
// address from all four RAMs returns a whole block column in one cycle
// (Fig. 6 of the document). For chroma, RAM1/RAM2 hold the two Cb block rows
// and RAM3/RAM4 the two Cr block rows, addresses 0 and 1 only.
// Each RAM has its own write enables on port A and B and read addresses on
// both ports; reads are asynchronous.
module dbf_int_mem
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic [3:0] we_a,
  input  logic [1:0] addr_a [4],
  input  blk_t       din_a  [4],
  output blk_t       dout_a [4],
  input  logic [3:0] we_b,
  input  logic [1:0] addr_b [4],
  input  blk_t       din_b  [4],
  output blk_t       dout_b [4]
);

  for (genvar r = 0; r < 4; r++) begin : g_ram
    dbf_dp_ram #(.DEPTH(4)) u_ram (
      .clk,
      .we_a (we_a[r]), .addr_a (addr_a[r]), .din_a (din_a[r]), .dout_a (dout_a[r]),
      .we_b (we_b[r]), .addr_b (addr_b[r]), .din_b (din_b[r]), .dout_b (dout_b[r])
    );
  end

endmodule
