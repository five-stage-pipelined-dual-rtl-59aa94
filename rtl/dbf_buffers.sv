// Pixel block buffers P1..P4 and Q1..Q4 of the filter unit.
//
// Eight 128-bit registers, each holding one 4x4 block, cleared to zero at
// reset as the document states. One block can be written per cycle: sel_p
// chooses the P or Q bank and row (0..3) the buffer within it (P1 = row 0).
// Reads are continuous. Fig. 5 of the document maps 4x4 blocks to these
// buffers: even block columns of a unit go to Q, odd ones to P.
module dbf_buffers
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic       sel_p,
  input  logic [1:0] row,
  input  blk_t       din,
  output blk_t       p_buf [4],
  output blk_t       q_buf [4]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        p_buf[i] <= '0;
        q_buf[i] <= '0;
      end
    end else if (we) begin
      if (sel_p) p_buf[row] <= din;
      else       q_buf[row] <= din;
    end
  end

endmodule
