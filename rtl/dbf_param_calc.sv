// Parameter calculation unit: beta and tC of one edge.
//
// A look-up on the average QP of the P and Q blocks, as the document describes
// (inputs BS, QPp, QPq; outputs beta and tC). The tables are those of the HEVC
// standard for 8-bit video:
//   qPL    = (QPq + QPp + 1) >> 1
//   beta'  = 0 for Q < 16, Q - 10 for 16 <= Q <= 28, 2*Q - 38 for Q >= 29,
//            with Q = clip(0, 51, qPL)
//   tC'    = tC table at Q = clip(0, 53, qPL + 2*(BS-1)) (BS >= 1)
// For chroma edges (chroma = 1) qPL is first mapped through the 4:2:0 chroma QP
// table (identity below 30, compressed from 30 to 43, QP-6 above 43), and BS is 2.
// Slice beta/tC offsets and chroma QP offsets are taken as zero. Combinational.
module dbf_param_calc
  import dbf_pkg::*;
(
  input  logic [1:0] bs,
  input  logic [5:0] qp_p,
  input  logic [5:0] qp_q,
  input  logic       chroma,
  output logic [6:0] beta,
  output logic [4:0] tc
);

  // tC' for Q = 18..53 (zero below 18).
  function automatic logic [4:0] tc_table(int q);
    case (q)
      18, 19, 20, 21, 22, 23, 24, 25, 26: return 5'd1;
      27, 28, 29, 30:                     return 5'd2;
      31, 32, 33, 34:                     return 5'd3;
      35, 36, 37:                         return 5'd4;
      38, 39:                             return 5'd5;
      40, 41:                             return 5'd6;
      42: return 5'd7;
      43: return 5'd8;
      44: return 5'd9;
      45: return 5'd10;
      46: return 5'd11;
      47: return 5'd13;
      48: return 5'd14;
      49: return 5'd16;
      50: return 5'd18;
      51: return 5'd20;
      52: return 5'd22;
      53: return 5'd24;
      default: return 5'd0;
    endcase
  endfunction

  function automatic logic [5:0] chroma_qp(logic [5:0] qpi);
    if (qpi < 6'd30)      return qpi;
    else if (qpi > 6'd43) return qpi - 6'd6;
    else case (qpi)
      6'd30: return 6'd29; 6'd31: return 6'd30; 6'd32: return 6'd31; 6'd33: return 6'd32;
      6'd34: return 6'd33; 6'd35: return 6'd33; 6'd36: return 6'd34; 6'd37: return 6'd34;
      6'd38: return 6'd35; 6'd39: return 6'd35; 6'd40: return 6'd36; 6'd41: return 6'd36;
      6'd42: return 6'd37; default: return 6'd37;
    endcase
  endfunction

  logic [6:0] sum;
  logic [5:0] qpl, qb;
  logic [6:0] qt;

  always_comb begin
    sum = 7'(qp_p) + 7'(qp_q) + 7'd1;
    qpl = sum[6:1];
    if (chroma) qpl = chroma_qp(qpl);
    qb = (qpl > 6'd51) ? 6'd51 : qpl;
    if (qb < 6'd16)       beta = 7'd0;
    else if (qb <= 6'd28) beta = 7'(qb - 6'd10);
    else                  beta = 7'({qb, 1'b0} - 7'd38);
    // qPL + 2*(BS-1), clipped to 0..53
    if (bs == 2'd2)      qt = 7'(qpl) + 7'd2;
    else                 qt = 7'(qpl);
    if (qt > 7'd53) qt = 7'd53;
    tc = (bs == 2'd0) ? 5'd0 : tc_table(int'(qt));
  end

endmodule
