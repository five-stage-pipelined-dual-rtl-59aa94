// Control unit: the state machine that sequences one 16x16 unit.
//
// With dbf_en high, a start pulse begins a unit:
//   PH_LLD   16 luma blocks are read (vertical edges V1-V4 filtered on the fly);
//   PH_LH    4 cycles of horizontal luma filtering out of the internal memory;
//   then two activities run side by side, as in the document's cycle chart:
//   the 16 luma blocks are written out (ctrl.lout, one per cycle) while the 8
//   chroma blocks are read (PH_CLD, edges V5/V6) and filtered horizontally
//   (PH_CH, 2 cycles, edges H5/H6); PH_WAIT covers the rest of the luma
//   write-out; PH_COUT writes the 8 chroma blocks out.
// When no chroma edge has BS = 2 nothing in Cb/Cr can change and the chroma
// write-out is skipped (skip mode). done pulses for one cycle at the end.
//
// Interface: the external memory supplies blocks with in_valid/in_ready (one
// 128-bit block per accepted cycle; rd_blk names the block wanted: 0..15 luma
// in column order, 16..19 Cb, 20..23 Cr); out_valid/wr_blk mark each block
// written back, one per cycle, without back-pressure. dbf_en low freezes the
// whole state machine (power save): no block is taken or written and the
// filter unit sees an idle control word.
//
// Cycles from start to done with no input stall: 1 + 16 + 4 + 16 + 8 = 45
// (37 in skip mode). With stalls: 21 + Sl + max(16, 10 + Sc) (+ 8 unless
// skipped), Sl and Sc being the stall cycles of the luma and chroma reads,
// plus any cycles with dbf_en low. The document gives 45 and 35.
module dbf_control_unit
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dbf_en,
  input  logic       start,
  input  logic       in_valid,
  input  logic       chroma_skip,
  output ctrl_t      ctrl,
  output logic       in_ready,
  output logic [4:0] rd_blk,
  output logic       out_valid,
  output logic [4:0] wr_blk,
  output logic       busy,
  output logic       done
);

  phase_e     phase;
  logic [3:0] idx;
  logic       lout;
  logic [3:0] lidx;
  logic       lout_over;  // luma write-out finished or finishing this cycle

  always_comb begin
    in_ready   = dbf_en && (phase == PH_LLD || phase == PH_CLD);
    out_valid  = dbf_en && (lout || phase == PH_COUT);
    rd_blk     = (phase == PH_CLD) ? 5'(16 + idx) : {1'b0, idx};
    wr_blk     = lout ? {1'b0, lidx} : 5'(16 + idx);
    busy       = (phase != PH_IDLE);
    lout_over  = !lout || (lidx == 4'd15);
    ctrl.phase = dbf_en ? phase : PH_IDLE;
    ctrl.idx   = idx;
    ctrl.take  = in_ready && in_valid;
    ctrl.start = dbf_en && (phase == PH_IDLE) && start;
    ctrl.lout  = dbf_en && lout;
    ctrl.lidx  = lidx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      idx   <= '0;
      lout  <= 1'b0;
      lidx  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (dbf_en) begin
        if (lout) begin
          if (lidx == 4'd15) lout <= 1'b0;
          lidx <= lidx + 4'd1;
        end
        unique case (phase)
          PH_IDLE: if (start) begin
            phase <= PH_LLD;
            idx   <= '0;
          end
          PH_LLD: if (in_valid) begin
            if (idx == 4'd15) begin phase <= PH_LH; idx <= '0; end
            else idx <= idx + 4'd1;
          end
          PH_LH:
            if (idx == 4'd3) begin
              phase <= PH_CLD;
              idx   <= '0;
              lout  <= 1'b1;
              lidx  <= '0;
            end else idx <= idx + 4'd1;
          PH_CLD: if (in_valid) begin
            if (idx == 4'd7) begin phase <= PH_CH; idx <= '0; end
            else idx <= idx + 4'd1;
          end
          PH_CH, PH_WAIT:
            if (phase == PH_CH && idx == 4'd0) idx <= 4'd1;
            else begin
              idx <= '0;
              if (!lout_over)       phase <= PH_WAIT;
              else if (chroma_skip) begin phase <= PH_IDLE; done <= 1'b1; end
              else                  phase <= PH_COUT;
            end
          PH_COUT:
            if (idx == 4'd7) begin phase <= PH_IDLE; idx <= '0; done <= 1'b1; end
            else idx <= idx + 4'd1;
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // The chroma passes overwrite internal-memory addresses 0 and 1: the luma
  // columns stored there must already be written out.
  a_v56_after_col0: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.phase == PH_CLD && ctrl.take && idx == 4'd6) |-> (!lout || lidx >= 4'd4));
  a_ch_after_col1: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.phase == PH_CH) |-> (!lout || lidx >= 4'd8));
  // chroma write-out never overlaps the luma write-out
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(lout && phase == PH_COUT));

endmodule
