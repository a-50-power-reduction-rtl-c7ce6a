// dvs_feedback_ctrl: slot-by-slot frequency/voltage selection by feedback.
//
// A frame is divided into SLOTS_PER_FRAME slots of MBS_PER_SLOT MBs (one MB
// per pipeline process). The first slot of every frame runs at the maximum
// frequency. At the end of each slot the controller compares the time used so
// far with the real-time schedule, in which slot s must end by
// (s+1) * T_slot and T_slot = MBS_PER_SLOT * WCEC cycles at 108 MHz. The time
// margin left for the next slot decides its mode: the lowest allowed
// frequency is chosen for which the worst case still fits, that is
//   MBS_PER_SLOT * WCEC * period(mode)
//     + T_TRANS if the mode changes now
//     + T_TRANS if the mode is below the maximum (to be able to return to it)
//   <= deadline of the next slot - time used.
// Because every slot is planned for its worst case, real-time operation holds
// whatever the actual cycle counts turn out to be. A mode change blocks new
// pipeline processes for T_TRANS ticks (the voltage/frequency transition).
// The return to full speed at the end of a frame belongs to the old frame,
// which reserved time for it: the new frame's time starts after it.
//
// Time is kept in ticks of 1/324 MHz: each clock of the decoder adds the
// period of the current mode (3, 4, 6 or 12 ticks). The controller watches
// the pipeline starts (proc_start) and the all-stages-done level (all_done);
// once the last process of a slot has started it raises hold until that
// process has finished and the decision (and any transition) is made.
// Clock generation and the supply regulator are outside this block: mode,
// freq_mhz and vdd_mv tell them what to produce.
//
// From the document: slots per frame (60), the mode table, two or four mode
// sets, the 50 us transition time and the first slot at full speed. The exact
// decision rule, the tick unit and the hold handshake are this design's.
module dvs_feedback_ctrl
  import dvs_pkg::*;
#(
  parameter int unsigned MBS_PER_SLOT    = 136,    // 8160 MBs / 60 slots
  parameter int unsigned SLOTS_PER_FRAME = 60,
  parameter int unsigned T_TRANS         = 16200,  // 50 us in ticks of 1/324 MHz
  parameter int unsigned NUM_SETS        = 4,      // 4: 108/81/54/27 MHz, 2: 108/54 MHz
  parameter int unsigned WCEC_CYC        = WCEC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        proc_start,
  input  logic        all_done,
  output logic        hold,
  output dvs_mode_e   mode,
  output logic [6:0]  freq_mhz,
  output logic [9:0]  vdd_mv,
  output logic        in_transition,
  output logic [15:0] slot_idx,        // slot within the frame
  output logic [31:0] frame_cnt,
  output logic [31:0] n_transitions,
  output logic [31:0] n_deadline_miss,
  output logic [31:0] t_now            // ticks since the frame began
);

  localparam int unsigned SLOT_TICKS = MBS_PER_SLOT * WCEC_CYC * 3;

  logic        running;
  logic [15:0] mb_cnt;
  logic        last_proc;    // last process of the slot has started
  logic [31:0] trans_left;
  logic        frame_trans;  // transition back to full speed at a frame end

  // Mode choice for the next slot, evaluated when the slot ends.
  dvs_mode_e next_mode;
  logic      frame_end;
  always_comb begin
    longint avail, need;
    need = 0;
    frame_end = (32'(slot_idx) == SLOTS_PER_FRAME - 1);
    avail = (longint'(slot_idx) + 2) * longint'(SLOT_TICKS) - longint'(t_now);
    next_mode = MODE_F4;
    if (!frame_end) begin
      for (int k = 2; k >= 0; k--) begin
        if (NUM_SETS == 4 || k == 1) begin
          need = longint'(MBS_PER_SLOT) * longint'(WCEC_CYC) * longint'(mode_period(dvs_mode_e'(k)))
               + ((dvs_mode_e'(k) != mode) ? longint'(T_TRANS) : 0)
               + longint'(T_TRANS);
          if (need <= avail) next_mode = dvs_mode_e'(k);
        end
      end
    end
  end

  assign hold = last_proc || (trans_left != 0);
  assign in_transition = (trans_left != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running         <= 1'b0;
      mb_cnt          <= '0;
      last_proc       <= 1'b0;
      trans_left      <= '0;
      frame_trans     <= 1'b0;
      mode            <= MODE_F4;
      slot_idx        <= '0;
      frame_cnt       <= '0;
      n_transitions   <= '0;
      n_deadline_miss <= '0;
      t_now           <= '0;
    end else begin
      if (running && !frame_trans) t_now <= t_now + 32'(mode_period(mode));
      if (trans_left != 0) begin
        if (trans_left > 32'(mode_period(mode))) begin
          trans_left <= trans_left - 32'(mode_period(mode));
        end else begin
          trans_left  <= '0;
          frame_trans <= 1'b0;
        end
      end

      if (proc_start) begin
        running <= 1'b1;
        if (32'(mb_cnt) == MBS_PER_SLOT - 1) begin
          mb_cnt    <= '0;
          last_proc <= 1'b1;
        end else begin
          mb_cnt <= mb_cnt + 1'b1;
        end
      end

      if (last_proc && all_done) begin
        last_proc <= 1'b0;
        if (t_now > 32'(slot_idx + 1) * 32'(SLOT_TICKS)) n_deadline_miss <= n_deadline_miss + 1'b1;
        if (next_mode != mode) begin
          mode          <= next_mode;
          trans_left    <= T_TRANS;
          n_transitions <= n_transitions + 1'b1;
        end
        if (frame_end) begin
          frame_trans <= (next_mode != mode);
          slot_idx  <= '0;
          frame_cnt <= frame_cnt + 1'b1;
          t_now     <= '0;
        end else begin
          slot_idx <= slot_idx + 1'b1;
        end
      end
    end
  end

  assign freq_mhz = mode_freq_mhz(mode);
  assign vdd_mv   = mode_vdd_mv(mode);

  a_no_start_in_hold: assert property (@(posedge clk) disable iff (!rst_n) hold |-> !proc_start)
    else $error("dvs_feedback_ctrl: pipeline started during a hold");

endmodule
