// tb_dvs_feedback_ctrl_2set: self-checking test of the slot-based DVS feedback
// controller, with small slots (4 MBs, 6 slots per frame, 300-tick
// transitions) so that many decisions happen quickly. A model pipeline issues
// processes whose lengths go through light, medium and heavy phases (all
// within the 440-cycle WCEC) and honours hold. The testbench keeps its own
// time account (ticks of 1/324 MHz per clock of the current mode) and checks:
//   * the controller's time account equals the testbench's;
//   * the first slot of every frame runs in the maximum-frequency mode;
//   * at every slot end the chosen mode is the lowest one whose worst case,
//     with transition allowances, still meets the next slot's deadline;
//   * a mode change holds the pipeline for the transition time;
//   * no slot misses its real-time deadline;
//   * all prepared modes are used (and only those) and the mode goes both
//     down and up.
// This copy runs the two-set configuration (108 and 54 MHz only);
// tb_dvs_feedback_ctrl runs the same checks with all four sets.
module tb_dvs_feedback_ctrl_2set;
  import dvs_pkg::*;

  localparam int MBS = 4, SLOTS = 6, TT = 300;
  localparam int NS = 2;                // prepared frequency/voltage sets
  localparam int SLOT_TICKS = MBS * WCEC * 3;

  logic clk = 0, rst_n = 0, proc_start, all_done, hold, in_transition;
  dvs_mode_e mode;
  logic [6:0] freq_mhz;
  logic [9:0] vdd_mv;
  logic [15:0] slot_idx;
  logic [31:0] frame_cnt, n_transitions, n_deadline_miss, t_now;
  int checks = 0, failures = 0;

  dvs_feedback_ctrl #(.MBS_PER_SLOT(MBS), .SLOTS_PER_FRAME(SLOTS), .T_TRANS(TT), .NUM_SETS(NS)) dut (.*);

  always #5 clk = ~clk;

  // model pipeline
  int remaining = 0, phase_len_lo = 100, phase_len_hi = 200;
  logic run = 0;
  assign all_done = (remaining == 0);
  assign proc_start = run && all_done && !hold;
  always_ff @(posedge clk)
    if (proc_start) remaining <= $urandom_range(phase_len_lo, phase_len_hi) - 1;
    else if (remaining > 0) remaining <= remaining - 1;

  function automatic int per(int k);
    return (k == 0) ? 12 : (k == 1) ? 6 : (k == 2) ? 4 : 3;
  endfunction

  int tb_ticks = 0, starts_in_slot = 0, slot = 0, nframes = 0;
  bit ft = 0, tb_running = 0, last_running = 0, expect_check = 0;
  int exp_mode, mode_before, trans_cycles = 0, n_down = 0, n_up = 0;
  bit seen_mode [4];

  always @(negedge clk) if (rst_n) begin
    // time account (value after the coming edge)
    checks++;
    if (int'(t_now) != tb_ticks) begin
      failures++;
      if (failures < 10) $display("FAIL t_now %0d tb %0d", t_now, tb_ticks);
    end
    if (expect_check) begin
      expect_check = 0;
      checks++;
      if (int'(mode) != exp_mode) begin
        failures++;
        $display("FAIL slot %0d frame %0d: mode %0d expected %0d", slot, nframes, mode, exp_mode);
      end
      if (int'(mode) < mode_before) n_down++;
      if (int'(mode) > mode_before) n_up++;
    end
    seen_mode[mode] = 1;
    if (in_transition) trans_cycles++;
    if (proc_start && starts_in_slot == 0 && slot == 0) begin
      checks++;
      if (mode != MODE_F4) begin failures++; $display("FAIL first slot of a frame not at 108 MHz"); end
    end
    if (proc_start) starts_in_slot++;
    // slot end decision
    if (starts_in_slot == MBS && all_done && !proc_start && last_running) begin
      longint avail;
      int cur;
      cur = int'(mode);
      checks++;
      if (tb_ticks > (slot + 1) * SLOT_TICKS) begin failures++; $display("FAIL deadline missed in slot %0d", slot); end
      mode_before = cur;
      if (slot == SLOTS - 1) exp_mode = 3;
      else begin
        avail = longint'(slot + 2) * SLOT_TICKS - tb_ticks;
        exp_mode = 3;
        for (int k = 0; k <= 2; k++)
          if (exp_mode == 3 && (NS == 4 || k == 1) && longint'(MBS * WCEC * per(k)) + ((k != cur) ? TT : 0) + TT <= avail)
            exp_mode = k;
      end
      expect_check = 1;
      starts_in_slot = 0;
      if (slot == SLOTS - 1) begin slot = 0; nframes++; end else slot++;
      if (slot == 0) begin tb_ticks = 0; ft = (exp_mode != cur); end
      else tb_ticks += per(cur);
    end else begin
      if (!in_transition) ft = 0;
      if (tb_running && !(ft && in_transition)) tb_ticks += per(int'(mode));
    end
    last_running = 1;
    if (proc_start) tb_running = 1;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    for (int ph = 0; ph < 12; ph++) begin
      case (ph % 4)
        0: begin phase_len_lo = 60;  phase_len_hi = 120; end
        1: begin phase_len_lo = 150; phase_len_hi = 250; end
        2: begin phase_len_lo = 380; phase_len_hi = 440; end
        default: begin phase_len_lo = 20; phase_len_hi = 60; end
      endcase
      repeat (4 * SLOTS * MBS) @(posedge proc_start);
    end
    @(negedge clk);
    checks++;
    if (n_deadline_miss != 0) begin failures++; $display("FAIL %0d deadline misses", n_deadline_miss); end
    checks++;
    if (trans_cycles == 0 || n_transitions == 0) begin failures++; $display("FAIL no transition"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (NS == 2 && (k == 0 || k == 2)) begin
        if (seen_mode[k]) begin failures++; $display("FAIL mode %0d used with two sets", k); end
        continue;
      end
      if (!seen_mode[k]) begin failures++; $display("FAIL mode %0d never used", k); end
    end
    checks++;
    if (n_down == 0 || n_up == 0) begin failures++; $display("FAIL mode never went both down (%0d) and up (%0d)", n_down, n_up); end
    checks++;
    if (int'(frame_cnt) != nframes) begin failures++; $display("FAIL frame_cnt %0d vs %0d", frame_cnt, nframes); end
    $display("dvs: %0d frames, %0d transitions (%0d down, %0d up), %0d cycles in transition",
             nframes, n_transitions, n_down, n_up, trans_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
