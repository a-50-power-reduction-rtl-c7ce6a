// tb_inter_pred: self-checking test of motion-compensated prediction. Every
// one of the 64 fractional motion vector combinations (luma quarter-sample
// positions with chroma eighth-sample positions) is run with a random
// reference window, some windows with only 0/255 pixels to drive the 6-tap
// filter into clipping. All 384 samples are compared with the reference model
// of h264_ref_pkg, which computes the centre position along the other filter
// order and uses the standard's sample letters. The cycle count is checked:
// 97 cycles for an integer luma vector, 161 for a fractional one.
module tb_inter_pred;
  import h264_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [2:0] mv_frac_x = 0, mv_frac_y = 0;
  logic [20:0][20:0][7:0] ref_y = '0;
  logic [1:0][8:0][8:0][7:0] ref_c = '0;
  logic pred_we;
  logic [6:0] pred_addr;
  logic [31:0] pred_data;
  int checks = 0, failures = 0;
  int got [384];

  inter_pred dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (pred_we)
    for (int j = 0; j < 4; j++) got[word_sample(int'(pred_addr), j)] = int'(pred_data[j*8 +: 8]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 128; it++) begin
      refwin_t w;
      mb_t e;
      int mvx, mvy, cyc, exp_cyc;
      mvx = it % 8;
      mvy = (it / 8) % 8;
      w = rand_refwin();
      for (int r = 0; r < 21; r++) for (int c = 0; c < 21; c++) ref_y[r][c] = 8'(w.y[r][c]);
      for (int k = 0; k < 2; k++) for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) ref_c[k][r][c] = 8'(w.c[k][r][c]);
      mv_frac_x = 3'(mvx); mv_frac_y = 3'(mvy);
      e = inter_ref(w, mvx, mvy);
      for (int s = 0; s < 384; s++) got[s] = -1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      mv_frac_x = 3'($urandom); mv_frac_y = 3'($urandom);   // captured on start
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      exp_cyc = (mvx % 4 == 0 && mvy % 4 == 0) ? 97 : 161;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL mv (%0d,%0d): %0d cycles, expected %0d", mvx, mvy, cyc, exp_cyc); end
      for (int s = 0; s < 384; s++) begin
        checks++;
        if (got[s] != e[s]) begin
          failures++;
          if (failures < 20) $display("FAIL mv (%0d,%0d) sample %0d: got %0d exp %0d", mvx, mvy, s, got[s], e[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
