// tb_intra_pred16: self-checking test of Intra_16x16 luma and intra chroma
// prediction. Every combination of luma mode and chroma mode is run several
// times with random neighbours and random availability (both neighbours for
// plane prediction); all 384 predicted samples are compared with the
// per-sample reference of h264_ref_pkg. The cycle count is checked too: 97
// cycles when both modes only copy pixels, 98 when DC or plane needs the
// preparation cycle.
module tb_intra_pred16;
  import h264_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [1:0] luma_mode, chroma_mode;
  logic avail_top, avail_left;
  logic [15:0][7:0] top_y, left_y;
  logic [7:0] tl_y;
  logic [1:0][7:0][7:0] top_c, left_c;
  logic [1:0][7:0] tl_c;
  logic pred_we;
  logic [6:0] pred_addr;
  logic [31:0] pred_data;
  int checks = 0, failures = 0;
  int got [384];

  intra_pred16 dut (.*);

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
    luma_mode = 0; chroma_mode = 0; avail_top = 0; avail_left = 0;
    top_y = '0; left_y = '0; tl_y = '0; top_c = '0; left_c = '0; tl_c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 64; it++) begin
      nbr_t n;
      mb_t e;
      int lm, cm, cyc, exp_cyc;
      lm = it % 4;
      cm = (it / 4) % 4;
      n = rand_nbr(lm == 3 || cm == 3 || it >= 48);
      if (it >= 32 && it < 40) begin  // flat and extreme neighbours
        for (int i = 0; i < 16; i++) begin n.ty[i] = (i < 8) ? 0 : 255; n.ly[i] = (i < 8) ? 255 : 0; end
      end
      avail_top = n.at; avail_left = n.al;
      for (int i = 0; i < 16; i++) begin top_y[i] = 8'(n.ty[i]); left_y[i] = 8'(n.ly[i]); end
      tl_y = 8'(n.tly);
      for (int k = 0; k < 2; k++) begin
        for (int i = 0; i < 8; i++) begin top_c[k][i] = 8'(n.tc[k][i]); left_c[k][i] = 8'(n.lc[k][i]); end
        tl_c[k] = 8'(n.tlc[k]);
      end
      luma_mode = 2'(lm); chroma_mode = 2'(cm);
      e = intra_ref(n, lm, cm);
      for (int s = 0; s < 384; s++) got[s] = -1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      // neighbours are captured on start: scramble them now
      top_y = '1; left_y = '0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      exp_cyc = (lm >= 2 || cm == 0 || cm == 3) ? 98 : 97;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL it %0d: %0d cycles, expected %0d", it, cyc, exp_cyc); end
      for (int s = 0; s < 384; s++) begin
        checks++;
        if (got[s] != e[s]) begin
          failures++;
          if (failures < 20) $display("FAIL it %0d lm %0d cm %0d sample %0d: got %0d exp %0d", it, lm, cm, s, got[s], e[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
