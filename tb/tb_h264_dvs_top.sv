// tb_h264_dvs_top: end-to-end test of the elastically pipelined decoder core
// with dynamic voltage scaling.
//
// The testbench plays the parts of the stages that the core leaves outside:
// a CABAC decoder (a done level after a random time), the syntax element
// decoder (writes the 24 coefficient matrices and the MB information of each
// MB, reads the MB's binary sequence from the three-bank buffer, presents the
// intra neighbours), the DRAM interface (presents the reference window of each
// inter MB) and the loop filter (reads every reconstructed MB back). A bus-side writer keeps
// the binary sequence buffer filled. Per-MB data are random: intra or inter,
// all Intra_16x16 and chroma modes, all motion vector fractions, random QPs,
// random coded-block patterns
// (uncoded blocks carry junk levels that must be ignored).
//
// Every reconstructed sample is compared with clip(prediction + residual)
// from the reference models; the binary sequence must arrive in order; no
// slot may miss its deadline. Stage times go through light, medium and heavy
// phases so that the DVS controller moves between modes. The test counts, and
// fails on the absence of: processes shorter than the 440-cycle WCEC, zero
// (cancelled) and coded matrices, each intra mode, inter MBs with integer and
// fractional vectors, mode decreases
// and increases, transition holds, frame boundaries, MBs straddling two
// sequence banks, and a full sequence buffer holding off the bus writer.
module tb_h264_dvs_top;
  import dvs_pkg::*;
  import h264_ref_pkg::*;

  localparam int MBS = 4, SLOTS = 5, TT = 300, N_MB = 120;
  localparam int SEQW = 32;

  logic clk = 0, rst_n = 0, run = 0;
  logic start;
  logic cabac_done = 1, sed_done = 1, lf_done = 1;
  logic coef_we = 0;
  logic [4:0] coef_waddr = 0;
  logic [255:0] coef_wdata = 0;
  mb_info_t sed_info = '0;
  logic [20:0][20:0][7:0] ref_y = '0;
  logic [1:0][8:0][8:0][7:0] ref_c = '0;
  logic avail_top = 0, avail_left = 0;
  logic [15:0][7:0] top_y = '0, left_y = '0;
  logic [7:0] tl_y = 0;
  logic [1:0][7:0][7:0] top_c = '0, left_c = '0;
  logic [1:0][7:0] tl_c = '0;
  logic [6:0] lf_raddr = 0;
  logic [31:0] lf_rdata;
  logic seq_wr_en = 0, seq_wr_last = 0, seq_wr_ready;
  logic [SEQW-1:0] seq_wr_data = 0;
  logic seq_mb_start = 0, seq_rd_en = 0, seq_rd_ready;
  logic [SEQW-1:0] seq_rd_data;
  logic [31:0] seq_straddle_cnt;
  dvs_mode_e mode;
  logic [6:0] freq_mhz;
  logic [9:0] vdd_mv;
  logic in_transition;
  logic [15:0] slot_idx;
  logic [31:0] frame_cnt, n_transitions, n_deadline_miss, proc_count;
  logic [15:0] proc_cycles;
  logic over_wcec;

  h264_dvs_top #(.MBS_PER_SLOT(MBS), .SLOTS_PER_FRAME(SLOTS), .T_TRANS(TT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pnum = 0;
  logic [31:0] seen_count = 0;

  // per-MB data
  mb_info_t info [N_MB + 8];
  nbr_t     nbr  [N_MB + 8];
  mb_t      pred [N_MB + 8];
  refwin_t  win  [N_MB + 8];
  mb_t      rec  [N_MB + 8];
  logic [255:0] coefw [N_MB + 8][24];

  // mechanism counters
  int n_inter_int = 0, n_inter_frac = 0;
  int n_short = 0, n_zero_blk = 0, n_coded_blk = 0, n_inter = 0, n_down = 0, n_up = 0;
  int n_trans_cyc = 0, n_checked_mb = 0, n_seq_wr_block = 0;
  int n_lm [4], n_cm [4];
  dvs_mode_e prev_mode = MODE_F4;

  int seq_wr_next = 0, seq_rd_next = 0;

  function automatic int phase_lo(int p);
    int ph;
    ph = (p / (MBS * SLOTS)) % 3;
    return (ph == 0) ? 30 : (ph == 1) ? 120 : 300;
  endfunction
  function automatic int phase_hi(int p);
    int ph;
    ph = (p / (MBS * SLOTS)) % 3;
    return (ph == 0) ? 150 : (ph == 1) ? 260 : 425;
  endfunction

  task automatic gen_mb(int m);
    mb_info_t in;
    blk16_t c, r;
    mb_t res;
    in.is_intra    = ($urandom_range(0, 9) < 6);
    in.luma_mode   = 2'($urandom_range(0, 3));
    in.chroma_mode = 2'($urandom_range(0, 3));
    in.qp_y        = 6'($urandom_range(0, 51));
    in.qp_c        = 6'($urandom_range(0, 39));
    case ($urandom_range(0, 3))
      0: in.coded = 24'h0;
      1: in.coded = 24'($urandom) & 24'($urandom);
      2: in.coded = 24'($urandom);
      default: in.coded = 24'hFFFFFF;
    endcase
    in.mv_frac_x = ($urandom_range(0, 3) == 0) ? 3'd0 : 3'($urandom);
    in.mv_frac_y = ($urandom_range(0, 3) == 0) ? 3'd0 : 3'($urandom);
    info[m] = in;
    nbr[m] = rand_nbr(in.luma_mode == 3 || in.chroma_mode == 3);
    for (int b = 0; b < 24; b++) begin
      for (int k = 0; k < 16; k++) begin
        int v;
        v = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(0, 16) - 8;
        coefw[m][b][k*16 +: 16] = 16'(v);
        c[k] = in.coded[b] ? v : 0;
      end
      r = iq_idct_ref(c, (b < 16) ? int'(in.qp_y) : int'(in.qp_c));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          int e;
          e = r[i*4+j];
          res[block_sample(b, i, j)] = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
        end
    end
    if (in.is_intra) pred[m] = intra_ref(nbr[m], int'(in.luma_mode), int'(in.chroma_mode));
    else begin
      win[m] = rand_refwin();
      pred[m] = inter_ref(win[m], int'(in.mv_frac_x), int'(in.mv_frac_y));
    end
    for (int s = 0; s < 384; s++) rec[m][s] = clip255(pred[m][s] + res[s]);
  endtask

  task automatic cabac_thread(int p);
    int lat;
    cabac_done = 0;
    lat = $urandom_range(phase_lo(p), phase_hi(p));
    repeat (lat) @(negedge clk);
    cabac_done = 1;
  endtask

  task automatic sed_thread(int p);
    int m, lat, n, len;
    m = p - 1;
    sed_done = 0;
    lat = $urandom_range(phase_lo(p), phase_hi(p));
    gen_mb(m);
    sed_info = info[m];
    avail_top = nbr[m].at; avail_left = nbr[m].al;
    for (int i = 0; i < 16; i++) begin top_y[i] = 8'(nbr[m].ty[i]); left_y[i] = 8'(nbr[m].ly[i]); end
    tl_y = 8'(nbr[m].tly);
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 8; i++) begin top_c[k][i] = 8'(nbr[m].tc[k][i]); left_c[k][i] = 8'(nbr[m].lc[k][i]); end
      tl_c[k] = 8'(nbr[m].tlc[k]);
    end
    n = 0;
    for (int b = 0; b < 24; b++) begin
      coef_we = 1; coef_waddr = 5'(b); coef_wdata = coefw[m][b];
      @(negedge clk); n++;
    end
    coef_we = 0;
    // binary sequence of this MB
    len = $urandom_range(1, 24);
    seq_mb_start = 1;
    @(negedge clk); n++;
    seq_mb_start = 0;
    for (int k = 0; k < len; k++) begin
      while (!seq_rd_ready) begin @(negedge clk); n++; end
      seq_rd_en = 1;
      @(negedge clk); n++;
      seq_rd_en = 0;
      checks++;
      if (seq_rd_data != SEQW'(seq_rd_next)) begin
        failures++;
        $display("FAIL binary sequence word %0d read as %0d", seq_rd_next, seq_rd_data);
      end
      seq_rd_next++;
    end
    while (n < lat) begin @(negedge clk); n++; end
    sed_done = 1;
  endtask

  // DRAM interface: loads the reference window of the MB in prediction.
  task automatic refwin_load(int p);
    int m;
    m = p - 2;
    if (m >= 0 && !info[m].is_intra) begin
      for (int r = 0; r < 21; r++) for (int c = 0; c < 21; c++) ref_y[r][c] = 8'(win[m].y[r][c]);
      for (int k = 0; k < 2; k++) for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++)
        ref_c[k][r][c] = 8'(win[m].c[k][r][c]);
    end
  endtask

  task automatic lf_thread(int p);
    int m, lat, n, bad;
    m = p - 4;
    lf_done = 0;
    lat = $urandom_range(phase_lo(p), phase_hi(p));
    n = 0;
    bad = 0;
    if (m >= 0 && m < N_MB) begin
      for (int a = 0; a < 96; a++) begin
        lf_raddr = 7'(a);
        @(negedge clk); n++;           // one-cycle read latency
        for (int j = 0; j < 4; j++) begin
            int e;
            e = rec[m][word_sample(a, j)];
            checks++;
            if (int'(lf_rdata[j*8 +: 8]) != e) begin
              failures++; bad++;
              if (bad < 4) $display("FAIL MB %0d word %0d sample %0d: got %0d exp %0d (intra %0d lm %0d cm %0d)",
                                    m, a, j, lf_rdata[j*8 +: 8], e, info[m].is_intra, info[m].luma_mode, info[m].chroma_mode);
            end
          end
      end
      n_checked_mb++;
      if (info[m].is_intra) begin n_lm[info[m].luma_mode]++; n_cm[info[m].chroma_mode]++; end
      else begin
        n_inter++;
        if (info[m].mv_frac_x[1:0] == 0 && info[m].mv_frac_y[1:0] == 0) n_inter_int++; else n_inter_frac++;
      end
      n_coded_blk += $countones(info[m].coded);
      n_zero_blk  += 24 - $countones(info[m].coded);
    end
    while (n < lat) begin @(negedge clk); n++; end
    lf_done = 1;
  endtask

  // bus-side writer of the binary sequence buffer
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      seq_wr_en = 0; seq_wr_last = 0;
      if (!seq_wr_ready) n_seq_wr_block++;
      else if ($urandom_range(0, 1) == 0) begin
        seq_wr_en = 1;
        seq_wr_data = SEQW'(seq_wr_next);
        seq_wr_last = ($urandom_range(0, 29) == 0);
        seq_wr_next++;
      end
    end
  end

  // process sequencing and statistics
  always @(negedge clk) if (rst_n) begin
    if (proc_count != seen_count) begin   // a start edge has just passed
      seen_count = proc_count;
      pnum++;
      if (pnum > 1 && proc_cycles < 16'(WCEC)) n_short++;
      fork
        cabac_thread(pnum);
        sed_thread(pnum);
        refwin_load(pnum);
        lf_thread(pnum);
      join_none
    end
    if (in_transition) n_trans_cyc++;
    if (mode < prev_mode) n_down++;
    if (mode > prev_mode) n_up++;
    prev_mode = mode;
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin n_lm[k] = 0; n_cm[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    wait (pnum == N_MB + 5);
    repeat (2) @(negedge clk);
    checks++;
    if (n_checked_mb != N_MB) begin failures++; $display("FAIL only %0d MBs checked", n_checked_mb); end
    checks++;
    if (n_deadline_miss != 0) begin failures++; $display("FAIL %0d slot deadlines missed", n_deadline_miss); end
    need("process shorter than WCEC", n_short);
    need("cancelled zero matrix", n_zero_blk);
    need("coded matrix", n_coded_blk);
    for (int k = 0; k < 4; k++) begin
      need($sformatf("intra luma mode %0d", k), n_lm[k]);
      need($sformatf("intra chroma mode %0d", k), n_cm[k]);
    end
    need("inter MB, integer luma vector", n_inter_int);
    need("inter MB, fractional luma vector", n_inter_frac);
    need("mode decrease", n_down);
    need("mode increase", n_up);
    need("transition hold", n_trans_cyc);
    need("frame boundary", int'(frame_cnt));
    need("MB straddling two sequence banks", int'(seq_straddle_cnt));
    need("sequence buffer full", n_seq_wr_block);
    $display("top: %0d MBs checked, %0d processes below WCEC, %0d zero / %0d coded matrices, %0d inter MBs",
             n_checked_mb, n_short, n_zero_blk, n_coded_blk, n_inter);
    $display("top: %0d frames, %0d mode changes (%0d down, %0d up), %0d transition cycles, %0d straddles, writer blocked %0d cycles",
             frame_cnt, n_transitions, n_down, n_up, n_trans_cyc, seq_straddle_cnt, n_seq_wr_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
