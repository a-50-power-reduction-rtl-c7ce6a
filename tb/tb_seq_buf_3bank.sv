// tb_seq_buf_3bank: self-checking test of the three-bank binary sequence
// buffer. A bus-side writer pushes a numbered word stream with random gaps
// and occasional early bank closes (wr_last); a decoder-side reader consumes
// "MBs" of random length (1..40 words, so they often cross a bank) with
// random gaps. Checks: words come out in order and unaltered, the writer is
// blocked when all three banks hold unread data, the reader is blocked when
// none is complete, and the straddle count matches a model of which bank each
// MB's words came from. Uses 16-word banks to reach full banks quickly.
module tb_seq_buf_3bank;
  localparam int W = 32, BD = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_last = 0, wr_ready;
  logic [W-1:0] wr_data = 0;
  logic [1:0] wr_bank, rd_bank;
  logic mb_start = 0, rd_en = 0, rd_ready;
  logic [W-1:0] rd_data;
  logic [31:0] straddle_cnt;
  int checks = 0, failures = 0;
  int wr_next = 0, rd_next = 0, n_wr_block = 0, n_rd_block = 0, exp_straddle = 0;
  int bank_of_word [int];   // word number -> bank it was written to
  int cur_bank, wcount;

  seq_buf_3bank #(.WIDTH(W), .BANK_DEPTH(BD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    cur_bank = 0; wcount = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      wr_en = 0; wr_last = 0;
      if (!wr_ready) n_wr_block++;
      if (wr_ready && $urandom_range(0, 3) != 0 && wr_next < 6000) begin
        wr_en = 1;
        wr_data = W'(wr_next);
        wr_last = ($urandom_range(0, 19) == 0);
        bank_of_word[wr_next] = cur_bank;
        wr_next++;
        wcount++;
        if (wr_last || wcount == BD) begin cur_bank = (cur_bank + 1) % 3; wcount = 0; end
      end
    end
  end

  // reader
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(negedge clk);   // let the writer fill all banks first
    while (rd_next < 5900) begin
      int len, first_bank;
      bit str;
      len = $urandom_range(1, 40);
      str = 0;
      @(negedge clk) mb_start = 1;
      @(negedge clk) mb_start = 0;
      for (int k = 0; k < len; k++) begin
        rd_en = 0;
        while (!rd_ready) begin n_rd_block++; @(negedge clk); end
        rd_en = 1;
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_data != W'(rd_next)) begin
          failures++;
          $display("FAIL read %0d got %0d", rd_next, rd_data);
        end
        if (k == 0) first_bank = bank_of_word[rd_next];
        else if (bank_of_word[rd_next] != first_bank) str = 1;
        rd_next++;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      if (str) exp_straddle++;
    end
    @(negedge clk);
    checks++;
    if (int'(straddle_cnt) != exp_straddle) begin failures++; $display("FAIL straddles %0d exp %0d", straddle_cnt, exp_straddle); end
    checks++;
    if (n_wr_block == 0) begin failures++; $display("FAIL writer never blocked"); end
    checks++;
    if (exp_straddle == 0) begin failures++; $display("FAIL no MB straddled banks"); end
    $display("seq_buf: %0d words, %0d straddling MBs, writer blocked %0d cycles, reader blocked %0d cycles",
             rd_next, exp_straddle, n_wr_block, n_rd_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
