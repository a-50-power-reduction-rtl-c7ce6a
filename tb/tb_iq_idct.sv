// tb_iq_idct: self-checking test of inverse quantisation and 4x4 inverse
// transform. Random MBs with random coded-block patterns (including all-zero
// and all-coded), random QPs for luma and chroma, and coefficient levels that
// are mostly small with occasional large ones. The residual buffer contents are
// compared, sample by sample, with the direct-form reference of
// h264_ref_pkg, and the MB cycle count with 8 cycles per coded block, 5 per
// zero block and 2 of overhead.
module tb_iq_idct;
  import h264_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [5:0] qp_y, qp_c;
  logic [23:0] coded;
  logic [4:0] coef_addr;
  logic [255:0] coef_data;
  logic res_we;
  logic [6:0] res_addr;
  logic [63:0] res_data;
  int checks = 0, failures = 0;

  logic [255:0] cmem [24];
  int res [384];
  int nwr [96];

  iq_idct dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) coef_data <= cmem[coef_addr];
  always @(posedge clk) if (res_we) begin
    for (int j = 0; j < 4; j++) res[word_sample(int'(res_addr), j)] = int'($signed(res_data[j*16 +: 16]));
    nwr[res_addr]++;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; qp_y = 0; qp_c = 0; coded = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 40; mb++) begin
      int cyc, nc, exp_cyc;
      blk16_t c, r;
      qp_y = 6'($urandom_range(0, 51));
      qp_c = 6'($urandom_range(0, 51));
      coded = (mb == 0) ? 24'h0 : (mb == 1) ? 24'hFFFFFF : 24'($urandom);
      for (int b = 0; b < 24; b++)
        for (int k = 0; k < 16; k++) begin
          int v;
          case ($urandom_range(0, 9))
            0, 1, 2, 3: v = 0;
            4, 5, 6, 7: v = $urandom_range(0, 6) - 3;
            8: v = $urandom_range(0, 200) - 100;
            default: v = (qp_y < 20) ? $urandom_range(0, 4000) - 2000 : $urandom_range(0, 60) - 30;
          endcase
          cmem[b][k*16 +: 16] = 16'(v);
        end
      for (int a = 0; a < 96; a++) nwr[a] = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      nc = $countones(coded);
      exp_cyc = 8 * nc + 5 * (24 - nc) + 2;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL MB %0d: %0d cycles, expected %0d", mb, cyc, exp_cyc); end
      for (int a = 0; a < 96; a++) begin
        checks++;
        if (nwr[a] != 1) begin failures++; $display("FAIL word %0d written %0d times", a, nwr[a]); end
      end
      for (int b = 0; b < 24; b++) begin
        for (int k = 0; k < 16; k++) c[k] = coded[b] ? int'($signed(cmem[b][k*16 +: 16])) : 0;
        r = iq_idct_ref(c, (b < 16) ? int'(qp_y) : int'(qp_c));
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            int e;
            e = r[i*4+j];
            e = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
            checks++;
            if (res[block_sample(b, i, j)] != e) begin
              failures++;
              if (failures < 20) $display("FAIL MB %0d blk %0d (%0d,%0d): got %0d exp %0d", mb, b, i, j, res[block_sample(b, i, j)], e);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
