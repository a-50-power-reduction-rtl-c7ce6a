// tb_pred_err_adder: self-checking test of the four-way prediction error
// adder. Fills model predicted-picture and residual memories (1-cycle read
// latency, like the buffer SRAMs) with random values including values that
// clip at 0 and 255, runs several MBs and compares every written word with
// clip(pred + residual). Also checks that every word is written exactly once
// and that an MB takes 96 word cycles plus two cycles of latency (done high
// 98 cycles after start).
module tb_pred_err_adder;
  import h264_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [6:0] pred_addr, res_addr, rec_addr;
  logic [31:0] pred_data, rec_data;
  logic [63:0] res_data;
  logic rec_we;
  int checks = 0, failures = 0;

  logic [31:0] pmem [96];
  logic [63:0] rmem [96];
  int written [96];

  pred_err_adder #(.PAR(4)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    pred_data <= pmem[pred_addr];
    res_data  <= rmem[res_addr];
  end

  always @(posedge clk) if (rec_we) begin
    for (int j = 0; j < 4; j++) begin
      int p, r, e;
      p = int'(pmem[rec_addr][j*8 +: 8]);
      r = int'($signed(rmem[rec_addr][j*16 +: 16]));
      e = clip255(p + r);
      checks++;
      if (int'(rec_data[j*8 +: 8]) != e) begin
        failures++;
        $display("FAIL word %0d sample %0d: got %0d exp %0d", rec_addr, j, rec_data[j*8 +: 8], e);
      end
    end
    written[rec_addr]++;
  end

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
    @(posedge clk);
    checks++; if (done !== 1'b1) begin failures++; $display("FAIL done not high after reset"); end
    for (int mb = 0; mb < 6; mb++) begin
      int cyc;
      for (int a = 0; a < 96; a++) begin
        written[a] = 0;
        for (int j = 0; j < 4; j++) begin
          pmem[a][j*8 +: 8] = 8'($urandom_range(0, 255));
          case ($urandom_range(0, 3))
            0: rmem[a][j*16 +: 16] = 16'($signed(-$urandom_range(0, 600)));
            1: rmem[a][j*16 +: 16] = 16'($urandom_range(0, 600));
            2: rmem[a][j*16 +: 16] = (mb == 5) ? 16'sh8000 : 16'($signed(-$urandom_range(0, 20)));
            default: rmem[a][j*16 +: 16] = (mb == 5) ? 16'sh7FFF : 16'($urandom_range(0, 20));
          endcase
        end
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 98) begin failures++; $display("FAIL MB took %0d cycles, expected 98", cyc); end
      for (int a = 0; a < 96; a++) begin
        checks++;
        if (written[a] != 1) begin failures++; $display("FAIL word %0d written %0d times", a, written[a]); end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
