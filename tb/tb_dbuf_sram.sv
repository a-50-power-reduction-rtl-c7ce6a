// tb_dbuf_sram: self-checking test of the two-bank double buffer. Over a
// series of pipeline processes the producer writes a fresh random block into
// the write bank while the consumer reads back, in random order, the block
// written during the previous process; a swap pulse separates processes. The
// test checks every read word (one-cycle read latency), that writes never
// disturb the bank being read, and that wbank toggles on every swap.
module tb_dbuf_sram;
  localparam int W = 32, D = 96;
  logic clk = 0, rst_n = 0, swap = 0, we = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic wbank;
  int checks = 0, failures = 0;
  logic [W-1:0] cur [D], prev [D];

  dbuf_sram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_bank;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_bank = 0;
    for (int p = 0; p < 8; p++) begin
      for (int a = 0; a < D; a++) cur[a] = W'($urandom);
      // write all of cur and read all of prev, interleaved, in one process
      for (int a = 0; a < D; a++) begin
        int ra;
        ra = $urandom_range(0, D - 1);
        @(negedge clk);
        we = 1; waddr = 7'(a); wdata = cur[a]; raddr = 7'(ra);
        @(negedge clk);
        we = 0;
        if (p > 0) begin
          checks++;
          if (rdata != prev[ra]) begin
            failures++;
            $display("FAIL process %0d addr %0d: got %h exp %h", p, ra, rdata, prev[ra]);
          end
        end
      end
      checks++;
      if (wbank != exp_bank) begin failures++; $display("FAIL wbank %0d", wbank); end
      @(negedge clk) swap = 1;
      @(negedge clk) swap = 0;
      exp_bank = ~exp_bank;
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
