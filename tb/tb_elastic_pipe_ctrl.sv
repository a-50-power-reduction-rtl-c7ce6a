// tb_elastic_pipe_ctrl: self-checking test of the elastic pipeline
// controller with six model stages. For every pipeline process each stage
// draws a random processing time (1..WCEC); a stage raises its done level that
// many cycles after the start and drops it on start. The test checks that:
//   * a process lasts as long as its slowest stage plus the one handover
//     cycle in which start is issued (the common idle cycles of a fixed-WCEC
//     pipeline disappear), plus any cycles held, and proc_cycles reports it;
//   * the total over all processes equals the sum of per-process maxima
//     (the elastic pipeline's execution-cycle formula);
//   * no start is issued while hold or !run is asserted;
//   * over_wcec flags a process longer than WCEC.
module tb_elastic_pipe_ctrl;
  import dvs_pkg::*;

  localparam int M = 6;
  logic clk = 0, rst_n = 0, run = 0, hold = 0;
  logic [M-1:0] stage_done;
  logic start;
  logic [31:0] proc_count;
  logic [15:0] proc_cycles;
  logic over_wcec;
  int checks = 0, failures = 0;

  int lat [M];
  int cnt [M];
  int prev_gap, held, cur_max, last_start_cyc, cyc, total_cyc, total_exp, nproc;
  bit force_long;

  elastic_pipe_ctrl #(.NSTAGES(M)) dut (.*);

  always #5 clk = ~clk;

  // Stage models
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_done <= '1;
      for (int i = 0; i < M; i++) cnt[i] <= 0;
    end else begin
      for (int i = 0; i < M; i++) begin
        if (start) begin
          stage_done[i] <= 1'b0;
          cnt[i] <= lat[i];
        end else if (cnt[i] > 0) begin
          cnt[i] <= cnt[i] - 1;
          if (cnt[i] == 1) stage_done[i] <= 1'b1;
        end
      end
    end
  end

  // Draw the next process's latencies when a start is issued.
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (start) begin
      if (nproc > 0) begin
        checks++;
        if (cyc - last_start_cyc != cur_max + 1 + held) begin
          failures++;
          $display("FAIL process %0d lasted %0d cycles, slowest stage %0d, held %0d", nproc, cyc - last_start_cyc, cur_max, held);
        end
        checks++;
        if (int'(proc_cycles) != prev_gap && nproc > 1) begin
          failures++;
          $display("FAIL proc_cycles %0d", proc_cycles);
        end
        prev_gap = cyc - last_start_cyc;
        total_cyc += cyc - last_start_cyc;
        total_exp += cur_max + 1 + held;
      end
      held = 0;
      last_start_cyc = cyc;
      nproc++;
      cur_max = 0;
      for (int i = 0; i < M; i++) begin
        lat[i] = $urandom_range(1, (i == 4) ? 98 : WCEC);
        if (force_long && i == 2) lat[i] = WCEC + 7;
        if (lat[i] > cur_max) cur_max = lat[i];
      end
    end
    if (&stage_done && hold) held++;
    if (start && (hold || !run)) begin
      failures++;
      $display("FAIL start while held");
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_cycles;
    held = 0; cyc = 0; nproc = 0; total_cyc = 0; total_exp = 0; force_long = 0;
    for (int i = 0; i < M; i++) lat[i] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (proc_count != 0) begin failures++; $display("FAIL started without run"); end
    run = 1;
    // 200 processes with random holds
    while (nproc < 200) begin
      @(negedge clk);
      hold = ($urandom_range(0, 99) < 5);
      if (start) begin
        seen_cycles = int'(proc_cycles);
      end
    end
    hold = 0;
    // proc_cycles reports the length of the previous process
    @(negedge clk);
    while (!start) @(negedge clk);
    @(negedge clk);
    // a process that exceeds the WCEC budget
    force_long = 1;
    while (!start) @(negedge clk);
    @(negedge clk);
    force_long = 0;
    while (!start) @(negedge clk);
    @(negedge clk);
    checks++;
    if (!over_wcec || int'(proc_cycles) != WCEC + 8 + 0) begin
      failures++;
      $display("FAIL over_wcec=%0d proc_cycles=%0d", over_wcec, proc_cycles);
    end
    while (!start) @(negedge clk);
    @(negedge clk);
    checks++;
    if (over_wcec) begin failures++; $display("FAIL over_wcec stuck"); end
    checks++;
    if (total_cyc != total_exp) begin failures++; $display("FAIL total %0d != %0d", total_cyc, total_exp); end
    checks++;
    if (proc_count != 32'(nproc)) begin failures++; $display("FAIL proc_count %0d != %0d", proc_count, nproc); end
    $display("elastic: %0d processes, %0d cycles, fixed-WCEC pipeline would need %0d", nproc, total_cyc, (nproc - 1) * WCEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
