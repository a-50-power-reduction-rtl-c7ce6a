// elastic_pipe_ctrl: pipeline controller of the elastic MB pipeline.
//
// Each pipeline stage raises its completion signal (stage_done) when it has
// finished its work for the current pipeline process and holds it until it is
// restarted. When every completion signal is high, the controller issues a
// common start pulse; each stage drops its completion signal on that edge and
// begins the next process. A process therefore lasts as long as its slowest
// stage instead of a fixed worst-case number of cycles (WCEC), which is what
// lets the clock be slowed down afterwards.
//
// Interface: stage_done[i] is a level from stage i (stages come out of reset
// with it high). start is combinational and lasts one cycle; it is held off
// while run is low or hold is high (hold is used for a voltage/frequency
// transition or a stalled external memory transfer). proc_count counts
// starts; proc_cycles is the length in cycles of the last finished process and
// over_wcec flags one that exceeded the WCEC budget.
//
// The handshake is the document's; the hold input, the statistics outputs and
// the reset behaviour (no process running, all stages idle) are this design's.
module elastic_pipe_ctrl
  import dvs_pkg::*;
#(
  parameter int unsigned NSTAGES   = NUM_STAGES,
  parameter int unsigned WCEC_CYC  = WCEC,
  parameter int unsigned CNT_W     = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               hold,
  input  logic [NSTAGES-1:0] stage_done,
  output logic               start,
  output logic [CNT_W-1:0]   proc_count,
  output logic [15:0]        proc_cycles,
  output logic               over_wcec
);

  logic [15:0] cyc;

  assign start = run && !hold && (&stage_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc         <= '0;
      proc_count  <= '0;
      proc_cycles <= '0;
      over_wcec   <= 1'b0;
    end else if (start) begin
      cyc         <= 16'd1;
      proc_count  <= proc_count + 1'b1;
      proc_cycles <= cyc;
      over_wcec   <= (proc_count != '0) && (32'(cyc) > WCEC_CYC);
    end else if (cyc != 16'hFFFF && proc_count != '0) begin
      cyc <= cyc + 1'b1;
    end
  end

  // Every stage must drop its completion signal on the start edge.
  property p_done_drops;
    @(posedge clk) disable iff (!rst_n) start |=> (stage_done == '0);
  endproperty
  a_done_drops: assert property (p_done_drops)
    else $error("elastic_pipe_ctrl: a stage kept its done signal after start");

endmodule
