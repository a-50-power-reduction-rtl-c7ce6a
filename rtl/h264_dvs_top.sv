// h264_dvs_top: core of the elastically pipelined H.264 decoder with dynamic
// voltage scaling.
//
// Six MB pipeline stages run side by side, each on a different MB:
//   0 CABAC decoding, 1 syntax element decoding (SED), 2 IQ/IDCT,
//   3 intra or inter prediction, 4 prediction error adder, 5 loop filter.
// The elastic pipeline controller starts a new pipeline process as soon as
// all six stages report completion, so a process lasts as long as the slowest
// stage needs for its MB rather than the worst-case 440 cycles. Stages hand
// their results on through two-bank SRAMs that swap on every start: SED ->
// (coefficients) -> IQ/IDCT -> (prediction error) -> adder, prediction ->
// (predicted picture) -> adder -> (reconstructed MB) -> loop filter. The DVS
// controller counts processes into slots, lowers the clock/voltage mode when
// the accumulated time margin allows, and holds the pipeline during a
// transition. A three-bank SRAM carries the CABAC-decoded binary sequences
// from the fixed-voltage bus side to the SED.
//
// Built here: pipeline control, buffers, IQ/IDCT, intra prediction (16x16
// luma and chroma modes), inter prediction (16x16 partition, quarter-sample
// luma and eighth-sample chroma), the four-way prediction error adder and the
// DVS controller. CABAC decoding, SED and the loop filter are not part of this
// RTL: their start/done handshakes and data ports are brought out, as is the
// reference window that the DRAM interface loads for inter prediction, and
// the clock/voltage mode outputs for the clock generator and regulator.
//
// Timing, per pipeline process p (start pulse begins it):
//   * SED fills the coefficient buffer for MB n during p and presents that
//     MB's mb_info on sed_info, and the intra neighbours of MB n on the
//     neighbour ports; all are taken over at the next start.
//   * IQ/IDCT and prediction work on MB n during p+1; for an inter MB the
//     reference window (ref_y, ref_c) must be valid during that process.
//   * The adder reconstructs MB n during p+2; the loop filter reads it
//     through lf_raddr/lf_rdata (one-cycle latency) during p+3.
// The stage assignment of the six stages follows the document's pipeline
// diagram; buffer layouts, handshakes and the exact process timing are this
// design's.
module h264_dvs_top
  import dvs_pkg::*;
#(
  parameter int unsigned MBS_PER_SLOT    = 136,
  parameter int unsigned SLOTS_PER_FRAME = 60,
  parameter int unsigned T_TRANS         = 16200,
  parameter int unsigned NUM_SETS        = 4,
  parameter int unsigned SEQ_WIDTH       = 32,
  parameter int unsigned SEQ_BANK_DEPTH  = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  // pipeline handshake of the stages outside this core
  output logic                 start,
  input  logic                 cabac_done,
  input  logic                 sed_done,
  input  logic                 lf_done,
  // SED results: coefficient levels and MB side information
  input  logic                 coef_we,
  input  logic [4:0]           coef_waddr,
  input  logic [255:0]         coef_wdata,
  input  mb_info_t             sed_info,
  // reference window for inter prediction, loaded from the external DRAM
  input  logic [20:0][20:0][7:0]    ref_y,
  input  logic [1:0][8:0][8:0][7:0] ref_c,
  // intra prediction neighbours
  input  logic                 avail_top,
  input  logic                 avail_left,
  input  logic [15:0][7:0]     top_y,
  input  logic [15:0][7:0]     left_y,
  input  logic [7:0]           tl_y,
  input  logic [1:0][7:0][7:0] top_c,
  input  logic [1:0][7:0][7:0] left_c,
  input  logic [1:0][7:0]      tl_c,
  // reconstructed MB for the loop filter
  input  logic [6:0]           lf_raddr,
  output logic [31:0]          lf_rdata,
  // binary sequence buffer: local bus side and SED side
  input  logic                 seq_wr_en,
  input  logic [SEQ_WIDTH-1:0] seq_wr_data,
  input  logic                 seq_wr_last,
  output logic                 seq_wr_ready,
  input  logic                 seq_mb_start,
  input  logic                 seq_rd_en,
  output logic                 seq_rd_ready,
  output logic [SEQ_WIDTH-1:0] seq_rd_data,
  output logic [31:0]          seq_straddle_cnt,
  // DVS and pipeline status
  output dvs_mode_e            mode,
  output logic [6:0]           freq_mhz,
  output logic [9:0]           vdd_mv,
  output logic                 in_transition,
  output logic [15:0]          slot_idx,
  output logic [31:0]          frame_cnt,
  output logic [31:0]          n_transitions,
  output logic [31:0]          n_deadline_miss,
  output logic [31:0]          proc_count,
  output logic [15:0]          proc_cycles,
  output logic                 over_wcec
);

  logic [NUM_STAGES-1:0] stage_done;
  logic                  hold;
  logic                  iq_done, intra_done, inter_done, add_done, pred_done;
  mb_info_t              info_q;

  // MB information moves from the SED stage to the reconstruction stages.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     info_q <= '0;
    else if (start) info_q <= sed_info;
  end

  assign pred_done = info_q.is_intra ? intra_done : inter_done;

  always_comb begin
    stage_done             = '0;
    stage_done[STG_CABAC]  = cabac_done;
    stage_done[STG_SED]    = sed_done;
    stage_done[STG_IQIDCT] = iq_done;
    stage_done[STG_PRED]   = pred_done;
    stage_done[STG_ADDER]  = add_done;
    stage_done[STG_LF]     = lf_done;
  end

  elastic_pipe_ctrl #(.NSTAGES(NUM_STAGES)) u_ctrl (
    .clk, .rst_n, .run, .hold,
    .stage_done, .start, .proc_count, .proc_cycles, .over_wcec
  );

  dvs_feedback_ctrl #(
    .MBS_PER_SLOT(MBS_PER_SLOT), .SLOTS_PER_FRAME(SLOTS_PER_FRAME),
    .T_TRANS(T_TRANS), .NUM_SETS(NUM_SETS)
  ) u_dvs (
    .clk, .rst_n, .proc_start(start), .all_done(&stage_done), .hold,
    .mode, .freq_mhz, .vdd_mv, .in_transition, .slot_idx, .frame_cnt,
    .n_transitions, .n_deadline_miss, .t_now()
  );

  // ---------------- coefficients: SED -> IQ/IDCT ----------------
  logic [4:0]   coef_raddr;
  logic [255:0] coef_rdata;
  dbuf_sram #(.WIDTH(256), .DEPTH(24)) u_coef_buf (
    .clk, .rst_n, .swap(start),
    .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .raddr(coef_raddr), .rdata(coef_rdata), .wbank()
  );

  // ---------------- IQ/IDCT ----------------
  logic        res_we;
  logic [6:0]  res_waddr, res_raddr;
  logic [63:0] res_wdata, res_rdata;
  iq_idct u_iq_idct (
    .clk, .rst_n, .start,
    .qp_y(sed_info.qp_y), .qp_c(sed_info.qp_c), .coded(sed_info.coded),
    .done(iq_done), .coef_addr(coef_raddr), .coef_data(coef_rdata),
    .res_we, .res_addr(res_waddr), .res_data(res_wdata)
  );

  dbuf_sram #(.WIDTH(64), .DEPTH(MB_WORDS)) u_res_buf (
    .clk, .rst_n, .swap(start),
    .we(res_we), .waddr(res_waddr), .wdata(res_wdata),
    .raddr(res_raddr), .rdata(res_rdata), .wbank()
  );

  // ---------------- prediction ----------------
  logic        intra_we;
  logic [6:0]  intra_addr;
  logic [31:0] intra_data;
  intra_pred16 u_intra (
    .clk, .rst_n, .start(start && sed_info.is_intra),
    .luma_mode(sed_info.luma_mode), .chroma_mode(sed_info.chroma_mode),
    .avail_top, .avail_left, .top_y, .left_y, .tl_y, .top_c, .left_c, .tl_c,
    .done(intra_done), .pred_we(intra_we), .pred_addr(intra_addr), .pred_data(intra_data)
  );

  logic        inter_we;
  logic [6:0]  inter_addr;
  logic [31:0] inter_data;
  inter_pred u_inter (
    .clk, .rst_n, .start(start && !sed_info.is_intra),
    .mv_frac_x(sed_info.mv_frac_x), .mv_frac_y(sed_info.mv_frac_y), .ref_y, .ref_c,
    .done(inter_done), .pred_we(inter_we), .pred_addr(inter_addr), .pred_data(inter_data)
  );

  logic        pw_we;
  logic [6:0]  pw_addr, pred_raddr;
  logic [31:0] pw_data, pred_rdata;
  assign pw_we   = info_q.is_intra ? intra_we   : inter_we;
  assign pw_addr = info_q.is_intra ? intra_addr : inter_addr;
  assign pw_data = info_q.is_intra ? intra_data : inter_data;

  dbuf_sram #(.WIDTH(32), .DEPTH(MB_WORDS)) u_pred_buf (
    .clk, .rst_n, .swap(start),
    .we(pw_we), .waddr(pw_addr), .wdata(pw_data),
    .raddr(pred_raddr), .rdata(pred_rdata), .wbank()
  );

  // ---------------- prediction error adder ----------------
  logic        rec_we;
  logic [6:0]  rec_waddr;
  logic [31:0] rec_wdata;
  pred_err_adder #(.PAR(4)) u_adder (
    .clk, .rst_n, .start, .done(add_done),
    .pred_addr(pred_raddr), .pred_data(pred_rdata),
    .res_addr(res_raddr), .res_data(res_rdata),
    .rec_we, .rec_addr(rec_waddr), .rec_data(rec_wdata)
  );

  dbuf_sram #(.WIDTH(32), .DEPTH(MB_WORDS)) u_rec_buf (
    .clk, .rst_n, .swap(start),
    .we(rec_we), .waddr(rec_waddr), .wdata(rec_wdata),
    .raddr(lf_raddr), .rdata(lf_rdata), .wbank()
  );

  // ---------------- binary sequence buffer ----------------
  seq_buf_3bank #(.WIDTH(SEQ_WIDTH), .BANK_DEPTH(SEQ_BANK_DEPTH)) u_seq_buf (
    .clk, .rst_n,
    .wr_en(seq_wr_en), .wr_data(seq_wr_data), .wr_last(seq_wr_last),
    .wr_ready(seq_wr_ready), .wr_bank(),
    .mb_start(seq_mb_start), .rd_en(seq_rd_en), .rd_ready(seq_rd_ready),
    .rd_data(seq_rd_data), .rd_bank(), .straddle_cnt(seq_straddle_cnt)
  );

endmodule
