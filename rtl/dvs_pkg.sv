// dvs_pkg: constants and types shared by the elastically pipelined H.264
// decoder core and its dynamic voltage scaling (DVS) control.
//
// The macroblock (MB) pipeline has six stages, and an MB process is given a
// worst-case budget of 440 cycles at 108 MHz (8,160 MBs per 1920x1088 frame at
// 30 frame/s). The four frequency/voltage operating modes are those of the
// design's SPICE-characterised table: 27/54/81/108 MHz at 0.55/0.70/0.85/1.00 V.
//
// Time in the DVS controller is counted in "ticks" of 1/324 MHz so that one
// clock period of every mode is a whole number of ticks: 12, 6, 4 and 3 ticks
// for 27, 54, 81 and 108 MHz. This tick unit is a choice of this design.
package dvs_pkg;

  localparam int unsigned WCEC          = 440;   // worst-case cycles per MB process
  localparam int unsigned MBS_PER_FRAME = 8160;  // 120 x 68 MBs
  localparam int unsigned NUM_STAGES    = 6;
  localparam int unsigned MB_SAMPLES    = 384;   // 256 luma + 2 x 64 chroma
  localparam int unsigned MB_WORDS      = MB_SAMPLES / 4; // 4 samples per word
  localparam int unsigned TICKS_PER_US  = 324;   // DVS time unit: 1/324 MHz

  // Operating mode; the enum value + 1 is the mode number of the mode table.
  typedef enum logic [1:0] {
    MODE_F1 = 2'd0,  //  27 MHz, 0.55 V
    MODE_F2 = 2'd1,  //  54 MHz, 0.70 V
    MODE_F3 = 2'd2,  //  81 MHz, 0.85 V
    MODE_F4 = 2'd3   // 108 MHz, 1.00 V
  } dvs_mode_e;

  // Stage indices of the MB pipeline (bit positions of the done/start vectors).
  typedef enum logic [2:0] {
    STG_CABAC  = 3'd0,
    STG_SED    = 3'd1,
    STG_IQIDCT = 3'd2,
    STG_PRED   = 3'd3,  // intra or inter prediction, whichever the MB uses
    STG_ADDER  = 3'd4,
    STG_LF     = 3'd5
  } stage_e;

  // Clock period of a mode in ticks of 1/324 MHz.
  function automatic logic [3:0] mode_period(input dvs_mode_e m);
    unique case (m)
      MODE_F1: return 4'd12;
      MODE_F2: return 4'd6;
      MODE_F3: return 4'd4;
      default: return 4'd3;
    endcase
  endfunction

  function automatic logic [6:0] mode_freq_mhz(input dvs_mode_e m);
    unique case (m)
      MODE_F1: return 7'd27;
      MODE_F2: return 7'd54;
      MODE_F3: return 7'd81;
      default: return 7'd108;
    endcase
  endfunction

  function automatic logic [9:0] mode_vdd_mv(input dvs_mode_e m);
    unique case (m)
      MODE_F1: return 10'd550;
      MODE_F2: return 10'd700;
      MODE_F3: return 10'd850;
      default: return 10'd1000;
    endcase
  endfunction

  // Side information the syntax element decoder hands to the reconstruction
  // stages for one MB.
  typedef struct packed {
    logic       is_intra;    // 1: intra MB (intra prediction), 0: inter MB
    logic [1:0] luma_mode;   // Intra_16x16: 0 V, 1 H, 2 DC, 3 plane
    logic [1:0] chroma_mode; // intra chroma: 0 DC, 1 H, 2 V, 3 plane
    logic [5:0] qp_y;        // luma quantisation parameter 0..51
    logic [5:0] qp_c;        // chroma quantisation parameter 0..51
    logic [23:0] coded;      // per 4x4 block: 1 = has non-zero coefficients
    logic [2:0] mv_frac_x;   // inter MB: motion vector bits [2:0] (luma
    logic [2:0] mv_frac_y;   //   quarter / chroma eighth sample fraction)
  } mb_info_t;

endpackage
