// iq_idct: inverse quantisation and 4x4 inverse integer transform for one MB.
//
// An MB carries 24 4x4 coefficient matrices: 16 luma blocks in raster order
// (block b at column b%4, row b/4) followed by 4 Cb and 4 Cr blocks, each in
// raster order inside its 8x8 component. For every block whose coded bit is
// set, the stage reads the 16 coefficient levels, scales them (flat scaling
// as in the Main profile: d = c * v(qp%6, position) << (qp/6)), applies the
// H.264 4x4 inverse integer transform (rows, then columns, then
// (x + 32) >> 6) and writes the 4x4 prediction error block to the residual
// buffer, one row of four samples per cycle. A block whose coded bit is clear
// is a zero matrix: its transform is cancelled and only four rows of zeros are
// written. The cycle count of an MB therefore depends on how many non-zero
// matrices it holds: 8 cycles per coded block, 5 per zero block, plus one.
//
// Interface: start (one cycle) with qp_y, qp_c and coded valid; done is high
// when idle and drops on start. coef_addr selects a block (0..23) and
// coef_data returns its 16 levels one cycle later, level (i,j) in bits
// [(4i+j)*16 +: 16], already in raster (not zig-zag) order. The residual
// buffer word holds four horizontally adjacent 16-bit samples: luma row y,
// words x/4 at address y*4 + x/4; Cb at 64 + y*2 + x/4; Cr at 80 + y*2 + x/4.
//
// The document gives the function (IQ and IDCT on 4x4 matrices, cancelled for
// zero matrices); the schedule, the widths and the buffer layout are this
// design's. The DC transforms of Intra_16x16 luma and of chroma are not part
// of this block: DC levels arrive already in place in each 4x4 matrix.
module iq_idct (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [5:0]   qp_y,
  input  logic [5:0]   qp_c,
  input  logic [23:0]  coded,
  output logic         done,
  output logic [4:0]   coef_addr,
  input  logic [255:0] coef_data,
  output logic         res_we,
  output logic [6:0]   res_addr,
  output logic [63:0]  res_data
);

  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_RD, S_ROW, S_COL, S_WR} state_e;

  state_e             st;
  logic [4:0]         blk;
  logic [1:0]         row;
  logic [5:0]         qpy_q, qpc_q;
  logic [23:0]        coded_q;
  logic signed [31:0] m [16];  // working matrix

  // Scale factor v for qp%6 and position class.
  function automatic logic [4:0] vscale(input logic [2:0] qm, input logic [3:0] pos);
    logic [1:0] cls;  // 0: both even, 1: both odd, 2: mixed
    logic i0, j0;
    i0 = pos[2];      // row index bit 0 (bits 3 and 1 do not affect the class)
    j0 = pos[0];      // column index bit 0
    cls = (!i0 && !j0) ? 2'd0 : (i0 && j0) ? 2'd1 : 2'd2;
    unique case (cls)
      2'd0: case (qm) 0: return 5'd10; 1: return 5'd11; 2: return 5'd13;
                      3: return 5'd14; 4: return 5'd16; default: return 5'd18; endcase
      2'd1: case (qm) 0: return 5'd16; 1: return 5'd18; 2: return 5'd20;
                      3: return 5'd23; 4: return 5'd25; default: return 5'd29; endcase
      default: case (qm) 0: return 5'd13; 1: return 5'd14; 2: return 5'd16;
                      3: return 5'd18; 4: return 5'd20; default: return 5'd23; endcase
    endcase
  endfunction

  // One 1-D inverse transform of four values.
  function automatic logic [127:0] itrans(input logic signed [31:0] a0, input logic signed [31:0] a1,
                                          input logic signed [31:0] a2, input logic signed [31:0] a3);
    logic signed [31:0] e0, e1, e2, e3;
    e0 = a0 + a2;
    e1 = a0 - a2;
    e2 = (a1 >>> 1) - a3;
    e3 = a1 + (a3 >>> 1);
    return {e0 - e3, e1 - e2, e1 + e2, e0 + e3};  // f3, f2, f1, f0
  endfunction

  logic [5:0] qp_cur;
  logic [2:0] qp_mod;
  logic [3:0] qp_div;
  assign qp_cur = (blk < 5'd16) ? qpy_q : qpc_q;
  assign qp_div = 4'(qp_cur / 6);
  assign qp_mod = 3'(qp_cur % 6);

  // vertical 1-D transforms of the four columns of the row-transformed block
  logic [3:0][127:0] colf;
  always_comb begin
    for (int j = 0; j < 4; j++) colf[j] = itrans(m[j], m[4+j], m[8+j], m[12+j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      blk     <= '0;
      row     <= '0;
      qpy_q   <= '0;
      qpc_q   <= '0;
      coded_q <= '0;
      done    <= 1'b1;
      for (int k = 0; k < 16; k++) m[k] <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          qpy_q   <= qp_y;
          qpc_q   <= qp_c;
          coded_q <= coded;
          blk     <= '0;
          done    <= 1'b0;
          st      <= S_NEXT;
        end
        S_NEXT: begin
          row <= '0;
          if (blk == 5'd24) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else if (coded_q[blk]) begin
            st <= S_RD;                      // coef_addr = blk this cycle
          end else begin
            for (int k = 0; k < 16; k++) m[k] <= '0;
            st <= S_WR;                      // zero matrix: transform cancelled
          end
        end
        S_RD: begin                          // inverse quantisation
          for (int k = 0; k < 16; k++)
            m[k] <= ($signed(coef_data[k*16 +: 16]) * $signed({1'b0, vscale(qp_mod, 4'(k))})) <<< qp_div;
          st <= S_ROW;
        end
        S_ROW: begin                         // horizontal 1-D transforms
          for (int i = 0; i < 4; i++)
            {m[i*4+3], m[i*4+2], m[i*4+1], m[i*4+0]} <= itrans(m[i*4+0], m[i*4+1], m[i*4+2], m[i*4+3]);
          st <= S_COL;
        end
        S_COL: begin                         // vertical 1-D transforms and rounding
          for (int j = 0; j < 4; j++) begin
            m[j]    <= ($signed(colf[j][31:0])   + 32) >>> 6;
            m[4+j]  <= ($signed(colf[j][63:32])  + 32) >>> 6;
            m[8+j]  <= ($signed(colf[j][95:64])  + 32) >>> 6;
            m[12+j] <= ($signed(colf[j][127:96]) + 32) >>> 6;
          end
          st <= S_WR;
        end
        S_WR: begin
          row <= row + 1'b1;
          if (row == 2'd3) begin
            blk <= blk + 1'b1;
            st  <= S_NEXT;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign coef_addr = blk;

  // Residual buffer write: row `row` of block `blk`.
  logic [4:0] ci;
  always_comb begin
    ci = blk - 5'd16;
    if (blk < 5'd16)
      res_addr = {1'b0, blk[3:2], row, blk[1:0]};
    else
      res_addr = 7'd64 + {2'd0, ci[2], 4'd0} + 7'({ci[1], row, ci[0]});
    for (int j = 0; j < 4; j++) begin
      logic signed [31:0] v;
      v = m[{row, 2'(j)}];
      if (v > 32767)       res_data[j*16 +: 16] = 16'sh7FFF;
      else if (v < -32768) res_data[j*16 +: 16] = 16'sh8000;
      else                 res_data[j*16 +: 16] = v[15:0];
    end
  end
  assign res_we = (st == S_WR);

endmodule
