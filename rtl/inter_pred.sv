// inter_pred: motion-compensated prediction of one MB (16x16 partition).
//
// Luma: the fractional part of the quarter-sample motion vector selects one
// of the 16 sample positions of H.264. Half-sample positions come from the
// 6-tap filter (1, -5, 20, 20, -5, 1); the centre position filters the
// unrounded horizontal half-sample values vertically; quarter-sample
// positions average two neighbouring integer/half-sample values (the 2-tap
// filter). Chroma: bilinear interpolation at 1/8-sample precision with the
// same motion vector (4:2:0).
//
// The integer part of the motion vector is applied by whoever loads the
// reference window: ref_y holds the 21x21 luma pixels whose element [r][c]
// is the reference pixel at (x0 + c - 2, y0 + r - 2), where (x0, y0) is the
// integer-displaced MB position; ref_c holds 9x9 pixels per chroma component
// starting at the integer-displaced chroma position. Both must stay valid
// from start until done.
//
// Timing: the predicted MB is written as 96 words of four samples in the
// layout of the predicted picture buffer (luma y*4 + x/4, Cb 64 + y*2 + x/4,
// Cr 80 + y*2 + x/4). An integer luma vector copies one word per cycle; any
// fractional luma vector takes two cycles per word (first the 6-tap
// intermediates are registered, then the centre and quarter values are
// formed). Chroma words take one cycle each. An MB therefore takes 97 or 161
// cycles, which is the data-dependent cycle count the elastic pipeline
// exploits. Only the 16x16 partition with one motion vector is covered;
// smaller partitions and bi-prediction are not.
module inter_pred (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [2:0]                 mv_frac_x,   // motion vector bits [2:0]
  input  logic [2:0]                 mv_frac_y,
  input  logic [20:0][20:0][7:0]     ref_y,       // [row][column]
  input  logic [1:0][8:0][8:0][7:0]  ref_c,       // [comp][row][column]
  output logic                       done,
  output logic                       pred_we,
  output logic [6:0]                 pred_addr,
  output logic [31:0]                pred_data
);

  typedef enum logic [1:0] {S_IDLE, S_F1, S_WR} state_e;

  state_e     st;
  logic [6:0] addr;
  logic [2:0] fx, fy;
  logic signed [15:0] b1v [6][4];  // unrounded horizontal half samples, rows y-2..y+3
  logic signed [15:0] h1v [5];     // unrounded vertical half samples, columns x..x+4

  function automatic logic [7:0] clip8(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  function automatic int tap6(input int e, input int f, input int g, input int h, input int i, input int j);
    return e - 5 * f + 20 * g + 20 * h - 5 * i + j;
  endfunction

  function automatic int px(input logic [20:0][20:0][7:0] w, input int x, input int y);
    return int'(w[y + 2][x + 2]);   // (x, y) relative to the MB, -2..18
  endfunction

  logic       is_luma, frac_luma;
  logic [3:0] wy, wx0;
  assign is_luma   = (addr < 7'd64);
  assign frac_luma = (fx[1:0] != 2'd0) || (fy[1:0] != 2'd0);
  assign wy  = addr[5:2];
  assign wx0 = {addr[1:0], 2'b00};

  // Stage 1: 6-tap intermediates of the current luma word.
  logic signed [15:0] b1n [6][4];
  logic signed [15:0] h1n [5];
  always_comb begin
    for (int r = 0; r < 6; r++)
      for (int j = 0; j < 4; j++)
        b1n[r][j] = 16'(tap6(px(ref_y, int'(wx0) + j - 2, int'(wy) + r - 2),
                             px(ref_y, int'(wx0) + j - 1, int'(wy) + r - 2),
                             px(ref_y, int'(wx0) + j,     int'(wy) + r - 2),
                             px(ref_y, int'(wx0) + j + 1, int'(wy) + r - 2),
                             px(ref_y, int'(wx0) + j + 2, int'(wy) + r - 2),
                             px(ref_y, int'(wx0) + j + 3, int'(wy) + r - 2)));
    for (int j = 0; j < 5; j++)
      h1n[j] = 16'(tap6(px(ref_y, int'(wx0) + j, int'(wy) - 2),
                        px(ref_y, int'(wx0) + j, int'(wy) - 1),
                        px(ref_y, int'(wx0) + j, int'(wy)),
                        px(ref_y, int'(wx0) + j, int'(wy) + 1),
                        px(ref_y, int'(wx0) + j, int'(wy) + 2),
                        px(ref_y, int'(wx0) + j, int'(wy) + 3)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      addr <= '0;
      fx   <= '0;
      fy   <= '0;
      done <= 1'b1;
      for (int r = 0; r < 6; r++) for (int j = 0; j < 4; j++) b1v[r][j] <= '0;
      for (int j = 0; j < 5; j++) h1v[j] <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          fx   <= mv_frac_x;
          fy   <= mv_frac_y;
          addr <= '0;
          done <= 1'b0;
          st   <= ((mv_frac_x[1:0] != 2'd0) || (mv_frac_y[1:0] != 2'd0)) ? S_F1 : S_WR;
        end
        S_F1: begin
          b1v <= b1n;
          h1v <= h1n;
          st  <= S_WR;
        end
        S_WR: begin
          if (addr == 7'd95) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            st <= (addr < 7'd63 && frac_luma) ? S_F1 : S_WR;
          end
          addr <= addr + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Stage 2: output word.
  always_comb begin
    logic [6:0] ca;
    logic       comp;
    int         cy, cx0;
    int         x, y, G, Gr, Gd, b, h, s, m, jc, A, B, C, D, dx, dy;
    ca   = addr - 7'd64;
    comp = ca[4];
    cy   = int'(ca[3:1]);
    cx0  = int'(ca[0]) * 4;
    pred_data = '0;
    for (int j = 0; j < 4; j++) begin
      {x, y, G, Gr, Gd, b, h, s, m, jc} = '0;
      {A, B, C, D, dx, dy} = '0;
      if (is_luma) begin
        x  = int'(wx0) + j;
        y  = int'(wy);
        G  = px(ref_y, x, y);
        Gr = px(ref_y, x + 1, y);
        Gd = px(ref_y, x, y + 1);
        b  = int'(clip8((int'(b1v[2][j]) + 16) >>> 5));
        s  = int'(clip8((int'(b1v[3][j]) + 16) >>> 5));
        h  = int'(clip8((int'(h1v[j]) + 16) >>> 5));
        m  = int'(clip8((int'(h1v[j + 1]) + 16) >>> 5));
        jc = int'(clip8((tap6(int'(b1v[0][j]), int'(b1v[1][j]), int'(b1v[2][j]),
                              int'(b1v[3][j]), int'(b1v[4][j]), int'(b1v[5][j])) + 512) >>> 10));
        unique case ({fx[1:0], fy[1:0]})
          4'b00_00: pred_data[j*8 +: 8] = 8'(G);
          4'b01_00: pred_data[j*8 +: 8] = 8'((G + b + 1) >> 1);
          4'b10_00: pred_data[j*8 +: 8] = 8'(b);
          4'b11_00: pred_data[j*8 +: 8] = 8'((b + Gr + 1) >> 1);
          4'b00_01: pred_data[j*8 +: 8] = 8'((G + h + 1) >> 1);
          4'b00_10: pred_data[j*8 +: 8] = 8'(h);
          4'b00_11: pred_data[j*8 +: 8] = 8'((h + Gd + 1) >> 1);
          4'b01_01: pred_data[j*8 +: 8] = 8'((b + h + 1) >> 1);
          4'b11_01: pred_data[j*8 +: 8] = 8'((b + m + 1) >> 1);
          4'b01_11: pred_data[j*8 +: 8] = 8'((h + s + 1) >> 1);
          4'b11_11: pred_data[j*8 +: 8] = 8'((m + s + 1) >> 1);
          4'b10_01: pred_data[j*8 +: 8] = 8'((b + jc + 1) >> 1);
          4'b10_11: pred_data[j*8 +: 8] = 8'((jc + s + 1) >> 1);
          4'b01_10: pred_data[j*8 +: 8] = 8'((h + jc + 1) >> 1);
          4'b11_10: pred_data[j*8 +: 8] = 8'((jc + m + 1) >> 1);
          default:  pred_data[j*8 +: 8] = 8'(jc);
        endcase
      end else begin
        x  = cx0 + j;
        y  = cy;
        dx = int'(fx);
        dy = int'(fy);
        A = int'(ref_c[comp][y][x]);
        B = int'(ref_c[comp][y][x + 1]);
        C = int'(ref_c[comp][y + 1][x]);
        D = int'(ref_c[comp][y + 1][x + 1]);
        pred_data[j*8 +: 8] = 8'(((8 - dx) * (8 - dy) * A + dx * (8 - dy) * B +
                                  (8 - dx) * dy * C + dx * dy * D + 32) >> 6);
      end
    end
  end

  assign pred_we   = (st == S_WR);
  assign pred_addr = addr;

endmodule
