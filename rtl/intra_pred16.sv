// intra_pred16: intra prediction of one MB from its neighbouring pixels.
//
// Predicts the 16x16 luma block with one of the four Intra_16x16 modes
// (0 vertical, 1 horizontal, 2 DC, 3 plane) and both 8x8 chroma blocks with
// one of the four intra chroma modes (0 DC, 1 horizontal, 2 vertical,
// 3 plane), as H.264 defines them, and writes the 384 predicted samples to the
// predicted picture buffer, four horizontally adjacent samples per word, in
// the same layout as the residual buffer (luma y*4 + x/4, Cb 64 + y*2 + x/4,
// Cr 80 + y*2 + x/4).
//
// Vertical and horizontal prediction only copy pixels, so they start writing
// in the cycle after start; DC and plane need the neighbour sums and plane
// gradients first, which take one extra cycle. An MB takes 97 (copy modes) or
// 98 cycles, after which done rises again.
//
// Interface: start (one cycle) with the modes, availability flags and the
// neighbours valid; they are captured on start. top_* are the pixels of the
// row above (index = x), left_* the column to the left (index = y), tl_* the
// pixel above-left. Plane prediction assumes both neighbours are available,
// as the standard requires of the encoder.
//
// The document names the intra modes and notes that copy modes need no
// calculation while DC needs a filter; the datapath, schedule and the choice
// to cover the 16x16 luma and chroma modes (not the nine 4x4 luma modes) are
// this design's.
module intra_pred16 (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [1:0]         luma_mode,
  input  logic [1:0]         chroma_mode,
  input  logic               avail_top,
  input  logic               avail_left,
  input  logic [15:0][7:0]   top_y,
  input  logic [15:0][7:0]   left_y,
  input  logic [7:0]         tl_y,
  input  logic [1:0][7:0][7:0] top_c,   // [0] Cb, [1] Cr
  input  logic [1:0][7:0][7:0] left_c,
  input  logic [1:0][7:0]    tl_c,
  output logic               done,
  output logic               pred_we,
  output logic [6:0]         pred_addr,
  output logic [31:0]        pred_data
);

  typedef enum logic [1:0] {S_IDLE, S_PREP, S_WR} state_e;

  state_e             st;
  logic [6:0]         addr;
  logic [1:0]         lmode, cmode;
  logic               at, al;
  logic [15:0][7:0]   ty, ly;
  logic [7:0]         tly;
  logic [1:0][7:0][7:0] tc, lc;
  logic [1:0][7:0]    tlc;

  // Values prepared in S_PREP
  logic [7:0]              dc_y;
  logic [1:0][3:0][7:0]    dc_c;       // [comp][block 0..3 raster]
  logic signed [19:0]      pa_y, pb_y, pc_y;
  logic signed [19:0]      pa_c [2], pb_c [2], pc_c [2];

  function automatic logic [7:0] clip1(input logic signed [31:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  // Chroma DC of 4x4 block k (raster in 8x8) of one component.
  function automatic logic [7:0] chroma_dc(input logic [1:0] k, input logic a_t, input logic a_l,
                                           input logic [7:0][7:0] t, input logic [7:0][7:0] l);
    logic [10:0] st4, sl4;
    logic xo, yo;
    xo = k[0];
    yo = k[1];
    st4 = '0;
    sl4 = '0;
    for (int i = 0; i < 4; i++) begin
      st4 += 11'(t[{xo, 2'(i)}]);
      sl4 += 11'(l[{yo, 2'(i)}]);
    end
    if (xo == yo) begin
      if (a_t && a_l) return 8'((st4 + sl4 + 11'd4) >> 3);
      if (a_l)        return 8'((sl4 + 11'd2) >> 2);
      if (a_t)        return 8'((st4 + 11'd2) >> 2);
      return 8'd128;
    end else if (xo) begin
      if (a_t)        return 8'((st4 + 11'd2) >> 2);
      if (a_l)        return 8'((sl4 + 11'd2) >> 2);
      return 8'd128;
    end else begin
      if (a_l)        return 8'((sl4 + 11'd2) >> 2);
      if (a_t)        return 8'((st4 + 11'd2) >> 2);
      return 8'd128;
    end
  endfunction

  // Combinational preparation from the captured neighbours.
  logic [7:0]         dc_y_n;
  logic signed [19:0] hy, vy, hc [2], vc [2];
  always_comb begin
    logic [12:0] s_t, s_l;
    s_t = '0;
    s_l = '0;
    for (int i = 0; i < 16; i++) begin
      s_t += 13'(ty[i]);
      s_l += 13'(ly[i]);
    end
    if (at && al)  dc_y_n = 8'((s_t + s_l + 13'd16) >> 5);
    else if (at)   dc_y_n = 8'((s_t + 13'd8) >> 4);
    else if (al)   dc_y_n = 8'((s_l + 13'd8) >> 4);
    else           dc_y_n = 8'd128;
    hy = '0;
    vy = '0;
    for (int i = 0; i < 8; i++) begin
      logic [7:0] pt, pl;
      pt = (i == 7) ? tly : ty[6-i];
      pl = (i == 7) ? tly : ly[6-i];
      hy += 20'(i + 1) * ($signed({12'd0, ty[8+i]}) - $signed({12'd0, pt}));
      vy += 20'(i + 1) * ($signed({12'd0, ly[8+i]}) - $signed({12'd0, pl}));
    end
    for (int c = 0; c < 2; c++) begin
      hc[c] = '0;
      vc[c] = '0;
      for (int i = 0; i < 4; i++) begin
        logic [7:0] pt, pl;
        pt = (i == 3) ? tlc[c] : tc[c][2-i];
        pl = (i == 3) ? tlc[c] : lc[c][2-i];
        hc[c] += 20'(i + 1) * ($signed({12'd0, tc[c][4+i]}) - $signed({12'd0, pt}));
        vc[c] += 20'(i + 1) * ($signed({12'd0, lc[c][4+i]}) - $signed({12'd0, pl}));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      addr  <= '0;
      done  <= 1'b1;
      lmode <= '0;
      cmode <= '0;
      at    <= 1'b0;
      al    <= 1'b0;
      ty    <= '0;
      ly    <= '0;
      tly   <= '0;
      tc    <= '0;
      lc    <= '0;
      tlc   <= '0;
      dc_y  <= '0;
      dc_c  <= '0;
      pa_y  <= '0;
      pb_y  <= '0;
      pc_y  <= '0;
      for (int c = 0; c < 2; c++) begin
        pa_c[c] <= '0;
        pb_c[c] <= '0;
        pc_c[c] <= '0;
      end
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          lmode <= luma_mode;
          cmode <= chroma_mode;
          at    <= avail_top;
          al    <= avail_left;
          ty    <= top_y;
          ly    <= left_y;
          tly   <= tl_y;
          tc    <= top_c;
          lc    <= left_c;
          tlc   <= tl_c;
          addr  <= '0;
          done  <= 1'b0;
          // copy modes (luma V/H with chroma H/V) need no preparation
          st    <= (luma_mode[1] || chroma_mode == 2'd0 || chroma_mode == 2'd3) ? S_PREP : S_WR;
        end
        S_PREP: begin
          dc_y <= dc_y_n;
          for (int c = 0; c < 2; c++)
            for (int k = 0; k < 4; k++)
              dc_c[c][k] <= chroma_dc(2'(k), at, al, tc[c], lc[c]);
          pa_y <= 20'(16 * (int'(ly[15]) + int'(ty[15])));
          pb_y <= (5 * hy + 32) >>> 6;
          pc_y <= (5 * vy + 32) >>> 6;
          for (int c = 0; c < 2; c++) begin
            pa_c[c] <= 20'(16 * (int'(lc[c][7]) + int'(tc[c][7])));
            pb_c[c] <= (34 * hc[c] + 32) >>> 6;
            pc_c[c] <= (34 * vc[c] + 32) >>> 6;
          end
          st <= S_WR;
        end
        S_WR: begin
          if (addr == 7'd95) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end
          addr <= addr + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Sample generation for word `addr`.
  always_comb begin
    logic [6:0] ca;
    logic       comp;
    logic [3:0] y;
    logic [3:0] x0;
    ca = addr - 7'd64;
    comp = ca[4];
    for (int j = 0; j < 4; j++) pred_data[j*8 +: 8] = 8'd0;
    if (addr < 7'd64) begin
      y  = addr[5:2];
      x0 = {addr[1:0], 2'b00};
      for (int j = 0; j < 4; j++) begin
        unique case (lmode)
          2'd0: pred_data[j*8 +: 8] = ty[x0 + 4'(j)];
          2'd1: pred_data[j*8 +: 8] = ly[y];
          2'd2: pred_data[j*8 +: 8] = dc_y;
          default: pred_data[j*8 +: 8] =
            clip1((32'(pa_y) + 32'(pb_y) * (int'(x0) + j - 7) + 32'(pc_y) * (int'(y) - 7) + 16) >>> 5);
        endcase
      end
    end else begin
      y  = {1'b0, ca[3:1]};
      x0 = {1'b0, ca[0], 2'b00};
      for (int j = 0; j < 4; j++) begin
        unique case (cmode)
          2'd0: pred_data[j*8 +: 8] = dc_c[comp][{y[2], ca[0]}];
          2'd1: pred_data[j*8 +: 8] = lc[comp][y[2:0]];
          2'd2: pred_data[j*8 +: 8] = tc[comp][x0[2:0] + 3'(j)];
          default: pred_data[j*8 +: 8] =
            clip1((32'(pa_c[comp]) + 32'(pb_c[comp]) * (int'(x0) + j - 3) + 32'(pc_c[comp]) * (int'(y) - 3) + 16) >>> 5);
        endcase
      end
    end
  end

  assign pred_we   = (st == S_WR);
  assign pred_addr = addr;

endmodule
