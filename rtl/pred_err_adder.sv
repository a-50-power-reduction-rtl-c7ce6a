// pred_err_adder: prediction error adder of the MB pipeline.
//
// Adds the prediction error (residual) of an MB to its predicted picture and
// clips each sum to the 8-bit range 0..255, giving the reconstructed MB. An MB
// holds 384 samples (16x16 luma and two 8x8 chroma blocks); with PAR adders
// working side by side it takes 384/PAR word cycles, 96 for the document's
// four-way parallel adder, which keeps this stage well inside the 440-cycle
// process budget.
//
// Interface: start (one cycle) begins an MB; done is high when idle (also out
// of reset) and drops on start. The stage reads word a (PAR samples) from the
// predicted picture buffer (8 bits per sample) and the residual buffer (16-bit
// two's complement per sample) through synchronous read ports, and writes the
// clipped result to the reconstructed picture buffer one cycle later.
// Timing: first read address in the cycle after start, last write
// 384/PAR + 1 cycles after start; done rises one cycle after the last write.
// The residual sample width, the word layout (PAR horizontally adjacent
// samples, sample 0 in the low bits) and the handshake are this design's.
module pred_err_adder
  import dvs_pkg::*;
#(
  parameter int unsigned PAR   = 4,
  localparam int unsigned WORDS = MB_SAMPLES / PAR,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                done,
  // predicted picture buffer read port
  output logic [AW-1:0]       pred_addr,
  input  logic [PAR*8-1:0]    pred_data,
  // prediction error buffer read port
  output logic [AW-1:0]       res_addr,
  input  logic [PAR*16-1:0]   res_data,
  // reconstructed picture buffer write port
  output logic                rec_we,
  output logic [AW-1:0]       rec_addr,
  output logic [PAR*8-1:0]    rec_data
);

  logic          busy;      // issuing read addresses
  logic [AW-1:0] addr;
  logic          vld_q;     // read data arrives this cycle
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      addr   <= '0;
      vld_q  <= 1'b0;
      addr_q <= '0;
      done   <= 1'b1;
    end else begin
      vld_q  <= busy;
      addr_q <= addr;
      if (start) begin
        busy <= 1'b1;
        addr <= '0;
        done <= 1'b0;
      end else if (busy) begin
        if (addr == AW'(WORDS - 1)) busy <= 1'b0;
        else addr <= addr + 1'b1;
      end else if (vld_q) begin
        done <= 1'b1;
      end
    end
  end

  assign pred_addr = addr;
  assign res_addr  = addr;

  always_comb begin
    for (int i = 0; i < PAR; i++) begin
      logic signed [16:0] s;
      s = $signed({9'd0, pred_data[i*8 +: 8]}) + $signed({res_data[i*16+15], res_data[i*16 +: 16]});
      if (s < 0)         rec_data[i*8 +: 8] = 8'd0;
      else if (s > 255)  rec_data[i*8 +: 8] = 8'd255;
      else               rec_data[i*8 +: 8] = s[7:0];
    end
  end

  assign rec_we   = vld_q;
  assign rec_addr = addr_q;

endmodule
