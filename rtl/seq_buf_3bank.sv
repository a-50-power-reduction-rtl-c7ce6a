// seq_buf_3bank: three-bank SRAM holding CABAC-decoded binary sequences on
// their way from the external DRAM (fixed-voltage local bus side) to the
// syntax element decoder (voltage-scaled core side).
//
// The banks are used in turn. The bus side fills one bank at a time; a bank
// is handed to the decoder side when it is full, or earlier when wr_last
// closes it (end of a burst of the stream). The decoder side reads a bank word
// by word and releases it to the bus side after its last word. Because the
// binary sequence of one MB has no fixed length, an MB often straddles two
// banks; with three banks, one can be filled for the next MB while the
// decoder still reads across the other two, so neither side has to wait on
// the other's clock and voltage. straddle_cnt counts MBs whose reads used more
// than one bank (mb_start marks the first read of an MB).
//
// Interface: write when wr_en && wr_ready. Read when rd_en && rd_ready;
// rd_data is valid the cycle after. rd_bank/wr_bank show the current banks.
// The bank size (1 kB each, 3 kB in all) follows the document's figure for
// the interface SRAM; word width and handshakes are this design's. One clock
// drives both sides here; the separate supplies of the banks are physical.
module seq_buf_3bank #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned BANK_DEPTH = 256,
  localparam int unsigned AW        = $clog2(BANK_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // local bus (DRAM) side
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_last,
  output logic             wr_ready,
  output logic [1:0]       wr_bank,
  // syntax element decoder side
  input  logic             mb_start,
  input  logic             rd_en,
  output logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [1:0]       rd_bank,
  output logic [31:0]      straddle_cnt
);

  logic [WIDTH-1:0] mem [3][BANK_DEPTH];
  logic [2:0]       full;
  logic [AW:0]      level [3];
  logic [AW-1:0]    wptr, rptr;
  logic             mb_first, straddled;
  logic [1:0]       first_bank;

  function automatic logic [1:0] inc3(input logic [1:0] b);
    return (b == 2'd2) ? 2'd0 : b + 2'd1;
  endfunction

  assign wr_ready = !full[wr_bank];
  assign rd_ready = full[rd_bank];

  logic do_wr, do_rd;
  assign do_wr = wr_en && wr_ready;
  assign do_rd = rd_en && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_bank][wptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_bank][rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full         <= '0;
      for (int b = 0; b < 3; b++) level[b] <= '0;
      wptr         <= '0;
      rptr         <= '0;
      wr_bank      <= '0;
      rd_bank      <= '0;
      mb_first     <= 1'b1;
      straddled    <= 1'b0;
      first_bank   <= '0;
      straddle_cnt <= '0;
    end else begin
      if (do_wr) begin
        if (wptr == AW'(BANK_DEPTH - 1) || wr_last) begin
          full[wr_bank]  <= 1'b1;
          level[wr_bank] <= {1'b0, wptr} + 1'b1;
          wr_bank        <= inc3(wr_bank);
          wptr           <= '0;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      if (do_rd) begin
        if ({1'b0, rptr} == level[rd_bank] - 1'b1) begin
          full[rd_bank] <= 1'b0;
          rd_bank       <= inc3(rd_bank);
          rptr          <= '0;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
      // straddle statistics
      if (mb_start && do_rd) begin
        mb_first   <= 1'b0;
        straddled  <= 1'b0;
        first_bank <= rd_bank;
      end else if (mb_start) begin
        mb_first  <= 1'b1;
        straddled <= 1'b0;
      end else if (do_rd) begin
        mb_first <= 1'b0;
        if (mb_first) begin
          first_bank <= rd_bank;
        end else if (rd_bank != first_bank && !straddled) begin
          straddled    <= 1'b1;
          straddle_cnt <= straddle_cnt + 1'b1;
        end
      end
    end
  end

  a_wr_rd_banks_differ: assert property (@(posedge clk) disable iff (!rst_n)
      (do_wr && do_rd) |-> (wr_bank != rd_bank))
    else $error("seq_buf_3bank: both sides on one bank");

endmodule
