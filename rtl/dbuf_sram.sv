// dbuf_sram: two-bank SRAM used as a double buffer between pipeline stages
// and at the border between the voltage-scaled core and the fixed-voltage
// local bus.
//
// One bank is written by the producing side while the other is read by the
// consuming side; a one-cycle swap pulse (the pipeline start) exchanges the
// two roles, so what was written during one pipeline process is read during
// the next. Reads are synchronous: rdata is valid the cycle after raddr.
// wbank tells which bank the write port currently owns.
//
// Both ports run on one clock here. In silicon the bank on the bus side would
// run at the bus's fixed voltage and clock while the other follows the core;
// that separation of supplies is physical and is not modelled in RTL.
module dbuf_sram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 96,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  output logic             wbank
);

  logic [WIDTH-1:0] bank0 [DEPTH];
  logic [WIDTH-1:0] bank1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbank <= 1'b0;
    else if (swap) wbank <= ~wbank;
  end

  // Writes and reads go to opposite banks. A write in the swap cycle still
  // lands in the bank that was being written.
  always_ff @(posedge clk) begin
    if (we && !wbank) bank0[waddr] <= wdata;
    if (we &&  wbank) bank1[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= wbank ? bank0[raddr] : bank1[raddr];
  end

endmodule
