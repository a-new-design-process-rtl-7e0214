// sample_ram: simple dual-port memory, one write port and one registered read
// port, used as the burst buffer that holds one burst of decimated complex
// samples (and, at other sizes, for the correlation and magnitude stores).
//
// Written as an array so that synthesis can map it onto block RAM. A write and
// a read of the same address in the same cycle return the old contents.
// Timing: rdata holds mem[raddr] one clock after raddr is presented.
// The contents are not reset; every location is written before it is read.
// The buffer itself is implied by the document's block diagram; its depth
// (one GSM burst) and port arrangement are this design's choices.
module sample_ram #(
  parameter int unsigned DEPTH = 156,
  parameter int unsigned W     = 48,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
