// huff_ram: generic on-chip memory used for every memory of the encoder
// (DIM, ADM, FADM, APM, FAPM, NAPM, LPM, LPCM, NPCM, PNPM, HCM).
//
// One synchronous write port and one asynchronous read port: a word written
// at a rising edge is visible on rdata from the next cycle, and rdata follows
// raddr within the same cycle. The asynchronous read lets each module's
// address counter read and compare in one cycle; the document does not give
// the memories' port timing, so this is this design's choice. Contents are
// not reset: every word is written before the encoder reads it.
module huff_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
