// huff_dr: data retriever (DR). Receives the samples to be compressed and
// stores them in the data insert memory (DIM, 32-bit x 4 kbyte).
//
// As in the architecture, an identifier watches the 32-bit input port: a
// cycle with a valid datum writes it at the address counter and advances the
// counter; a cycle without one leaves the counter holding. The end of the
// sample block is marked with in_last on its final datum (the document does
// not say how the end is recognised; this marker is this design's choice).
//
// Interface: clear (one cycle) resets the counter before a new block; while
// en is high, in_valid/in_data/in_last are accepted, one datum per cycle.
// done pulses in the cycle after the datum with in_last was accepted, with
// count holding the number of samples. Data beyond DIM_DEPTH samples are
// dropped and raise overflow (the block still ends at in_last). The read
// port (rd_addr -> rd_data, same cycle) hands the samples to the FC.
module huff_dr
  import huff_pkg::*;
#(
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned DEPTH = DIM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  input  logic          in_last,
  output logic          done,
  output logic [AW:0]   count,
  output logic          overflow,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);

  // identifier: a datum is present and there is room for it
  logic accept, store;
  assign accept = en && in_valid;
  assign store  = accept && (count < (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= accept && in_last;
      if (clear) begin
        count    <= '0;
        overflow <= 1'b0;
      end else begin
        if (store)               count    <= count + 1'b1;
        if (accept && !store)    overflow <= 1'b1;
      end
    end
  end

  huff_ram #(.WIDTH(DW), .DEPTH(DEPTH)) u_dim (
    .clk   (clk),
    .we    (store),
    .waddr (count[AW-1:0]),
    .wdata (in_data),
    .raddr (rd_addr),
    .rdata (rd_data)
  );

endmodule
