// huff_dec: Huffman decoder. Turns a serial stream of code bits back into
// sample values using the code table the encoder produced (ADM values and
// HCM code words).
//
// It follows the decoding procedure of the architecture: take the next bit
// of the stream into an accumulator, compare the bits gathered so far with
// the existing Huffman codes; on a match output that code's symbol and clear
// the accumulator, otherwise take one more bit. The comparison is done by an
// address counter that steps through the table one entry per cycle, so a
// bit costs 1 + (entries compared) cycles. The serial handshake, the
// table-scanning order and the error rule (no match within CW bits: the
// bits are dropped and error is raised) are this design's choices.
//
// Interface: bit_in is taken when bit_valid and bit_ready are both high.
// sym_valid pulses for one cycle with sym_data. The table is read through
// tbl_addr -> tbl_symbol/tbl_len/tbl_code in the same cycle (the encoder's
// table port); scanning is high while the decoder uses that port. flush
// (pulse) clears a partly received code.
module huff_dec
  import huff_pkg::*;
#(
  parameter int unsigned K_DEPTH = ADM_DEPTH,
  parameter int unsigned DW      = DATA_W,
  parameter int unsigned LW      = LEN_W,
  parameter int unsigned CW      = CODE_W,
  localparam int unsigned KAW    = $clog2(K_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [KAW:0]   n_symbols,
  input  logic           flush,
  input  logic           bit_valid,
  input  logic           bit_in,
  output logic           bit_ready,
  output logic           sym_valid,
  output logic [DW-1:0]  sym_data,
  output logic           error,
  output logic           scanning,
  output logic [KAW-1:0] tbl_addr,
  input  logic [DW-1:0]  tbl_symbol,
  input  logic [LW-1:0]  tbl_len,
  input  logic [CW-1:0]  tbl_code
);

  typedef enum logic {S_WAIT, S_SCAN} state_e;
  state_e state;

  logic [CW-1:0] acc_q;   // bits gathered, latest in bit 0
  logic [LW-1:0] len_q;
  logic [KAW:0]  j_q;     // address counter over the table

  logic hit, last_entry;
  assign hit        = (tbl_len == len_q) && (tbl_code == acc_q);
  assign last_entry = (j_q == n_symbols - 1'b1);

  assign bit_ready = (state == S_WAIT) && !flush;
  assign scanning  = (state == S_SCAN);
  assign tbl_addr  = KAW'(j_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WAIT;
      acc_q     <= '0;
      len_q     <= '0;
      j_q       <= '0;
      sym_valid <= 1'b0;
      sym_data  <= '0;
      error     <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      error     <= 1'b0;
      unique case (state)
        S_WAIT: begin
          if (flush) begin
            acc_q <= '0;
            len_q <= '0;
          end else if (bit_valid) begin
            acc_q <= {acc_q[CW-2:0], bit_in};
            len_q <= len_q + 1'b1;
            j_q   <= '0;
            state <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (hit) begin
            sym_valid <= 1'b1;
            sym_data  <= tbl_symbol;
            acc_q     <= '0;
            len_q     <= '0;
            state     <= S_WAIT;
          end else if (last_entry || n_symbols == '0) begin
            if (int'(len_q) >= CW) begin
              error <= 1'b1;
              acc_q <= '0;
              len_q <= '0;
            end
            state <= S_WAIT;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // a symbol is only reported after a bit was taken and matched
  property p_sym_after_scan;
    @(posedge clk) disable iff (!rst_n) sym_valid |-> $past(state == S_SCAN);
  endproperty
  a_sym_after_scan: assert property (p_sym_after_scan);

endmodule
