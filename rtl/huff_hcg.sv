// huff_hcg: Huffman code generator (HCG). Reads the memory-mapped tree left
// by the tree generator and writes every symbol's code word into the Huffman
// codes memory (HCM, 32-bit x 2 kbyte), at the symbol's ADM address.
//
// The address counter steps through the leaves. For each leaf the identifier
// follows the connectors upward: the leaf's own branch bit (LPCM) is the
// last bit of the code, then each internal node's bit (NPCM) is placed one
// position higher while PNPM gives the next node up, until the root
// (node n_symbols-2) is reached. A shift register arranges the bits, so the
// finished code is right-aligned with its first (root-side) bit as the most
// significant. An HCM word is {length[LEN_W-1:0], code[CODE_W-1:0]}. A lone
// symbol gets the one-bit code 0. The bottom-up walk and the HCM word format
// are this design's choices; the document names only the parts. A code
// longer than CODE_W bits (impossible with 16-bit probabilities of at most
// 1024 samples) would set code_ovf and be truncated.
//
// Timing: start (pulse); each leaf takes 1 + (code length - 1) + 1 cycles;
// done pulses after the last HCM write. When idle, HCM is read through
// hcm_raddr/hcm_rdata.
module huff_hcg
  import huff_pkg::*;
#(
  parameter int unsigned K_DEPTH = ADM_DEPTH,
  parameter int unsigned W       = HCM_W,
  parameter int unsigned LW      = LEN_W,
  localparam int unsigned CW     = W - LW,
  localparam int unsigned KAW    = $clog2(K_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [KAW:0]   n_symbols,
  output logic           busy,
  output logic           done,
  output logic           code_ovf,
  // tree memories
  output logic [KAW-1:0] leaf_addr,
  input  logic [KAW-1:0] leaf_sym,
  input  logic [KAW-1:0] leaf_parent,
  input  logic           leaf_bit,
  output logic [KAW-1:0] node_addr,
  input  logic [KAW-1:0] node_parent,
  input  logic           node_bit,
  // HCM read port
  input  logic [KAW-1:0] hcm_raddr,
  output logic [W-1:0]   hcm_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_LEAF, S_WALK, S_WRITE, S_DONE} state_e;
  state_e state;

  logic [KAW:0]    l_q;     // address counter over leaves
  logic [KAW-1:0]  cur_q;   // node being visited
  logic [KAW-1:0]  sym_q;
  logic [CW-1:0]   code_q;  // arranging register
  logic [LW-1:0]   len_q;
  logic [KAW-1:0]  root;

  assign root      = KAW'(n_symbols - (KAW+1)'(2));
  assign busy      = (state != S_IDLE);
  assign leaf_addr = KAW'(l_q);
  assign node_addr = cur_q;

  // place a bit at position len_q of the code
  function automatic logic [CW-1:0] put_bit(logic [CW-1:0] c, logic [LW-1:0] pos, logic b);
    return c | (CW'(b) << pos);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      l_q      <= '0;
      cur_q    <= '0;
      sym_q    <= '0;
      code_q   <= '0;
      len_q    <= '0;
      code_ovf <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          l_q      <= '0;
          code_ovf <= 1'b0;
          state    <= (n_symbols == '0) ? S_DONE : S_LEAF;
        end
        S_LEAF: begin
          sym_q  <= leaf_sym;
          code_q <= {{(CW-1){1'b0}}, (n_symbols == (KAW+1)'(1)) ? 1'b0 : leaf_bit};
          len_q  <= LW'(1);
          cur_q  <= leaf_parent;
          if (n_symbols == (KAW+1)'(1) || leaf_parent == root) state <= S_WRITE;
          else                                                  state <= S_WALK;
        end
        S_WALK: begin
          code_q <= put_bit(code_q, len_q, node_bit);
          if (int'(len_q) >= CW) code_ovf <= 1'b1;
          else                   len_q    <= len_q + 1'b1;
          cur_q <= node_parent;
          if (node_parent == root) state <= S_WRITE;
        end
        S_WRITE: begin
          if (l_q == n_symbols - 1'b1) begin
            state <= S_DONE;
          end else begin
            l_q   <= l_q + 1'b1;
            state <= S_LEAF;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  huff_ram #(.WIDTH(W), .DEPTH(K_DEPTH)) u_hcm (
    .clk   (clk),
    .we    (state == S_WRITE),
    .waddr (sym_q),
    .wdata ({len_q, code_q}),
    .raddr (hcm_raddr),
    .rdata (hcm_rdata)
  );

endmodule
