// huff_pkg: widths, sizes and shared types of the Huffman encoder.
//
// The sizes follow the memories of the architecture: a 32-bit wide, 4 kbyte
// data insert memory (1024 samples), a 32-bit 2 kbyte arranged data memory
// (512 distinct symbols), a 16-bit frequency/probability memory and a 32-bit
// 2 kbyte Huffman codes memory (512 code words). Probabilities are unsigned
// fixed point with PROB_FRAC fraction bits, so 1.0 is 2**PROB_FRAC; this
// number format is a choice of this design, sized so that 1.0 fits in the
// 16-bit FADM word. A code word in HCM packs {length, code} into 32 bits.
package huff_pkg;

  localparam int unsigned DATA_W    = 32;   // sample / input port width
  localparam int unsigned DIM_DEPTH = 1024; // 32-bit x 4 kbyte
  localparam int unsigned ADM_DEPTH = 512;  // 32-bit x 2 kbyte
  localparam int unsigned FADM_W    = 16;   // 16-bit words
  localparam int unsigned PROB_FRAC = 15;   // probability 1.0 = 2**15
  localparam int unsigned HCM_W     = 32;   // 32-bit x 2 kbyte
  localparam int unsigned LEN_W     = 6;    // code length field of an HCM word
  localparam int unsigned CODE_W    = HCM_W - LEN_W; // 26 code bits

  // ALU operations used by FC (count), PC (divide) and HTG (add).
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_DIV = 2'd2
  } alu_op_e;

endpackage
