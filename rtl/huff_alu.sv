// huff_alu: the arithmetic logic unit shared in kind by the frequency
// calculator (summation, to count), the probability calculator (division,
// frequency over sample count) and the tree generator (summation of the two
// lowest probabilities).
//
// Purely combinational: y = a + b, a - b or a / b (unsigned, truncating).
// Division by zero returns all ones. The document names only summation and
// division; the subtraction is this design's addition and is used to count
// down the number of leaves still to find in the tree generator.
module huff_alu
  import huff_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_DIV: y = (b == '0) ? '1 : a / b;
      default: y = '0;
    endcase
  end

endmodule
