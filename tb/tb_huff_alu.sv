// tb_huff_alu: checks the ALU's add, subtract and divide on fixed corner
// cases and on random operands, against arithmetic done in the testbench.
module tb_huff_alu;
  import huff_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  huff_alu #(.W(32)) dut (.*);

  task automatic try(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    case (o)
      ALU_ADD: e = x + z;
      ALU_SUB: e = x - z;
      default: e = (z == 0) ? 32'hFFFF_FFFF : x / z;
    endcase
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL: op %s a=%0d b=%0d y=%0d expected %0d", o.name(), x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(ALU_ADD, 32'd3, 32'd4);
    try(ALU_ADD, 32'hFFFF_FFFF, 32'd1);
    try(ALU_SUB, 32'd10, 32'd3);
    try(ALU_DIV, 32'd1 << 15, 32'd2);
    try(ALU_DIV, 32'd57 << 15, 32'd366);
    try(ALU_DIV, 32'd5, 32'd0);
    for (int i = 0; i < 300; i++) begin
      try(ALU_ADD, $urandom, $urandom);
      try(ALU_SUB, $urandom, $urandom);
      try(ALU_DIV, $urandom, $urandom % 2000 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
