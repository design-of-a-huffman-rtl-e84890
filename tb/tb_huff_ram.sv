// tb_huff_ram: checks the generic memory. Fills a 64-word memory with
// pseudo-random words, checks that a write is seen from the next cycle on,
// that a cycle with we low writes nothing, and reads everything back
// through the asynchronous read port.
module tb_huff_ram;
  localparam int W = 20, D = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  huff_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = W'($urandom); model[i] = wdata;
      raddr = 6'(i);
      @(negedge clk);
      we = 0;
      #1 check(rdata == model[i], $sformatf("word %0d read after write", i));
    end
    // we low: no write
    @(negedge clk);
    we = 0; waddr = 6'd5; wdata = ~model[5];
    @(negedge clk);
    raddr = 6'd5;
    #1 check(rdata == model[5], "write with we low");
    // read back in reverse, address change seen in the same cycle
    for (int i = D - 1; i >= 0; i--) begin
      raddr = 6'(i);
      #1 check(rdata == model[i], $sformatf("word %0d read back", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
