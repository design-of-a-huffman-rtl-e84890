// tb_huff_dr: checks the data retriever with a 16-word DIM. A block of 10
// samples arrives with idle cycles in between (the counter must hold); the
// count, the done pulse one cycle after the last sample, and the stored
// words are checked. A second block of 20 samples overruns the memory:
// count stops at 16, overflow is raised and the first 16 are kept.
module tb_huff_dr;
  localparam int D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, en, in_valid, in_last, done, overflow;
  logic [31:0] in_data, rd_data;
  logic [4:0] count;
  logic [3:0] rd_addr;
  logic [31:0] sent [32];
  int checks = 0, failures = 0;

  huff_dr #(.DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_block(input int n, input bit gaps);
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    en = 1;
    for (int i = 0; i < n; i++) begin
      if (gaps) begin
        int c0 = int'(count);
        repeat (1 + i % 3) @(negedge clk);
        check(int'(count) == c0, "counter holds without data");
      end
      sent[i] = $urandom;
      in_valid = 1; in_data = sent[i]; in_last = (i == n - 1);
      @(negedge clk);
      in_valid = 0; in_last = 0;
      check(done == (i == n - 1), $sformatf("done pulse after sample %0d", i));
    end
    @(negedge clk);
    check(!done, "done lasts one cycle");
    en = 0;
  endtask

  initial begin
    clear = 0; en = 0; in_valid = 0; in_last = 0; in_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_block(10, 1);
    check(count == 5'd10, $sformatf("count %0d", count));
    check(!overflow, "no overflow");
    for (int i = 0; i < 10; i++) begin
      rd_addr = 4'(i);
      #1 check(rd_data == sent[i], $sformatf("DIM word %0d", i));
    end
    send_block(20, 0);
    check(count == 5'd16, $sformatf("count after overrun %0d", count));
    check(overflow, "overflow");
    for (int i = 0; i < 16; i++) begin
      rd_addr = 4'(i);
      #1 check(rd_data == sent[i], $sformatf("DIM word %0d after overrun", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
