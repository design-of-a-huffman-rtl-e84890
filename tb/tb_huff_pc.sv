// tb_huff_pc: checks the probability calculator against a testbench FADM
// (array, combinational read, written at the clock edge). Random
// frequencies summing to N are turned into probabilities; each FADM word
// must become floor(f * 2**15 / N), done must come n_symbols + 1 cycles
// after start, and the probability register must hold the last quotient.
module tb_huff_pc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, busy, done, fadm_we;
  logic [9:0] n_symbols;
  logic [10:0] n_samples;
  logic [15:0] prob_q, fadm_wdata, fadm_rdata;
  logic [9:0] fadm_addr;
  logic [15:0] fadm [1024];
  int checks = 0, failures = 0;

  assign fadm_rdata = fadm[fadm_addr];
  always @(posedge clk) if (fadm_we) fadm[fadm_addr] <= fadm_wdata;

  huff_pc dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int k, input int n);
    int f [512];
    int left = n, cyc;
    for (int i = 0; i < k; i++) begin
      f[i] = (i == k - 1) ? left : 1 + int'($urandom % (left - (k - 1 - i)) / 2);
      left -= f[i];
      fadm[i] = 16'(f[i]);
    end
    @(negedge clk);
    n_symbols = 10'(k); n_samples = 11'(n); start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == k + 1, $sformatf("cycles %0d for %0d symbols", cyc, k));
    for (int i = 0; i < k; i++)
      check(int'(fadm[i]) == (f[i] << 15) / n, $sformatf("P[%0d] %0d vs %0d", i, fadm[i], (f[i] << 15) / n));
    check(int'(prob_q) == (f[k-1] << 15) / n, "probability register");
  endtask

  initial begin
    start = 0; n_symbols = '0; n_samples = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(25, 366);
    run(1, 7);
    run(3, 10);
    run(512, 1024);
    run(100, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
