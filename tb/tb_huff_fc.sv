// tb_huff_fc: checks the frequency calculator with a 64-sample DIM and a
// 16-symbol ADM. The DIM is a testbench array read combinationally. Several
// random blocks are counted; the testbench finds the distinct values in
// order of first appearance and their counts itself and compares ADM, FADM
// and the symbol count, and checks the cycle count from start to done
// (per symbol: 1 load + (N - first position) scan + 1 write; plus 2).
// A block with 20 distinct values must raise overflow and keep 16.
module tb_huff_fc;
  localparam int N = 64, K = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, busy, done, overflow, fadm_we;
  logic [6:0] n_samples;
  logic [4:0] n_symbols;
  logic [5:0] dim_addr;
  logic [31:0] dim_data, adm_data;
  logic [3:0] adm_addr;
  logic [4:0] fadm_addr;
  logic [15:0] fadm_wdata, fadm_rdata;
  logic [31:0] dim [N];
  int checks = 0, failures = 0;

  assign dim_data = dim[dim_addr];

  huff_fc #(.N_DEPTH(N), .K_DEPTH(K), .FADM_DEPTH(32)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input int nvals);
    logic [31:0] sym [64];
    int cnt [64], first [64];
    int k = 0, cyc = 0, exp_cyc = 2;
    bit ovf = 0;
    for (int i = 0; i < n; i++) dim[i] = 32'($urandom % nvals) * 32'h0101_0101;
    for (int i = 0; i < n; i++) begin
      int f = -1;
      for (int j = 0; j < k; j++) if (sym[j] == dim[i]) f = j;
      if (f >= 0) cnt[f]++;
      else if (k < K) begin sym[k] = dim[i]; cnt[k] = 1; first[k] = i; k++; end
      else ovf = 1;
    end
    for (int j = 0; j < k; j++) exp_cyc += 2 + n - first[j];
    @(negedge clk);
    n_samples = 7'(n); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == exp_cyc, $sformatf("cycles %0d vs %0d", cyc, exp_cyc));
    check(n_symbols == 5'(k), $sformatf("symbols %0d vs %0d", n_symbols, k));
    check(overflow == ovf, "overflow flag");
    for (int j = 0; j < k; j++) begin
      adm_addr = 4'(j); fadm_addr = 5'(j);
      #1;
      check(adm_data == sym[j], $sformatf("ADM[%0d]", j));
      check(int'(fadm_rdata) == cnt[j], $sformatf("FADM[%0d] %0d vs %0d", j, fadm_rdata, cnt[j]));
    end
  endtask

  initial begin
    start = 0; n_samples = '0; adm_addr = '0; fadm_addr = '0; fadm_we = 0; fadm_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(64, 5);
    run(64, 12);
    run(30, 3);
    run(1, 4);
    run(64, 1);
    run(64, 20);
    // outside write port when idle
    @(negedge clk);
    fadm_we = 1; fadm_addr = 5'd3; fadm_wdata = 16'hBEEF;
    @(negedge clk);
    fadm_we = 0;
    #1 check(fadm_rdata == 16'hBEEF, "FADM outside write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
