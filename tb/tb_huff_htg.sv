// tb_huff_htg: checks the Huffman tree generator against a testbench FADM
// holding probabilities (with many equal values). After each run the tree is
// read back through the leaf and node ports and checked on its own terms:
// leaves cover every symbol once, in ascending probability, with the
// probability FADM holds for that symbol; every internal node has exactly
// one 0-child and one 1-child; the root holds the sum of all
// probabilities; the leaf depths satisfy Kraft's equality and give the
// minimum weighted depth (computed here by repeatedly merging the two
// smallest weights). The cycle count is checked against the schedule:
// sort (fetch, search, shift), leaf scan, 2 cycles per merge.
module tb_huff_htg;
  localparam int KD = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [9:0] n_symbols;
  logic [9:0] fadm_addr;
  logic [15:0] fadm_rdata;
  logic [8:0] ext_leaf_addr, ext_leaf_sym, ext_leaf_parent, ext_node_addr, ext_node_parent;
  logic [15:0] ext_leaf_prob, ext_node_prob;
  logic ext_leaf_bit, ext_node_bit;
  logic [15:0] fadm [1024];
  int checks = 0, failures = 0;

  assign fadm_rdata = fadm[fadm_addr];

  huff_htg dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint optimum(input int k);
    longint w [KD];
    bit used [KD];
    longint cost = 0;
    for (int i = 0; i < k; i++) begin w[i] = longint'(fadm[i]); used[i] = 0; end
    for (int c = k; c > 1; c--) begin
      int a = -1, b = -1;
      for (int i = 0; i < k; i++) if (!used[i] && (a < 0 || w[i] < w[a])) a = i;
      used[a] = 1;
      for (int i = 0; i < k; i++) if (!used[i] && (b < 0 || w[i] < w[b])) b = i;
      w[b] += w[a];
      cost += w[b];
    end
    return cost;
  endfunction

  // cycles the schedule predicts, excluding a constant overhead
  function automatic int schedule(input int k);
    int a [KD];
    int m = 0, cyc = 0;
    for (int i = 0; i < k; i++) begin
      int p = int'(fadm[i]), j = 0;
      while (j < m && a[j] < p) j++;
      cyc += 1 + j + 1;
      if (j == m) begin a[m] = p; m++; end
      else if (a[j] != p) begin
        cyc += m - j + 1;
        for (int s = m; s > j; s--) a[s] = a[s-1];
        a[j] = p; m++;
      end
    end
    for (int j = 0; j < m; j++) begin
      int last = 0;
      for (int i = 0; i < k; i++) if (int'(fadm[i]) == a[j]) last = i;
      cyc += 1 + last + 1;
    end
    cyc += 1 + ((k > 1) ? 2 * (k - 1) : 0);
    return cyc;
  endfunction

  int overhead = -1;

  // the probabilities of a real block sum to at most 2**15, so k * range
  // is kept within the 16-bit node width
  task automatic run(input int k, input int range);
    int depth [KD];
    bit seen [KD];
    int zeros [KD], ones [KD];
    int cyc, prev, root, sum;
    longint kraft = 0, wsum = 0;
    sum = 0;
    for (int i = 0; i < k; i++) begin
      fadm[i] = 16'(1 + $urandom % range);
      sum += int'(fadm[i]);
    end
    @(negedge clk);
    n_symbols = 10'(k); start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (overhead < 0) overhead = cyc - schedule(k);
    check(cyc - schedule(k) == overhead, $sformatf("cycles %0d, schedule %0d + %0d", cyc, schedule(k), overhead));
    root = k - 2;
    for (int i = 0; i < k; i++) begin seen[i] = 0; zeros[i] = 0; ones[i] = 0; end
    prev = 0;
    for (int l = 0; l < k; l++) begin
      int cur, d;
      ext_leaf_addr = 9'(l);
      #1;
      check(int'(ext_leaf_sym) < k && !seen[ext_leaf_sym], $sformatf("leaf %0d symbol %0d", l, ext_leaf_sym));
      seen[ext_leaf_sym] = 1;
      check(ext_leaf_prob == fadm[{1'b0, ext_leaf_sym}], $sformatf("leaf %0d probability", l));
      check(int'(ext_leaf_prob) >= prev, $sformatf("leaf %0d ascending", l));
      prev = int'(ext_leaf_prob);
      if (k == 1) begin
        check(ext_leaf_bit == 1'b0, "single leaf bit");
        continue;
      end
      if (ext_leaf_bit) ones[ext_leaf_parent]++; else zeros[ext_leaf_parent]++;
      d = 1; cur = int'(ext_leaf_parent);
      while (cur != root && d < 64) begin
        ext_node_addr = 9'(cur);
        #1;
        d++;
        cur = int'(ext_node_parent);
      end
      kraft += 64'(1) << (63 - d);
      wsum  += longint'(ext_leaf_prob) * d;
    end
    for (int t = 0; t < k - 2; t++) begin
      ext_node_addr = 9'(t);
      #1;
      if (ext_node_bit) ones[ext_node_parent]++; else zeros[ext_node_parent]++;
    end
    if (k > 1) begin
      bit ok = 1;
      for (int t = 0; t < k - 1; t++) if (zeros[t] != 1 || ones[t] != 1) ok = 0;
      check(ok, "each node has one 0-child and one 1-child");
      check(kraft == 64'(1) << 63, "Kraft sum is 1");
      check(wsum == optimum(k), $sformatf("weighted depth %0d vs optimum %0d", wsum, optimum(k)));
      ext_node_addr = 9'(root);
      #1 check(int'(ext_node_prob) == sum, "root probability is the total");
    end
  endtask

  initial begin
    start = 0; n_symbols = '0; ext_leaf_addr = '0; ext_node_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(25, 40);
    run(2, 5);
    run(1, 5);
    run(3, 2);
    run(60, 6);
    run(200, 160);
    run(512, 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
