// tb_huff_hcg: checks the Huffman code generator against tree memories held
// in testbench arrays (leaf: symbol, parent, bit; node: parent, bit).
// Trees: the three-symbol example with probabilities 0.6 / 0.1 / 0.3
// (expected codes 1, 00, 01), a single symbol (code 0), and random trees
// made by joining random pairs. For those the expected codes are worked out
// top-down, root first, which is the reverse of the generator's leaf-to-root
// walk. Every HCM word and the cycle count (code length + 1 per symbol,
// plus 2) are checked.
module tb_huff_hcg;
  localparam int KD = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, busy, done, code_ovf;
  logic [9:0] n_symbols;
  logic [8:0] leaf_addr, leaf_sym, leaf_parent, node_addr, node_parent, hcm_raddr;
  logic leaf_bit, node_bit;
  logic [31:0] hcm_rdata;

  int l_sym [KD], l_par [KD], n_par [KD];
  bit l_bit [KD], n_bit [KD];
  logic [25:0] e_code [KD];
  int e_len [KD];
  int checks = 0, failures = 0;

  assign leaf_sym    = 9'(l_sym[leaf_addr]);
  assign leaf_parent = 9'(l_par[leaf_addr]);
  assign leaf_bit    = l_bit[leaf_addr];
  assign node_parent = 9'(n_par[node_addr]);
  assign node_bit    = n_bit[node_addr];

  huff_hcg dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_check(input int k, input string name);
    int cyc, sumlen = 0;
    @(negedge clk);
    n_symbols = 10'(k); start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int s = 0; s < k; s++) begin
      hcm_raddr = 9'(s);
      #1;
      check(int'(hcm_rdata[31:26]) == e_len[s] && hcm_rdata[25:0] == e_code[s],
            $sformatf("%s: symbol %0d code %0d/%0h vs %0d/%0h", name, s,
                      hcm_rdata[31:26], hcm_rdata[25:0], e_len[s], e_code[s]));
      sumlen += e_len[s];
    end
    check(cyc == sumlen + k + 2, $sformatf("%s: cycles %0d vs %0d", name, cyc, sumlen + k + 2));
    check(!code_ovf, $sformatf("%s: no overflow", name));
  endtask

  // a random tree whose codes all fit the 26-bit code field
  task automatic random_tree(input int k);
    int maxlen;
    do begin
      random_tree_once(k);
      maxlen = 0;
      for (int s = 0; s < k; s++) if (e_len[s] > maxlen) maxlen = e_len[s];
    end while (maxlen > 26);
  endtask

  task automatic random_tree_once(input int k);
    int act [2*KD];
    int na = 0;
    logic [25:0] nc [KD];
    int nl [KD];
    int perm [KD];
    // items: leaf l -> l, node t -> KD + t
    for (int i = 0; i < k; i++) begin act[na++] = i; perm[i] = i; end
    for (int i = k - 1; i > 0; i--) begin
      int j = int'($urandom % (i + 1)), tmp = perm[i];
      perm[i] = perm[j]; perm[j] = tmp;
    end
    for (int i = 0; i < k; i++) l_sym[i] = perm[i];
    for (int t = 0; t < k - 1; t++) begin
      for (int b = 0; b < 2; b++) begin
        int x = int'($urandom % na), it = act[x];
        act[x] = act[na-1]; na--;
        if (it < KD) begin l_par[it] = t; l_bit[it] = b[0]; end
        else begin n_par[it-KD] = t; n_bit[it-KD] = b[0]; end
      end
      act[na++] = KD + t;
    end
    // top-down: parents have higher indices
    nc[k-2] = '0; nl[k-2] = 0;
    for (int t = k - 3; t >= 0; t--) begin
      nc[t] = (nc[n_par[t]] << 1) | 26'(n_bit[t]);
      nl[t] = nl[n_par[t]] + 1;
    end
    for (int l = 0; l < k; l++) begin
      e_code[l_sym[l]] = (nc[l_par[l]] << 1) | 26'(l_bit[l]);
      e_len[l_sym[l]]  = nl[l_par[l]] + 1;
    end
  endtask

  initial begin
    start = 0; n_symbols = '0; hcm_raddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A = 0.6 (symbol 0), B = 0.1 (1), C = 0.3 (2): B, C join first
    l_sym[0] = 1; l_par[0] = 0; l_bit[0] = 0;
    l_sym[1] = 2; l_par[1] = 0; l_bit[1] = 1;
    l_sym[2] = 0; l_par[2] = 1; l_bit[2] = 1;
    n_par[0] = 1; n_bit[0] = 0;
    e_len[0] = 1; e_code[0] = 26'b1;
    e_len[1] = 2; e_code[1] = 26'b00;
    e_len[2] = 2; e_code[2] = 26'b01;
    run_check(3, "example");
    l_sym[0] = 0; l_par[0] = 0; l_bit[0] = 1;
    e_len[0] = 1; e_code[0] = '0;
    run_check(1, "single");
    random_tree(2);   run_check(2, "two");
    random_tree(25);  run_check(25, "random25");
    random_tree(24);  run_check(24, "random24");
    random_tree(512); run_check(512, "random512");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
