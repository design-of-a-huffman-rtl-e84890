// tb_huffman_encoder: end-to-end test of the Huffman encoder at its default
// sizes (1024-sample DIM, 512-symbol ADM).
//
// Four blocks are encoded in turn:
//   1. 366 temperature readings (0.1 degC steps, random walk), fed with idle
//      cycles between samples so the data retriever holds;
//   2. five equal samples (a single symbol);
//   3. 1030 samples over 600 values: more samples than DIM and more
//      distinct values than ADM hold (overflow);
//   4. 1024 samples with a geometric spread of 40 values (long codes).
// For each block the testbench computes, on its own, the distinct values,
// their counts and probabilities, and the minimum possible average code
// length (Huffman's merge of the two smallest, done with a linear search).
// It then reads the encoder's table and checks the values, probabilities,
// that the codes are prefix-free and complete (Kraft sum exactly 1), that
// their weighted length equals the optimum, and that every sample encoded
// with the table and decoded bit by bit (extend the bit string until it
// matches a code) gives back the block. The cycle counts of the probability
// and code generators are checked against their one-per-step schedules.
// Mechanisms counted and required at least once: retriever hold, repeated
// probability, sorted insertion with shifting, leaf-first and node-first
// merges, single symbol, sample overflow, symbol overflow.
module tb_huffman_encoder;
  import huff_pkg::*;

  localparam int NMAX = 1100;
  localparam int KMAX = 700;
  localparam int DEC_MAX = 400;  // samples decoded per block

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, in_valid, in_last;
  logic [31:0] in_data;
  logic in_ready, busy, done, overflow;
  logic [10:0] num_samples;
  logic [9:0]  num_symbols;
  logic [8:0]  tbl_addr = '0;
  logic [31:0] tbl_symbol;
  logic [15:0] tbl_prob;
  logic [5:0]  tbl_code_len;
  logic [25:0] tbl_code;
  logic [31:0] cyc_dr, cyc_fc, cyc_pc, cyc_htg, cyc_hcg;
  logic dec_flush, dec_bit_valid, dec_bit, dec_bit_ready, dec_sym_valid, dec_error;
  logic [31:0] dec_symbol;

  huffman_encoder dut (.*);

  int checks = 0, failures = 0;
  int n_hold = 0, n_repeat = 0, n_shift = 0, n_leaf_first = 0, n_node_first = 0;
  int n_single = 0, n_dim_ovf = 0, n_adm_ovf = 0;
  int n_dec_more = 0, n_dec_match = 0, n_dec_error = 0, scan_cycles = 0;
  logic [31:0] dec_out [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors (inside the tree generator; states by encoding:
  // 2 = search, 3 = shift, 7/8 = first/second merge pick)
  always @(posedge clk) if (rst_n) begin
    if (dec_sym_valid) begin dec_out.push_back(dec_symbol); n_dec_match++; end
    if (dec_error) n_dec_error++;
    if (dut.u_dec.scanning) scan_cycles++;
    if (dut.u_dec.scanning && !dut.u_dec.hit && dut.u_dec.last_entry) n_dec_more++;
    if (in_ready && !in_valid) n_hold++;
    if (dut.u_htg.state == 4'd2 && !dut.u_htg.apm_end && dut.u_htg.apm_eq) n_repeat++;
    if (dut.u_htg.state == 4'd3 && dut.u_htg.s_q != dut.u_htg.j_q) n_shift++;
    if (dut.u_htg.state == 4'd7 || dut.u_htg.state == 4'd8) begin
      if (dut.u_htg.take_leaf && dut.u_htg.node_avail) n_leaf_first++;
      if (!dut.u_htg.take_leaf && dut.u_htg.leaf_avail) n_node_first++;
    end
  end

  // ---------------- stimulus and reference ----------------
  logic [31:0] blk [NMAX];
  int          blk_n;
  logic [31:0] rsym [KMAX];
  int          rfreq [KMAX];
  int          rfirst [KMAX];
  int          rk;
  int unsigned lfsr = 32'h1234_5678;

  function automatic int unsigned rnd();
    lfsr = lfsr * 1664525 + 1013904223;
    return lfsr >> 8;
  endfunction

  // distinct values (first KLIM in order of first appearance) and counts
  task automatic reference(input int nstore, input int klim);
    rk = 0;
    for (int i = 0; i < nstore; i++) begin
      int f = -1;
      for (int j = 0; j < rk; j++) if (rsym[j] == blk[i]) f = j;
      if (f >= 0) rfreq[f]++;
      else if (rk < klim) begin
        rsym[rk] = blk[i]; rfreq[rk] = 1; rfirst[rk] = i; rk++;
      end
    end
  endtask

  // minimum sum of p_i * len_i (sum of all merged weights)
  function automatic longint optimum(input int k, input int p[KMAX]);
    longint w[KMAX];
    bit     used[KMAX];
    int     cnt = k;
    longint cost = 0;
    if (k == 1) return longint'(p[0]);
    for (int i = 0; i < k; i++) begin w[i] = longint'(p[i]); used[i] = 0; end
    while (cnt > 1) begin
      int a = -1, b = -1;
      for (int i = 0; i < k; i++) if (!used[i] && (a < 0 || w[i] < w[a])) a = i;
      used[a] = 1;
      for (int i = 0; i < k; i++) if (!used[i] && (b < 0 || w[i] < w[b])) b = i;
      w[b] = w[a] + w[b];
      cost += w[b];
      cnt--;
    end
    return cost;
  endfunction

  // inputs change at the falling edge and are sampled at the rising edge
  task automatic run_block(input int n, input bit gaps);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < n; i++) begin
      if (gaps) repeat (rnd() % 3) @(negedge clk);
      in_valid = 1'b1;
      in_data  = blk[i];
      in_last  = (i == n - 1);
      @(negedge clk);
      in_valid = 1'b0;
      in_last  = 1'b0;
    end
    do @(negedge clk); while (!done);
  endtask

  task automatic check_table(input int n, input string name);
    int nstore, klim;
    int p[KMAX];
    int tlen[KMAX];
    logic [25:0] tcode[KMAX];
    int tidx[KMAX];
    longint kraft, wsum, opt;
    int sumlen, k;
    bit ok;
    nstore = (n > DIM_DEPTH) ? DIM_DEPTH : n;
    klim   = ADM_DEPTH;
    reference(nstore, klim);
    check(num_samples == 11'(nstore), $sformatf("%s: sample count %0d", name, num_samples));
    check(num_symbols == 10'(rk), $sformatf("%s: symbol count %0d vs %0d", name, num_symbols, rk));
    check(overflow == (n > DIM_DEPTH || rk == klim && nstore > 0 && n > 0 && name == "overflow"),
          $sformatf("%s: overflow flag", name));
    k = rk;
    kraft = 0; wsum = 0; sumlen = 0;
    for (int a = 0; a < k; a++) begin
      tbl_addr = 9'(a);
      #1;
      tidx[a] = -1;
      for (int j = 0; j < k; j++) if (rsym[j] == tbl_symbol) tidx[a] = j;
      check(tidx[a] == a, $sformatf("%s: symbol %0d order", name, a));
      if (tidx[a] >= 0) begin
        p[a] = (rfreq[tidx[a]] << PROB_FRAC) / nstore;
        check(int'(tbl_prob) == p[a], $sformatf("%s: prob of %0d: %0d vs %0d", name, a, tbl_prob, p[a]));
      end else p[a] = 0;
      tlen[a]  = int'(tbl_code_len);
      tcode[a] = tbl_code;
      check(tlen[a] >= 1 && tlen[a] <= CODE_W, $sformatf("%s: length %0d", name, tlen[a]));
      kraft += 64'(1) << (40 - tlen[a]);
      wsum  += longint'(p[a]) * tlen[a];
      sumlen += tlen[a];
    end
    @(posedge clk);
    if (k > 1) check(kraft == (64'(1) << 40), $sformatf("%s: Kraft sum not 1", name));
    else       check(tlen[0] == 1 && tcode[0] == 0, $sformatf("%s: single code", name));
    opt = optimum(k, p);
    if (k > 1) check(wsum == opt, $sformatf("%s: weighted length %0d vs optimum %0d", name, wsum, opt));
    ok = 1;
    for (int a = 0; a < k; a++)
      for (int b = 0; b < k; b++)
        if (a != b && tlen[a] <= tlen[b] && (tcode[b] >> (tlen[b] - tlen[a])) == tcode[a]) ok = 0;
    check(ok, $sformatf("%s: prefix-free", name));
    // encode the stored samples, then decode bit by bit
    begin
      bit stream[$];
      int dec_ok = 1, pos = 0;
      for (int i = 0; i < nstore; i++) begin
        int s = -1;
        for (int a = 0; a < k; a++) if (rsym[a] == blk[i]) s = a;
        if (s < 0) continue;
        for (int b = tlen[s] - 1; b >= 0; b--) stream.push_back(tcode[s][b]);
      end
      for (int i = 0; i < nstore; i++) begin
        logic [25:0] acc = '0;
        int l = 0, hit = -1, s = -1;
        for (int a = 0; a < k; a++) if (rsym[a] == blk[i]) s = a;
        if (s < 0) continue;
        while (hit < 0 && l < CODE_W && pos < stream.size()) begin
          acc = {acc[24:0], stream[pos]}; pos++; l++;
          for (int a = 0; a < k; a++) if (tlen[a] == l && tcode[a] == acc) hit = a;
        end
        if (hit != s) dec_ok = 0;
      end
      check(dec_ok == 1 && pos == stream.size(), $sformatf("%s: decode", name));
      // the same stream through the hardware decoder (first DEC_MAX samples)
      begin
        int nbits = 0, nsym = 0, exp_scan = 0, hw_ok = 1;
        logic [25:0] acc = '0;
        int l = 0;
        logic [31:0] exp_syms [$];
        for (int i = 0; i < nstore && nsym < DEC_MAX; i++) begin
          int s = -1;
          for (int a = 0; a < k; a++) if (rsym[a] == blk[i]) s = a;
          if (s < 0) continue;
          exp_syms.push_back(blk[i]);
          nbits += tlen[s];
          nsym++;
        end
        // scan cycles: entries compared up to the match, or all of them
        for (int b = 0; b < nbits; b++) begin
          int hit = -1;
          acc = {acc[24:0], stream[b]}; l++;
          for (int a = 0; a < k && hit < 0; a++) if (tlen[a] == l && tcode[a] == acc) hit = a;
          exp_scan += (hit >= 0) ? hit + 1 : k;
          if (hit >= 0) begin acc = '0; l = 0; end
        end
        dec_out.delete();
        scan_cycles = 0;
        for (int b = 0; b < nbits; b++) begin
          while (!dec_bit_ready) @(negedge clk);
          dec_bit_valid = 1'b1;
          dec_bit = stream[b];
          @(negedge clk);
          dec_bit_valid = 1'b0;
        end
        while (!dec_bit_ready) @(negedge clk);
        @(negedge clk);
        check(dec_out.size() == exp_syms.size(),
              $sformatf("%s: decoder gave %0d symbols, expected %0d", name, dec_out.size(), exp_syms.size()));
        for (int i = 0; i < exp_syms.size() && i < dec_out.size(); i++)
          if (dec_out[i] != exp_syms[i]) hw_ok = 0;
        check(hw_ok == 1, $sformatf("%s: decoder symbols", name));
        check(scan_cycles == exp_scan, $sformatf("%s: decoder scan cycles %0d vs %0d", name, scan_cycles, exp_scan));
      end
    end
    // cycle counts: PC one division per symbol, HCG one cycle per code bit + 1 per leaf
    check(cyc_pc == 32'(k + 2), $sformatf("%s: PC cycles %0d", name, cyc_pc));
    check(cyc_hcg == 32'(sumlen + k + 3), $sformatf("%s: HCG cycles %0d vs %0d", name, cyc_hcg, sumlen + k + 3));
    begin
      int fc_exp = 4;
      for (int j = 0; j < k; j++) fc_exp += 2 + nstore - rfirst[j];
      check(cyc_fc == 32'(fc_exp), $sformatf("%s: FC cycles %0d vs %0d", name, cyc_fc, fc_exp));
    end
    $display("%s: N=%0d K=%0d cycles DR=%0d FC=%0d PC=%0d HTG=%0d HCG=%0d total=%0d",
             name, nstore, k, cyc_dr, cyc_fc, cyc_pc, cyc_htg, cyc_hcg,
             cyc_dr + cyc_fc + cyc_pc + cyc_htg + cyc_hcg);
  endtask

  initial begin
    int t;
    start = 1'b0; in_valid = 1'b0; in_last = 1'b0; in_data = '0;
    dec_flush = 1'b0; dec_bit_valid = 1'b0; dec_bit = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. temperature readings
    t = 250;
    for (int i = 0; i < 366; i++) begin
      automatic int r = rnd() % 5;
      if (r == 0 && t > 238) t--;
      else if (r == 4 && t < 262) t++;
      blk[i] = 32'(t);
    end
    run_block(366, 1);
    check_table(366, "temperature");

    // 2. one symbol
    for (int i = 0; i < 5; i++) blk[i] = 32'hCAFE_0001;
    run_block(5, 0);
    check_table(5, "single");
    if (num_symbols == 1) n_single++;
    // a stream that matches no code: 26 ones against the single code 0
    for (int b = 0; b < CODE_W; b++) begin
      while (!dec_bit_ready) @(negedge clk);
      dec_bit_valid = 1'b1; dec_bit = 1'b1;
      @(negedge clk);
      dec_bit_valid = 1'b0;
    end
    repeat (3) @(negedge clk);
    check(n_dec_error == 1, "decoder error after CODE_W unmatched bits");
    // flush clears a partial code: one 1-bit, flush, then 0 decodes
    dec_out.delete();
    dec_bit_valid = 1'b1; dec_bit = 1'b1;
    @(negedge clk);
    dec_bit_valid = 1'b0;
    while (!dec_bit_ready) @(negedge clk);
    dec_flush = 1'b1;
    @(negedge clk);
    dec_flush = 1'b0;
    dec_bit_valid = 1'b1; dec_bit = 1'b0;
    @(negedge clk);
    dec_bit_valid = 1'b0;
    repeat (4) @(negedge clk);
    check(dec_out.size() == 1 && dec_out[0] == 32'hCAFE_0001, "decoder flush");

    // 3. overflow of both memories
    for (int i = 0; i < 1030; i++) blk[i] = 32'((i * 7) % 600 + 1000);
    run_block(1030, 0);
    check_table(1030, "overflow");
    if (dut.u_dr.overflow) n_dim_ovf++;
    if (dut.u_fc.overflow) n_adm_ovf++;

    // 4. geometric spread
    for (int i = 0; i < 1024; i++) begin
      automatic int v = 0;
      while (v < 39 && (rnd() % 3) != 0) v++;
      blk[i] = 32'(v * 11);
    end
    run_block(1024, 1);
    check_table(1024, "geometric");

    check(n_hold > 0,       "mechanism: retriever hold");
    check(n_repeat > 0,     "mechanism: repeated probability");
    check(n_shift > 0,      "mechanism: sorted insertion shift");
    check(n_leaf_first > 0, "mechanism: leaf taken before node");
    check(n_node_first > 0, "mechanism: node taken before leaf");
    check(n_single > 0,     "mechanism: single symbol");
    check(n_dim_ovf > 0,    "mechanism: sample overflow");
    check(n_adm_ovf > 0,    "mechanism: symbol overflow");
    check(n_dec_more > 0,   "mechanism: decoder takes another bit");
    check(n_dec_match > 0,  "mechanism: decoder match");
    check(n_dec_error > 0,  "mechanism: decoder error");
    $display("mechanisms: hold=%0d repeat=%0d shift=%0d leaf_first=%0d node_first=%0d single=%0d dim_ovf=%0d adm_ovf=%0d dec_more=%0d dec_match=%0d dec_error=%0d",
             n_hold, n_repeat, n_shift, n_leaf_first, n_node_first, n_single, n_dim_ovf, n_adm_ovf,
             n_dec_more, n_dec_match, n_dec_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
