// tb_huff_dec: checks the decoder against code tables held in testbench
// arrays (same-cycle read, like the encoder's table port). Tables: the
// three-value example (codes 1, 00, 01) and complete prefix codes made by
// splitting randomly chosen code words in two until K words exist. A random
// symbol sequence is encoded, sent bit by bit with random pauses, and the
// decoded values are compared. The cycles spent scanning the table are
// checked: per bit, the entries up to the matching one, or all K when the
// bits so far match nothing. Also checked: error after CODE_W unmatched bits
// and flush of a partial code.
module tb_huff_dec;
  localparam int KD = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [9:0] n_symbols;
  logic flush, bit_valid, bit_in, bit_ready, sym_valid, error, scanning;
  logic [31:0] sym_data, tbl_symbol;
  logic [8:0] tbl_addr;
  logic [5:0] tbl_len;
  logic [25:0] tbl_code;

  logic [31:0] t_sym [KD];
  int          t_len [KD];
  logic [25:0] t_code [KD];
  assign tbl_symbol = t_sym[tbl_addr];
  assign tbl_len    = 6'(t_len[tbl_addr]);
  assign tbl_code   = t_code[tbl_addr];

  huff_dec dut (.*);

  int checks = 0, failures = 0, n_err = 0, scan_cyc = 0;
  logic [31:0] got [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (sym_valid) got.push_back(sym_data);
    if (error) n_err++;
    if (scanning) scan_cyc++;
  end

  task automatic send_bit(input logic b);
    while (!bit_ready) @(negedge clk);
    bit_valid = 1'b1; bit_in = b;
    @(negedge clk);
    bit_valid = 1'b0;
    repeat ($urandom % 2) @(negedge clk);
  endtask

  task automatic run(input int k, input int nsyms, input string name);
    bit stream [$];
    logic [31:0] sent [$];
    int exp_scan = 0, l = 0;
    logic [25:0] acc = '0;
    for (int i = 0; i < nsyms; i++) begin
      int s = int'($urandom % k);
      sent.push_back(t_sym[s]);
      for (int b = t_len[s] - 1; b >= 0; b--) stream.push_back(t_code[s][b]);
    end
    foreach (stream[b]) begin
      int hit = -1;
      acc = {acc[24:0], stream[b]}; l++;
      for (int a = 0; a < k && hit < 0; a++) if (t_len[a] == l && t_code[a] == acc) hit = a;
      exp_scan += (hit >= 0) ? hit + 1 : k;
      if (hit >= 0) begin acc = '0; l = 0; end
    end
    n_symbols = 10'(k);
    got.delete();
    scan_cyc = 0;
    foreach (stream[b]) send_bit(stream[b]);
    while (!bit_ready) @(negedge clk);
    @(negedge clk);
    check(got.size() == sent.size(), $sformatf("%s: %0d symbols, expected %0d", name, got.size(), sent.size()));
    foreach (sent[i])
      check(i < got.size() && got[i] == sent[i], $sformatf("%s: decoded value %0d", name, i));
    check(scan_cyc == exp_scan, $sformatf("%s: scan cycles %0d vs %0d", name, scan_cyc, exp_scan));
  endtask

  // complete prefix code: split random words until there are k of them
  task automatic random_code(input int k);
    int n = 2;
    t_code[0] = 26'b0; t_len[0] = 1;
    t_code[1] = 26'b1; t_len[1] = 1;
    while (n < k) begin
      int a = int'($urandom % n);
      if (t_len[a] >= 20) continue;
      t_code[n] = (t_code[a] << 1) | 26'b1; t_len[n] = t_len[a] + 1;
      t_code[a] = t_code[a] << 1;           t_len[a] = t_len[a] + 1;
      n++;
    end
    for (int i = 0; i < k; i++) t_sym[i] = $urandom;
  endtask

  initial begin
    flush = 0; bit_valid = 0; bit_in = 0; n_symbols = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A = 1, B = 00, C = 01
    t_sym[0] = 32'hA; t_len[0] = 1; t_code[0] = 26'b1;
    t_sym[1] = 32'hB; t_len[1] = 2; t_code[1] = 26'b00;
    t_sym[2] = 32'hC; t_len[2] = 2; t_code[2] = 26'b01;
    run(3, 40, "example");
    random_code(2);   run(2, 30, "two");
    random_code(18);  run(18, 200, "random18");
    random_code(512); run(512, 100, "random512");
    // no code matches: single code 0, send ones
    t_sym[0] = 32'h5; t_len[0] = 1; t_code[0] = '0;
    n_symbols = 10'd1;
    n_err = 0;
    for (int b = 0; b < 26; b++) send_bit(1'b1);
    repeat (3) @(negedge clk);
    check(n_err == 1, "error after 26 unmatched bits");
    // flush
    got.delete();
    send_bit(1'b1);
    while (!bit_ready) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
    send_bit(1'b0);
    repeat (3) @(negedge clk);
    check(got.size() == 1 && got[0] == 32'h5, "flush clears a partial code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
