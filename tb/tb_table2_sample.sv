// tb_table2_sample: decodes the full sample set the example code was built
// for: 120 symbols with occurrence counts A 22, B 8, C 15, D 33, E 4, F 16,
// G 2, H 20, in random order. Checks that the coded stream is 325 bits
// (against 360 bits for the 3-bit fixed-length code), that all 120 symbols
// come out in order, and that they take 120 consecutive cycles.
module tb_table2_sample;
  import huff_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic [7:0] in_data;
  logic [2:0] out_sym, out_len;
  int checks = 0, failures = 0, cycle = 0;
  int counts[8] = '{22, 8, 15, 33, 4, 16, 2, 20};
  int exp_sym[$], got_sym[$], got_cyc[$];
  logic [7:0] words[$];

  huff_par_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      got_sym.push_back(int'(out_sym));
      got_cyc.push_back(cycle);
    end
    if (rst_n && in_valid && in_ready && words.size() > 0) void'(words.pop_front());
  end
  always @(negedge clk) begin
    in_valid <= rst_n;
    in_data  <= (words.size() > 0) ? words[0] : 8'h00;
  end

  initial begin
    bit q[$];
    int pool[$];
    for (int s = 0; s < 8; s++) repeat (counts[s]) pool.push_back(s);
    pool.shuffle();
    foreach (pool[i]) begin
      exp_sym.push_back(pool[i]);
      push_str(q, t2_code[pool[i]]);
    end
    check(pool.size() == 120, "120 symbols");
    check(q.size() == 325, $sformatf("coded stream is %0d bits, expected 325", q.size()));
    while (q.size() % 8 != 0) q.push_back(0);
    for (int b = 0; b < q.size(); b += 8) begin
      logic [7:0] w;
      for (int j = 0; j < 8; j++) w[7-j] = q[b+j];
      words.push_back(w);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (got_sym.size() < 120) @(posedge clk);
    for (int i = 0; i < 120; i++)
      check(got_sym[i] == exp_sym[i], $sformatf("symbol %0d: got %0d exp %0d", i, got_sym[i], exp_sym[i]));
    check(got_cyc[119] - got_cyc[0] == 119, $sformatf("120 symbols took %0d cycles", got_cyc[119] - got_cyc[0] + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
