// tb_huff_par_decoder: end-to-end test of the basic bit-parallel decoder.
//  1. The worked example: words 00100110 10010101 11011110 decode to
//     A D C E B F H D with lengths 2 2 3 5 4 3 3 2, one symbol per cycle.
//  2. 3000 random symbols with the source always valid: every symbol
//     correct, and the symbols leave on consecutive cycles (one per clock).
//  3. 3000 random symbols with a source that pauses at random: every symbol
//     correct, stalls observed.
// The stream is built from the text form of the code in huff_ref_pkg.
module tb_huff_par_decoder;
  import huff_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic [7:0] in_data;
  logic [2:0] out_sym, out_len;
  int checks = 0, failures = 0;

  huff_par_decoder #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  logic [7:0] words[$];
  int exp_sym[$];
  int got_sym[$], got_len[$], got_cyc[$];
  int cycle = 0;
  int gap_pct = 0;
  int stalls = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      got_sym.push_back(int'(out_sym));
      got_len.push_back(int'(out_len));
      got_cyc.push_back(cycle);
    end
  end

  // Source: presents words, holds them until taken; zero padding after the end.
  always @(negedge clk) begin
    if (!rst_n) in_valid <= 0;
    else if (int'($urandom % 100) < gap_pct) in_valid <= 0;
    else begin
      in_valid <= 1;
      in_data  <= (words.size() > 0) ? words[0] : 8'h00;
    end
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready && words.size() > 0) void'(words.pop_front());

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int n, int pct, bit consecutive);
    bit q[$];
    gap_pct = pct;
    rst_n = 0;
    got_sym.delete(); got_len.delete(); got_cyc.delete();
    words.delete();
    for (int i = 0; i < n; i++) begin
      int s = int'($urandom % 8);
      exp_sym.push_back(s);
      push_str(q, t2_code[s]);
    end
    while (q.size() % 8 != 0) q.push_back(0);
    for (int i = 0; i < q.size(); i += 8) begin
      logic [7:0] w;
      for (int b = 0; b < 8; b++) w[7-b] = q[i+b];
      words.push_back(w);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (got_sym.size() < n) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      check(got_sym[i] == exp_sym[i], $sformatf("symbol %0d: got %0d exp %0d", i, got_sym[i], exp_sym[i]));
      check(got_len[i] == t2_code[exp_sym[i]].len(), $sformatf("length %0d", i));
    end
    if (consecutive)
      check(got_cyc[n-1] - got_cyc[0] == n - 1,
            $sformatf("%0d symbols took %0d cycles", n, got_cyc[n-1] - got_cyc[0] + 1));
    else begin
      stalls = (got_cyc[n-1] - got_cyc[0] + 1) - n;
      check(stalls > 0, "no stall seen");
    end
    exp_sym.delete();
  endtask

  initial begin
    int lens[8] = '{2, 2, 3, 5, 4, 3, 3, 2};
    int syms[8] = '{0, 3, 2, 4, 1, 5, 7, 3};
    in_data = 0;
    // 1. worked example
    gap_pct = 0;
    words = '{8'b00100110, 8'b10010101, 8'b11011110};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (got_sym.size() < 8) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      check(got_sym[i] == syms[i], $sformatf("example symbol %0d: got %0d", i, got_sym[i]));
      check(got_len[i] == lens[i], $sformatf("example length %0d: got %0d", i, got_len[i]));
    end
    check(got_cyc[7] - got_cyc[0] == 7, "example: one symbol per cycle");
    // 2. always-valid source
    run(3000, 0, 1);
    // 3. pausing source
    run(3000, 40, 0);
    $display("stall cycles in pausing run: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
