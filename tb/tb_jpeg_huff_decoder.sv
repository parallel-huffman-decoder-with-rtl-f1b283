// tb_jpeg_huff_decoder: end-to-end test of the JPEG Huffman decoder.
// A random sequence of (codeword, amplitude) pairs over the luminance AC
// table is turned into a bit stream and 16-bit words. The decoder with the
// optimized LUT is checked item by item against the sequence (alternating
// codeword and amplitude items, run/category, lengths, amplitude bits);
// the decoder with the full LUT, fed the same words, must match it cycle
// for cycle. Runs: source always valid (2 items per pair, one item per
// cycle), source pausing at random (stalls), and a stream of ones that
// holds no codeword (code_err must rise and decoding stop).
module tb_jpeg_huff_decoder;
  import huff_pkg::run_cat_t;
  import huff_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [15:0] in_data;
  logic in_ready [2];
  logic out_valid [2], out_is_amp [2], code_err [2];
  run_cat_t out_rc [2];
  logic [15:0] out_amp [2];
  logic [4:0] out_len [2];
  int checks = 0, failures = 0;

  jpeg_huff_decoder #(.W(16), .LUT_OPT(1'b1)) dut_opt (
    .clk, .rst_n, .in_valid, .in_data, .in_ready (in_ready[0]),
    .out_valid (out_valid[0]), .out_is_amp (out_is_amp[0]), .out_rc (out_rc[0]),
    .out_amp (out_amp[0]), .out_len (out_len[0]), .code_err (code_err[0]));
  jpeg_huff_decoder #(.W(16), .LUT_OPT(1'b0)) dut_full (
    .clk, .rst_n, .in_valid, .in_data, .in_ready (in_ready[1]),
    .out_valid (out_valid[1]), .out_is_amp (out_is_amp[1]), .out_rc (out_rc[1]),
    .out_amp (out_amp[1]), .out_len (out_len[1]), .code_err (code_err[1]));

  always #5 clk = ~clk;

  typedef struct { bit is_amp; int rc; int len; int amp; int cyc; } item_t;
  logic [15:0] words[$];
  logic [15:0] pad = 16'h0000;
  item_t exp_q[$], got_q[$];
  int cycle = 0, gap_pct = 0, mismatch = 0;
  int n_cat0 = 0, n_long = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_ready[0] != in_ready[1] || out_valid[0] != out_valid[1] ||
          (out_valid[0] && (out_is_amp[0] != out_is_amp[1] || out_len[0] != out_len[1] ||
           (!out_is_amp[0] && out_rc[0] != out_rc[1]) || (out_is_amp[0] && out_amp[0] != out_amp[1]))))
        mismatch++;
      if (out_valid[0])
        got_q.push_back('{out_is_amp[0], int'(out_rc[0]), int'(out_len[0]), int'(out_amp[0]), cycle});
    end
  end

  always @(negedge clk) begin
    if (!rst_n) in_valid <= 0;
    else if (int'($urandom % 100) < gap_pct) in_valid <= 0;
    else begin
      in_valid <= 1;
      in_data  <= (words.size() > 0) ? words[0] : pad;
    end
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready[0] && words.size() > 0) void'(words.pop_front());

  task automatic build_stream(int n);
    bit q[$];
    exp_q.delete(); words.delete();
    for (int k = 0; k < n; k++) begin
      int i, cat, amp;
      case ($urandom % 4)
        0:       i = 3;                          // 0x00, end of block
        1:       i = int'($urandom % 162);
        default: i = int'($urandom % 40);        // short and medium codes
      endcase
      cat = jp_val[i] & 15;
      amp = (cat == 0) ? 0 : int'($urandom % (1 << cat));
      if (cat == 0) n_cat0++;
      if (jp_len[i] == 16) n_long++;
      push_bits(q, jp_code[i], jp_len[i]);
      push_bits(q, amp, cat);
      exp_q.push_back('{0, jp_val[i], jp_len[i], 0, 0});
      exp_q.push_back('{1, 0, cat, amp, 0});
    end
    while (q.size() % 16 != 0) q.push_back(0);
    for (int b = 0; b < q.size(); b += 16) begin
      logic [15:0] w;
      for (int j = 0; j < 16; j++) w[15-j] = q[b+j];
      words.push_back(w);
    end
  endtask

  task automatic run(int n, int pct, bit consecutive);
    int m;
    gap_pct = pct;
    rst_n = 0;
    build_stream(n);
    repeat (2) @(posedge clk);
    got_q.delete();
    @(negedge clk) rst_n = 1;
    m = exp_q.size();
    while (got_q.size() < m) @(posedge clk);
    for (int k = 0; k < m; k++) begin
      item_t g = got_q[k], e = exp_q[k];
      bit ok = (g.is_amp == e.is_amp) && (g.len == e.len) &&
               (e.is_amp ? g.amp == e.amp : g.rc == e.rc);
      check(ok, $sformatf("item %0d: got amp=%0d rc=%h len=%0d a=%h exp amp=%0d rc=%h len=%0d a=%h",
                          k, g.is_amp, g.rc, g.len, g.amp, e.is_amp, e.rc, e.len, e.amp));
    end
    if (consecutive)
      check(got_q[m-1].cyc - got_q[0].cyc == m - 1,
            $sformatf("%0d items took %0d cycles", m, got_q[m-1].cyc - got_q[0].cyc + 1));
    else
      check(got_q[m-1].cyc - got_q[0].cyc > m - 1, "no stall seen");
    check(!code_err[0] && !code_err[1], "code_err on a valid stream");
  endtask

  initial begin
    build_jpeg();
    in_data = 0;
    run(1500, 0, 1);
    run(1500, 40, 0);
    check(mismatch == 0, $sformatf("full and optimized LUT decoders differ in %0d cycles", mismatch));
    check(n_cat0 > 0 && n_long > 0, "category-0 and 16-bit codewords exercised");
    // invalid stream: all ones
    rst_n = 0;
    words.delete();
    pad = 16'hffff;
    gap_pct = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(posedge clk);
    got_q.delete();
    repeat (10) @(posedge clk);
    check(code_err[0] && code_err[1], "code_err not raised on an invalid stream");
    check(got_q.size() == 0, "decoding continued after code_err");
    $display("pairs with category 0: %0d, 16-bit codewords: %0d", n_cat0, n_long);
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
