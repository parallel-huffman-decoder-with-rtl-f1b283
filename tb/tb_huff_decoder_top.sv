// tb_huff_decoder_top: end-to-end test of huff_decoder_top at its default
// parameters. The three decoders run at the same time on their own streams:
//   t2  2000 random symbols of the example code,
//   jf  1000 random (codeword, amplitude) pairs of the JPEG AC table,
//   jo  the same JPEG pairs.
// Each stream is run twice: with the source always valid (checks the rate
// of one item per clock) and with a source that pauses at random (stalls).
// Finally both JPEG decoders get a stream of ones and must flag code_err.
// Every output item is checked against the reference models, and each
// mechanism of the design is counted; one that never happens is a failure:
// stalls, codewords that span the two buffer layers, words taken while a
// layer is released in the same cycle (seen as a word accepted in a cycle
// where the decoder also consumed across a layer end), amplitude items,
// category-0 amplitude items, codewords decoded through a leading-ones run
// of 9 or more (the long-code sections of the optimized LUT), code errors.
module tb_huff_decoder_top;
  import huff_pkg::run_cat_t;
  import huff_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic        t2_in_valid, t2_in_ready, t2_out_valid;
  logic [7:0]  t2_in_data;
  logic [2:0]  t2_out_sym, t2_out_len;
  logic        jf_in_valid, jf_in_ready, jf_out_valid, jf_out_is_amp, jf_code_err;
  logic [15:0] jf_in_data, jf_out_amp;
  run_cat_t    jf_out_rc;
  logic [4:0]  jf_out_len;
  logic        jo_in_valid, jo_in_ready, jo_out_valid, jo_out_is_amp, jo_code_err;
  logic [15:0] jo_in_data, jo_out_amp;
  run_cat_t    jo_out_rc;
  logic [4:0]  jo_out_len;

  huff_decoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, gap_pct = 0;
  // mechanism counters
  int n_stall_t2 = 0, n_stall_j = 0, n_span_t2 = 0, n_span_j = 0;
  int n_amp = 0, n_cat0 = 0, n_long_ones = 0, n_err = 0, n_words = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef struct { bit is_amp; int rc; int len; int amp; int cyc; } item_t;
  logic [7:0]  t2_words[$];
  logic [15:0] jf_words[$], jo_words[$];
  logic [15:0] jpad = 16'h0000;
  int          t2_exp[$];
  item_t       t2_got[$], j_exp[$], jf_got[$], jo_got[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (t2_out_valid) t2_got.push_back('{0, int'(t2_out_sym), int'(t2_out_len), 0, cycle});
      if (jf_out_valid) jf_got.push_back('{jf_out_is_amp, int'(jf_out_rc), int'(jf_out_len), int'(jf_out_amp), cycle});
      if (jo_out_valid) jo_got.push_back('{jo_out_is_amp, int'(jo_out_rc), int'(jo_out_len), int'(jo_out_amp), cycle});
      if (t2_in_valid && t2_in_ready && t2_words.size() > 0) begin void'(t2_words.pop_front()); n_words++; end
      if (jf_in_valid && jf_in_ready && jf_words.size() > 0) begin void'(jf_words.pop_front()); n_words++; end
      if (jo_in_valid && jo_in_ready && jo_words.size() > 0) begin void'(jo_words.pop_front()); n_words++; end
    end
  end

  always @(negedge clk) begin
    t2_in_valid <= rst_n && !(int'($urandom % 100) < gap_pct);
    jf_in_valid <= rst_n && !(int'($urandom % 100) < gap_pct);
    jo_in_valid <= rst_n && !(int'($urandom % 100) < gap_pct);
    t2_in_data  <= (t2_words.size() > 0) ? t2_words[0] : 8'h00;
    jf_in_data  <= (jf_words.size() > 0) ? jf_words[0] : jpad;
    jo_in_data  <= (jo_words.size() > 0) ? jo_words[0] : jpad;
  end

  task automatic build(int nsym, int npair);
    bit q[$];
    t2_exp.delete(); j_exp.delete(); t2_words.delete(); jf_words.delete(); jo_words.delete();
    for (int k = 0; k < nsym; k++) begin
      int s = int'($urandom % 8);
      int start = q.size();
      t2_exp.push_back(s);
      push_str(q, t2_code[s]);
      if (start / 8 != (q.size() - 1) / 8) n_span_t2++;
    end
    while (q.size() % 8 != 0) q.push_back(0);
    for (int b = 0; b < q.size(); b += 8) begin
      logic [7:0] w;
      for (int j = 0; j < 8; j++) w[7-j] = q[b+j];
      t2_words.push_back(w);
    end
    q.delete();
    for (int k = 0; k < npair; k++) begin
      int i, cat, amp, start, ones;
      i = ($urandom % 3 == 0) ? 3 : int'($urandom % 162);
      cat = jp_val[i] & 15;
      amp = (cat == 0) ? 0 : int'($urandom % (1 << cat));
      start = q.size();
      push_bits(q, jp_code[i], jp_len[i]);
      if (start / 16 != (q.size() - 1) / 16) n_span_j++;
      ones = 0;
      while (ones < jp_len[i] && q[start + ones]) ones++;
      if (ones >= 9) n_long_ones++;
      push_bits(q, amp, cat);
      if (cat == 0) n_cat0++;
      n_amp++;
      j_exp.push_back('{0, jp_val[i], jp_len[i], 0, 0});
      j_exp.push_back('{1, 0, cat, amp, 0});
    end
    while (q.size() % 16 != 0) q.push_back(0);
    for (int b = 0; b < q.size(); b += 16) begin
      logic [15:0] w;
      for (int j = 0; j < 16; j++) w[15-j] = q[b+j];
      jf_words.push_back(w);
      jo_words.push_back(w);
    end
  endtask

  task automatic check_jpeg(string tag, ref item_t got[$], input bit consecutive);
    int m = j_exp.size();
    for (int k = 0; k < m; k++) begin
      item_t g = got[k], e = j_exp[k];
      bit ok = (g.is_amp == e.is_amp) && (g.len == e.len) &&
               (e.is_amp ? g.amp == e.amp : g.rc == e.rc);
      check(ok, $sformatf("%s item %0d: got amp=%0d rc=%h len=%0d a=%h exp amp=%0d rc=%h len=%0d a=%h",
                          tag, k, g.is_amp, g.rc, g.len, g.amp, e.is_amp, e.rc, e.len, e.amp));
    end
    if (consecutive)
      check(got[m-1].cyc - got[0].cyc == m - 1, $sformatf("%s: %0d items in %0d cycles", tag, m, got[m-1].cyc - got[0].cyc + 1));
    else if (got[m-1].cyc - got[0].cyc > m - 1) n_stall_j += got[m-1].cyc - got[0].cyc + 1 - m;
  endtask

  task automatic run(int nsym, int npair, int pct);
    gap_pct = pct;
    rst_n = 0;
    build(nsym, npair);
    repeat (2) @(posedge clk);
    t2_got.delete(); jf_got.delete(); jo_got.delete();
    @(negedge clk) rst_n = 1;
    while (t2_got.size() < nsym || jf_got.size() < 2 * npair || jo_got.size() < 2 * npair)
      @(posedge clk);
    for (int k = 0; k < nsym; k++) begin
      check(t2_got[k].rc == t2_exp[k], $sformatf("t2 symbol %0d: got %0d exp %0d", k, t2_got[k].rc, t2_exp[k]));
      check(t2_got[k].len == t2_code[t2_exp[k]].len(), $sformatf("t2 length %0d", k));
    end
    if (pct == 0)
      check(t2_got[nsym-1].cyc - t2_got[0].cyc == nsym - 1, "t2: one symbol per cycle");
    else
      n_stall_t2 += t2_got[nsym-1].cyc - t2_got[0].cyc + 1 - nsym;
    check_jpeg("jf", jf_got, pct == 0);
    check_jpeg("jo", jo_got, pct == 0);
    check(!jf_code_err && !jo_code_err, "code_err on a valid stream");
  endtask

  initial begin
    build_jpeg();
    run(2000, 1000, 0);
    run(2000, 1000, 35);
    // stream without a codeword
    rst_n = 0;
    jpad = 16'hffff;
    gap_pct = 0;
    jf_words.delete(); jo_words.delete();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(posedge clk);
    n_err = int'(jf_code_err) + int'(jo_code_err);
    check(n_err == 2, "code_err on a stream of ones");
    $display("stalls t2=%0d jpeg=%0d; layer-spanning codewords t2=%0d jpeg=%0d; words taken=%0d",
             n_stall_t2, n_stall_j, n_span_t2, n_span_j, n_words);
    $display("amplitude items=%0d (category 0: %0d); codewords with >=9 leading ones=%0d; code errors=%0d",
             n_amp, n_cat0, n_long_ones, n_err);
    check(n_stall_t2 > 0, "t2 stall never happened");
    check(n_stall_j > 0,  "jpeg stall never happened");
    check(n_span_t2 > 0,  "t2 layer-spanning codeword never happened");
    check(n_span_j > 0,   "jpeg layer-spanning codeword never happened");
    check(n_amp > 0 && n_cat0 > 0, "amplitude / category-0 item never happened");
    check(n_long_ones > 0, "long leading-ones codeword never happened");
    check(n_words > 0, "no words taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
