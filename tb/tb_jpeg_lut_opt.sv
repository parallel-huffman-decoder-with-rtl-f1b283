// tb_jpeg_lut_opt: every 16-bit window against the reference search decoder
// over the JPEG luminance AC codewords (run/category, length, hit), and a
// count of how many windows start with each of the 162 codewords.
module tb_jpeg_lut_opt;
  import huff_pkg::run_cat_t;
  import huff_ref_pkg::*;
  logic [15:0] bits;
  run_cat_t rc;
  logic [4:0] len;
  logic hit;
  int checks = 0, failures = 0, seen = 0;
  int hits_per_code [162];

  jpeg_lut_opt dut (.*);

  initial begin
    build_jpeg();
    if (jp_n != 162) begin failures++; $display("FAIL table size %0d", jp_n); end
    for (int v = 0; v < 65536; v++) begin
      int e;
      bits = 16'(v);
      e = jpeg_find(bits);
      #1;
      checks++;
      if (e < 0) begin
        if (hit) begin failures++; $display("FAIL %b: unexpected hit", bits); end
      end else begin
        hits_per_code[e]++;
        if (!hit || rc != run_cat_t'(jp_val[e]) || len != 5'(jp_len[e])) begin
          failures++;
          $display("FAIL %b: got hit=%0d rc=%h len=%0d exp rc=%h len=%0d",
                   bits, hit, rc, len, jp_val[e], jp_len[e]);
        end
      end
    end
    foreach (hits_per_code[i]) if (hits_per_code[i] > 0) seen++;
    checks++;
    if (seen != 162) begin failures++; $display("FAIL only %0d codewords exercised", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
