// tb_huff_lut_table2: all 32 five-bit inputs against the text form of the
// example code (symbol and length of the codeword that prefixes the input).
module tb_huff_lut_table2;
  import huff_ref_pkg::*;
  logic [4:0] bits;
  logic [2:0] sym, len;
  logic hit;
  int checks = 0, failures = 0;

  huff_lut_table2 dut (.*);

  initial begin
    for (int a = 0; a < 32; a++) begin
      int es, el;
      bits = 5'(a);
      es = -1; el = 0;
      for (int s = 0; s < 8; s++) begin
        bit m;
        m = 1;
        for (int b = 0; b < t2_code[s].len(); b++)
          if ((t2_code[s][b] == "1") != bits[4-b]) m = 0;
        if (m) begin es = s; el = t2_code[s].len(); end
      end
      #1;
      checks++;
      if (!hit || es < 0 || sym != 3'(es) || len != 3'(el)) begin
        failures++;
        $display("FAIL in=%b got hit=%0d sym=%0d len=%0d exp sym=%0d len=%0d", bits, hit, sym, len, es, el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
