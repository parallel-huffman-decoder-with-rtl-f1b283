// tb_jpeg_l1d: all 65536 windows against a loop count of leading ones.
module tb_jpeg_l1d;
  logic [15:0] bits;
  logic [4:0] count;
  int checks = 0, failures = 0;

  jpeg_l1d #(.N(16)) dut (.*);

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int e;
      bits = 16'(v);
      e = 0;
      while (e < 16 && bits[15-e]) e++;
      #1;
      checks++;
      if (count != 5'(e)) begin
        failures++;
        $display("FAIL %b: got %0d exp %0d", bits, count, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
