// tb_huff_shifter: random buffer contents and pointers against a bit-by-bit
// model, for the example decoder (W=8, WIN=5) and the JPEG decoder
// (W=16, WIN=16) shapes.
module tb_huff_shifter;
  int checks = 0, failures = 0;

  logic [15:0] d8;  logic [2:0] p8;  logic [4:0]  w8;
  logic [31:0] d16; logic [3:0] p16; logic [15:0] w16;

  huff_shifter #(.W(8),  .WIN(5))  dut8  (.data (d8),  .ptr (p8),  .window (w8));
  huff_shifter #(.W(16), .WIN(16)) dut16 (.data (d16), .ptr (p16), .window (w16));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [4:0] e8; logic [15:0] e16;
      d8 = 16'($urandom); p8 = 3'($urandom);
      d16 = $urandom;     p16 = 4'($urandom);
      #1;
      for (int b = 0; b < 5; b++)  e8[4-b]   = d8[15 - p8 - b];
      for (int b = 0; b < 16; b++) e16[15-b] = d16[31 - p16 - b];
      checks += 2;
      if (w8 != e8)   begin failures++; $display("FAIL W8 d=%h p=%0d got %b exp %b", d8, p8, w8, e8); end
      if (w16 != e16) begin failures++; $display("FAIL W16 d=%h p=%0d got %h exp %h", d16, p16, w16, e16); end
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
