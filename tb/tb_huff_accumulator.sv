// tb_huff_accumulator: random length sequences against a modulo-W model.
// Checks ptr, sum and word_done every cycle, for W = 8 (example decoder).
module tb_huff_accumulator;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic add_en;
  logic [3:0] add_len;
  logic [2:0] ptr;
  logic [3:0] sum;
  logic word_done;
  int checks = 0, failures = 0;
  int model = 0, wraps = 0;

  huff_accumulator #(.W(W), .LEN_W(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: ptr=%0d sum=%0d wd=%0d model=%0d", what, ptr, sum, word_done, model);
    end
  endtask

  initial begin
    add_en = 0; add_len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ptr == 0, "reset");
    for (int i = 0; i < 2000; i++) begin
      add_en  = ($urandom % 4) != 0;
      add_len = 4'($urandom % (W + 1));
      #1;
      check(sum == 4'(model + add_len), "sum");
      check(word_done == (add_en && model + add_len >= W), "word_done");
      @(posedge clk);
      if (add_en) begin
        if (model + add_len >= W) wraps++;
        model = (model + add_len) % W;
      end
      @(negedge clk);
      check(ptr == 3'(model), "ptr");
    end
    check(wraps > 100, "wraps seen");
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
