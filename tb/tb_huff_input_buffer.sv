// tb_huff_input_buffer: random pushes and layer releases against a queue
// model. Checks layer contents, valid count and in_ready each cycle, and
// that a release and a load can happen in the same cycle.
module tb_huff_input_buffer;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, shift;
  logic [W-1:0] in_data;
  logic [2*W-1:0] data;
  logic [1:0] nvalid;
  int checks = 0, failures = 0, both = 0;
  logic [W-1:0] q[$];

  huff_input_buffer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: nvalid=%0d data=%h q=%p", what, nvalid, data, q);
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(nvalid == 2'(q.size()), "nvalid");
      if (q.size() > 0) check(data[2*W-1 -: W] == q[0], "layer1");
      if (q.size() > 1) check(data[W-1:0] == q[1], "layer2");
      in_valid = ($urandom % 3) != 0;
      in_data  = W'($urandom);
      shift    = (q.size() > 0) && (($urandom % 2) == 0);
      #1;
      check(in_ready == (q.size() < 2 || shift), "in_ready");
      @(posedge clk);
      if (shift) void'(q.pop_front());
      if (in_valid && in_ready) begin
        q.push_back(in_data);
        if (shift) both++;
      end
    end
    check(both > 100, "release and load in one cycle");
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
