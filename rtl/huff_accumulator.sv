// huff_accumulator: bit pointer of a bit-parallel Huffman decoder.
//
// The register ptr points at the first undecoded bit of the first buffer
// layer (0..W-1). Each time a codeword (or, in the JPEG decoder, an
// amplitude) is consumed, add_en is raised with its length add_len; at the
// clock edge the length is accumulated. When the sum reaches or passes the
// word width W the first buffer layer is used up: word_done is raised in
// the same cycle so the buffer can move its second layer forward and take
// a new word, and W is subtracted from the sum. This is the two-fold role
// the accumulator has in the decoder: point the shifter at the right bit,
// and trigger the buffer load.
//
// Interface: sum and word_done are combinational from ptr and add_len; ptr
// is registered and reset to 0 by the active-low synchronous reset rst_n.
// add_len must not exceed W, so one layer at most is used up per cycle.
module huff_accumulator #(
  parameter int unsigned W     = 8,  // input word (buffer layer) width
  parameter int unsigned LEN_W = 4,  // width of a consumed length
  localparam int unsigned PTR_W = $clog2(W),
  localparam int unsigned SUM_W = PTR_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             add_en,
  input  logic [LEN_W-1:0] add_len,
  output logic [PTR_W-1:0] ptr,
  output logic [SUM_W-1:0] sum,
  output logic             word_done
);

  always_comb begin
    sum       = SUM_W'(ptr) + SUM_W'(add_len);
    word_done = add_en && (sum >= SUM_W'(W));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      ptr <= '0;
    else if (add_en) ptr <= word_done ? PTR_W'(sum - SUM_W'(W)) : PTR_W'(sum);
  end

endmodule
