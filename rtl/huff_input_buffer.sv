// huff_input_buffer: the two-layer input buffer of a bit-parallel decoder.
//
// The buffer holds two words of W bits. Layer 1 holds the word being
// decoded, layer 2 the next one, so a codeword that starts near the end of
// layer 1 can run on into layer 2. When the accumulator signals that layer
// 1 is used up (shift), layer 2 moves into layer 1 and a new word is taken
// into layer 2 in the same cycle, as in the worked example of the design.
//
// The input side is a valid/ready handshake (in_valid, in_data, in_ready),
// so the buffer also works when the source is not always ready; a word is
// taken at a clock edge where both are high. in_ready is high while a
// layer is empty or one is being freed by shift in the same cycle. nvalid
// (0..2) counts the layers holding data; the decoder consumes only bits
// that lie inside valid layers and stalls otherwise. The first stream bit
// is the MSB of each word. Reset (rst_n low, synchronous) empties both
// layers.
module huff_input_buffer #(
  parameter int unsigned W = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   in_data,
  output logic           in_ready,
  input  logic           shift,    // layer 1 used up this cycle
  output logic [2*W-1:0] data,     // {layer 1, layer 2}
  output logic [1:0]     nvalid
);

  logic [W-1:0] layer1, layer2;
  logic         push;
  logic [1:0]   kept;              // layers still held after a shift

  always_comb begin
    in_ready = (nvalid < 2'd2) || shift;
    push     = in_valid && in_ready;
    kept     = nvalid - {1'b0, shift};
    data     = {layer1, layer2};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nvalid <= '0;
      layer1 <= '0;
      layer2 <= '0;
    end else begin
      nvalid <= kept + {1'b0, push};
      if (shift) layer1 <= layer2;
      if (push) begin
        if (kept == 2'd0) layer1 <= in_data;
        else              layer2 <= in_data;
      end
    end
  end

  // A layer can only be released if it holds data.
  a_shift_needs_data: assert property (@(posedge clk) disable iff (!rst_n)
    shift |-> nvalid != 2'd0);

endmodule
