// huff_par_decoder: bit-parallel Huffman decoder for the example code.
//
// The decoder produces one codeword per clock cycle whatever its length.
// Input words of W bits enter a two-layer buffer (huff_input_buffer). The
// accumulator (huff_accumulator) holds the position of the next undecoded
// bit in layer 1; the shifter (huff_shifter) moves the two layers left by
// that position so the LUT (huff_lut_table2) sees the next codeword at its
// MSB end. The LUT returns the symbol and the codeword length; in the same
// cycle the length is accumulated, and when the accumulator passes W the
// buffer moves layer 2 into layer 1 and takes a new word, while W is
// subtracted from the accumulator.
//
// A codeword is consumed only when all its bits lie inside layers that hold
// data; otherwise the decoder waits (a stall, only possible when the source
// does not deliver a word every time one is requested). With in_valid held
// high the buffer never runs dry, since a word (8 bits) is longer than any
// codeword (at most 5), and a symbol leaves every cycle.
//
// Timing: the decoded symbol is registered. A word taken at clock edge k
// gives its first symbol at edge k+1 (out_valid high for one cycle per
// symbol). The input handshake, output registers and stall rule are this
// design's choices; the buffer, accumulator, shifter and LUT follow the
// bit-parallel scheme. Reset: rst_n, active low, synchronous.
module huff_par_decoder
  import huff_pkg::*;
#(
  parameter int unsigned W = 8  // input word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,   // first stream bit in the MSB
  output logic         in_ready,
  output logic         out_valid,
  output logic [2:0]   out_sym,   // fixed-length code of the decoded symbol
  output logic [2:0]   out_len    // length of the codeword it came from
);

  localparam int unsigned PTR_W = $clog2(W);
  localparam int unsigned LEN_W = 3;

  logic [2*W-1:0]       buf_data;
  logic [1:0]           nvalid;
  logic [PTR_W-1:0]     ptr;
  logic [PTR_W:0]       sum;
  logic                 word_done;
  logic [T2_MAXLEN-1:0] window;
  logic [2:0]           lut_sym, lut_len;
  logic                 lut_hit;
  logic                 fire;

  huff_input_buffer #(.W(W)) u_buffer (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .shift (word_done),
    .data  (buf_data),
    .nvalid
  );

  huff_shifter #(.W(W), .WIN(T2_MAXLEN)) u_shifter (
    .data (buf_data), .ptr, .window
  );

  huff_lut_table2 u_lut (
    .bits (window), .sym (lut_sym), .len (lut_len), .hit (lut_hit)
  );

  huff_accumulator #(.W(W), .LEN_W(LEN_W)) u_acc (
    .clk, .rst_n,
    .add_en  (fire),
    .add_len (lut_len),
    .ptr, .sum, .word_done
  );

  // The codeword must lie within the layers that hold data.
  always_comb begin
    fire = lut_hit && ({1'b0, sum} <= (PTR_W + 2)'(nvalid) * (PTR_W + 2)'(W));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_len   <= '0;
    end else begin
      out_valid <= fire;
      if (fire) begin
        out_sym <= lut_sym;
        out_len <= lut_len;
      end
    end
  end

endmodule
