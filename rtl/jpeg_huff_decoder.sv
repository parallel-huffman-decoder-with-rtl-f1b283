// jpeg_huff_decoder: bit-parallel Huffman decoder modified for JPEG.
//
// In a JPEG entropy-coded stream each Huffman codeword is followed by the
// bits of a coefficient amplitude, whose length is the category carried by
// the codeword. The decoder therefore alternates between two kinds of
// cycle: in a codeword cycle the LUT decodes the run/category byte and the
// accumulator adds the code length; in the following amplitude cycle the
// shifter output itself is the amplitude, its top `category` bits are
// taken, and the accumulator adds the category. The buffer, accumulator and
// shifter are those of the basic decoder, with 16-bit input words so that
// a layer is never shorter than the longest codeword (16 bits).
//
// The LUT is either the full 16-bit-input table (LUT_OPT = 0, jpeg_lut_full)
// or the optimized table with leading 1's detector, positioner and 10-bit
// key (LUT_OPT = 1, jpeg_lut_opt); both give the same results.
//
// Outputs (registered, one item per cycle while data is available):
//   out_valid   an item is presented this cycle
//   out_is_amp  0: codeword item (out_rc, out_len valid)
//               1: amplitude item (out_amp holds out_len bits, right-aligned,
//                  still in the JPEG coded form, out_len = category)
// The alternation is strict: a codeword of category 0 (end of block, run of
// sixteen zeros) is also followed by an amplitude item, of length 0. A
// codeword or amplitude is consumed only when all its bits lie in valid
// buffer layers; otherwise the decoder waits. A window of valid bits that
// matches no codeword sets the sticky code_err and stops decoding until
// reset. Handshake, strict alternation for category 0 and code_err are this
// design's choices. Reset: rst_n, active low, synchronous.
module jpeg_huff_decoder
  import huff_pkg::*;
#(
  parameter int unsigned W       = 16,  // input word width
  parameter bit          LUT_OPT = 1'b1 // 1: optimized LUT, 0: full LUT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,   // first stream bit in the MSB
  output logic         in_ready,
  output logic         out_valid,
  output logic         out_is_amp,
  output run_cat_t     out_rc,
  output logic [15:0]  out_amp,
  output logic [4:0]   out_len,
  output logic         code_err
);

  localparam int unsigned PTR_W = $clog2(W);
  localparam int unsigned WIN   = JPEG_MAXLEN;

  logic [2*W-1:0]   buf_data;
  logic [1:0]       nvalid;
  logic [PTR_W-1:0] ptr;
  logic [PTR_W:0]   sum;
  logic             word_done;
  logic [WIN-1:0]   window;
  run_cat_t         lut_rc;
  logic [4:0]       lut_len;
  logic             lut_hit;

  logic             phase_amp;  // 0: codeword cycle, 1: amplitude cycle
  logic [3:0]       cat_q;      // category of the last codeword
  logic [4:0]       add_len;
  logic             fits, fire, bad_code;
  logic [15:0]      amp;

  huff_input_buffer #(.W(W)) u_buffer (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .shift (word_done),
    .data  (buf_data),
    .nvalid
  );

  huff_shifter #(.W(W), .WIN(WIN)) u_shifter (
    .data (buf_data), .ptr, .window
  );

  if (LUT_OPT) begin : g_lut_opt
    jpeg_lut_opt u_lut (.bits (window), .rc (lut_rc), .len (lut_len), .hit (lut_hit));
  end else begin : g_lut_full
    jpeg_lut_full u_lut (.bits (window), .rc (lut_rc), .len (lut_len), .hit (lut_hit));
  end

  huff_accumulator #(.W(W), .LEN_W(5)) u_acc (
    .clk, .rst_n,
    .add_en  (fire),
    .add_len,
    .ptr, .sum, .word_done
  );

  always_comb begin
    add_len  = phase_amp ? {1'b0, cat_q} : lut_len;
    fits     = (PTR_W + 2)'(sum) <= (PTR_W + 2)'(nvalid) * (PTR_W + 2)'(W);
    // A full window of valid bits that no codeword matches.
    bad_code = !phase_amp && !lut_hit
               && ((PTR_W + 2)'(ptr) + (PTR_W + 2)'(WIN) <= (PTR_W + 2)'(nvalid) * (PTR_W + 2)'(W));
    fire     = !code_err && fits && (phase_amp || lut_hit);
    amp      = 16'(window >> (5'(WIN) - {1'b0, cat_q}));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_amp  <= 1'b0;
      cat_q      <= '0;
      code_err   <= 1'b0;
      out_valid  <= 1'b0;
      out_is_amp <= 1'b0;
      out_rc     <= '0;
      out_amp    <= '0;
      out_len    <= '0;
    end else begin
      out_valid <= fire;
      if (bad_code) code_err <= 1'b1;
      if (fire) begin
        phase_amp  <= !phase_amp;
        out_is_amp <= phase_amp;
        out_len    <= add_len;
        if (phase_amp) begin
          out_amp <= amp;
        end else begin
          cat_q  <= lut_rc.category;
          out_rc <= lut_rc;
        end
      end
    end
  end

endmodule
