// huff_decoder_top: the three bit-parallel Huffman decoders side by side.
//
//   t2_*  huff_par_decoder: the basic bit-parallel decoder for the
//         eight-symbol example code, 8-bit input words, one symbol per cycle.
//   jf_*  jpeg_huff_decoder with the full 16-bit-input JPEG luminance AC
//         LUT: alternating codeword and amplitude items, 16-bit words.
//   jo_*  jpeg_huff_decoder with the optimized LUT (leading 1's detector,
//         positioner, 10-bit key): same behaviour as jf_*.
// The decoders share only clock and reset (rst_n, active low, synchronous)
// and each has its own input handshake and outputs; see the submodules for
// timing.
module huff_decoder_top
  import huff_pkg::*;
#(
  parameter int unsigned T2_W   = 8,   // input word of the basic decoder
  parameter int unsigned JPEG_W = 16   // input word of the JPEG decoders
) (
  input  logic              clk,
  input  logic              rst_n,
  // basic decoder
  input  logic              t2_in_valid,
  input  logic [T2_W-1:0]   t2_in_data,
  output logic              t2_in_ready,
  output logic              t2_out_valid,
  output logic [2:0]        t2_out_sym,
  output logic [2:0]        t2_out_len,
  // JPEG decoder, full LUT
  input  logic              jf_in_valid,
  input  logic [JPEG_W-1:0] jf_in_data,
  output logic              jf_in_ready,
  output logic              jf_out_valid,
  output logic              jf_out_is_amp,
  output run_cat_t          jf_out_rc,
  output logic [15:0]       jf_out_amp,
  output logic [4:0]        jf_out_len,
  output logic              jf_code_err,
  // JPEG decoder, optimized LUT
  input  logic              jo_in_valid,
  input  logic [JPEG_W-1:0] jo_in_data,
  output logic              jo_in_ready,
  output logic              jo_out_valid,
  output logic              jo_out_is_amp,
  output run_cat_t          jo_out_rc,
  output logic [15:0]       jo_out_amp,
  output logic [4:0]        jo_out_len,
  output logic              jo_code_err
);

  huff_par_decoder #(.W(T2_W)) u_t2 (
    .clk, .rst_n,
    .in_valid  (t2_in_valid),  .in_data (t2_in_data), .in_ready (t2_in_ready),
    .out_valid (t2_out_valid), .out_sym (t2_out_sym), .out_len  (t2_out_len)
  );

  jpeg_huff_decoder #(.W(JPEG_W), .LUT_OPT(1'b0)) u_jpeg_full (
    .clk, .rst_n,
    .in_valid   (jf_in_valid),   .in_data (jf_in_data), .in_ready (jf_in_ready),
    .out_valid  (jf_out_valid),  .out_is_amp (jf_out_is_amp),
    .out_rc     (jf_out_rc),     .out_amp (jf_out_amp), .out_len (jf_out_len),
    .code_err   (jf_code_err)
  );

  jpeg_huff_decoder #(.W(JPEG_W), .LUT_OPT(1'b1)) u_jpeg_opt (
    .clk, .rst_n,
    .in_valid   (jo_in_valid),   .in_data (jo_in_data), .in_ready (jo_in_ready),
    .out_valid  (jo_out_valid),  .out_is_amp (jo_out_is_amp),
    .out_rc     (jo_out_rc),     .out_amp (jo_out_amp), .out_len (jo_out_len),
    .code_err   (jo_code_err)
  );

endmodule
