// huff_pkg: types and constant tables shared by the Huffman decoders.
//
// Two codes are defined here. The first is the eight-symbol example code of
// the basic bit-parallel decoder: symbols A..H carry the 3-bit fixed-length
// codes 000..111 and the variable-length codes
//   A 00, B 0101, C 011, D 10, E 01001, F 110, G 01000, H 111
// (lengths 2..5; the code is complete, its Kraft sum is exactly 1).
// The second is the luminance AC table of the JPEG baseline standard
// (ITU-T T.81 Annex K.3): the BITS list (number of codes of each length
// 1..16) and HUFFVAL (the run/category byte of each code, in code order).
// Its 162 codewords are not stored; they are derived at elaboration by the
// canonical rule of the standard (Annex C): codes of one length are
// consecutive, and the first code of length L+1 is (last code of length L
// plus one) shifted left by one. jpeg_ac_len() and jpeg_ac_code() compute
// the length and the left-aligned codeword of entry i from BITS.
// Taking the table from the standard is this design's choice; the decoder
// only relies on the code being prefix-free with codes of at most 16 bits.
package huff_pkg;

  // ---------------- example code (eight symbols) ----------------
  localparam int unsigned T2_NSYM   = 8;
  localparam int unsigned T2_MAXLEN = 5;
  // Variable-length code of symbol s, left-aligned in 5 bits, and its length.
  localparam logic [0:T2_NSYM-1][4:0] T2_CODE = {
    5'b00000,  // A 00
    5'b01010,  // B 0101
    5'b01100,  // C 011
    5'b10000,  // D 10
    5'b01001,  // E 01001
    5'b11000,  // F 110
    5'b01000,  // G 01000
    5'b11100   // H 111
  };
  localparam logic [0:T2_NSYM-1][2:0] T2_LEN = {
    3'd2, 3'd4, 3'd3, 3'd2, 3'd5, 3'd3, 3'd5, 3'd3
  };

  // ---------------- JPEG luminance AC table ----------------
  localparam int unsigned JPEG_MAXLEN = 16;
  localparam int unsigned JPEG_NCODES = 162;
  // Number of codes of each length 1..16.
  localparam logic [1:16][7:0] JPEG_AC_BITS = {
    8'd0, 8'd2, 8'd1, 8'd3, 8'd3, 8'd2, 8'd4, 8'd3,
    8'd5, 8'd5, 8'd4, 8'd4, 8'd0, 8'd0, 8'd1, 8'd125
  };
  // Run/category byte (run in [7:4], category in [3:0]) of each code.
  localparam logic [0:JPEG_NCODES-1][7:0] JPEG_AC_VAL = {
    8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12, 8'h21, 8'h31,
    8'h41, 8'h06, 8'h13, 8'h51, 8'h61, 8'h07, 8'h22, 8'h71, 8'h14, 8'h32,
    8'h81, 8'h91, 8'ha1, 8'h08, 8'h23, 8'h42, 8'hb1, 8'hc1, 8'h15, 8'h52,
    8'hd1, 8'hf0, 8'h24, 8'h33, 8'h62, 8'h72, 8'h82, 8'h09, 8'h0a, 8'h16,
    8'h17, 8'h18, 8'h19, 8'h1a, 8'h25, 8'h26, 8'h27, 8'h28, 8'h29, 8'h2a,
    8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45,
    8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57,
    8'h58, 8'h59, 8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69,
    8'h6a, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h83,
    8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89, 8'h8a, 8'h92, 8'h93, 8'h94,
    8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3, 8'ha4, 8'ha5,
    8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6,
    8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7,
    8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8,
    8'hd9, 8'hda, 8'he1, 8'he2, 8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8,
    8'he9, 8'hea, 8'hf1, 8'hf2, 8'hf3, 8'hf4, 8'hf5, 8'hf6, 8'hf7, 8'hf8,
    8'hf9, 8'hfa
  };

  // Run/category pair as the decoder presents it.
  typedef struct packed {
    logic [3:0] run;       // number of zero coefficients before this one
    logic [3:0] category;  // amplitude bit length
  } run_cat_t;

  // Code length of JPEG table entry i.
  function automatic int unsigned jpeg_ac_len(int unsigned i);
    int unsigned k;
    k = 0;
    for (int unsigned l = 1; l <= JPEG_MAXLEN; l++) begin
      if (i < k + int'(JPEG_AC_BITS[l])) return l;
      k += int'(JPEG_AC_BITS[l]);
    end
    return 0;
  endfunction

  // Codeword of JPEG table entry i, left-aligned in 16 bits.
  function automatic logic [15:0] jpeg_ac_code(int unsigned i);
    int unsigned k;
    int unsigned code;
    k    = 0;
    code = 0;
    for (int unsigned l = 1; l <= JPEG_MAXLEN; l++) begin
      for (int unsigned j = 0; j < int'(JPEG_AC_BITS[l]); j++) begin
        if (k == i) return 16'(code << (JPEG_MAXLEN - l));
        code++;
        k++;
      end
      code = code << 1;
    end
    return '0;
  endfunction

  // Number of leading ones of a left-aligned codeword of length len.
  function automatic int unsigned lead_ones(logic [15:0] code, int unsigned len);
    int unsigned n;
    n = 0;
    for (int unsigned b = 0; b < len; b++) begin
      if (code[15-b] != 1'b1) return n;
      n++;
    end
    return n;
  endfunction

endpackage
