// huff_ref_pkg: reference models for the Huffman decoder testbenches.
//
// Holds the example code as text strings and rebuilds the JPEG luminance
// AC codewords from the standard's BITS/HUFFVAL lists with the size-list /
// code-list procedure of the JPEG standard (Annex C), written independently
// of the RTL. Also gives a slow search decoder used to predict what the
// LUTs must return, and helpers to turn a queue of bits into input words.
package huff_ref_pkg;
  import huff_pkg::JPEG_AC_BITS, huff_pkg::JPEG_AC_VAL;

  // Example code, symbol A..H = index 0..7.
  string t2_code [8] = '{"00", "0101", "011", "10", "01001", "110", "01000", "111"};

  int jp_n;
  int jp_len  [162];
  int jp_code [162];   // right-aligned
  int jp_val  [162];

  function automatic void build_jpeg();
    int k, code, si;
    int huffsize [163];
    k = 0;
    for (int l = 1; l <= 16; l++)
      for (int j = 0; j < int'(JPEG_AC_BITS[l]); j++) huffsize[k++] = l;
    huffsize[k] = 0;
    jp_n = k;
    k = 0; code = 0; si = huffsize[0];
    while (huffsize[k] != 0) begin
      while (huffsize[k] == si) begin
        jp_len[k]  = si;
        jp_code[k] = code;
        jp_val[k]  = int'(JPEG_AC_VAL[k]);
        code++; k++;
      end
      code = code << 1;
      si++;
    end
  endfunction

  // Search decoder: index of the codeword at the head of a 16-bit window, -1 if none.
  function automatic int jpeg_find(logic [15:0] win);
    for (int i = 0; i < jp_n; i++)
      if (int'(win >> (16 - jp_len[i])) == jp_code[i]) return i;
    return -1;
  endfunction

  // Append the text code s to a bit queue.
  function automatic void push_str(ref bit q[$], input string s);
    for (int i = 0; i < s.len(); i++) q.push_back(s[i] == "1");
  endfunction

  function automatic void push_bits(ref bit q[$], input int value, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(bit'((value >> i) & 1));
  endfunction

endpackage
