// jpeg_lut_full: JPEG luminance AC look-up table with the full 16-bit input.
//
// The LUT receives the next 16 undecoded bits (the longest JPEG codeword is
// 16 bits) and compares them with all 162 stored codewords at once, each
// entry checking only as many leading bits as its codeword has. As the
// code is prefix-free, at most one entry matches; that entry gives the
// 13-bit result: the run/category byte (run of zeros in [7:4], amplitude
// category in [3:0]) and the 5-bit code length. hit is low when no entry
// matches (an invalid codeword, or bits past the end of the valid data).
// The entries are generated at elaboration from the standard's BITS and
// HUFFVAL lists in huff_pkg (canonical code construction), so the table is
// a set of constant comparators, the gate-level form of a PLA. Purely
// combinational.
module jpeg_lut_full
  import huff_pkg::*;
(
  input  logic [15:0] bits,   // next undecoded bits, first bit in the MSB
  output run_cat_t    rc,
  output logic [4:0]  len,
  output logic        hit
);

  logic [JPEG_NCODES-1:0] match;

  for (genvar i = 0; i < JPEG_NCODES; i++) begin : g_entry
    localparam int unsigned L     = jpeg_ac_len(i);
    localparam logic [15:0] CODE  = jpeg_ac_code(i);
    localparam logic [15:0] MASK  = ~(16'hffff >> L);
    assign match[i] = ((bits ^ CODE) & MASK) == 16'h0000;
  end

  always_comb begin
    rc  = '0;
    len = '0;
    for (int i = 0; i < int'(JPEG_NCODES); i++) begin
      if (match[i]) begin
        rc  = run_cat_t'(JPEG_AC_VAL[i]);
        len = 5'(jpeg_ac_len(i));
      end
    end
    hit = |match;
  end

endmodule
