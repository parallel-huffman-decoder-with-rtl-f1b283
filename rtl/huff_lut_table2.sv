// huff_lut_table2: look-up table of the eight-symbol example code.
//
// The LUT sees the next five undecoded bits (the longest codeword is five
// bits) and returns the decoded symbol, i.e. its 3-bit fixed-length code
// (A=000 .. H=111), together with the length of the codeword found at the
// head of the bits; the accumulator adds that length. It is a 32-word ROM
// indexed by the five bits; each word is filled at elaboration from the
// code list in huff_pkg by matching every codeword as a prefix of the
// address, so changing the code means changing only that list. Because the
// example code is complete, every address hits; hit is kept for codes that
// are not. Purely combinational, as the ROM of the bit-parallel decoder is
// read in the same cycle as the shifter.
module huff_lut_table2
  import huff_pkg::*;
(
  input  logic [T2_MAXLEN-1:0] bits,   // next undecoded bits, first bit in MSB
  output logic [2:0]           sym,    // fixed-length code of the symbol
  output logic [2:0]           len,    // codeword length
  output logic                 hit
);

  typedef struct packed {
    logic       hit;
    logic [2:0] sym;
    logic [2:0] len;
  } entry_t;

  localparam int unsigned DEPTH = 1 << T2_MAXLEN;

  function automatic entry_t rom_word(int unsigned addr);
    entry_t e;
    e = '0;
    for (int unsigned s = 0; s < T2_NSYM; s++) begin
      logic [T2_MAXLEN-1:0] mask;
      mask = ~(T2_MAXLEN'({T2_MAXLEN{1'b1}}) >> T2_LEN[s]);
      if (((T2_MAXLEN'(addr) ^ T2_CODE[s]) & mask) == '0) begin
        e.hit = 1'b1;
        e.sym = 3'(s);
        e.len = T2_LEN[s];
      end
    end
    return e;
  endfunction

  entry_t rom [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) rom[a] = rom_word(a);
  end

  always_comb begin
    hit = rom[bits].hit;
    sym = rom[bits].sym;
    len = rom[bits].len;
  end

endmodule
