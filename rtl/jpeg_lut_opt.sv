// jpeg_lut_opt: optimized JPEG luminance AC look-up table.
//
// All long JPEG luminance codewords begin with a run of ones, so a codeword
// is split into three parts: n leading ones, the zero that ends them, and
// a remainder that is never longer than 6 bits for this table (n ranges
// over 0..15). The leading 1's detector (jpeg_l1d) counts n in the 16-bit
// window; the shifter/positioner moves the window left by n+1 bits so the
// remainder sits at its top; the pointer, n as a 4-bit value, selects the
// LUT section that belongs to that run of ones. The LUT then compares a
// 10-bit key {n, remainder} instead of 16 bits, still with one entry per
// codeword (162), each giving the 13-bit result: run/category byte and
// 5-bit code length. The outputs equal those of jpeg_lut_full for every
// window; the cost is the detector and shifter in series in front of the
// table, which lengthens the path from buffer to result.
// A window of 16 ones has no codeword (hit low). Purely combinational.
module jpeg_lut_opt
  import huff_pkg::*;
(
  input  logic [15:0] bits,   // next undecoded bits, first bit in the MSB
  output run_cat_t    rc,
  output logic [4:0]  len,
  output logic        hit
);

  localparam int unsigned REST_W = 6;  // longest remainder of the table

  logic [4:0]         ones;       // leading ones, 0..16
  logic [15:0]        positioned; // window moved past the run of ones
  logic [3:0]         pointer;    // LUT section
  logic [REST_W-1:0]  rest;
  logic [JPEG_NCODES-1:0] match;

  jpeg_l1d #(.N(16)) u_l1d (.bits, .count (ones));

  always_comb begin
    positioned = bits << ones;          // positioned[15] is the ending zero
    rest       = positioned[14 -: REST_W];
    pointer    = ones[3:0];
  end

  for (genvar i = 0; i < JPEG_NCODES; i++) begin : g_entry
    localparam int unsigned L    = jpeg_ac_len(i);
    localparam logic [15:0] CODE = jpeg_ac_code(i);
    localparam int unsigned N1   = lead_ones(CODE, L);
    localparam int unsigned RL   = L - N1 - 1;           // remainder length
    localparam logic [15:0] CODE_POS = CODE << (N1 + 1);
    localparam logic [REST_W-1:0] REST = CODE_POS[15 -: REST_W];
    localparam logic [REST_W-1:0] MASK = ~({REST_W{1'b1}} >> RL);
    if (N1 >= L || RL > REST_W) begin : g_bad
      $error("codeword %0d does not fit the reduced LUT", i);
    end
    assign match[i] = !ones[4] && (pointer == 4'(N1))
                      && (((rest ^ REST) & MASK) == '0);
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
