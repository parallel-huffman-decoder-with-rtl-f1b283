// jpeg_l1d: leading 1's detector (L1D) of the optimized JPEG LUT.
//
// Counts how many consecutive ones the window starts with, from its MSB
// (the next undecoded bit). The result, 0..16, tells the positioner how far
// to move the window and selects the section of the reduced LUT. Purely
// combinational: a priority encoder on the first zero bit.
module jpeg_l1d #(
  parameter int unsigned N = 16,  // window width
  localparam int unsigned CNT_W = $clog2(N + 1)
) (
  input  logic [N-1:0]     bits,
  output logic [CNT_W-1:0] count
);

  always_comb begin
    count = CNT_W'(N);
    for (int i = 0; i < int'(N); i++) begin
      if (bits[N-1-i] == 1'b0) begin
        count = CNT_W'(i);
        break;
      end
    end
  end

endmodule
