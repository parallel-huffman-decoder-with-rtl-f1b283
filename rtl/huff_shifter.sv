// huff_shifter: barrel shifter (data pointer) in front of the decoder LUT.
//
// The two buffer layers form one 2W-bit field, first layer in the upper
// half; its most significant bit is the oldest bit of the stream. The
// shifter moves the field left by ptr (the accumulator) and hands the WIN
// most significant bits to the LUT, so the LUT always sees the next
// undecoded bit first. Purely combinational.
module huff_shifter #(
  parameter int unsigned W   = 8,  // buffer layer width
  parameter int unsigned WIN = 8,  // bits presented to the LUT (<= W+1)
  localparam int unsigned PTR_W = $clog2(W)
) (
  input  logic [2*W-1:0]   data,
  input  logic [PTR_W-1:0] ptr,
  output logic [WIN-1:0]   window
);

  logic [2*W-1:0] shifted;

  always_comb begin
    shifted = data << ptr;
    window  = shifted[2*W-1 -: WIN];
  end

endmodule
