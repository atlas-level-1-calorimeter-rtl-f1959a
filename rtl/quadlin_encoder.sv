// quadlin_encoder: quad-linear compression of a 12-bit energy into 8 bits.
//
// The 12-bit value is divided by 1, 4, 16 or 64 depending on its magnitude
// and the resulting 6-bit word is prefixed with 2 scale bits:
//     0-63 -> 00, /1   64-255 -> 01, /4   256-1023 -> 10, /16   1024-4095 -> 11, /64
// This is the table of the specification for the (unsigned) transverse
// energy.  For the signed Ex/Ey components (SIGNED = 1) this design uses the
// same code on a 12-bit two's complement value with ranges halved
// (|v| < 32, 128, 512, 2048) and a 6-bit two's complement mantissa taken by
// arithmetic shift.  Purely combinational.
module quadlin_encoder #(
  parameter bit SIGNED = 1'b0
) (
  input  logic [11:0] din,
  output logic [7:0]  dout
);
  always_comb begin
    if (!SIGNED) begin
      if      (din < 12'd64)   dout = {2'b00, din[5:0]};
      else if (din < 12'd256)  dout = {2'b01, din[7:2]};
      else if (din < 12'd1024) dout = {2'b10, din[9:4]};
      else                     dout = {2'b11, din[11:6]};
    end else begin
      logic signed [11:0] v;
      v = signed'(din);
      if      (v >= -12'sd32  && v < 12'sd32)  dout = {2'b00, din[5:0]};
      else if (v >= -12'sd128 && v < 12'sd128) dout = {2'b01, din[7:2]};
      else if (v >= -12'sd512 && v < 12'sd512) dout = {2'b10, din[9:4]};
      else                                     dout = {2'b11, din[11:6]};
    end
  end
endmodule
