// scale_sat: output quantizer of one real butterfly result.
//
// The butterfly keeps its sum at full precision; this block brings it back to
// the storage wordlength. It drops DROP + inc least significant bits by
// truncation (an arithmetic right shift, i.e. rounding toward minus infinity,
// so 1.5 -> 1 and -1.5 -> -2) and then clamps the result to the OW-bit two's
// complement range by saturation, reporting the clamp on `ovf`.
//   inc = 0     : the stage keeps its format; overflow saturates
//   inc = 1 .. 3: the stage gains inc integer bits (scaling by 2^-inc);
//                 a radix-2 stage uses 0 or 1, a radix-4 stage 0 .. 2
// Truncation and saturation are the quantization and overflow modes the
// precision analysis assumes; DROP (the extra fraction bits carried by the
// twiddle product) is this design's choice. Purely combinational.
module scale_sat #(
  parameter int unsigned IW   = 29,  // width of the full-precision input
  parameter int unsigned OW   = 11,  // storage wordlength
  parameter int unsigned DROP = 14   // fraction bits always dropped
) (
  input  logic signed [IW-1:0] din,
  input  logic [1:0]           inc,   // extra right shift (integer bits gained)
  output logic signed [OW-1:0] dout,
  output logic                 ovf    // saturation happened
);
  localparam logic signed [IW-1:0] MAXV = IW'((64'sd1 <<< (OW - 1)) - 1);
  localparam logic signed [IW-1:0] MINV = -IW'(64'sd1 <<< (OW - 1));

  logic signed [IW-1:0] shifted;

  always_comb begin
    shifted = din >>> (DROP + int'(inc));
    if (shifted > MAXV) begin
      dout = MAXV[OW-1:0];
      ovf  = 1'b1;
    end else if (shifted < MINV) begin
      dout = MINV[OW-1:0];
      ovf  = 1'b1;
    end else begin
      dout = shifted[OW-1:0];
      ovf  = 1'b0;
    end
  end

endmodule
