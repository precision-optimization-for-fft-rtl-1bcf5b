// cmul: full-precision complex multiplier for the twiddle factor product.
//
// Computes p = b * w with b an DW-bit complex sample and w a TW-bit complex
// twiddle factor, keeping every product bit (no rounding), so that, as the
// butterfly with output scaling requires, no noise enters before the output
// quantizer. Four real multipliers and two adders; purely combinational.
//   p_re = b_re*w_re - b_im*w_im,  p_im = b_re*w_im + b_im*w_re
// The output is DW+TW+1 bits wide, enough for the worst case |b|*|w|*sqrt(2).
module cmul #(
  parameter int unsigned DW = 11,  // sample wordlength
  parameter int unsigned TW = 16   // twiddle wordlength
) (
  input  logic signed [DW-1:0]    b_re,
  input  logic signed [DW-1:0]    b_im,
  input  logic signed [TW-1:0]    w_re,
  input  logic signed [TW-1:0]    w_im,
  output logic signed [DW+TW:0]   p_re,
  output logic signed [DW+TW:0]   p_im
);
  logic signed [DW+TW-1:0] rr, ii, ri, ir;

  always_comb begin
    rr   = b_re * w_re;
    ii   = b_im * w_im;
    ri   = b_re * w_im;
    ir   = b_im * w_re;
    p_re = (DW+TW+1)'(rr) - (DW+TW+1)'(ii);
    p_im = (DW+TW+1)'(ri) + (DW+TW+1)'(ir);
  end

endmodule
