// butterfly_r4: radix-4 decimation-in-time processing element with scaling
// at the output, for the radix-4 configuration of the processor.
//
// The four inputs are the words at addresses p, p+s, p+2s, p+3s of an
// in-place DIT transform whose input was loaded in bit-reversed order, so
// x1 (at p+s) and x2 (at p+2s) swap roles compared with the natural-order
// radix-4 equations. With y0 = x0, y1 = w1*x1, y2 = w2*x2, y3 = w3*x3:
//   o0 = y0 + y1 +   (y2 + y3)          (to p)
//   o1 = y0 - y1 - j*(y2 - y3)          (to p+s)
//   o2 = y0 + y1 -   (y2 + y3)          (to p+2s)
//   o3 = y0 - y1 + j*(y2 - y3)          (to p+3s)
// and every output is multiplied by 2^-inc, inc = 0, 1 or 2 integer bits
// gained by the stage. Multiplication by -j and +j is a swap of real and
// imaginary parts with a sign change, so three multipliers suffice.
// With r2 = 1 the PE instead computes two independent radix-2 butterflies,
// (x0, w1*x1) and (x2, w3*x3), used for the one radix-2 stage of a
// mixed-radix transform when log2(N) is odd.
// As in the radix-2 PE, products and sums stay at full precision and the
// only quantization (truncation, then saturation) is at the output.
// Twiddles are Q2.(TW-2). Timing: two register stages, one butterfly per
// cycle, outputs two cycles after the inputs; `ovf` flags any saturation.
module butterfly_r4 #(
  parameter int unsigned WL = 11,  // data wordlength
  parameter int unsigned TW = 16   // twiddle wordlength
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [1:0]           inc,
  input  logic                 r2,
  input  logic signed [WL-1:0] x_re [4],
  input  logic signed [WL-1:0] x_im [4],
  input  logic signed [TW-1:0] w_re [1:3],
  input  logic signed [TW-1:0] w_im [1:3],
  output logic                 out_valid,
  output logic signed [WL-1:0] o_re [4],
  output logic signed [WL-1:0] o_im [4],
  output logic                 ovf
);
  localparam int unsigned PW = WL + TW + 1;  // product width
  localparam int unsigned SW = WL + TW + 3;  // sum width (4 terms)
  localparam int unsigned FB = TW - 2;       // twiddle fraction bits

  // ---- stage 1: three twiddle multiplications ----
  logic signed [PW-1:0] p_re_c [1:3], p_im_c [1:3];
  logic signed [PW-1:0] p_re_q [1:3], p_im_q [1:3];
  logic signed [WL-1:0] x0_re_q, x0_im_q, x2_re_q, x2_im_q;
  logic [1:0]           inc_q;
  logic                 r2_q, v_q;

  for (genvar k = 1; k <= 3; k++) begin : g_mul
    cmul #(.DW(WL), .TW(TW)) u_cmul (
      .b_re(x_re[k]), .b_im(x_im[k]), .w_re(w_re[k]), .w_im(w_im[k]),
      .p_re(p_re_c[k]), .p_im(p_im_c[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    p_re_q  <= p_re_c;
    p_im_q  <= p_im_c;
    x0_re_q <= x_re[0];
    x0_im_q <= x_im[0];
    x2_re_q <= x_re[2];
    x2_im_q <= x_im[2];
    inc_q   <= inc;
    r2_q    <= r2;
  end

  // ---- stage 2: sums at full precision, then quantize ----
  logic signed [SW-1:0] s_re [4], s_im [4];
  logic signed [WL-1:0] q_re [4], q_im [4];
  logic [7:0]           o;

  always_comb begin
    logic signed [SW-1:0] y0r, y0i, y1r, y1i, y2r, y2i, y3r, y3i, ar, ai, br, bi, cr, ci, dr, di;
    y0r = SW'(x0_re_q) <<< FB;
    y0i = SW'(x0_im_q) <<< FB;
    y1r = SW'(p_re_q[1]);
    y1i = SW'(p_im_q[1]);
    y2r = SW'(p_re_q[2]);
    y2i = SW'(p_im_q[2]);
    y3r = SW'(p_re_q[3]);
    y3i = SW'(p_im_q[3]);
    ar = y0r + y1r;  ai = y0i + y1i;   // y0 + y1
    br = y0r - y1r;  bi = y0i - y1i;   // y0 - y1
    dr = y2r - y3r;  di = y2i - y3i;   // y2 - y3
    if (r2_q) begin
      // two radix-2 butterflies: (x0, w1 x1) and (x2, w3 x3)
      cr = SW'(x2_re_q) <<< FB;
      ci = SW'(x2_im_q) <<< FB;
      s_re[0] = ar;       s_im[0] = ai;
      s_re[1] = br;       s_im[1] = bi;
      s_re[2] = cr + y3r; s_im[2] = ci + y3i;
      s_re[3] = cr - y3r; s_im[3] = ci - y3i;
    end else begin
      cr = y2r + y3r;  ci = y2i + y3i;   // y2 + y3
      s_re[0] = ar + cr;  s_im[0] = ai + ci;
      s_re[1] = br + di;  s_im[1] = bi - dr;   // (y0 - y1) - j (y2 - y3)
      s_re[2] = ar - cr;  s_im[2] = ai - ci;
      s_re[3] = br - di;  s_im[3] = bi + dr;   // (y0 - y1) + j (y2 - y3)
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_q
    scale_sat #(.IW(SW), .OW(WL), .DROP(FB)) u_qr (.din(s_re[k]), .inc(inc_q), .dout(q_re[k]), .ovf(o[2*k]));
    scale_sat #(.IW(SW), .OW(WL), .DROP(FB)) u_qi (.din(s_im[k]), .inc(inc_q), .dout(q_im[k]), .ovf(o[2*k+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ovf       <= 1'b0;
    end else begin
      out_valid <= v_q;
      ovf       <= v_q & (|o);
    end
  end

  always_ff @(posedge clk) begin
    o_re <= q_re;
    o_im <= q_im;
  end

endmodule
