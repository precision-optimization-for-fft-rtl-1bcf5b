// butterfly_r2: the radix-2 decimation-in-time processing element with
// scaling at the output.
//
//   X_m[p] = (X_{m-1}[p] + W * X_{m-1}[q]) * 2^-inc
//   X_m[q] = (X_{m-1}[p] - W * X_{m-1}[q]) * 2^-inc
//
// The twiddle product and the sum/difference are kept at full precision, so
// the result is noiseless up to the single quantization point at the output:
// there scale_sat drops the product's extra fraction bits plus `inc` more by
// truncation, and saturates to WL bits. `inc` is the stage's scaling decision
// (1: one more integer bit, 0: same format with saturation). The twiddle
// factor is in Q2.(TW-2) format (see twiddle_rom).
// Timing: two register stages, outputs valid two cycles after the inputs
// (cycle 1: complex multiply, cycle 2: add/subtract and quantize). The PE
// accepts one butterfly per cycle; `ovf` flags that at least one of the four
// real outputs saturated.
module butterfly_r2 #(
  parameter int unsigned WL = 11,  // data wordlength
  parameter int unsigned TW = 16   // twiddle wordlength
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 inc,
  input  logic signed [WL-1:0] a_re,
  input  logic signed [WL-1:0] a_im,
  input  logic signed [WL-1:0] b_re,
  input  logic signed [WL-1:0] b_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic                 out_valid,
  output logic signed [WL-1:0] x0_re,
  output logic signed [WL-1:0] x0_im,
  output logic signed [WL-1:0] x1_re,
  output logic signed [WL-1:0] x1_im,
  output logic                 ovf
);
  localparam int unsigned PW = WL + TW + 1;  // product width
  localparam int unsigned SW = WL + TW + 2;  // sum width
  localparam int unsigned FB = TW - 2;       // twiddle fraction bits

  // ---- stage 1: twiddle multiplication ----
  logic signed [PW-1:0] p_re_c, p_im_c;
  logic signed [PW-1:0] p_re_q, p_im_q;
  logic signed [WL-1:0] a_re_q, a_im_q;
  logic                 inc_q, v_q;

  cmul #(.DW(WL), .TW(TW)) u_cmul (
    .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
    .p_re(p_re_c), .p_im(p_im_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    p_re_q <= p_re_c;
    p_im_q <= p_im_c;
    a_re_q <= a_re;
    a_im_q <= a_im;
    inc_q  <= inc;
  end

  // ---- stage 2: add / subtract at full precision, then quantize ----
  logic signed [SW-1:0] a_re_s, a_im_s, s0_re, s0_im, s1_re, s1_im;
  logic signed [WL-1:0] q0_re, q0_im, q1_re, q1_im;
  logic [3:0]           o;

  always_comb begin
    a_re_s = SW'(a_re_q) <<< FB;
    a_im_s = SW'(a_im_q) <<< FB;
    s0_re  = a_re_s + SW'(p_re_q);
    s0_im  = a_im_s + SW'(p_im_q);
    s1_re  = a_re_s - SW'(p_re_q);
    s1_im  = a_im_s - SW'(p_im_q);
  end

  scale_sat #(.IW(SW), .OW(WL), .DROP(FB)) u_q0r (.din(s0_re), .inc({1'b0, inc_q}), .dout(q0_re), .ovf(o[0]));
  scale_sat #(.IW(SW), .OW(WL), .DROP(FB)) u_q0i (.din(s0_im), .inc({1'b0, inc_q}), .dout(q0_im), .ovf(o[1]));
  scale_sat #(.IW(SW), .OW(WL), .DROP(FB)) u_q1r (.din(s1_re), .inc({1'b0, inc_q}), .dout(q1_re), .ovf(o[2]));
  scale_sat #(.IW(SW), .OW(WL), .DROP(FB)) u_q1i (.din(s1_im), .inc({1'b0, inc_q}), .dout(q1_im), .ovf(o[3]));

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
    x0_re <= q0_re;
    x0_im <= q0_im;
    x1_re <= q1_re;
    x1_im <= q1_im;
  end

endmodule
