// twiddle_rom: coefficient ROM for the radix-2 FFT, W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N)
// for k = 0 .. N/2-1.
//
// Only a quarter wave, cos(2*pi*m/N) for m = 0 .. N/4, is stored; both parts
// of every twiddle factor are read from it by symmetry:
//   k <= N/4 : re =  C[k],        im = -C[N/4-k]
//   k >  N/4 : re = -C[N/2-k],    im = -C[k-N/4]
// The table is computed at elaboration time, rounded to nearest, in Q2.(TW-2)
// format so that +1.0 is exactly representable (1.0 = 2^(TW-2)). The twiddle
// wordlength and the quarter-wave storage are this design's choices.
// Timing: synchronous read, the factor for `idx` appears one cycle later.
module twiddle_rom #(
  parameter int unsigned N  = 8192,  // FFT size (power of two, >= 4)
  parameter int unsigned TW = 16     // twiddle wordlength
) (
  input  logic                          clk,
  input  logic [$clog2(N/2)-1:0]        idx,
  output logic signed [TW-1:0]          w_re,
  output logic signed [TW-1:0]          w_im
);
  typedef logic signed [TW-1:0] tw_t;
  localparam int unsigned Q = N / 4;

  function automatic tw_t qcos(input int unsigned m);
    real pi;
    pi = 3.14159265358979323846;
    return tw_t'($rtoi($floor($cos(2.0 * pi * real'(m) / real'(N)) * real'(64'd1 << (TW - 2)) + 0.5)));
  endfunction

  tw_t tab [Q+1];
  for (genvar m = 0; m <= Q; m++) begin : g_tab
    assign tab[m] = qcos(m);
  end

  localparam int unsigned KW = $clog2(N / 2) + 1;  // idx plus one bit
  localparam int unsigned AW = $clog2(Q + 1);      // quarter-table address

  logic [KW-1:0] k;
  logic [AW-1:0] a_re, a_im;
  logic          neg_re;

  always_comb begin
    k = {1'b0, idx};
    if (k <= KW'(Q)) begin
      a_re   = AW'(k);
      a_im   = AW'(KW'(Q) - k);
      neg_re = 1'b0;
    end else begin
      a_re   = AW'(KW'(N / 2) - k);
      a_im   = AW'(k - KW'(Q));
      neg_re = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    w_re <= neg_re ? -tab[a_re] : tab[a_re];
    w_im <= -tab[a_im];
  end

endmodule
