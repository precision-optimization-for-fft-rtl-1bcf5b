// fft_sqnr_probe4: testbench helper that owns one top-level instance in the
// radix-4 configuration with the given size, wordlength and schedule. It
// streams FRAMES transforms through it, checks every bin bit for bit against
// the radix-4 reference model, and measures the SQNR against a
// double-precision FFT (signal and noise power summed over all frames).
// Input: SIGMA = 0 gives real and imaginary parts uniformly distributed over
// the whole <1, WL-1> range; SIGMA > 0 gives normally distributed parts with
// that standard deviation (Box-Muller), rounded and clamped to the range.
// A failure is counted if the SQNR is more than TOL dB away from EXPECT_DB.
// It runs on its own clock and raises `finished` when it is done.
module fft_sqnr_probe4 #(
  parameter int          N         = 8192,
  parameter int          WL        = 11,
  parameter logic [31:0] SCHED     = 32'h1955,
  parameter real         SIGMA     = 0.0,
  parameter int          FRAMES    = 1,
  parameter real         EXPECT_DB = 37.0,
  parameter real         TOL       = 3.0,
  parameter string       LABEL     = "probe"
) (
  output bit  finished,
  output int  checks,
  output int  failures,
  output real sqnr_db
);
  import fft_ref_pkg::*;
  localparam int TW = 16, S = $clog2(N), NS = (S + 1) / 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  logic in_ready, out_valid, busy, done, ovf;
  logic signed [WL-1:0] in_re = '0, in_im = '0;
  logic signed [WL-1:0] out_re [4], out_im [4];
  logic [S-1:0] out_idx [4], stage;
  logic [3:0] out_lane;

  fft_processor #(.RADIX(4), .N(N), .WL(WL), .TW(TW), .SCHED(SCHED)) dut (.*);

  always #5 clk = ~clk;

  longint yr [N], yi [N];
  int n_done = 0, n_ovf = 0;

  always @(posedge clk) begin
    if (out_valid)
      for (int k = 0; k < 4; k++) begin
        yr[out_idx[k]] = out_re[k];
        yi[out_idx[k]] = out_im[k];
      end
    if (ovf) n_ovf++;
    if (done) n_done++;
  end

  function automatic longint sample();
    real u1, u2, z, v;
    if (SIGMA == 0.0) return longint'($signed(WL'($urandom)));
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    z = $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
    v = z * SIGMA * real'(1 <<< (WL - 1));
    if (v > real'((1 <<< (WL - 1)) - 1)) v = real'((1 <<< (WL - 1)) - 1);
    if (v < -real'(1 <<< (WL - 1))) v = -real'(1 <<< (WL - 1));
    return longint'(v);
  endfunction

  initial begin
    longint xr[], xi[], er[], ei[];
    real fr[], fi[];
    real ps, pn, sc;
    int m_out, ns, bad;
    finished = 1'b0; checks = 0; failures = 0; sqnr_db = 0.0;
    xr = new[N]; xi = new[N]; er = new[N]; ei = new[N]; fr = new[N]; fi = new[N];
    m_out = 1;
    for (int t = 0; t < NS; t++) m_out += int'(SCHED[2 * t +: 2]);
    sc = 2.0 ** (m_out - WL);
    ps = 0.0; pn = 0.0; bad = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = sample();
        xi[n] = sample();
        er[n] = xr[n]; ei[n] = xi[n];
        fr[n] = real'(xr[n]) / real'(1 <<< (WL - 1));
        fi[n] = real'(xi[n]) / real'(1 <<< (WL - 1));
      end
      fixed_fft4(er, ei, N, WL, TW, SCHED, ns);
      float_fft(fr, fi, N);
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_re = WL'(xr[n]);
        in_im = WL'(xi[n]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      wait (n_done == f + 1);
      for (int n = 0; n < N; n++) begin
        checks++;
        if (yr[n] != er[n] || yi[n] != ei[n]) begin
          failures++;
          if (bad < 5) $display("FAIL %s frame %0d bin %0d", LABEL, f, n);
          bad++;
        end
        ps += fr[n] ** 2 + fi[n] ** 2;
        pn += (fr[n] - real'(yr[n]) * sc) ** 2 + (fi[n] - real'(yi[n]) * sc) ** 2;
      end
    end
    sqnr_db = 10.0 * $log10(ps / pn);
    checks++;
    if (sqnr_db < EXPECT_DB - TOL || sqnr_db > EXPECT_DB + TOL) failures++;
    $display("%-30s N=%5d WL=%2d sched=%b out=<%0d,%0d>: SQNR %6.2f dB, plot %6.2f dB, saturations %0d",
             LABEL, N, WL, SCHED[2*NS-1:0], m_out, WL - m_out, sqnr_db, EXPECT_DB, n_ovf);
    finished = 1'b1;
  end
endmodule
