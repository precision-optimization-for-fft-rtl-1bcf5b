// fft_sqnr_probe: testbench helper that owns one processor instance with the
// given size, wordlength and schedule, streams FRAMES transforms of
// uniformly distributed input through it, checks every bin bit for bit
// against the reference model, and measures the SQNR of the result against
// a double-precision FFT (signal and noise power summed over all frames).
// It counts a failure if the SQNR is more than TOL dB away from EXPECT_DB.
// It runs on its own clock and raises `finished` when it is done.
module fft_sqnr_probe #(
  parameter int          N         = 256,
  parameter int          WL        = 12,
  parameter logic [31:0] SCHED     = 32'hF5,
  parameter int          FRAMES    = 1,
  parameter real         EXPECT_DB = 42.75,
  parameter real         TOL       = 1.5,
  parameter string       LABEL     = "probe"
) (
  output bit  finished,
  output int  checks,
  output int  failures,
  output real sqnr_db
);
  import fft_ref_pkg::*;
  localparam int TW = 16, S = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  logic in_ready, out_valid, busy, done, ovf;
  logic signed [WL-1:0] in_re = '0, in_im = '0, out_re0, out_im0, out_re1, out_im1;
  logic [S-1:0] out_idx0, out_idx1, stage;

  fft_r2_mem #(.N(N), .WL(WL), .TW(TW), .SCHED(SCHED)) dut (.*);

  always #5 clk = ~clk;

  longint yr [N], yi [N];
  int n_done = 0, n_ovf = 0;

  always @(posedge clk) begin
    if (out_valid) begin
      yr[out_idx0] = out_re0; yi[out_idx0] = out_im0;
      yr[out_idx1] = out_re1; yi[out_idx1] = out_im1;
    end
    if (ovf) n_ovf++;
    if (done) n_done++;
  end

  initial begin
    longint xr[], xi[], er[], ei[];
    real fr[], fi[];
    real ps, pn, sc;
    int m_out, ns, bad;
    finished = 1'b0; checks = 0; failures = 0; sqnr_db = 0.0;
    xr = new[N]; xi = new[N]; er = new[N]; ei = new[N]; fr = new[N]; fi = new[N];
    m_out = 1;
    for (int s = 0; s < S; s++) m_out += int'(SCHED[s]);
    sc = 2.0 ** (m_out - WL);
    ps = 0.0; pn = 0.0; bad = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = longint'($signed(WL'($urandom)));
        xi[n] = longint'($signed(WL'($urandom)));
        er[n] = xr[n]; ei[n] = xi[n];
        fr[n] = real'(xr[n]) / real'(1 <<< (WL - 1));
        fi[n] = real'(xi[n]) / real'(1 <<< (WL - 1));
      end
      fixed_fft(er, ei, N, WL, TW, SCHED, ns);
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
          if (bad++ < 5) $display("FAIL %s frame %0d bin %0d", LABEL, f, n);
        end
        ps += fr[n] ** 2 + fi[n] ** 2;
        pn += (fr[n] - real'(yr[n]) * sc) ** 2 + (fi[n] - real'(yi[n]) * sc) ** 2;
      end
    end
    sqnr_db = 10.0 * $log10(ps / pn);
    checks++;
    if (sqnr_db < EXPECT_DB - TOL || sqnr_db > EXPECT_DB + TOL) failures++;
    $display("%-28s N=%5d WL=%2d sched=%b out=<%0d,%0d>: SQNR %6.2f dB, expected %6.2f dB, saturations %0d",
             LABEL, N, WL, SCHED[S-1:0], m_out, WL - m_out, sqnr_db, EXPECT_DB, n_ovf);
    finished = 1'b1;
  end
endmodule
