// tb_fft_full: one complete transform through the processor at its default
// parameters (N = 8192, WL = 11, TW = 16, default schedule with integer bits
// 2 3 4 5 5 6 6 7 7 8 8 9 9 per stage, output format <9, 2>). The input is
// uniformly distributed over the whole <1, 10> range. Checks:
//   - all 8192 bins bit-exact against the reference model, each exactly once;
//   - compute time 13 * (4096 + 4) cycles;
//   - SQNR against a double-precision FFT within 1.5 dB of the 33.47 dB
//     expected for this wordlength and schedule;
//   - only lanes 0 and 1 are flagged valid (radix-2) and lanes 2, 3 stay 0.
module tb_fft_full;
  import fft_ref_pkg::*;
  localparam int N = 8192, WL = 11, TW = 16, S = 13;
  localparam logic [31:0] SCHED = 32'h1EAA;
  localparam real EXPECT_DB = 33.47;

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  logic in_ready, out_valid, busy, done, ovf;
  logic signed [WL-1:0] in_re = '0, in_im = '0;
  logic signed [WL-1:0] out_re [4], out_im [4];
  logic [S-1:0] out_idx [4], stage;
  logic [3:0] out_lane;
  int checks = 0, failures = 0;

  fft_processor dut (.*);

  always #5 clk = ~clk;

  longint xr [N], xi [N], er [N], ei [N];
  longint yr [N], yi [N];
  int got [N];
  int busy_cyc = 0, n_out = 0, n_ovf = 0, exp_sat = 0, bad_lane = 0;
  bit finished = 1'b0;

  always @(posedge clk) begin
    if (busy) busy_cyc++;
    if (ovf) n_ovf++;
    if (out_valid) begin
      for (int k = 0; k < 2; k++) begin
        got[out_idx[k]]++;
        yr[out_idx[k]] = out_re[k];
        yi[out_idx[k]] = out_im[k];
      end
      if (out_lane != 4'b0011 || out_idx[2] != 0 || out_re[3] != 0 || out_im[2] != 0) bad_lane++;
      n_out++;
    end
    if (done) finished <= 1'b1;
  end

  initial begin
    longint a[], b[];
    real fr[], fi[];
    real ps, pn, sc, q;
    int bad;
    a = new[N]; b = new[N]; fr = new[N]; fi = new[N];
    for (int n = 0; n < N; n++) begin
      xr[n] = longint'($signed(WL'($urandom)));
      xi[n] = longint'($signed(WL'($urandom)));
      a[n] = xr[n]; b[n] = xi[n];
      got[n] = 0;
    end
    fixed_fft(a, b, N, WL, TW, SCHED, exp_sat);
    for (int n = 0; n < N; n++) begin er[n] = a[n]; ei[n] = b[n]; end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_re = WL'(xr[n]);
      in_im = WL'(xi[n]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    wait (finished);
    bad = 0;
    for (int n = 0; n < N; n++) begin
      checks++;
      if (got[n] != 1 || yr[n] != er[n] || yi[n] != ei[n]) begin
        failures++;
        if (bad++ < 10) $display("FAIL bin %0d (%0d,%0d) expected (%0d,%0d) seen %0d", n, yr[n], yi[n], er[n], ei[n], got[n]);
      end
    end
    checks++;
    if (busy_cyc != S * (N / 2 + 4)) begin failures++; $display("FAIL compute took %0d cycles", busy_cyc); end
    checks++;
    if (n_out != N / 2) failures++;
    checks++;
    if (bad_lane != 0) begin failures++; $display("FAIL lane mask or unused lanes in %0d cycles", bad_lane); end
    // SQNR against the noise-free transform
    for (int n = 0; n < N; n++) begin
      fr[n] = real'(xr[n]) / real'(1 <<< (WL - 1));
      fi[n] = real'(xi[n]) / real'(1 <<< (WL - 1));
    end
    float_fft(fr, fi, N);
    sc = 2.0 ** (9 - WL);  // output format <9, 2>: LSB = 2^-2
    ps = 0.0; pn = 0.0;
    for (int n = 0; n < N; n++) begin
      ps += fr[n] ** 2 + fi[n] ** 2;
      pn += (fr[n] - real'(yr[n]) * sc) ** 2 + (fi[n] - real'(yi[n]) * sc) ** 2;
    end
    q = 10.0 * $log10(ps / pn);
    $display("N=%0d WL=%0d: SQNR %0.2f dB (expected %0.2f), compute %0d cycles, saturations %0d/%0d",
             N, WL, q, EXPECT_DB, busy_cyc, n_ovf, exp_sat);
    checks++;
    if (q < EXPECT_DB - 1.5 || q > EXPECT_DB + 1.5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
