// tb_fft_full_r4: full-size runs of the radix-4 configuration (N = 8192,
// WL = 11: one radix-2 stage followed by six radix-4 stages) with
//   - the default schedule 01|10|01|01|01|01|01 (integer parts 2 4 5 6 7 8 9,
//     output <9, 2>), and
//   - halving in every stage, 01|10|10|10|10|10|10 (output <14, -3>).
// Each instance transforms the same uniformly distributed input once. Checks:
// every bin bit-exact against the reference model and seen exactly once,
// compute time 7 * (2048 + 4) cycles, all four lanes flagged valid, and the
// SQNR against a double-precision FFT: the optimized schedule must be at
// least as good as the radix-2 processor of the same wordlength (33.47 dB;
// with seven instead of thirteen quantization points it measures about
// 40.5 dB) and beat halving by more than 15 dB.
module tb_fft_full_r4;
  import fft_ref_pkg::*;
  localparam int N = 8192, WL = 11, TW = 16, S = 13, NS = 7;

  longint xr [N], xi [N];
  bit data_ready = 1'b0;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam logic [31:0] SCHED = (g == 0) ? 32'h1955 : 32'h1AAA;
    localparam int M_OUT = (g == 0) ? 9 : 14;

    logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
    logic in_ready, out_valid, busy, done, ovf;
    logic signed [WL-1:0] in_re = '0, in_im = '0;
    logic signed [WL-1:0] out_re [4], out_im [4];
    logic [S-1:0] out_idx [4], stage;
    logic [3:0] out_lane;

    fft_processor #(.RADIX(4), .SCHED(SCHED)) dut (.*);

    always #5 clk = ~clk;

    longint er [N], ei [N], yr [N], yi [N];
    int got [N];
    int busy_cyc = 0, bad_lane = 0;
    bit finished = 1'b0, fin = 1'b0;
    real sq;

    always @(posedge clk) begin
      if (busy) busy_cyc++;
      if (out_valid) begin
        if (out_lane != 4'b1111) bad_lane++;
        for (int k = 0; k < 4; k++) begin
          got[out_idx[k]]++;
          yr[out_idx[k]] = out_re[k];
          yi[out_idx[k]] = out_im[k];
        end
      end
      if (done) finished <= 1'b1;
    end

    initial begin
      longint a[], b[];
      real fr[], fi[];
      real ps, pn, sc;
      int ns, bad;
      a = new[N]; b = new[N]; fr = new[N]; fi = new[N];
      wait (data_ready);
      for (int n = 0; n < N; n++) begin
        a[n] = xr[n]; b[n] = xi[n];
        got[n] = 0;
      end
      fixed_fft4(a, b, N, WL, TW, SCHED, ns);
      for (int n = 0; n < N; n++) begin er[n] = a[n]; ei[n] = b[n]; end
      rst_n = 1'b0;
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
          bad = bad + 1;
          if (bad <= 10) $display("FAIL sched %0h bin %0d (%0d,%0d) expected (%0d,%0d) seen %0d",
                                   SCHED, n, yr[n], yi[n], er[n], ei[n], got[n]);
        end
      end
      checks++;
      if (busy_cyc != NS * (N / 4 + 4)) begin failures++; $display("FAIL compute took %0d cycles", busy_cyc); end
      checks++;
      if (bad_lane != 0) begin failures++; $display("FAIL lane mask"); end
      for (int n = 0; n < N; n++) begin
        fr[n] = real'(xr[n]) / real'(1 <<< (WL - 1));
        fi[n] = real'(xi[n]) / real'(1 <<< (WL - 1));
      end
      float_fft(fr, fi, N);
      sc = 2.0 ** (M_OUT - WL);
      ps = 0.0; pn = 0.0;
      for (int n = 0; n < N; n++) begin
        ps += fr[n] ** 2 + fi[n] ** 2;
        pn += (fr[n] - real'(yr[n]) * sc) ** 2 + (fi[n] - real'(yi[n]) * sc) ** 2;
      end
      sq = 10.0 * $log10(ps / pn);
      $display("radix-4 N=%0d WL=%0d SCHED=%0h: SQNR %0.2f dB, compute %0d cycles, reference saturations %0d",
               N, WL, SCHED, sq, busy_cyc, ns);
      fin = 1'b1;
    end
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      xr[n] = longint'($signed(WL'($urandom)));
      xi[n] = longint'($signed(WL'($urandom)));
    end
    data_ready = 1'b1;
    wait (g_run[0].fin && g_run[1].fin);
    checks++;
    if (g_run[0].sq < 33.47) begin failures++; $display("FAIL optimized SQNR"); end
    checks++;
    if (g_run[0].sq - g_run[1].sq < 15.0) begin failures++; $display("FAIL gain over halving %0.2f dB", g_run[0].sq - g_run[1].sq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
