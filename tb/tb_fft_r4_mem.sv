// tb_fft_r4_mem: end-to-end test of the radix-4 configuration at N = 32
// (mixed radix: one radix-2 stage, then two radix-4 stages) and N = 64
// (three radix-4 stages), WL = 12. Each instance streams three transforms:
// uniform random, full-scale DC (forcing saturation in a stage that gains
// fewer bits than the data grows), uniform random again. Every bin is
// compared bit for bit with the reference model and must appear exactly
// once; compute time must be NS * (N/4 + 4) cycles; the SQNR against a
// floating-point FFT is bounded; and the test counts the radix-2 stage, stages
// gaining 0, 1 and 2 bits, saturation events and drain cycles.
module tb_fft_r4_mem;
  import fft_ref_pkg::*;
  localparam int WL = 12, TW = 16, NF = 3;

  int checks = 0, failures = 0;
  int n_r2 = 0, n_inc [3] = '{0, 0, 0}, n_ovf = 0, n_drain = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  // N = 32: fields 01 | 10 | 00 -> integer parts 2 4 4 (last stage saturates)
  // N = 64: fields 10 | 10 | 01 -> integer parts 3 5 6
  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam int N = (g == 0) ? 32 : 64;
    localparam int S = $clog2(N);
    localparam int NS = (S + 1) / 2;
    localparam logic [31:0] SCHED = (g == 0) ? 32'b01_10_00 : 32'b10_10_01;
    localparam int M_OUT = (g == 0) ? 4 : 6;

    logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
    logic in_ready, out_valid, busy, done, ovf;
    logic signed [WL-1:0] in_re = '0, in_im = '0;
    logic [S-1:0] out_idx [4];
    logic signed [WL-1:0] out_re [4], out_im [4];
    logic [S-1:0] stage, stage_d;
    bit finished = 1'b0;

    fft_r4_mem #(.N(N), .WL(WL), .TW(TW), .SCHED(SCHED)) dut (.*);

    always #5 clk = ~clk;

    longint xr [NF][N], xi [NF][N], er [NF][N], ei [NF][N];
    int got [N];
    int frame_out = 0, busy_cyc = 0;

    always @(posedge clk) begin
      if (rst_n) begin
        if (busy) busy_cyc++;
        if (busy && stage != stage_d) begin
          if (S % 2 == 1 && stage == 0) n_r2++;
          n_inc[SCHED[2 * (NS - 1 - int'(stage)) +: 2]]++;
        end
        if (ovf) n_ovf++;
        if (out_valid) begin
          for (int k = 0; k < 4; k++) begin
            checks++;
            got[out_idx[k]]++;
            if (longint'(out_re[k]) != er[frame_out][out_idx[k]] || longint'(out_im[k]) != ei[frame_out][out_idx[k]])
              fail($sformatf("N=%0d frame %0d bin %0d: (%0d,%0d) expected (%0d,%0d)", N, frame_out, out_idx[k],
                             out_re[k], out_im[k], er[frame_out][out_idx[k]], ei[frame_out][out_idx[k]]));
          end
        end
        if (done) begin
          checks++;
          if (busy_cyc != NS * (N / 4 + 4)) fail($sformatf("N=%0d compute took %0d cycles", N, busy_cyc));
          n_drain += busy_cyc - NS * N / 4;
          for (int n = 0; n < N; n++) begin
            checks++;
            if (got[n] != 1) fail($sformatf("N=%0d bin %0d seen %0d times", N, n, got[n]));
            got[n] = 0;
          end
          busy_cyc = 0;
          frame_out++;
        end
      end
      stage_d <= busy ? stage : '1;
    end

    initial begin
      longint a[], b[];
      real fr[], fi[];
      real ps, pn, sc;
      int ns;
      a = new[N]; b = new[N]; fr = new[N]; fi = new[N];
      for (int n = 0; n < N; n++) got[n] = 0;
      for (int f = 0; f < NF; f++) begin
        for (int n = 0; n < N; n++) begin
          xr[f][n] = (f == 1) ? (1 <<< (WL - 1)) - 1 : longint'($signed(WL'($urandom)));
          xi[f][n] = (f == 1) ? (1 <<< (WL - 1)) - 1 : longint'($signed(WL'($urandom)));
          a[n] = xr[f][n]; b[n] = xi[f][n];
        end
        fixed_fft4(a, b, N, WL, TW, SCHED, ns);
        for (int n = 0; n < N; n++) begin er[f][n] = a[n]; ei[f][n] = b[n]; end
      end
      #1 rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      for (int f = 0; f < NF; f++) begin
        int n;
        n = 0;
        while (n < N) begin
          @(negedge clk);
          if (in_ready && ($urandom % 4) != 0) begin
            in_valid = 1'b1;
            in_re = WL'(xr[f][n]);
            in_im = WL'(xi[f][n]);
            n++;
          end else begin
            in_valid = 1'b0;
          end
        end
        @(negedge clk);
        in_valid = 1'b0;
        wait (frame_out == f + 1);
      end
      // SQNR of the random transforms
      sc = 2.0 ** (M_OUT - WL);
      ps = 0.0; pn = 0.0;
      for (int f = 0; f < NF; f += 2) begin
        for (int n = 0; n < N; n++) begin
          fr[n] = real'(xr[f][n]) / real'(1 <<< (WL - 1));
          fi[n] = real'(xi[f][n]) / real'(1 <<< (WL - 1));
        end
        float_fft(fr, fi, N);
        for (int n = 0; n < N; n++) begin
          ps += fr[n] ** 2 + fi[n] ** 2;
          pn += (fr[n] - real'(er[f][n]) * sc) ** 2 + (fi[n] - real'(ei[f][n]) * sc) ** 2;
        end
      end
      $display("N=%0d radix-4: SQNR %0.2f dB", N, 10.0 * $log10(ps / pn));
      checks++;
      if (10.0 * $log10(ps / pn) < 40.0) fail("SQNR too low");
      finished = 1'b1;
    end
  end

  initial begin
    wait (g_run[0].finished && g_run[1].finished);
    $display("radix-2 stages=%0d stages gaining 0/1/2 bits=%0d/%0d/%0d ovf events=%0d drain cycles=%0d",
             n_r2, n_inc[0], n_inc[1], n_inc[2], n_ovf, n_drain);
    checks++; if (n_r2 == 0) fail("no radix-2 stage");
    checks++; if (n_inc[0] == 0 || n_inc[1] == 0 || n_inc[2] == 0) fail("a scaling choice never used");
    checks++; if (n_ovf == 0) fail("no saturation");
    checks++; if (n_drain == 0) fail("no drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
