// tb_fft_r2_mem: end-to-end test of the FFT processor at N = 64, WL = 12.
// Schedule 6'b111101: one integer bit gained in every stage but the fifth,
// output format <6, 6>. Three transforms are streamed (with random gaps on
// in_valid, and the next transform loaded right after done):
//   1. uniform random input  -> normal operation, truncation in scaling stages
//   2. full-scale DC input   -> the non-scaling stage overflows and saturates
//   3. uniform random input again
// Every output bin is compared bit for bit with the reference model, each
// bin must appear exactly once, the SQNR of transforms 1 and 3 against a
// floating-point FFT is reported and bounded, and the compute time must be
// log2(N) * (N/2 + 4) cycles. The test counts each mechanism (scaling
// stage, saturating stage, saturation event, pipeline drain, direct output
// of the last stage) and fails if one never happened.
module tb_fft_r2_mem;
  import fft_ref_pkg::*;
  localparam int N = 64, WL = 12, TW = 16, S = 6, NF = 3;
  localparam logic [31:0] SCHED = 32'b111101;
  localparam int M_OUT = 1 + 5;  // output integer bits

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  logic in_ready, out_valid, busy, done, ovf;
  logic signed [WL-1:0] in_re = '0, in_im = '0, out_re0, out_im0, out_re1, out_im1;
  logic [S-1:0] out_idx0, out_idx1, stage;
  int checks = 0, failures = 0;

  fft_r2_mem #(.N(N), .WL(WL), .TW(TW), .SCHED(SCHED)) dut (.*);

  always #5 clk = ~clk;

  longint xr [NF][N], xi [NF][N];      // inputs
  longint er [NF][N], ei [NF][N];      // expected outputs
  int     exp_sat [NF];
  int     got [N];
  int     frame_out = 0, n_out = 0, busy_cyc = 0, issue_cyc = 0;
  int     n_scale_stage = 0, n_keep_stage = 0, n_ovf = 0, n_drain = 0, n_direct = 0;
  logic [S-1:0] stage_d;
  logic busy_d = 1'b0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  task automatic make_inputs();
    for (int f = 0; f < NF; f++) begin
      longint a[], b[];
      int ns;
      a = new[N]; b = new[N];
      for (int n = 0; n < N; n++) begin
        if (f == 1) begin
          xr[f][n] = (1 <<< (WL - 1)) - 1;
          xi[f][n] = (1 <<< (WL - 1)) - 1;
        end else begin
          xr[f][n] = longint'($signed(WL'($urandom)));
          xi[f][n] = longint'($signed(WL'($urandom)));
        end
        a[n] = xr[f][n]; b[n] = xi[f][n];
      end
      fixed_fft(a, b, N, WL, TW, SCHED, ns);
      exp_sat[f] = ns;
      for (int n = 0; n < N; n++) begin er[f][n] = a[n]; ei[f][n] = b[n]; end
    end
  endtask

  function automatic real sqnr(input int f);
    real a[], b[];
    real ps, pn, sc;
    a = new[N]; b = new[N];
    for (int n = 0; n < N; n++) begin
      a[n] = real'(xr[f][n]) / real'(1 <<< (WL - 1));
      b[n] = real'(xi[f][n]) / real'(1 <<< (WL - 1));
    end
    float_fft(a, b, N);
    sc = 2.0 ** (M_OUT - WL);
    ps = 0.0; pn = 0.0;
    for (int n = 0; n < N; n++) begin
      ps += a[n] * a[n] + b[n] * b[n];
      pn += (a[n] - real'(er[f][n]) * sc) ** 2 + (b[n] - real'(ei[f][n]) * sc) ** 2;
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  // output checker and mechanism counters
  always @(posedge clk) begin
    if (rst_n) begin
      if (busy) busy_cyc++;
      if (busy && !busy_d) n_keep_stage += 0;
      if (busy && stage != stage_d) begin
        if (SCHED[S - 1 - int'(stage)]) n_scale_stage++; else n_keep_stage++;
      end
      if (ovf) n_ovf++;
      if (out_valid) begin
        n_direct++;
        checks++;
        if (int'(out_idx1) != int'(out_idx0) + N / 2) fail("output index pair");
        got[out_idx0]++;
        got[out_idx1]++;
        if (longint'(out_re0) != er[frame_out][out_idx0] || longint'(out_im0) != ei[frame_out][out_idx0] ||
            longint'(out_re1) != er[frame_out][out_idx1] || longint'(out_im1) != ei[frame_out][out_idx1])
          fail($sformatf("frame %0d bin %0d: (%0d,%0d)/(%0d,%0d) expected (%0d,%0d)/(%0d,%0d)", frame_out, out_idx0,
                         out_re0, out_im0, out_re1, out_im1, er[frame_out][out_idx0], ei[frame_out][out_idx0],
                         er[frame_out][out_idx1], ei[frame_out][out_idx1]));
      end
      if (done) begin
        checks++;
        if (busy_cyc != S * (N / 2 + 4)) fail($sformatf("frame %0d compute took %0d cycles", frame_out, busy_cyc));
        n_drain += busy_cyc - S * N / 2;
        for (int n = 0; n < N; n++) begin
          checks++;
          if (got[n] != 1) fail($sformatf("frame %0d bin %0d seen %0d times", frame_out, n, got[n]));
          got[n] = 0;
        end
        busy_cyc = 0;
        frame_out++;
      end
    end
    stage_d <= busy ? stage : '1;
    busy_d  <= busy;
  end

  initial begin
    real q;
    make_inputs();
    for (int n = 0; n < N; n++) got[n] = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      int n;
      n = 0;
      while (n < N) begin
        @(negedge clk);
        if (in_ready && ($urandom % 5) != 0) begin
          in_valid = 1'b1;
          in_re = WL'(xr[f][n]);
          in_im = WL'(xi[f][n]);
          n++;
        end else begin
          in_valid = 1'b0;
        end
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 1'b0;
      wait (in_ready);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (frame_out != NF) fail($sformatf("%0d transforms completed", frame_out));
    for (int f = 0; f < NF; f += 2) begin
      q = sqnr(f);
      $display("transform %0d: SQNR %0.2f dB", f, q);
      checks++;
      if (q < 42.0) fail("SQNR too low");
    end
    $display("model saturations per transform: %0d %0d %0d", exp_sat[0], exp_sat[1], exp_sat[2]);
    $display("scaling stages=%0d saturating stages=%0d ovf events=%0d drain cycles=%0d direct outputs=%0d",
             n_scale_stage, n_keep_stage, n_ovf, n_drain, n_direct);
    checks++; if (n_scale_stage == 0) fail("no scaling stage");
    checks++; if (n_keep_stage == 0) fail("no saturating stage");
    checks++; if (n_ovf == 0 || exp_sat[1] == 0) fail("no saturation");
    checks++; if (n_drain == 0) fail("no drain");
    checks++; if (n_direct != NF * N / 2) fail("direct output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
