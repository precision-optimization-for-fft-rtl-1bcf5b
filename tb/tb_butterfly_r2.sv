// tb_butterfly_r2: feeds the radix-2 PE one random butterfly per cycle
// (random samples, real twiddle factors, random scaling decision) and
// compares both outputs two cycles later with the bit-accurate reference.
// Also checks the two-cycle latency and the saturation flag.
module tb_butterfly_r2;
  import fft_ref_pkg::*;
  localparam int WL = 11, TW = 16, N = 8192, LAT = 2, NV = 5000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, inc = 1'b0;
  logic signed [WL-1:0] a_re = '0, a_im = '0, b_re = '0, b_im = '0;
  logic signed [TW-1:0] w_re = '0, w_im = '0;
  logic out_valid, ovf;
  logic signed [WL-1:0] x0_re, x0_im, x1_re, x1_im;
  int checks = 0, failures = 0, n_sat = 0, n_inc = 0;

  butterfly_r2 #(.WL(WL), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  // expected outputs, indexed by the cycle the input was applied
  longint e0r[NV], e0i[NV], e1r[NV], e1i[NV];
  bit     es[NV];
  int     in_cyc[NV];
  int     cyc = 0, sent = 0, got = 0;

  always @(posedge clk) cyc++;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NV; k++) begin
      longint wr, wi, pr, pi_, ar, ai;
      bit s0, s1, s2, s3;
      @(negedge clk);
      in_valid = 1'b1;
      inc  = 1'($urandom);
      a_re = WL'($urandom); a_im = WL'($urandom);
      b_re = WL'($urandom); b_im = WL'($urandom);
      tw_ref(N, $urandom % (N / 2), TW, wr, wi);
      w_re = TW'(wr); w_im = TW'(wi);
      ar = longint'(a_re) <<< (TW - 2);
      ai = longint'(a_im) <<< (TW - 2);
      pr = longint'(b_re) * wr - longint'(b_im) * wi;
      pi_ = longint'(b_re) * wi + longint'(b_im) * wr;
      e0r[k] = quant_ref(ar + pr, TW - 2 + int'(inc), WL, s0);
      e0i[k] = quant_ref(ai + pi_, TW - 2 + int'(inc), WL, s1);
      e1r[k] = quant_ref(ar - pr, TW - 2 + int'(inc), WL, s2);
      e1i[k] = quant_ref(ai - pi_, TW - 2 + int'(inc), WL, s3);
      es[k]  = s0 | s1 | s2 | s3;
      in_cyc[k] = cyc;
      n_inc += int'(inc);
      sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != NV) begin failures++; $display("FAIL got %0d of %0d", got, NV); end
    checks++;
    if (n_sat == 0 || n_inc == 0) failures++;
    $display("saturated=%0d scaled=%0d", n_sat, n_inc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (got >= sent || cyc - in_cyc[got] != LAT + 1 ||
          longint'(x0_re) != e0r[got] || longint'(x0_im) != e0i[got] ||
          longint'(x1_re) != e1r[got] || longint'(x1_im) != e1i[got] || ovf != es[got]) begin
        failures++;
        if (failures < 10)
          $display("FAIL #%0d lat=%0d x0=(%0d,%0d) x1=(%0d,%0d) ovf=%0d exp x0=(%0d,%0d) x1=(%0d,%0d) ovf=%0d",
                   got, cyc - in_cyc[got], x0_re, x0_im, x1_re, x1_im, ovf, e0r[got], e0i[got], e1r[got], e1i[got], es[got]);
      end
      if (es[got]) n_sat++;
      got++;
    end
  end

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
