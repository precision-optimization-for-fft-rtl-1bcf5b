// tb_butterfly_r4: feeds the radix-4 PE one random butterfly per cycle and
// compares all four outputs two cycles later with a bit-accurate reference.
// Inputs: random samples (one in eight all at full scale to force
// saturation), real twiddle factors W^e1, W^e2, W^e3 for random exponents,
// a random 0/1/2-bit scaling decision, and a radix-2 mode in one of four
// butterflies (two radix-2 butterflies with unit twiddles on words 0/1 and
// 2/3). Also checks the latency and the saturation flag.
module tb_butterfly_r4;
  import fft_ref_pkg::*;
  localparam int WL = 11, TW = 16, N = 8192, LAT = 2, NV = 5000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, r2 = 1'b0;
  logic [1:0] inc = '0;
  logic signed [WL-1:0] x_re [4], x_im [4];
  logic signed [TW-1:0] w_re [1:3], w_im [1:3];
  logic out_valid, ovf;
  logic signed [WL-1:0] o_re [4], o_im [4];
  int checks = 0, failures = 0, n_sat = 0, n_r2 = 0;
  int n_inc [3] = '{0, 0, 0};

  butterfly_r4 #(.WL(WL), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  longint er [NV][4], ei [NV][4];
  bit     es [NV];
  int     in_cyc [NV];
  int     cyc = 0, sent = 0, got = 0;

  always @(posedge clk) cyc++;

  initial begin
    for (int k = 0; k < 4; k++) begin x_re[k] = '0; x_im[k] = '0; end
    for (int k = 1; k < 4; k++) begin w_re[k] = '0; w_im[k] = '0; end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      longint wr [4], wi [4], yr [4], yi [4], sr [4], si [4];
      bit s, full;
      int drop;
      @(negedge clk);
      in_valid = 1'b1;
      inc = 2'($urandom % 3);
      r2 = ($urandom % 4) == 0;
      full = ($urandom % 8) == 0;
      for (int k = 0; k < 4; k++) begin
        x_re[k] = full ? WL'((1 << (WL - 1)) - 1) : WL'($urandom);
        x_im[k] = full ? WL'((1 << (WL - 1)) - 1) : WL'($urandom);
      end
      for (int k = 1; k < 4; k++) begin
        tw_ref(N, r2 ? 0 : int'($urandom % N), TW, wr[k], wi[k]);
        w_re[k] = TW'(wr[k]);
        w_im[k] = TW'(wi[k]);
      end
      for (int k = 0; k < 4; k++) begin
        if (k == 0 || (r2 && k == 2)) begin
          yr[k] = longint'(x_re[k]) <<< (TW - 2);
          yi[k] = longint'(x_im[k]) <<< (TW - 2);
        end else begin
          cmul_ref(longint'(x_re[k]), longint'(x_im[k]), wr[k], wi[k], yr[k], yi[k]);
        end
      end
      if (r2) begin
        sr[0] = yr[0] + yr[1]; si[0] = yi[0] + yi[1];
        sr[1] = yr[0] - yr[1]; si[1] = yi[0] - yi[1];
        sr[2] = yr[2] + yr[3]; si[2] = yi[2] + yi[3];
        sr[3] = yr[2] - yr[3]; si[3] = yi[2] - yi[3];
      end else begin
        sr[0] = yr[0] + yr[1] + yr[2] + yr[3];  si[0] = yi[0] + yi[1] + yi[2] + yi[3];
        sr[1] = yr[0] - yr[1] + yi[2] - yi[3];  si[1] = yi[0] - yi[1] - yr[2] + yr[3];
        sr[2] = yr[0] + yr[1] - yr[2] - yr[3];  si[2] = yi[0] + yi[1] - yi[2] - yi[3];
        sr[3] = yr[0] - yr[1] - yi[2] + yi[3];  si[3] = yi[0] - yi[1] + yr[2] - yr[3];
      end
      drop = TW - 2 + int'(inc);
      es[v] = 1'b0;
      for (int k = 0; k < 4; k++) begin
        er[v][k] = quant_ref(sr[k], drop, WL, s);
        es[v] |= s;
        ei[v][k] = quant_ref(si[k], drop, WL, s);
        es[v] |= s;
      end
      in_cyc[v] = cyc;
      n_inc[inc]++;
      n_r2 += int'(r2);
      sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != NV) begin failures++; $display("FAIL got %0d of %0d", got, NV); end
    checks++;
    if (n_sat == 0 || n_r2 == 0 || n_inc[0] == 0 || n_inc[1] == 0 || n_inc[2] == 0) failures++;
    $display("saturated=%0d radix-2 mode=%0d scaled by 0/1/2 bits=%0d/%0d/%0d", n_sat, n_r2, n_inc[0], n_inc[1], n_inc[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      bit ok;
      checks++;
      ok = got < sent && cyc - in_cyc[got] == LAT + 1 && ovf == es[got];
      if (got < sent)
        for (int k = 0; k < 4; k++)
          if (longint'(o_re[k]) != er[got][k] || longint'(o_im[k]) != ei[got][k]) ok = 1'b0;
      if (!ok) begin
        failures++;
        if (failures < 10)
          $display("FAIL #%0d lat=%0d o0=(%0d,%0d) exp (%0d,%0d) o1=(%0d,%0d) exp (%0d,%0d) ovf=%0d exp %0d",
                   got, cyc - in_cyc[got], o_re[0], o_im[0], er[got][0], ei[got][0],
                   o_re[1], o_im[1], er[got][1], ei[got][1], ovf, es[got]);
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
