// tb_twiddle_rom: reads every twiddle factor of the default 8192-point ROM
// and compares it with cos/sin computed directly (no symmetry), and checks
// the one-cycle read latency.
module tb_twiddle_rom;
  import fft_ref_pkg::*;
  localparam int N = 8192, TW = 16;
  logic clk = 1'b0;
  logic [$clog2(N/2)-1:0] idx;
  logic signed [TW-1:0] w_re, w_im;
  int checks = 0, failures = 0, cycles = 0;

  twiddle_rom #(.N(N), .TW(TW)) dut (.clk(clk), .idx(idx), .w_re(w_re), .w_im(w_im));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    longint er, ei;
    idx = '0;
    for (int k = 0; k < N / 2; k++) begin
      @(negedge clk);
      idx = k[$clog2(N/2)-1:0];
      @(posedge clk);
      #1;
      tw_ref(N, k, TW, er, ei);
      checks++;
      if (longint'(w_re) != er || longint'(w_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d w=(%0d,%0d) exp=(%0d,%0d)", k, w_re, w_im, er, ei);
      end
    end
    // latency: the output must not change before the clock edge
    @(negedge clk);
    idx = 12'd2048;   // W = -j
    #1;
    checks++;
    if (w_re == 16'sd0 && w_im == -16'sd16384) failures++;  // previous value was k = 4095
    @(posedge clk);
    #1;
    checks++;
    if (w_re != 16'sd0 || w_im != -16'sd16384) begin failures++; $display("FAIL latency w=(%0d,%0d)", w_re, w_im); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
