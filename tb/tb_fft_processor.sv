// tb_fft_processor: the top level with RADIX = 2 and RADIX = 4 side by side
// at N = 64, WL = 12, each transforming the same two random frames
// back to back. Checks every bin bit for bit against the matching reference
// model (radix-2 or radix-4), each bin exactly once per frame, the lane mask
// (0011 or 1111) with zeroed unused lanes, and the compute time of each
// configuration.
module tb_fft_processor;
  import fft_ref_pkg::*;
  localparam int N = 64, S = 6, WL = 12, TW = 16, NF = 2;

  int checks = 0, failures = 0;
  longint xr [NF][N], xi [NF][N];
  bit data_ready = 1'b0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam int RADIX = (g == 0) ? 2 : 4;
    localparam logic [31:0] SCHED = (g == 0) ? 32'b110101 : 32'b10_10_01;
    localparam int LANES = (g == 0) ? 2 : 4;
    localparam int CYC = (g == 0) ? S * (N / 2 + 4) : 3 * (N / 4 + 4);

    logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
    logic in_ready, out_valid, busy, done, ovf;
    logic signed [WL-1:0] in_re = '0, in_im = '0;
    logic signed [WL-1:0] out_re [4], out_im [4];
    logic [S-1:0] out_idx [4], stage;
    logic [3:0] out_lane;

    fft_processor #(.RADIX(RADIX), .N(N), .WL(WL), .TW(TW), .SCHED(SCHED)) dut (.*);

    always #5 clk = ~clk;

    longint er [NF][N], ei [NF][N];
    int got [N];
    int frame_out = 0, busy_cyc = 0;
    bit finished = 1'b0;

    always @(posedge clk) begin
      if (rst_n) begin
        if (busy) busy_cyc++;
        if (out_valid) begin
          checks++;
          if (out_lane != ((g == 0) ? 4'b0011 : 4'b1111)) fail($sformatf("radix %0d lane mask %b", RADIX, out_lane));
          for (int k = 0; k < 4; k++) begin
            if (k < LANES) begin
              checks++;
              got[out_idx[k]]++;
              if (longint'(out_re[k]) != er[frame_out][out_idx[k]] || longint'(out_im[k]) != ei[frame_out][out_idx[k]])
                fail($sformatf("radix %0d frame %0d bin %0d: (%0d,%0d) expected (%0d,%0d)", RADIX, frame_out,
                               out_idx[k], out_re[k], out_im[k], er[frame_out][out_idx[k]], ei[frame_out][out_idx[k]]));
            end else begin
              checks++;
              if (out_idx[k] != 0 || out_re[k] != 0 || out_im[k] != 0) fail($sformatf("lane %0d not zero", k));
            end
          end
        end
        if (done) begin
          checks++;
          if (busy_cyc != CYC) fail($sformatf("radix %0d compute took %0d cycles", RADIX, busy_cyc));
          for (int n = 0; n < N; n++) begin
            checks++;
            if (got[n] != 1) fail($sformatf("radix %0d bin %0d seen %0d times", RADIX, n, got[n]));
            got[n] = 0;
          end
          busy_cyc = 0;
          frame_out++;
        end
      end
    end

    initial begin
      longint a[], b[];
      int ns;
      a = new[N]; b = new[N];
      for (int n = 0; n < N; n++) got[n] = 0;
      wait (data_ready);
      for (int f = 0; f < NF; f++) begin
        for (int n = 0; n < N; n++) begin a[n] = xr[f][n]; b[n] = xi[f][n]; end
        if (g == 0) fixed_fft(a, b, N, WL, TW, SCHED, ns);
        else fixed_fft4(a, b, N, WL, TW, SCHED, ns);
        for (int n = 0; n < N; n++) begin er[f][n] = a[n]; ei[f][n] = b[n]; end
      end
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      for (int f = 0; f < NF; f++) begin
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          in_valid = 1'b1;
          in_re = WL'(xr[f][n]);
          in_im = WL'(xi[f][n]);
          if (!in_ready) fail("input not ready");
        end
        @(negedge clk);
        in_valid = 1'b0;
        wait (frame_out == f + 1);
      end
      finished = 1'b1;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = longint'($signed(WL'($urandom)));
        xi[f][n] = longint'($signed(WL'($urandom)));
      end
    data_ready = 1'b1;
    wait (g_run[0].finished && g_run[1].finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
