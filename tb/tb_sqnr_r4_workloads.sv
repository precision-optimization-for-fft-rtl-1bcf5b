// tb_sqnr_r4_workloads: precision of the 8192-point radix-4 configuration
// (one radix-2 stage, then six radix-4 stages) for the schedules that are
// fully defined without the offline optimizer:
//   - halving in every stage (1 bit in the radix-2 stage, 2 bits in each
//     radix-4 stage), uniformly distributed input, WL = 8, 11, 14, 16;
//   - one integer bit per stage, normally distributed input with standard
//     deviation 0.2, WL = 10, 12, 15 (the schedule found optimal for this
//     input in that wordlength range);
//   - halving with the same normal input, WL = 12, 16.
// Every bin of every run is checked bit for bit against the reference model.
// The expected SQNR values are read from published SQNR-vs-wordlength plots
// (to about 0.5 dB), so the tolerance is 3 dB.
module tb_sqnr_r4_workloads;
  localparam int NP = 9;
  bit  fin [NP];
  int  ck [NP], fl [NP];
  real db [NP];

  fft_sqnr_probe4 #(.WL(8),  .SCHED(32'h1AAA), .EXPECT_DB(-1.5), .LABEL("uniform, halving, WL 8"))  p0 (fin[0], ck[0], fl[0], db[0]);
  fft_sqnr_probe4 #(.WL(11), .SCHED(32'h1AAA), .EXPECT_DB(16.5), .LABEL("uniform, halving, WL 11")) p1 (fin[1], ck[1], fl[1], db[1]);
  fft_sqnr_probe4 #(.WL(14), .SCHED(32'h1AAA), .EXPECT_DB(34.5), .LABEL("uniform, halving, WL 14")) p2 (fin[2], ck[2], fl[2], db[2]);
  fft_sqnr_probe4 #(.WL(16), .SCHED(32'h1AAA), .EXPECT_DB(46.5), .LABEL("uniform, halving, WL 16")) p3 (fin[3], ck[3], fl[3], db[3]);
  fft_sqnr_probe4 #(.WL(10), .SIGMA(0.2), .SCHED(32'h1555), .EXPECT_DB(33.0), .LABEL("normal 0.2, 1 bit/stage, WL 10")) p4 (fin[4], ck[4], fl[4], db[4]);
  fft_sqnr_probe4 #(.WL(12), .SIGMA(0.2), .SCHED(32'h1555), .EXPECT_DB(45.0), .LABEL("normal 0.2, 1 bit/stage, WL 12")) p5 (fin[5], ck[5], fl[5], db[5]);
  fft_sqnr_probe4 #(.WL(15), .SIGMA(0.2), .SCHED(32'h1555), .EXPECT_DB(63.0), .LABEL("normal 0.2, 1 bit/stage, WL 15")) p6 (fin[6], ck[6], fl[6], db[6]);
  fft_sqnr_probe4 #(.WL(12), .SIGMA(0.2), .SCHED(32'h1AAA), .EXPECT_DB(13.0), .LABEL("normal 0.2, halving, WL 12")) p7 (fin[7], ck[7], fl[7], db[7]);
  fft_sqnr_probe4 #(.WL(16), .SIGMA(0.2), .SCHED(32'h1AAA), .EXPECT_DB(37.0), .LABEL("normal 0.2, halving, WL 16")) p8 (fin[8], ck[8], fl[8], db[8]);

  initial begin
    int c, f;
    bit all;
    do begin
      #1000;
      all = 1'b1;
      for (int i = 0; i < NP; i++) all &= fin[i];
    end while (!all);
    c = 0; f = 0;
    for (int i = 0; i < NP; i++) begin c += ck[i]; f += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
