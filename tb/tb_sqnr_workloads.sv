// tb_sqnr_workloads: reproduces the precision results of the scaling
// schedules on the processor itself, with uniformly distributed input:
//   - 8192-point, WL = 8 .. 16, each with its optimized schedule;
//   - 8192-point with halving at every stage, WL = 11 and 14 (the pair of
//     configurations whose precision is about equal);
//   - 256-point, WL = 12, schedule 1111_0101 (best of all 256 schedules)
//     against 1111_1111 (halving at every stage), averaged over 8 transforms.
// Each measured SQNR must lie within 1.5 dB of the published figure, and each
// optimized schedule must beat halving-per-stage at the same size.
module tb_sqnr_workloads;
  localparam int NP = 13;
  bit  fin [NP];
  int  ck [NP], fl [NP];
  real db [NP];
  int checks = 0, failures = 0;

  fft_sqnr_probe #(.N(8192), .WL(8),  .SCHED(32'h1D55), .EXPECT_DB(18.08), .LABEL("8192pt WL8 optimized"))  p0  (fin[0],  ck[0],  fl[0],  db[0]);
  fft_sqnr_probe #(.N(8192), .WL(9),  .SCHED(32'h1D55), .EXPECT_DB(23.70), .LABEL("8192pt WL9 optimized"))  p1  (fin[1],  ck[1],  fl[1],  db[1]);
  fft_sqnr_probe #(.N(8192), .WL(10), .SCHED(32'h1EAA), .EXPECT_DB(27.47), .LABEL("8192pt WL10 optimized")) p2  (fin[2],  ck[2],  fl[2],  db[2]);
  fft_sqnr_probe #(.N(8192), .WL(11), .SCHED(32'h1EAA), .EXPECT_DB(33.47), .LABEL("8192pt WL11 optimized")) p3  (fin[3],  ck[3],  fl[3],  db[3]);
  fft_sqnr_probe #(.N(8192), .WL(12), .SCHED(32'h1EAA), .EXPECT_DB(39.50), .LABEL("8192pt WL12 optimized")) p4  (fin[4],  ck[4],  fl[4],  db[4]);
  fft_sqnr_probe #(.N(8192), .WL(13), .SCHED(32'h1EAA), .EXPECT_DB(45.51), .LABEL("8192pt WL13 optimized")) p5  (fin[5],  ck[5],  fl[5],  db[5]);
  fft_sqnr_probe #(.N(8192), .WL(14), .SCHED(32'h1EAA), .EXPECT_DB(51.50), .LABEL("8192pt WL14 optimized")) p6  (fin[6],  ck[6],  fl[6],  db[6]);
  fft_sqnr_probe #(.N(8192), .WL(15), .SCHED(32'h1ED5), .EXPECT_DB(55.28), .LABEL("8192pt WL15 optimized")) p7  (fin[7],  ck[7],  fl[7],  db[7]);
  fft_sqnr_probe #(.N(8192), .WL(16), .SCHED(32'h1F55), .EXPECT_DB(60.83), .LABEL("8192pt WL16 optimized")) p8  (fin[8],  ck[8],  fl[8],  db[8]);
  fft_sqnr_probe #(.N(8192), .WL(11), .SCHED(32'h1FFF), .EXPECT_DB(14.10), .LABEL("8192pt WL11 halving"))   p9  (fin[9],  ck[9],  fl[9],  db[9]);
  fft_sqnr_probe #(.N(8192), .WL(14), .SCHED(32'h1FFF), .EXPECT_DB(32.16), .LABEL("8192pt WL14 halving"))   p10 (fin[10], ck[10], fl[10], db[10]);
  fft_sqnr_probe #(.N(256), .WL(12), .SCHED(32'hF5), .FRAMES(8), .EXPECT_DB(42.75), .LABEL("256pt WL12 ID245")) p11 (fin[11], ck[11], fl[11], db[11]);
  fft_sqnr_probe #(.N(256), .WL(12), .SCHED(32'hFF), .FRAMES(8), .EXPECT_DB(35.39), .LABEL("256pt WL12 ID255")) p12 (fin[12], ck[12], fl[12], db[12]);

  initial begin
    bit all;
    do begin
      #1000;
      all = 1'b1;
      for (int i = 0; i < NP; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NP; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    checks += 3;
    if (db[3] <= db[9]) failures++;     // optimized beats halving, WL 11
    if (db[6] <= db[10]) failures++;    // optimized beats halving, WL 14
    if (db[11] <= db[12]) failures++;   // ID 245 beats ID 255
    $display("WL11 optimized vs WL14 halving: %0.2f dB vs %0.2f dB", db[3], db[10]);
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
