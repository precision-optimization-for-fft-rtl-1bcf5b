// tb_fft_ctrl4: runs the radix-4 control unit at N = 32 (a radix-2 first
// stage, then two radix-4 stages) and N = 64 (three radix-4 stages), LAT = 3,
// through two transforms each with gaps in the input stream, and checks:
//   - the load addresses are the bit-reversed sample numbers;
//   - in every stage each address is read exactly once; a radix-2 stage
//     reads four consecutive words, a radix-4 stage with span s reads
//     p, p+s, p+2s, p+3s with p mod 4s < s;
//   - twiddle exponents pos*N/(2s), pos*N/(4s) and 3*pos*N/(4s) (the last
//     folded below N/2 with the sign flag), all zero in a radix-2 stage;
//   - the PE control follows the issue by one cycle with the stage's 2-bit
//     scaling field and radix-2 flag; the write-back follows by LAT cycles
//     with the same four addresses;
//   - each stage takes N/4 + LAT + 1 cycles and done pulses once per transform.
module tb_fft_ctrl4;
  import fft_pkg::*;
  import fft_ref_pkg::brev;
  localparam int LAT = 3;

  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam int N = (g == 0) ? 32 : 64;
    localparam int S = $clog2(N);
    localparam int NS = (S + 1) / 2;
    localparam bit MIX = (S % 2) == 1;
    localparam logic [31:0] SCHED = (g == 0) ? 32'b01_10_00 : 32'b10_01_10;

    logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
    logic in_ready, ld_we, rd_en, pe_valid, pe_r2, pe_neg3, wb_en, wb_last, done;
    logic [1:0] pe_inc;
    logic [S-1:0] ld_addr, stage;
    logic [S-1:0] rd_addr [4], wb_addr [4];
    logic [S-2:0] tw_idx [1:3];
    phase_e phase;

    fft_ctrl4 #(.N(N), .SCHED(SCHED), .LAT(LAT)) dut (.*);

    always #5 clk = ~clk;

    int cyc = 0, ld_n = 0, busy_cyc = 0, n_done = 0, n_drain = 0;
    int seen [NS][N];
    int issue_cyc [$];
    int issue_st [$];
    int issue_a [$];
    bit rd_en_d, r2_d, neg3_d;
    logic [S-1:0] stage_d;
    bit finished = 1'b0;

    always @(posedge clk) begin
      cyc++;
      if (rst_n) begin
        if (phase != PH_LOAD) busy_cyc++;
        if (phase == PH_DRAIN) n_drain++;
        if (ld_we) begin
          checks++;
          if (int'(ld_addr) != brev(ld_n % N, S)) fail($sformatf("N=%0d ld_addr %0d for sample %0d", N, ld_addr, ld_n));
          ld_n++;
        end
        if (rd_en) begin
          int st, sp, p, pos, e1, e2, e3;
          bit r2;
          r2 = MIX && stage == 0;
          st = MIX ? 2 * int'(stage) - 1 : 2 * int'(stage);
          sp = r2 ? 1 : (1 << st);
          p = int'(rd_addr[0]);
          pos = r2 ? 0 : p % sp;
          e1 = pos * N / (2 * sp);
          e2 = pos * N / (4 * sp);
          e3 = 3 * pos * N / (4 * sp);
          checks++;
          if ((p % (4 * sp)) >= sp) fail($sformatf("N=%0d base %0d stage %0d", N, p, stage));
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (int'(rd_addr[k]) != p + k * sp) fail($sformatf("N=%0d addr[%0d]=%0d base %0d stage %0d", N, k, rd_addr[k], p, stage));
            seen[stage][rd_addr[k]]++;
            issue_a.push_back(int'(rd_addr[k]));
          end
          checks++;
          if (int'(tw_idx[1]) != e1 || int'(tw_idx[2]) != e2 || int'(tw_idx[3]) != e3 % (N / 2))
            fail($sformatf("N=%0d twiddles %0d %0d %0d for base %0d stage %0d", N, tw_idx[1], tw_idx[2], tw_idx[3], p, stage));
          issue_cyc.push_back(cyc);
          issue_st.push_back(int'(stage));
          r2_d <= r2;
          neg3_d <= e3 >= N / 2;
        end
        checks++;
        if (pe_valid != rd_en_d) fail("pe_valid timing");
        if (pe_valid) begin
          checks++;
          if (pe_inc != SCHED[2 * (NS - 1 - int'(stage_d)) +: 2] || pe_r2 != r2_d || pe_neg3 != neg3_d)
            fail($sformatf("N=%0d PE control inc=%0d r2=%0d neg3=%0d", N, pe_inc, pe_r2, pe_neg3));
        end
        if (wb_en) begin
          checks++;
          if (issue_cyc.size() == 0) fail("write-back without issue");
          else begin
            int c, st;
            bit ok;
            c = issue_cyc.pop_front();
            st = issue_st.pop_front();
            ok = (cyc - c == LAT) && (wb_last == (st == NS - 1));
            for (int k = 0; k < 4; k++) if (int'(wb_addr[k]) != issue_a.pop_front()) ok = 1'b0;
            if (!ok) fail($sformatf("N=%0d write-back latency %0d or addresses", N, cyc - c));
          end
        end
        if (done) begin
          n_done++;
          checks++;
          if (busy_cyc != NS * (N / 4 + LAT + 1)) fail($sformatf("N=%0d transform took %0d cycles", N, busy_cyc));
          for (int s = 0; s < NS; s++)
            for (int a = 0; a < N; a++) begin
              checks++;
              if (seen[s][a] != 1) fail($sformatf("N=%0d stage %0d address %0d read %0d times", N, s, a, seen[s][a]));
              seen[s][a] = 0;
            end
          busy_cyc = 0;
        end
      end
      rd_en_d <= rd_en;
      stage_d <= stage;
    end

    initial begin
      for (int s = 0; s < NS; s++) for (int a = 0; a < N; a++) seen[s][a] = 0;
      #1 rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      while (n_done < 2) begin
        @(negedge clk);
        in_valid = ($urandom % 4) != 0;
      end
      repeat (3) @(posedge clk);
      checks++;
      if (ld_n < 2 * N || n_drain == 0) fail("too few samples or no drain");
      $display("N=%0d loaded=%0d drain cycles=%0d transforms=%0d", N, ld_n, n_drain, n_done);
      finished = 1'b1;
    end
  end

  initial begin
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
