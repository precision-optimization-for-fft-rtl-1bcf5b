// tb_fft_ctrl: runs the control unit (N = 16, LAT = 3) through two whole
// transforms, with gaps in the input stream, and checks:
//   - the load addresses are the bit-reversed sample numbers;
//   - in every stage each address is read exactly once, as radix-2 DIT pairs
//     (q = p + 2^stage) with twiddle index (p mod 2^stage) * N / 2^(stage+1);
//   - the PE control follows the issue by one cycle with the stage's
//     scaling bit, and the write-back by LAT cycles with the same addresses;
//   - each stage takes N/2 + LAT + 1 cycles (issue plus pipeline drain) and
//     done pulses once per transform.
module tb_fft_ctrl;
  import fft_pkg::*;
  import fft_ref_pkg::brev;
  localparam int N = 16, S = 4, LAT = 3;
  localparam logic [31:0] SCHED = 32'b1010;

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  logic in_ready, ld_we, rd_en, pe_valid, pe_inc, wb_en, wb_last, done;
  logic [S-1:0] ld_addr, rd_p, rd_q, wb_p, wb_q, stage;
  logic [S-2:0] tw_idx;
  phase_e phase;
  int checks = 0, failures = 0;

  fft_ctrl #(.N(N), .SCHED(SCHED), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0, ld_n = 0, busy_cyc = 0, n_done = 0, n_drain = 0;
  int seen [S][N];
  int issue_cyc [$];
  logic [S-1:0] issue_p [$], issue_q [$];
  logic [S-1:0] issue_st [$];
  bit rd_en_d;
  logic [S-1:0] stage_d;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0d %s", cyc, msg);
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (phase != PH_LOAD) busy_cyc++;
      if (phase == PH_DRAIN) n_drain++;
      if (ld_we) begin
        checks++;
        if (int'(ld_addr) != brev(ld_n % N, S)) fail($sformatf("ld_addr %0d for sample %0d", ld_addr, ld_n));
        ld_n++;
      end
      if (rd_en) begin
        int span;
        span = 1 << stage;
        checks++;
        if (int'(rd_q) != int'(rd_p) + span || (int'(rd_p) & span) != 0)
          fail($sformatf("pair p=%0d q=%0d stage %0d", rd_p, rd_q, stage));
        checks++;
        if (int'(tw_idx) != (int'(rd_p) % span) * (N / (2 * span)))
          fail($sformatf("twiddle %0d for p=%0d stage %0d", tw_idx, rd_p, stage));
        seen[stage][rd_p]++;
        seen[stage][rd_q]++;
        issue_cyc.push_back(cyc);
        issue_p.push_back(rd_p);
        issue_q.push_back(rd_q);
        issue_st.push_back(stage);
      end
      // PE control one cycle after issue
      checks++;
      if (pe_valid != rd_en_d) fail("pe_valid timing");
      if (pe_valid) begin
        checks++;
        if (pe_inc != SCHED[S - 1 - int'(stage_d)]) fail("pe_inc");
      end
      if (wb_en) begin
        checks++;
        if (issue_cyc.size() == 0) fail("write-back without issue");
        else begin
          int c;
          logic [S-1:0] p, q, st;
          c = issue_cyc.pop_front(); p = issue_p.pop_front(); q = issue_q.pop_front(); st = issue_st.pop_front();
          if (cyc - c != LAT || wb_p != p || wb_q != q || wb_last != (int'(st) == S - 1))
            fail($sformatf("write-back lat=%0d p=%0d/%0d q=%0d/%0d last=%0d", cyc - c, wb_p, p, wb_q, q, wb_last));
        end
      end
      if (done) begin
        n_done++;
        checks++;
        if (busy_cyc != S * (N / 2 + LAT + 1)) fail($sformatf("transform took %0d cycles", busy_cyc));
        for (int s = 0; s < S; s++)
          for (int a = 0; a < N; a++) begin
            checks++;
            if (seen[s][a] != 1) fail($sformatf("stage %0d address %0d read %0d times", s, a, seen[s][a]));
            seen[s][a] = 0;
          end
        busy_cyc = 0;
      end
    end
    rd_en_d <= rd_en;
    stage_d <= stage;
  end

  initial begin
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
    $display("loaded=%0d drain cycles=%0d transforms=%0d", ld_n, n_drain, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
