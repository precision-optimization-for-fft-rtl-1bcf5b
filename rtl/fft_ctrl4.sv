// fft_ctrl4: control unit of the radix-4 configuration (mixed radix when
// log2(N) is odd).
//
// Same three phases as the radix-2 control unit (LOAD with bit-reversed
// addresses, RUN, DRAIN), but each issue covers four words:
//   - If log2(N) is odd, the first stage is a radix-2 stage: issue j reads
//     words 4j .. 4j+3 and the PE (r2 = 1) computes the two butterflies
//     (4j, 4j+1) and (4j+2, 4j+3), whose twiddle factors are all 1.
//   - Each radix-4 stage with lowest bit position st (s = 2^st) reads
//     p, p+s, p+2s, p+3s, where p is j with two 0 bits inserted at st and
//     st+1. With pos = j mod s, the twiddle exponents are
//       e1 = pos*N/(2s), e2 = pos*N/(4s), e3 = 3*pos*N/(4s)
//     (W_N^e). The ROM holds e < N/2 only; for e3 >= N/2 it is read at
//     e3 - N/2 and tw3_neg asks the datapath to negate the factor.
// Stages are numbered t = 0 .. NS-1, NS = ceil(log2(N)/2). The schedule has
// one 2-bit field per stage, the first stage in the most significant used
// field: the number of integer bits that stage gains (0 .. 2; 0 .. 1 for the
// radix-2 stage).
// Timing: N/4 issues per stage, then LAT+1 drain cycles; PE controls
// (pe_*) one cycle after issue; write-back addresses LAT cycles after issue.
module fft_ctrl4 #(
  parameter int unsigned N     = 8192,
  parameter logic [31:0] SCHED = 32'h0000_1955,
  parameter int unsigned LAT   = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  output logic                   ld_we,
  output logic [$clog2(N)-1:0]   ld_addr,
  output logic                   rd_en,
  output logic [$clog2(N)-1:0]   rd_addr [4],
  output logic [$clog2(N/2)-1:0] tw_idx [1:3],
  output logic                   pe_valid,
  output logic [1:0]             pe_inc,
  output logic                   pe_r2,
  output logic                   pe_neg3,
  output logic                   wb_en,
  output logic                   wb_last,
  output logic [$clog2(N)-1:0]   wb_addr [4],
  output fft_pkg::phase_e        phase,
  output logic [$clog2(N)-1:0]   stage,
  output logic                   done
);
  import fft_pkg::*;

  localparam int unsigned S   = $clog2(N);
  localparam int unsigned AW  = S;
  localparam int unsigned JW  = S - 2;
  localparam bit          MIX = (S % 2) == 1;
  localparam int unsigned NS  = (S + 1) / 2;

  logic [AW-1:0] ld_cnt;
  logic [JW-1:0] bf_cnt;

  // ---- address and twiddle generation ----
  logic [AW-1:0] st_c, s_c, pos_c, p_c, e3_c;
  logic [AW-2:0] e1_c, e2_c;  // always below N/2
  logic          r2_c;

  always_comb begin
    r2_c  = MIX && (stage == '0);
    st_c  = MIX ? ((stage == '0) ? '0 : AW'(2) * stage - AW'(1)) : AW'(2) * stage;
    s_c   = AW'(1) << st_c;
    if (r2_c) begin
      pos_c = '0;
      p_c   = AW'(bf_cnt) << 2;
      s_c   = AW'(1);
      e1_c  = '0;
      e2_c  = '0;
      e3_c  = '0;
    end else begin
      pos_c = AW'(bf_cnt) & (s_c - AW'(1));
      p_c   = ((AW'(bf_cnt) >> st_c) << (st_c + AW'(2))) | pos_c;
      e1_c  = (AW-1)'(pos_c << (AW'(S - 1) - st_c));
      e2_c  = (AW-1)'(pos_c << (AW'(S - 2) - st_c));
      e3_c  = (AW'(3) * pos_c) << (AW'(S - 2) - st_c);
    end
    for (int k = 0; k < 4; k++) rd_addr[k] = p_c + AW'(k) * s_c;
    tw_idx[1] = e1_c;
    tw_idx[2] = e2_c;
    tw_idx[3] = e3_c[AW-2:0];
  end

  always_comb begin
    for (int unsigned i = 0; i < S; i++) ld_addr[i] = ld_cnt[S-1-i];
  end

  assign in_ready = (phase == PH_LOAD);
  assign ld_we    = in_valid && in_ready;
  assign rd_en    = (phase == PH_RUN);

  // ---- PE control and write-back delay line ----
  logic [LAT-1:0] dl_v, dl_last;
  logic [AW-1:0]  dl_a [LAT][4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_v     <= '0;
      pe_valid <= 1'b0;
    end else begin
      dl_v     <= {dl_v[LAT-2:0], rd_en};
      pe_valid <= rd_en;
    end
  end

  always_ff @(posedge clk) begin
    pe_inc     <= SCHED[2 * (int'(NS - 1) - int'(stage)) +: 2];
    pe_r2      <= r2_c;
    pe_neg3    <= e3_c[AW-1];
    dl_last[0] <= (stage == AW'(NS - 1));
    dl_a[0]    <= rd_addr;
    for (int i = 1; i < LAT; i++) begin
      dl_last[i] <= dl_last[i-1];
      dl_a[i]    <= dl_a[i-1];
    end
  end

  assign wb_en   = dl_v[LAT-1];
  assign wb_last = dl_last[LAT-1];
  assign wb_addr = dl_a[LAT-1];

  // ---- phase sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_LOAD;
      ld_cnt <= '0;
      bf_cnt <= '0;
      stage  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_LOAD: begin
          if (ld_we) begin
            ld_cnt <= ld_cnt + AW'(1);
            if (ld_cnt == AW'(N - 1)) begin
              phase  <= PH_RUN;
              stage  <= '0;
              bf_cnt <= '0;
            end
          end
        end
        PH_RUN: begin
          bf_cnt <= bf_cnt + JW'(1);
          if (bf_cnt == JW'(N / 4 - 1)) phase <= PH_DRAIN;
        end
        PH_DRAIN: begin
          if (dl_v == '0) begin
            if (stage == AW'(NS - 1)) begin
              phase  <= PH_LOAD;
              ld_cnt <= '0;
              done   <= 1'b1;
            end else begin
              phase  <= PH_RUN;
              stage  <= stage + AW'(1);
            end
          end
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

endmodule
