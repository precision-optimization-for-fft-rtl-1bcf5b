// fft_ctrl: control unit of the memory-based radix-2 DIT FFT.
//
// Sequencing (one transform):
//   PH_LOAD : accepts N input samples (valid/ready); sample n is written to
//             storage address bitrev(n), so that the in-place DIT stages
//             leave the result in natural order.
//   PH_RUN  : for stage st = 0 .. S-1 (S = log2 N) issues the N/2
//             butterflies j = 0 .. N/2-1, one per cycle:
//               span = 2^st, p = j with a 0 inserted at bit st, q = p + span,
//               twiddle index = (j mod span) * N/(2*span),
//               scaling decision inc = SCHED[S-1-st] (first stage is the MSB).
//   PH_DRAIN: after the last butterfly of a stage, waits until the PE
//             pipeline is empty, so that the next stage never reads a word
//             whose new value has not been written yet (a stall of LAT cycles
//             per stage).
// A delay line of LAT cycles carries p, q and a "last stage" flag alongside
// the data, so that the write-back addresses (wb_*) line up with the PE
// result. Results of the last stage are flagged wb_last: the datapath sends
// them to the output instead of the storage. `done` pulses for one cycle when
// the last result has left the PE.
// The document shows only a control unit box; the schedule encoding follows
// its configuration-ID convention, everything else here is this design's own.
// Timing: issue at cycle t, storage and twiddle data at t+1 (pe_valid/pe_inc
// are aligned to that cycle), write-back at t+LAT.
module fft_ctrl #(
  parameter int unsigned N     = 8192,           // FFT size
  parameter logic [31:0] SCHED = 32'h0000_1EAA,  // per-stage scaling, MSB of the low log2(N) bits = stage 1
  parameter int unsigned LAT   = 3               // issue-to-write-back latency
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input sample handshake
  input  logic                   in_valid,
  output logic                   in_ready,
  output logic                   ld_we,        // write input sample at ld_addr
  output logic [$clog2(N)-1:0]   ld_addr,
  // butterfly issue (storage read and twiddle lookup)
  output logic                   rd_en,
  output logic [$clog2(N)-1:0]   rd_p,
  output logic [$clog2(N)-1:0]   rd_q,
  output logic [$clog2(N/2)-1:0] tw_idx,
  // PE input control, one cycle after issue
  output logic                   pe_valid,
  output logic                   pe_inc,
  // write-back, LAT cycles after issue
  output logic                   wb_en,
  output logic                   wb_last,
  output logic [$clog2(N)-1:0]   wb_p,
  output logic [$clog2(N)-1:0]   wb_q,
  // status
  output fft_pkg::phase_e        phase,
  output logic [$clog2(N)-1:0]   stage,        // current stage, 0 .. S-1
  output logic                   done
);
  import fft_pkg::*;

  localparam int unsigned S  = $clog2(N);
  localparam int unsigned AW = S;
  localparam int unsigned JW = S - 1;

  logic [AW-1:0] ld_cnt;
  logic [JW-1:0] bf_cnt;

  // ---- address generation for the butterfly being issued ----
  logic [AW-1:0] p_c, q_c, span_c;
  logic [JW-1:0] tw_c, mask_c;

  always_comb begin
    span_c = AW'(1) << stage;
    mask_c = JW'(span_c - AW'(1));
    p_c    = ((AW'(bf_cnt) >> stage) << (stage + 1)) | AW'(bf_cnt & mask_c);
    q_c    = p_c | span_c;
    tw_c   = (bf_cnt & mask_c) << (JW'(S - 1) - JW'(stage));
  end

  // bit reversal of the load counter
  always_comb begin
    for (int unsigned i = 0; i < S; i++) begin
      ld_addr[i] = ld_cnt[S-1-i];
    end
  end

  assign in_ready = (phase == PH_LOAD);
  assign ld_we    = in_valid && in_ready;
  assign rd_en    = (phase == PH_RUN);
  assign rd_p     = p_c;
  assign rd_q     = q_c;
  assign tw_idx   = tw_c;

  // ---- write-back delay line ----
  logic [LAT-1:0] dl_v;
  logic [LAT-1:0] dl_last;
  logic [AW-1:0]  dl_p [LAT];
  logic [AW-1:0]  dl_q [LAT];
  logic           issue_inc;

  assign issue_inc = SCHED[int'(S - 1) - int'(stage)];

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
    pe_inc     <= issue_inc;
    dl_last[0] <= (stage == AW'(S - 1));
    dl_p[0]    <= p_c;
    dl_q[0]    <= q_c;
    for (int i = 1; i < LAT; i++) begin
      dl_last[i] <= dl_last[i-1];
      dl_p[i]    <= dl_p[i-1];
      dl_q[i]    <= dl_q[i-1];
    end
  end

  assign wb_en   = dl_v[LAT-1];
  assign wb_last = dl_last[LAT-1];
  assign wb_p    = dl_p[LAT-1];
  assign wb_q    = dl_q[LAT-1];

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
          if (bf_cnt == JW'(N / 2 - 1)) begin
            phase <= PH_DRAIN;
          end
        end
        PH_DRAIN: begin
          // the pipeline is empty once nothing is left in the delay line
          if (dl_v == '0) begin
            if (stage == AW'(S - 1)) begin
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
