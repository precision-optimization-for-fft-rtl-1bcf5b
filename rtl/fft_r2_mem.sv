// fft_r2_mem: memory-based radix-2 DIT FFT processor with fixed-wordlength
// storage and a static, per-stage optimized scaling schedule.
//
// Every stage reads all N words from one storage, passes them through a
// single radix-2 PE and writes them back in place, so all stages share one
// wordlength WL. Instead of halving at every stage, each stage either gains
// one integer bit (result shifted right by one, truncated) or keeps its
// format and saturates overflows; which of the two is fixed per stage by the
// SCHED parameter, chosen offline from the probability distribution of the
// data (one bit per stage, MSB = first stage). The default is the schedule
// for N = 8192, WL = 11, uniformly distributed input: integer bits per stage
// 2 3 4 5 5 6 6 7 7 8 8 9 9, i.e. 13'b1111010101010. SCHED = all ones gives
// the classic divide-by-two-per-stage scaling.
//
// Number formats: input samples are <1, WL-1> (value = integer / 2^(WL-1)).
// Output samples are <M, WL-M> with M = 1 + (number of ones in SCHED), i.e.
// value = integer * 2^(M-WL).
//
// Structure (control unit, storage, input mux, PE, output mux):
//   input mux  : the storage write port takes the input sample while loading
//                and the PE result while computing;
//   output mux : PE results of the last stage leave on the output port
//                instead of going back to storage.
// Interface and timing:
//   - in_valid/in_ready: N samples in natural order; in_ready is high while
//     the processor is loading, one sample per cycle.
//   - Computation then takes S * (N/2 + LAT + 1) cycles (S = log2 N, LAT = 3):
//     one butterfly per cycle plus a pipeline drain of LAT + 1 cycles per stage.
//   - Results leave during the last stage, two per cycle (out_valid): bins
//     out_idx0 and out_idx1 = out_idx0 + N/2, in increasing out_idx0 order.
//   - busy is high while computing, stage tells which stage is in progress.
//   - done pulses once the last result has left; the next transform may be
//     loaded right after. ovf pulses when a PE output saturated.
module fft_r2_mem #(
  parameter int unsigned N     = 8192,           // FFT size (power of two, 8 .. 2^31)
  parameter int unsigned WL    = 11,             // storage and I/O wordlength
  parameter int unsigned TW    = 16,             // twiddle wordlength
  parameter logic [31:0] SCHED = 32'h0000_1EAA   // scaling schedule, low log2(N) bits used
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [WL-1:0]  in_re,
  input  logic signed [WL-1:0]  in_im,
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_idx0,
  output logic signed [WL-1:0]  out_re0,
  output logic signed [WL-1:0]  out_im0,
  output logic [$clog2(N)-1:0]  out_idx1,
  output logic signed [WL-1:0]  out_re1,
  output logic signed [WL-1:0]  out_im1,
  output logic                  busy,
  output logic [$clog2(N)-1:0]  stage,     // stage being computed, 0 .. log2(N)-1
  output logic                  done,
  output logic                  ovf
);
  import fft_pkg::*;

  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned LAT = 3;  // storage read (1) + PE (2)

  // ---- control unit ----
  logic             ld_we, rd_en, pe_valid, pe_inc, wb_en, wb_last;
  logic [AW-1:0]    ld_addr, rd_p, rd_q, wb_p, wb_q;
  logic [AW-2:0]    tw_idx;
  phase_e           phase;

  fft_ctrl #(.N(N), .SCHED(SCHED), .LAT(LAT)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .ld_we(ld_we), .ld_addr(ld_addr),
    .rd_en(rd_en), .rd_p(rd_p), .rd_q(rd_q), .tw_idx(tw_idx),
    .pe_valid(pe_valid), .pe_inc(pe_inc),
    .wb_en(wb_en), .wb_last(wb_last), .wb_p(wb_p), .wb_q(wb_q),
    .phase(phase), .stage(stage), .done(done)
  );

  assign busy = (phase != PH_LOAD);

  // ---- storage ----
  logic [2*WL-1:0]      rd_d0, rd_d1, wr_d0, wr_d1;
  logic                 wr_en0, wr_en1;
  logic [AW-1:0]        wr_a0;
  logic signed [WL-1:0] x0_re, x0_im, x1_re, x1_im;
  logic                 pe_out_valid;

  // input mux: load path or PE result
  always_comb begin
    if (ld_we) begin
      wr_en0 = 1'b1;
      wr_a0  = ld_addr;
      wr_d0  = {in_re, in_im};
    end else begin
      wr_en0 = wb_en && !wb_last;
      wr_a0  = wb_p;
      wr_d0  = {x0_re, x0_im};
    end
    wr_en1 = wb_en && !wb_last;
    wr_d1  = {x1_re, x1_im};
  end

  fft_storage #(.N(N), .WL(WL)) u_mem (
    .clk(clk),
    .rd_en(rd_en), .rd_addr0(rd_p), .rd_addr1(rd_q),
    .rd_data0(rd_d0), .rd_data1(rd_d1),
    .wr_en0(wr_en0), .wr_addr0(wr_a0), .wr_data0(wr_d0),
    .wr_en1(wr_en1), .wr_addr1(wb_q), .wr_data1(wr_d1)
  );

  // ---- twiddle factors ----
  logic signed [TW-1:0] w_re, w_im;

  twiddle_rom #(.N(N), .TW(TW)) u_tw (
    .clk(clk), .idx(tw_idx), .w_re(w_re), .w_im(w_im)
  );

  // ---- processing element ----
  butterfly_r2 #(.WL(WL), .TW(TW)) u_pe (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pe_valid), .inc(pe_inc),
    .a_re(rd_d0[2*WL-1:WL]), .a_im(rd_d0[WL-1:0]),
    .b_re(rd_d1[2*WL-1:WL]), .b_im(rd_d1[WL-1:0]),
    .w_re(w_re), .w_im(w_im),
    .out_valid(pe_out_valid),
    .x0_re(x0_re), .x0_im(x0_im), .x1_re(x1_re), .x1_im(x1_im),
    .ovf(ovf)
  );

  // ---- output mux: last-stage results go to the output port ----
  assign out_valid = wb_en && wb_last;
  assign out_idx0  = wb_p;
  assign out_idx1  = wb_q;
  assign out_re0   = x0_re;
  assign out_im0   = x0_im;
  assign out_re1   = x1_re;
  assign out_im1   = x1_im;

  // The write-back tag and the PE result must stay aligned.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (chk_en) begin
      a_pe_aligned: assert (pe_out_valid == wb_en)
        else $error("fft_r2_mem: PE and write-back out of step");
    end
  end

endmodule
