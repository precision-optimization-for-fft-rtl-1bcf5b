// fft_processor: top level of the memory-based FFT processor with a static
// per-stage scaling schedule.
//
// RADIX selects the processing element and storage organisation:
//   2 : fft_r2_mem, one radix-2 butterfly per cycle, two-bank storage,
//       SCHED holds one bit per stage (1 = the stage gains an integer bit)
//   4 : fft_r4_mem, one radix-4 butterfly per cycle, four-bank storage,
//       SCHED holds one 2-bit field per stage (gain of 0, 1 or 2 bits); a
//       radix-2 first stage is used when log2(N) is odd
// In both cases the first stage owns the most significant used bits of SCHED.
// The published processor is radix-2, and the method is also evaluated for
// radix-4 FFTs (0, 1 or 2 integer bits per stage). The radix-4 datapath, its
// mixed-radix first stage and its default schedule are this design's own.
// The defaults (N = 8192, WL = 11) use the schedule chosen for uniformly
// distributed input: integer parts 2 3 4 5 5 6 6 7 7 8 8 9 9 for radix-2 and
// 2 4 5 6 7 8 9 for radix-4. The output format is <9, 2> in both.
//
// Interface: N samples are loaded with in_valid/in_ready in natural order;
// results leave during the last stage on up to four lanes. Lane k is valid
// when out_valid and out_lane[k] are both set; it carries bin out_idx[k].
// Radix-2 uses lanes 0 and 1, radix-4 all four. done pulses after the last
// bin of a transform; ovf pulses when a PE output saturated.
module fft_processor #(
  parameter int unsigned RADIX = 2,               // 2 or 4
  parameter int unsigned N     = 8192,            // FFT size, power of two
  parameter int unsigned WL    = 11,              // storage and I/O wordlength
  parameter int unsigned TW    = 16,              // twiddle wordlength
  parameter logic [31:0] SCHED = (RADIX == 4) ? 32'h0000_1955 : 32'h0000_1EAA
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [WL-1:0]  in_re,
  input  logic signed [WL-1:0]  in_im,
  output logic                  out_valid,
  output logic [3:0]            out_lane,
  output logic [$clog2(N)-1:0]  out_idx [4],
  output logic signed [WL-1:0]  out_re [4],
  output logic signed [WL-1:0]  out_im [4],
  output logic                  busy,
  output logic [$clog2(N)-1:0]  stage,
  output logic                  done,
  output logic                  ovf
);
  if (RADIX == 4) begin : g_r4
    fft_r4_mem #(.N(N), .WL(WL), .TW(TW), .SCHED(SCHED)) u_fft (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid), .in_ready(in_ready), .in_re(in_re), .in_im(in_im),
      .out_valid(out_valid), .out_idx(out_idx), .out_re(out_re), .out_im(out_im),
      .busy(busy), .stage(stage), .done(done), .ovf(ovf)
    );
    assign out_lane = 4'b1111;
  end else begin : g_r2
    fft_r2_mem #(.N(N), .WL(WL), .TW(TW), .SCHED(SCHED)) u_fft (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid), .in_ready(in_ready), .in_re(in_re), .in_im(in_im),
      .out_valid(out_valid),
      .out_idx0(out_idx[0]), .out_re0(out_re[0]), .out_im0(out_im[0]),
      .out_idx1(out_idx[1]), .out_re1(out_re[1]), .out_im1(out_im[1]),
      .busy(busy), .stage(stage), .done(done), .ovf(ovf)
    );
    assign out_lane = 4'b0011;
    for (genvar k = 2; k < 4; k++) begin : g_unused
      assign out_idx[k] = '0;
      assign out_re[k]  = '0;
      assign out_im[k]  = '0;
    end
  end

  initial begin
    if (RADIX != 2 && RADIX != 4) $error("fft_processor: RADIX must be 2 or 4");
  end
endmodule
