// fft_r4_mem: radix-4 configuration of the memory-based FFT processor with
// fixed-wordlength storage and a static per-stage scaling schedule.
//
// Same organisation as the radix-2 processor (control unit, storage, input
// mux, PE, output mux), with a radix-4 PE that handles four words per cycle
// and a four-bank storage. When log2(N) is odd the first stage is a radix-2
// stage (the PE then computes two radix-2 butterflies per cycle). A radix-4
// stage may gain 0, 1 or 2 integer bits; SCHED holds one 2-bit field per
// stage, first stage in the most significant used field. The default,
// 14'b01_10_01_01_01_01_01 for N = 8192, gives the integer parts
// 2 4 5 6 7 8 9 after the seven stages, i.e. the same formats at the same
// points of the transform as the default radix-2 schedule.
// Formats: input <1, WL-1>; output <1 + sum of the fields, rest>.
// Timing: N load cycles (in_valid/in_ready), then NS * (N/4 + LAT + 1)
// compute cycles with NS = ceil(log2(N)/2) and LAT = 3. Results leave during
// the last stage, four bins per cycle (out_idx[k], out_re[k], out_im[k]);
// done pulses after the last of them.
module fft_r4_mem #(
  parameter int unsigned N     = 8192,
  parameter int unsigned WL    = 11,
  parameter int unsigned TW    = 16,
  parameter logic [31:0] SCHED = 32'h0000_1955
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [WL-1:0]  in_re,
  input  logic signed [WL-1:0]  in_im,
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_idx [4],
  output logic signed [WL-1:0]  out_re [4],
  output logic signed [WL-1:0]  out_im [4],
  output logic                  busy,
  output logic [$clog2(N)-1:0]  stage,
  output logic                  done,
  output logic                  ovf
);
  import fft_pkg::*;

  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned LAT = 3;

  // ---- control unit ----
  logic             ld_we, rd_en, pe_valid, pe_r2, pe_neg3, wb_en, wb_last;
  logic [1:0]       pe_inc;
  logic [AW-1:0]    ld_addr;
  logic [AW-1:0]    rd_addr [4], wb_addr [4];
  logic [AW-2:0]    tw_idx [1:3];
  phase_e           phase;

  fft_ctrl4 #(.N(N), .SCHED(SCHED), .LAT(LAT)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .ld_we(ld_we), .ld_addr(ld_addr),
    .rd_en(rd_en), .rd_addr(rd_addr), .tw_idx(tw_idx),
    .pe_valid(pe_valid), .pe_inc(pe_inc), .pe_r2(pe_r2), .pe_neg3(pe_neg3),
    .wb_en(wb_en), .wb_last(wb_last), .wb_addr(wb_addr),
    .phase(phase), .stage(stage), .done(done)
  );

  assign busy = (phase != PH_LOAD);

  // ---- storage with input mux ----
  logic [2*WL-1:0]      rd_d [4], wr_d [4];
  logic [AW-1:0]        wr_a [4];
  logic [3:0]           wr_en;
  logic signed [WL-1:0] o_re [4], o_im [4];
  logic                 pe_out_valid;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      wr_en[k] = wb_en && !wb_last;
      wr_a[k]  = wb_addr[k];
      wr_d[k]  = {o_re[k], o_im[k]};
    end
    if (ld_we) begin
      wr_en[0] = 1'b1;
      wr_a[0]  = ld_addr;
      wr_d[0]  = {in_re, in_im};
    end
  end

  fft_storage4 #(.N(N), .WL(WL)) u_mem (
    .clk(clk), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_d),
    .wr_en(wr_en), .wr_addr(wr_a), .wr_data(wr_d)
  );

  // ---- twiddle factors, one ROM per multiplier ----
  logic signed [TW-1:0] tr [1:3], ti [1:3], w_re [1:3], w_im [1:3];

  for (genvar k = 1; k <= 3; k++) begin : g_tw
    twiddle_rom #(.N(N), .TW(TW)) u_tw (.clk(clk), .idx(tw_idx[k]), .w_re(tr[k]), .w_im(ti[k]));
  end

  always_comb begin
    for (int k = 1; k <= 3; k++) begin
      w_re[k] = tr[k];
      w_im[k] = ti[k];
    end
    if (pe_neg3) begin  // W^(e + N/2) = -W^e
      w_re[3] = -tr[3];
      w_im[3] = -ti[3];
    end
  end

  // ---- processing element ----
  logic signed [WL-1:0] x_re [4], x_im [4];
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      x_re[k] = rd_d[k][2*WL-1:WL];
      x_im[k] = rd_d[k][WL-1:0];
    end
  end

  butterfly_r4 #(.WL(WL), .TW(TW)) u_pe (
    .clk(clk), .rst_n(rst_n), .in_valid(pe_valid), .inc(pe_inc), .r2(pe_r2),
    .x_re(x_re), .x_im(x_im), .w_re(w_re), .w_im(w_im),
    .out_valid(pe_out_valid), .o_re(o_re), .o_im(o_im), .ovf(ovf)
  );

  // ---- output mux ----
  assign out_valid = wb_en && wb_last;
  assign out_idx   = wb_addr;
  assign out_re    = o_re;
  assign out_im    = o_im;

  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (chk_en) begin
      a_pe_aligned: assert (pe_out_valid == wb_en)
        else $error("fft_r4_mem: PE and write-back out of step");
    end
  end

endmodule
