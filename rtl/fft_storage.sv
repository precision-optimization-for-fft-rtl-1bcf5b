// fft_storage: the data memory of the memory-based FFT, N complex words of
// 2*WL bits ({re, im}), read and rewritten in place once per stage.
//
// A radix-2 PE needs two reads and two writes per cycle. Instead of a
// four-port memory the words are split over two single-read single-write
// banks by address parity: bank = XOR of all address bits, row = address
// without bit 0. The two words of every radix-2 butterfly differ in exactly
// one address bit, so they always lie in different banks and both ports can
// be served in the same cycle without conflict. The banking scheme is this
// design's choice; the total size, N * 2 * WL bits, is the storage of the
// processor (180,224 bits for N = 8192, WL = 11).
// Interface: port 0 and port 1 each have a read address (shared read enable,
// data one cycle later, in port order) and a write address, data and enable.
// Two simultaneous accesses of the same kind must go to different banks;
// an assertion checks this.
module fft_storage #(
  parameter int unsigned N  = 8192,  // words
  parameter int unsigned WL = 11     // wordlength of each of re and im
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [$clog2(N)-1:0]  rd_addr0,
  input  logic [$clog2(N)-1:0]  rd_addr1,
  output logic [2*WL-1:0]       rd_data0,
  output logic [2*WL-1:0]       rd_data1,
  input  logic                  wr_en0,
  input  logic [$clog2(N)-1:0]  wr_addr0,
  input  logic [2*WL-1:0]       wr_data0,
  input  logic                  wr_en1,
  input  logic [$clog2(N)-1:0]  wr_addr1,
  input  logic [2*WL-1:0]       wr_data1
);
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned RW = AW - 1;  // row address within a bank

  logic [1:0]         b_we, b_re;
  logic [RW-1:0]      b_waddr [2];
  logic [RW-1:0]      b_raddr [2];
  logic [2*WL-1:0]    b_wdata [2];
  logic [2*WL-1:0]    b_rdata [2];
  logic               rsel0;  // bank that served read port 0, one cycle late

  logic wbank0, wbank1, rbank0;
  assign wbank0 = ^wr_addr0;
  assign wbank1 = ^wr_addr1;
  assign rbank0 = ^rd_addr0;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (wr_en0 && (wbank0 == 1'(b))) begin
        b_we[b]    = 1'b1;
        b_waddr[b] = wr_addr0[AW-1:1];
        b_wdata[b] = wr_data0;
      end else begin
        b_we[b]    = wr_en1 && (wbank1 == 1'(b));
        b_waddr[b] = wr_addr1[AW-1:1];
        b_wdata[b] = wr_data1;
      end
      b_re[b]    = rd_en;
      b_raddr[b] = (rbank0 == 1'(b)) ? rd_addr0[AW-1:1] : rd_addr1[AW-1:1];
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    bank_ram #(.DEPTH(N / 2), .W(2 * WL)) u_bank (
      .clk(clk), .we(b_we[b]), .waddr(b_waddr[b]), .wdata(b_wdata[b]),
      .re(b_re[b]), .raddr(b_raddr[b]), .rdata(b_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en) rsel0 <= rbank0;
  end

  assign rd_data0 = b_rdata[rsel0];
  assign rd_data1 = b_rdata[~rsel0];

  // Conflict-free access rule of the parity banking.
  always_ff @(posedge clk) begin
    if (wr_en0 && wr_en1) begin
      assert (wbank0 != wbank1) else $error("fft_storage: write bank conflict");
    end
    if (rd_en) begin
      assert ((^rd_addr1) != rbank0) else $error("fft_storage: read bank conflict");
    end
  end

endmodule
