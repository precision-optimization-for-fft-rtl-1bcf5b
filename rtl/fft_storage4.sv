// fft_storage4: data memory of the radix-4 configuration, N complex words
// of 2*WL bits ({re, im}) in four single-read single-write banks, so that a
// radix-4 PE can read and write four words per cycle.
//
// Bank = {XOR of the odd-numbered address bits, XOR of the even-numbered
// address bits}; row = address without its two lowest bits. The four words
// of a radix-4 butterfly differ in two adjacent address bits, one odd and
// one even, so all four combinations, and hence all four banks, occur: the
// group is conflict-free for every stage. The same holds for the four
// consecutive words of the mixed-radix radix-2 stage. The banking is this
// design's choice; the total size is N * 2 * WL bits as in the radix-2
// configuration.
// Interface: four read ports (shared enable, data one cycle later, in port
// order) and four write ports. Accesses issued together must fall in
// different banks; an assertion checks this.
module fft_storage4 #(
  parameter int unsigned N  = 8192,  // words (>= 8)
  parameter int unsigned WL = 11     // wordlength of each of re and im
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [$clog2(N)-1:0]  rd_addr [4],
  output logic [2*WL-1:0]       rd_data [4],
  input  logic [3:0]            wr_en,
  input  logic [$clog2(N)-1:0]  wr_addr [4],
  input  logic [2*WL-1:0]       wr_data [4]
);
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned RW = AW - 2;

  function automatic logic [1:0] bank_of(input logic [AW-1:0] a);
    logic odd, even;
    odd = 1'b0;
    even = 1'b0;
    for (int i = 0; i < AW; i++) begin
      if (i % 2 == 1) odd ^= a[i];
      else            even ^= a[i];
    end
    return {odd, even};
  endfunction

  logic [1:0]      rb [4], wb [4], rb_q [4];
  logic [3:0]      b_we;
  logic [RW-1:0]   b_waddr [4], b_raddr [4];
  logic [2*WL-1:0] b_wdata [4], b_rdata [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rb[k] = bank_of(rd_addr[k]);
      wb[k] = bank_of(wr_addr[k]);
    end
    for (int b = 0; b < 4; b++) begin
      b_we[b]    = 1'b0;
      b_waddr[b] = wr_addr[0][AW-1:2];
      b_wdata[b] = wr_data[0];
      b_raddr[b] = rd_addr[0][AW-1:2];
      for (int k = 3; k >= 0; k--) begin
        if (wr_en[k] && wb[k] == 2'(b)) begin
          b_we[b]    = 1'b1;
          b_waddr[b] = wr_addr[k][AW-1:2];
          b_wdata[b] = wr_data[k];
        end
        if (rb[k] == 2'(b)) b_raddr[b] = rd_addr[k][AW-1:2];
      end
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    bank_ram #(.DEPTH(N / 4), .W(2 * WL)) u_bank (
      .clk(clk), .we(b_we[b]), .waddr(b_waddr[b]), .wdata(b_wdata[b]),
      .re(rd_en), .raddr(b_raddr[b]), .rdata(b_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en) rb_q <= rb;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) rd_data[k] = b_rdata[rb_q[k]];
  end

  // Conflict-free access rule of the banking.
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      for (int k = i + 1; k < 4; k++) begin
        if (wr_en[i] && wr_en[k]) begin
          assert (wb[i] != wb[k]) else $error("fft_storage4: write bank conflict");
        end
        if (rd_en) begin
          assert (rb[i] != rb[k]) else $error("fft_storage4: read bank conflict");
        end
      end
    end
  end

endmodule
