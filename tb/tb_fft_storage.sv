// tb_fft_storage: fills the parity-banked storage (N = 64) with random words,
// first one word per cycle on port 0, then two per cycle as butterfly pairs
// (addresses differing in one bit), and reads back random butterfly pairs,
// checking both read ports against a plain array model and the one-cycle
// read latency.
module tb_fft_storage;
  localparam int N = 64, WL = 11, AW = $clog2(N);
  logic clk = 1'b0;
  logic rd_en = 1'b0, wr_en0 = 1'b0, wr_en1 = 1'b0;
  logic [AW-1:0] rd_addr0 = '0, rd_addr1 = '0, wr_addr0 = '0, wr_addr1 = '0;
  logic [2*WL-1:0] rd_data0, rd_data1, wr_data0 = '0, wr_data1 = '0;
  logic [2*WL-1:0] model [N];
  int checks = 0, failures = 0;

  fft_storage #(.N(N), .WL(WL)) dut (.*);

  always #5 clk = ~clk;

  task automatic pair(input int bitpos, input int base, output int p, output int q);
    p = base & ~(1 << bitpos);
    q = p | (1 << bitpos);
  endtask

  initial begin
    int p, q;
    // single-port fill
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      wr_en0 = 1'b1; wr_addr0 = AW'(a); wr_data0 = (2*WL)'($urandom);
      model[a] = wr_data0;
    end
    @(negedge clk);
    wr_en0 = 1'b0;
    // dual-port rewrite of half the words in butterfly pairs
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      pair($urandom % AW, $urandom % N, p, q);
      wr_en0 = 1'b1; wr_addr0 = AW'(p); wr_data0 = (2*WL)'($urandom);
      wr_en1 = 1'b1; wr_addr1 = AW'(q); wr_data1 = (2*WL)'($urandom);
      model[p] = wr_data0;
      model[q] = wr_data1;
    end
    @(negedge clk);
    wr_en0 = 1'b0; wr_en1 = 1'b0;
    // dual-port reads
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      pair($urandom % AW, $urandom % N, p, q);
      if ($urandom % 2) begin int t; t = p; p = q; q = t; end
      rd_en = 1'b1; rd_addr0 = AW'(p); rd_addr1 = AW'(q);
      @(posedge clk);
      #1;
      rd_en = 1'b0;
      checks++;
      if (rd_data0 != model[p] || rd_data1 != model[q]) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d q=%0d got %h %h exp %h %h", p, q, rd_data0, rd_data1, model[p], model[q]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
