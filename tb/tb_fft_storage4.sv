// tb_fft_storage4: fills the four-bank storage (N = 64) with random words one
// per cycle on port 0, rewrites random groups of four words (addresses
// differing only in two adjacent bits, as a radix-4 or paired radix-2
// butterfly accesses them) with random write enables, and reads back random
// groups in shuffled port order, checking all four read ports against a
// plain array model and the one-cycle read latency.
module tb_fft_storage4;
  localparam int N = 64, WL = 11, AW = $clog2(N);
  logic clk = 1'b0;
  logic rd_en = 1'b0;
  logic [3:0] wr_en = '0;
  logic [AW-1:0] rd_addr [4], wr_addr [4];
  logic [2*WL-1:0] rd_data [4], wr_data [4];
  logic [2*WL-1:0] model [N];
  int checks = 0, failures = 0;

  fft_storage4 #(.N(N), .WL(WL)) dut (.*);

  always #5 clk = ~clk;

  // four addresses that differ only in bits b and b+1, in random port order
  task automatic quad(output int a [4]);
    int b, base, perm [4];
    b = $urandom % (AW - 1);
    base = ($urandom % N) & ~(3 << b);
    perm = '{0, 1, 2, 3};
    perm.shuffle();
    for (int k = 0; k < 4; k++) a[k] = base | (perm[k] << b);
  endtask

  initial begin
    int a [4];
    for (int k = 0; k < 4; k++) begin rd_addr[k] = '0; wr_addr[k] = '0; wr_data[k] = '0; end
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      wr_en = 4'b0001; wr_addr[0] = AW'(n); wr_data[0] = (2*WL)'($urandom);
      model[n] = wr_data[0];
    end
    for (int v = 0; v < 300; v++) begin
      @(negedge clk);
      quad(a);
      wr_en = 4'($urandom);
      for (int k = 0; k < 4; k++) begin
        wr_addr[k] = AW'(a[k]);
        wr_data[k] = (2*WL)'($urandom);
        if (wr_en[k]) model[a[k]] = wr_data[k];
      end
    end
    @(negedge clk);
    wr_en = '0;
    for (int v = 0; v < 500; v++) begin
      @(negedge clk);
      quad(a);
      rd_en = 1'b1;
      for (int k = 0; k < 4; k++) rd_addr[k] = AW'(a[k]);
      @(posedge clk);
      #1;
      rd_en = 1'b0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rd_data[k] != model[a[k]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d got %h exp %h", k, a[k], rd_data[k], model[a[k]]);
        end
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
