// tb_scale_sat: checks the output quantizer against the reference
// floor-then-clamp model, with random and directed values, for the scaling
// decisions inc = 0 (keep format and saturate), 1 and 2 (drop one or two
// more bits by truncation).
module tb_scale_sat;
  import fft_ref_pkg::*;
  localparam int IW = 29, OW = 11, DROP = 14;

  logic signed [IW-1:0] din;
  logic [1:0]           inc;
  logic signed [OW-1:0] dout;
  logic                 ovf;
  int checks = 0, failures = 0;
  int n_sat = 0, n_trunc_neg = 0;

  scale_sat #(.IW(IW), .OW(OW), .DROP(DROP)) dut (.din(din), .inc(inc), .dout(dout), .ovf(ovf));

  task automatic check_one(input longint v, input logic [1:0] i);
    longint exp_q;
    bit exp_s;
    din = IW'(v);
    inc = i;
    #1;
    exp_q = quant_ref(longint'(din), DROP + int'(i), OW, exp_s);
    checks++;
    if (longint'(dout) != exp_q || ovf != exp_s) begin
      failures++;
      $display("FAIL din=%0d inc=%0d dout=%0d ovf=%0d exp=%0d/%0d", din, i, dout, ovf, exp_q, exp_s);
    end
    if (exp_s) n_sat++;
    if (v < 0 && (v % (64'sd1 <<< DROP)) != 0) n_trunc_neg++;
  endtask

  initial begin
    // directed: -1.5 LSB truncates to -2 LSB, +1.5 LSB to +1 LSB
    check_one(-(3 <<< (DROP - 1)), 2'd0);
    checks++; if (dout != -2) failures++;
    check_one((3 <<< (DROP - 1)), 2'd0);
    checks++; if (dout != 1) failures++;
    // range limits
    check_one((longint'(1) <<< (OW - 1 + DROP)), 2'd0);          // just over max
    checks++; if (dout != 11'sd1023 || !ovf) failures++;
    check_one((longint'(1) <<< (OW - 1 + DROP)), 2'd1);          // fits after /2
    checks++; if (dout != 11'sd512 || ovf) failures++;
    check_one(-(longint'(1) <<< (OW - 1 + DROP)), 2'd0);         // exactly min
    checks++; if (dout != -11'sd1024 || ovf) failures++;
    check_one(-(longint'(1) <<< (OW - 1 + DROP)) - 1, 2'd0);     // just under min
    checks++; if (dout != -11'sd1024 || !ovf) failures++;
    for (int k = 0; k < 20000; k++) begin
      longint v;
      v = longint'($signed({$urandom, $urandom})) >>> (64 - IW + ($urandom % 6));
      check_one(v, 2'($urandom % 3));
    end
    checks++;
    if (n_sat == 0 || n_trunc_neg == 0) failures++;
    $display("saturations=%0d negative truncations=%0d", n_sat, n_trunc_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
