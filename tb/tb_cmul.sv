// tb_cmul: checks the full-precision complex multiplier against 64-bit
// integer arithmetic for random operands and the extreme corners.
module tb_cmul;
  localparam int DW = 11, TW = 16;
  logic signed [DW-1:0] b_re, b_im;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [DW+TW:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmul #(.DW(DW), .TW(TW)) dut (.b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im), .p_re(p_re), .p_im(p_im));

  task automatic check_one(input longint br, input longint bi, input longint wr, input longint wi);
    longint er, ei;
    b_re = DW'(br); b_im = DW'(bi); w_re = TW'(wr); w_im = TW'(wi);
    #1;
    er = longint'(b_re) * longint'(w_re) - longint'(b_im) * longint'(w_im);
    ei = longint'(b_re) * longint'(w_im) + longint'(b_im) * longint'(w_re);
    checks++;
    if (longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      $display("FAIL b=(%0d,%0d) w=(%0d,%0d) p=(%0d,%0d) exp=(%0d,%0d)", b_re, b_im, w_re, w_im, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    check_one(-1024, -1024, -32768, 32767);
    check_one(-1024, 1023, -32768, -32768);
    check_one(1023, -1024, 32767, 32767);
    check_one(-1024, -1024, -32768, -32768);
    for (int k = 0; k < 20000; k++) begin
      check_one(longint'($signed(DW'($urandom))), longint'($signed(DW'($urandom))),
                longint'($signed(TW'($urandom))), longint'($signed(TW'($urandom))));
    end
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
