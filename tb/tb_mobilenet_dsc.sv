// tb_mobilenet_dsc: runs a MobileNet V1 style depthwise separable block
// (DWC 3x3 S = 1, PWC, DWC 3x3 S = 2 on a 16x16 image; see tb_dsc_runner)
// on two NP-CGRA instances: the default 8x8 array and the 4x4 array used
// for the comparison of depthwise separable layers. Both run at the same
// time; the test passes when both finish with no failure.
module tb_mobilenet_dsc;
  int  checks8, failures8, checks4, failures4;
  bit  fin8, fin4;
  int  checks, failures;
  logic clk = 0; always #5 clk = ~clk;

  tb_dsc_runner u_8x8 (.checks(checks8), .failures(failures8), .finished(fin8));
  tb_dsc_runner #(.R(4), .C(4)) u_4x4 (.checks(checks4), .failures(failures4), .finished(fin4));

  initial begin
    fork
      begin wait (fin8 && fin4); end
      begin repeat (400000) @(posedge clk); $display("FAIL watchdog expired"); end
    join_any
    checks = checks8 + checks4 + 2;
    failures = failures8 + failures4 + (fin8 ? 0 : 1) + (fin4 ? 0 : 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
