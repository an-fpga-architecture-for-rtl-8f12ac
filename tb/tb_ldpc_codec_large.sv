// tb_ldpc_codec_large: end-to-end tests of the codec at the two smaller code sizes of the
// encoder and quantizer synthesis studies, (n, m) = (96, 48) and (204, 102), with the default
// bus width, message width and iteration limit. The matrices of the codes studied are not
// available, so each codec_bench instance generates a code of its size (three ones per column
// of P). The two benches run concurrently; the result line sums their checks and failures.
module tb_ldpc_codec_large;
  logic fin96, fin204;
  int   chk96, chk204, fail96, fail204;
  int   checks, failures;

  codec_bench #(.N(96), .R(48), .NWORDS(150), .MAX_ERR(6), .SEED(2024))
    b96 (.finished(fin96), .checks(chk96), .failures(fail96));
  codec_bench #(.N(204), .R(102), .NWORDS(60), .MAX_ERR(8), .SEED(77))
    b204 (.finished(fin204), .checks(chk204), .failures(fail204));

  initial begin
    wait (fin96 && fin204);
    checks   = chk96 + chk204;
    failures = fail96 + fail204;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 400000 half-periods of the benches' 10-unit clock
  initial begin
    #2000000;
    checks   = chk96 + chk204;
    failures = fail96 + fail204 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
