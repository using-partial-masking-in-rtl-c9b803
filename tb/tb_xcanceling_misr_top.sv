// tb_xcanceling_misr_top: end-to-end test of the X-canceling MISR with partially masked
// X-chains at the default parameters (256-bit MISR, 128 scan chains of which 12 are X-chains,
// 8 selection channels, q = 7 combinations per signature, 32-bit X-free MISR).
//
// One run of the xcm_e2e_run harness: 55 test vectors of 24 slices with X-chain cells X 40% of
// the time and regular cells 0.4%, 1% D's. Every signature is read out through 7 X-canceled
// combinations that must match their X-free predictions while the DUT sees random X values;
// errors injected from the second signature on must be detected. Masking, X-leaking, regular-
// chain X's, multi-vector signatures, combinations and error detection must all occur.
module tb_xcanceling_misr_top;
  logic done;
  int   checks, failures, masked_x, leaked_x, regular_x, slices, sigs;
  int   total_checks = 0, total_failures = 0;

  xcm_e2e_run u_run (
    .done, .checks, .failures, .n_masked_x(masked_x), .n_leaked_x(leaked_x),
    .n_regular_x(regular_x), .n_slices(slices), .n_sigs(sigs)
  );

  initial begin : watchdog
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done === 1'b1);
    total_checks = checks + 1;
    total_failures = failures;
    // the signatures absorbed the expected mix: masked X's far outnumber leaked ones
    if (!(masked_x > 4 * leaked_x)) begin
      total_failures++;
      $display("FAIL: masking removed too few X's (%0d masked, %0d leaked)", masked_x, leaked_x);
    end
    $display("slices %0d, signatures %0d", slices, sigs);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
