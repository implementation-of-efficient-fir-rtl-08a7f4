// End-to-end runs of the DA LMS filter at the other two filter lengths the
// design is characterised for: the single-block N = 4 filter and the
// eight-block N = 32 filter (P = 4, L = 8 in both), plus the 16-tap filter
// with the reduced step size mu = 2^-1 / N (MU_I = 1). Each size runs the full
// bit-exact comparison of da_lms_filter_checker; the results are summed.
// At N = 32 the weights adapt during the full-scale burst before the error
// reaches 2^11, so shift count 0 is not required there (it is exercised at
// N = 4 and N = 16).
module tb_da_lms_filter_sizes;
  int c4, f4, c32, f32, cmu, fmu;
  bit d4, d32, dmu;

  da_lms_filter_checker #(.N(4),  .PLANT2_TAP(127)) u_n4  (.checks(c4),  .failures(f4),  .done(d4));
  da_lms_filter_checker #(.N(32), .PLANT2_TAP(100), .MIN_T(7))  u_n32 (.checks(c32), .failures(f32), .done(d32));
  // N = 16 with the smaller step size mu = 1/(2N): bit-exact checks only;
  // within 1200 samples the halved, floor-rounded steps do not reach the
  // convergence margin nor the largest error magnitudes
  da_lms_filter_checker #(.N(16), .MU_I(1), .MIN_T(5), .CHECK_CONV(0)) u_mu (.checks(cmu), .failures(fmu), .done(dmu));

  initial begin
    #(10 * 8 * 3100);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c32 + cmu, f4 + f32 + fmu + 1);
    $finish;
  end

  initial begin
    wait (d4 && d32 && dmu);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c32 + cmu, f4 + f32 + fmu);
    $finish;
  end
endmodule
