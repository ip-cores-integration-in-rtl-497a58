// tb_fft_pu: self-checking test of the FFT butterfly.
//
// Drives random operands and all four twiddle indices and compares both
// outputs with (a +/- W8^k b) / 2 worked out in real arithmetic with the exact
// twiddle, saturated to the 8-bit range, allowing one LSB of rounding. Runs a
// set of full-scale operands to make the saturation happen and counts it.
module tb_fft_pu;
  import ipi_pkg::*;

  cplx_t a, b, a_o, b_o;
  logic [1:0] tw;
  int checks = 0, failures = 0, sat_seen = 0;

  fft_pu dut (.a, .b, .tw, .a_o, .b_o);

  function automatic real clip(input real v);
    if (v > 127.0) return 127.0;
    if (v < -128.0) return -128.0;
    return v;
  endfunction

  task automatic check_part(input string what, input int got, input real exp_v);
    real e;
    e = clip(exp_v);
    checks++;
    if ((real'(got) - e) > 1.01 || (e - real'(got)) > 1.01) begin
      failures++;
      $display("FAIL %s: got %0d expected %f (a=%0d,%0d b=%0d,%0d k=%0d)",
               what, got, e, a.re, a.im, b.re, b.im, tw);
    end
    if (exp_v > 127.5 || exp_v < -128.5) sat_seen++;
  endtask

  task automatic run_one();
    real wr, wi, pr, pi;
    #1;
    wr = $cos(2.0 * 3.14159265358979 * tw / 8.0);
    wi = -$sin(2.0 * 3.14159265358979 * tw / 8.0);
    pr = b.re * wr - b.im * wi;
    pi = b.re * wi + b.im * wr;
    check_part("a.re", a_o.re, (a.re + pr) / 2.0);
    check_part("a.im", a_o.im, (a.im + pi) / 2.0);
    check_part("b.re", b_o.re, (a.re - pr) / 2.0);
    check_part("b.im", b_o.im, (a.im - pi) / 2.0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a.re = 8'($urandom); a.im = 8'($urandom);
      b.re = 8'($urandom); b.im = 8'($urandom);
      tw = 2'(i);
      run_one();
    end
    // full-scale operands drive the sums out of range
    for (int k = 0; k < 4; k++) begin
      a = '{re: 8'sd127, im: -8'sd128};
      b = '{re: 8'sd127, im: -8'sd128};
      tw = 2'(k);
      run_one();
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturating results seen: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
