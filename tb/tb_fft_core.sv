// tb_fft_core: self-checking test of the 8-point FFT core.
//
// Sends random frames as two input groups (x0 x2 x4 x6, then x1 x3 x5 x7),
// takes the two result groups with random acknowledge delays, and compares
// X0..X7 with a direct DFT divided by 8, within 2 LSBs. Inputs are kept to
// +/-63 per part so that no stage saturates. Checks that the first result
// group is valid exactly 12 cycles after the second input group was taken.
module tb_fft_core;
  import ipi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  group_t din = '0, dout;
  logic din_valid = 0, din_ready, dout_valid, dout_ack = 0;
  int checks = 0, failures = 0;

  fft_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input int lim);
    cplx_t x [8];
    rcplx_t y [8];
    int lat;
    for (int n = 0; n < 8; n++) x[n] = rand_sample(lim);
    dft8_scaled(x, y);
    for (int g = 0; g < 2; g++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) din[i] = x[2 * i + g];
      din_valid = 1;
      while (!din_ready) @(negedge clk);
      @(negedge clk);
      din_valid = 0;
      din = group_t'({$urandom, $urandom});   // core must not look at din now
    end
    lat = 0;
    while (!dout_valid) begin
      lat++;
      @(negedge clk);
    end
    checks++;
    if (lat != 12) begin   // clock edges from taking S2 to S3 valid
      failures++;
      $display("FAIL latency %0d cycles, expected 12", lat);
    end
    for (int g = 0; g < 2; g++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (!near(dout[i].re, y[4 * g + i].re, 2.0) || !near(dout[i].im, y[4 * g + i].im, 2.0)) begin
          failures++;
          $display("FAIL X%0d = %0d,%0d expected %f,%f", 4 * g + i,
                   dout[i].re, dout[i].im, y[4 * g + i].re, y[4 * g + i].im);
        end
      end
      checks++;
      if (!dout_valid) begin failures++; $display("FAIL dout_valid dropped"); end
      dout_ack = 1;
      @(negedge clk);
      dout_ack = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) frame(63);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
