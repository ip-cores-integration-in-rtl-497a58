// tb_ipi_fft_soc: end-to-end test of the integrated FFT core, at the
// design's default sizes.
//
// Plays the DSP: calls the core, writes the eight samples of a frame in the
// order x0 x2 x4 x6 x1 x3 x5 x7, and reads X0..X7 back, comparing each with
// a direct 8-point DFT divided by 8 (within 2 LSBs). The first frame runs
// without stalls and must take 33 cycles from the call to the last result
// word; the following frames stall the DSP at random in both directions and
// some start right after the previous one. Counts, and requires at least
// once: a DSP write stall, a DSP read stall, both input group handovers,
// both result group captures, cycles in which the interface waits for the
// busy core, and back-to-back frames.
module tb_ipi_fft_soc;
  import ipi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic call = 0, wvalid = 0, wready, rvalid, rready = 0;
  cplx_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  int n_wstall = 0, n_rstall = 0, n_s1 = 0, n_s2 = 0, n_s3 = 0, n_s4 = 0;
  int n_wait_core = 0, n_b2b = 0, n_frames = 0;

  ipi_fft_soc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe the internal transfers between the interface unit and the core
  always @(posedge clk) if (rst_n) begin
    if (dut.din_valid && dut.din_ready) begin
      if (dut.u_fft.u_cu.state == CU_LOAD_S1) n_s1++; else n_s2++;
    end
    if (dut.dout_valid && dut.dout_ack) begin
      if (dut.u_fft.u_cu.state == CU_OUT_S3) n_s3++; else n_s4++;
    end
    if (dut.u_iu.u_ctrl.state == IU_WAIT && !dut.dout_valid) n_wait_core++;
  end

  task automatic frame(input bit stalls, input bit b2b, output int n_cycles);
    cplx_t x [8];
    rcplx_t y [8];
    int wi = 0, ri = 0;
    for (int n = 0; n < 8; n++) x[n] = rand_sample(63);
    dft8_scaled(x, y);
    if (!b2b) repeat ($urandom_range(1, 4)) @(negedge clk);
    else n_b2b++;
    call = 1;
    n_cycles = 1;
    @(negedge clk);
    call = 0;
    while (ri < 8) begin
      wvalid = (wi < 8) && (stalls ? ($urandom_range(0, 3) != 0) : 1'b1);
      wdata  = wvalid ? x[(wi % 4) * 2 + wi / 4] : cplx_t'(16'($urandom));
      rready = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (wready && !wvalid && wi < 8) n_wstall++;
      if (rvalid && !rready) n_rstall++;
      @(posedge clk);
      n_cycles++;
      if (wvalid && wready) wi++;
      if (rvalid && rready) begin
        checks++;
        if (!near(rdata.re, y[ri].re, 2.0) || !near(rdata.im, y[ri].im, 2.0)) begin
          failures++;
          $display("FAIL X%0d = %0d,%0d expected %f,%f", ri, rdata.re, rdata.im, y[ri].re, y[ri].im);
        end
        ri++;
      end
      @(negedge clk);
    end
    wvalid = 0; rready = 0;
    n_frames++;
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(1'b0, 1'b0, n);
    checks++;
    if (n != 33) begin
      failures++;
      $display("FAIL unstalled frame took %0d cycles, expected 33", n);
    end
    for (int f = 0; f < 300; f++) frame(1'b1, f % 3 == 0, n);
    checks += 8;
    if (n_wstall == 0)    begin failures++; $display("FAIL no DSP write stall"); end
    if (n_rstall == 0)    begin failures++; $display("FAIL no DSP read stall"); end
    if (n_s1 != n_frames) begin failures++; $display("FAIL S1 handovers %0d", n_s1); end
    if (n_s2 != n_frames) begin failures++; $display("FAIL S2 handovers %0d", n_s2); end
    if (n_s3 != n_frames) begin failures++; $display("FAIL S3 captures %0d", n_s3); end
    if (n_s4 != n_frames) begin failures++; $display("FAIL S4 captures %0d", n_s4); end
    if (n_wait_core == 0) begin failures++; $display("FAIL never waited for the core"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back frame"); end
    $display("frames %0d, back-to-back %0d, write stalls %0d, read stalls %0d, wait-for-core cycles %0d",
             n_frames, n_b2b, n_wstall, n_rstall, n_wait_core);
    $display("S1 %0d, S2 %0d, S3 %0d, S4 %0d", n_s1, n_s2, n_s3, n_s4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
