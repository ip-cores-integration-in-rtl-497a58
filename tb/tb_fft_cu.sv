// tb_fft_cu: self-checking test of the FFT control unit's schedule.
//
// Loads two input groups, then, for every cycle in which the unit writes,
// applies an exact (real-valued, unscaled) butterfly to a model of the eight
// registers at the addresses and twiddle the unit gives. At the end the model
// registers 0,2,1,3 and 4,6,5,7 must hold the 8-point DFT of the inputs,
// which shows the schedule computes the transform. Also checks the handshake
// timing: 12 butterfly cycles, results valid right after, each result group
// held until acknowledged.
module tb_fft_cu;
  import ipi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic din_valid = 0, din_ready, dout_valid, dout_ack = 0, out_hi;
  logic load_en, load_hi, wr_en;
  logic [2:0] addr_a, addr_b;
  logic [1:0] tw;
  int checks = 0, failures = 0;
  real mre [8], mim [8], xre [8], xim [8];
  localparam real PI = 3.14159265358979;
  localparam int OUT_MAP [8] = '{0, 2, 1, 3, 4, 6, 5, 7};

  fft_cu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s = %0b expected %0b at %0t", what, got, exp_v, $time);
    end
  endtask

  task automatic frame(input int ack_delay);
    int nbfly;
    // natural-order inputs x[n]; arrival order x0 x2 x4 x6 x1 x3 x5 x7
    for (int n = 0; n < 8; n++) begin
      xre[n] = real'($urandom_range(0, 200)) - 100.0;
      xim[n] = real'($urandom_range(0, 200)) - 100.0;
    end
    for (int i = 0; i < 4; i++) begin
      mre[i] = xre[2*i];     mim[i] = xim[2*i];
      mre[4+i] = xre[2*i+1]; mim[4+i] = xim[2*i+1];
    end
    @(negedge clk);
    expect_bit("din_ready idle", din_ready, 1'b1);
    din_valid = 1;
    #1;
    expect_bit("load_en S1", load_en, 1'b1);
    expect_bit("load_hi S1", load_hi, 1'b0);
    @(negedge clk);
    expect_bit("din_ready S2", din_ready, 1'b1);
    #1;
    expect_bit("load_hi S2", load_hi, 1'b1);
    @(negedge clk);
    din_valid = 0;
    nbfly = 0;
    while (wr_en) begin
      real wr, wi, pr, pi, ar, ai;
      wr = $cos(2.0 * PI * tw / 8.0);
      wi = -$sin(2.0 * PI * tw / 8.0);
      pr = mre[addr_b] * wr - mim[addr_b] * wi;
      pi = mre[addr_b] * wi + mim[addr_b] * wr;
      ar = mre[addr_a]; ai = mim[addr_a];
      mre[addr_a] = ar + pr; mim[addr_a] = ai + pi;
      mre[addr_b] = ar - pr; mim[addr_b] = ai - pi;
      expect_bit("din_ready busy", din_ready, 1'b0);
      expect_bit("dout_valid busy", dout_valid, 1'b0);
      nbfly++;
      @(negedge clk);
    end
    checks++;
    if (nbfly != 12) begin
      failures++;
      $display("FAIL %0d butterfly cycles, expected 12", nbfly);
    end
    for (int k = 0; k < 8; k++) begin
      real er = 0.0, ei = 0.0;
      for (int n = 0; n < 8; n++) begin
        er += xre[n] * $cos(2.0 * PI * n * k / 8.0) + xim[n] * $sin(2.0 * PI * n * k / 8.0);
        ei += xim[n] * $cos(2.0 * PI * n * k / 8.0) - xre[n] * $sin(2.0 * PI * n * k / 8.0);
      end
      checks++;
      if ((mre[OUT_MAP[k]] - er) > 0.001 || (er - mre[OUT_MAP[k]]) > 0.001 ||
          (mim[OUT_MAP[k]] - ei) > 0.001 || (ei - mim[OUT_MAP[k]]) > 0.001) begin
        failures++;
        $display("FAIL X%0d = %f,%f expected %f,%f", k, mre[OUT_MAP[k]], mim[OUT_MAP[k]], er, ei);
      end
    end
    // result groups, held until acknowledged
    for (int g = 0; g < 2; g++) begin
      repeat (ack_delay) begin
        expect_bit("dout_valid hold", dout_valid, 1'b1);
        expect_bit("out_hi", out_hi, 1'(g));
        @(negedge clk);
      end
      expect_bit("dout_valid", dout_valid, 1'b1);
      expect_bit("out_hi", out_hi, 1'(g));
      dout_ack = 1;
      @(negedge clk);
      dout_ack = 0;
    end
    expect_bit("back to idle", din_ready, 1'b1);
    expect_bit("no result", dout_valid, 1'b0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) frame(f % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
