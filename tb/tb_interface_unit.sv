// tb_interface_unit: self-checking test of the interface unit between a
// stalling DSP and a model of the core.
//
// The DSP side sends eight random words per frame and reads eight back, with
// random gaps in both directions. The core side is a small model that
// accepts two input groups (with random waits on din_ready), then, after a
// random delay, offers two result groups made from known random words and
// waits a random time before each acknowledge is answered. Checks that the
// core sees words 0..3 and 4..7 of the DSP stream on ports 0..3 in that
// order, that the DSP reads the result words in order 0..7, and counts how
// often each kind of stall happened.
module tb_interface_unit;
  import ipi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic call = 0, wvalid = 0, wready, rvalid, rready = 0;
  cplx_t wdata = '0, rdata;
  group_t din, dout = '0;
  logic din_valid, din_ready = 0, dout_valid = 0, dout_ack;
  int checks = 0, failures = 0;
  int n_wstall = 0, n_rstall = 0, n_core_busy = 0;

  interface_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t words_in [8], words_out [8];
  cplx_t seen_in [8];
  int groups_seen, results_given;

  // core model
  initial begin
    forever begin
      @(negedge clk);
      din_ready = 1'($urandom);
      if (din_valid && !din_ready) n_core_busy++;
      @(posedge clk);
      if (din_valid && din_ready && groups_seen < 2) begin
        for (int i = 0; i < 4; i++) seen_in[4 * groups_seen + i] = din[i];
        groups_seen++;
      end
      if (groups_seen == 2) begin
        for (int g = 0; g < 2; g++) begin
          @(negedge clk);
          din_ready = 0;
          repeat ($urandom_range(0, 5)) @(negedge clk);
          for (int i = 0; i < 4; i++) dout[i] = words_out[4 * g + i];
          dout_valid = 1;
          do @(posedge clk); while (!dout_ack);
          @(negedge clk);
          dout_valid = 0;
          dout = group_t'({$urandom, $urandom});
        end
        groups_seen = 0;
      end
    end
  end

  task automatic frame();
    int wi = 0, ri = 0;
    for (int i = 0; i < 8; i++) begin
      words_in[i]  = 16'($urandom);
      words_out[i] = 16'($urandom);
    end
    @(negedge clk);
    call = 1;
    @(negedge clk);
    call = 0;
    while (ri < 8) begin
      wvalid = (wi < 8) && 1'($urandom);
      wdata  = wvalid ? words_in[wi] : cplx_t'(16'($urandom));
      rready = 1'($urandom);
      if (wready && !wvalid && wi < 8) n_wstall++;
      if (rvalid && !rready) n_rstall++;
      @(posedge clk);
      if (wvalid && wready) wi++;
      if (rvalid && rready) begin
        checks++;
        if (rdata != words_out[ri]) begin
          failures++;
          $display("FAIL result word %0d = %h expected %h", ri, rdata, words_out[ri]);
        end
        ri++;
      end
      @(negedge clk);
    end
    wvalid = 0; rready = 0;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (seen_in[i] != words_in[i]) begin
        failures++;
        $display("FAIL core port %0d of group %0d got %h expected %h", i % 4, i / 4, seen_in[i], words_in[i]);
      end
    end
  endtask

  initial begin
    groups_seen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 100; f++) frame();
    checks += 3;
    if (n_wstall == 0)    begin failures++; $display("FAIL no DSP write stall"); end
    if (n_rstall == 0)    begin failures++; $display("FAIL no DSP read stall"); end
    if (n_core_busy == 0) begin failures++; $display("FAIL core never refused a group"); end
    $display("write stalls %0d, read stalls %0d, core busy %0d", n_wstall, n_rstall, n_core_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
