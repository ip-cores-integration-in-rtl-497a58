// tb_iu_controller: self-checking test of the interface unit's controller.
//
// Plays a DSP that stalls at random and a core that answers after a random
// delay, and logs, cycle by cycle, the controller's actions: a word taken
// into register i (Wi), a group handed to the core (C), a result group
// captured (A), a word sent from register i (Ri). The log of each frame must
// be W0 W1 W2 W3 C W0 W1 W2 W3 C A R0 R1 R2 R3 A R0 R1 R2 R3. A frame with no
// stalls and a core that answers at once must take 21 cycles from the call
// to the last word sent.
module tb_iu_controller;
  import ipi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic call = 0, wvalid = 0, wready, rvalid, rready = 0;
  logic din_valid, din_ready = 0, dout_valid = 0, dout_ack;
  logic [1:0] sel;
  logic buf_wr_en, buf_cap_en;
  int checks = 0, failures = 0;
  string log_s;
  int cycles;

  iu_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // log what the controller does at each rising edge
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (buf_wr_en) begin
      if (!(wvalid && wready)) begin failures++; $display("FAIL write without handshake"); end
      log_s = {log_s, $sformatf("W%0d ", sel)};
    end
    if (din_valid && din_ready) log_s = {log_s, "C "};
    if (buf_cap_en) begin
      if (!(dout_ack && dout_valid)) begin failures++; $display("FAIL capture without ack"); end
      log_s = {log_s, "A "};
    end
    if (rvalid && rready) log_s = {log_s, $sformatf("R%0d ", sel)};
  end

  task automatic frame(input bit stalls, output int n_cycles);
    int groups_in = 0, groups_out = 0, words_out = 0;
    log_s = "";
    @(negedge clk);
    call = 1;
    cycles = 0;
    @(negedge clk);
    call = 0;
    while (words_out < 8) begin
      wvalid     = stalls ? 1'($urandom) : 1'b1;
      rready     = stalls ? 1'($urandom) : 1'b1;
      din_ready  = stalls ? 1'($urandom) : 1'b1;
      dout_valid = (groups_in == 2 && groups_out < 2) && (stalls ? 1'($urandom) : 1'b1);
      @(posedge clk);
      if (din_valid && din_ready) groups_in++;
      if (dout_ack) groups_out++;
      if (rvalid && rready) words_out++;
      @(negedge clk);
    end
    n_cycles = cycles;
    wvalid = 0; rready = 0; din_ready = 0; dout_valid = 0;
    checks++;
    if (log_s != "W0 W1 W2 W3 C W0 W1 W2 W3 C A R0 R1 R2 R3 A R0 R1 R2 R3 ") begin
      failures++;
      $display("FAIL frame log: %s", log_s);
    end
    checks++;
    if (wready || rvalid || din_valid || dout_ack) begin
      failures++;
      $display("FAIL controller not idle after the frame");
    end
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(1'b0, n);
    checks++;
    if (n != 21) begin
      failures++;
      $display("FAIL unstalled frame took %0d cycles, expected 21", n);
    end
    for (int f = 0; f < 50; f++) frame(1'b1, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
