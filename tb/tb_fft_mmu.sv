// tb_fft_mmu: self-checking test of the FFT core's eight-register memory.
//
// Issues random group loads (low and high half) and random two-port writes,
// keeps its own copy of the eight registers, and after every clock compares
// both read ports (at random addresses) and the flat register output with it.
module tb_fft_mmu;
  import ipi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load_en = 0, load_hi = 0, wr_en = 0;
  group_t load_data = '0;
  logic [2:0] rd_addr_a = 0, rd_addr_b = 0, wr_addr_a = 0, wr_addr_b = 1;
  cplx_t rd_a, rd_b, wr_a = '0, wr_b = '0;
  cplx_t [N_POINTS-1:0] regs_o;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  fft_mmu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (regs_o[i] != model[i]) begin
        failures++;
        $display("FAIL reg %0d = %h expected %h", i, regs_o[i], model[i]);
      end
    end
    rd_addr_a = 3'($urandom); rd_addr_b = 3'($urandom);
    #1;
    checks += 2;
    if (rd_a != model[rd_addr_a]) begin failures++; $display("FAIL rd_a"); end
    if (rd_b != model[rd_addr_b]) begin failures++; $display("FAIL rd_b"); end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      load_en = 0; wr_en = 0;
      if ($urandom_range(0, 2) == 0) begin
        load_en = 1; load_hi = 1'($urandom);
        for (int i = 0; i < 4; i++) load_data[i] = 16'($urandom);
        for (int i = 0; i < 4; i++) model[(load_hi ? 4 : 0) + i] = load_data[i];
      end else if ($urandom_range(0, 1) == 0) begin
        wr_en = 1;
        wr_addr_a = 3'($urandom);
        wr_addr_b = wr_addr_a + 3'($urandom_range(1, 7));
        wr_a = 16'($urandom); wr_b = 16'($urandom);
        model[wr_addr_a] = wr_a; model[wr_addr_b] = wr_b;
      end
      @(negedge clk);
      load_en = 0; wr_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
