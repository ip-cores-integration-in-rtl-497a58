// tb_iu_buffer: self-checking test of the interface unit's registers,
// demultiplexer and multiplexer.
//
// Random serial writes (through the demultiplexer) and parallel captures are
// mirrored in a model of the four registers; after every clock the parallel
// output and the multiplexer output for every select value are compared
// with the model.
module tb_iu_buffer;
  import ipi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] sel = 0;
  logic wr_en = 0, cap_en = 0;
  cplx_t wr_data = '0, rd_data;
  group_t cap_data = '0, regs_o;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  iu_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (regs_o[i] != model[i]) begin
        failures++;
        $display("FAIL reg %0d = %h expected %h", i, regs_o[i], model[i]);
      end
      sel = 2'(i);
      #1;
      checks++;
      if (rd_data != model[i]) begin
        failures++;
        $display("FAIL mux sel %0d = %h expected %h", i, rd_data, model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        cap_en = 1;
        for (int i = 0; i < 4; i++) cap_data[i] = 16'($urandom);
        for (int i = 0; i < 4; i++) model[i] = cap_data[i];
      end else begin
        wr_en = 1;
        sel = 2'($urandom);
        wr_data = 16'($urandom);
        model[sel] = wr_data;
      end
      @(negedge clk);
      wr_en = 0; cap_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
