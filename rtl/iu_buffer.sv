// iu_buffer: data path of the FFT interface unit: a 1->4 demultiplexer,
// four 16-bit registers and a 4->1 multiplexer.
//
// On the DSP side data are serial, one 16-bit word per transfer; on the core
// side they are parallel, the four registers being wired straight to the
// core's four ports. The demultiplexer steers a serial word into register
// sel (serial to parallel); the multiplexer shows register sel to the DSP
// (parallel to serial). The same four registers also take a whole result
// group from the core in one cycle, so one set of registers buffers both
// directions.
//
// Interface: wr_en/sel/wr_data write one register, cap_en/cap_data load all
// four, regs_o drives the core, rd_data = register sel.
// Timing: writes at the rising edge; rd_data and regs_o are register outputs
// (rd_data through the multiplexer). Reset clears the registers. A capture
// wins over a serial write in the same cycle (the controller never asks for
// both).
//
// Four 16-bit registers, the 1->4 demultiplexer and the 4->1 multiplexer
// follow the FFT example's interface; sharing the registers between input
// and output groups is this design's reading of it.
module iu_buffer
  import ipi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] sel,
  input  logic       wr_en,
  input  cplx_t      wr_data,
  input  logic       cap_en,
  input  group_t     cap_data,
  output cplx_t      rd_data,
  output group_t     regs_o
);

  group_t regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      regs <= '0;
    else if (cap_en) regs <= cap_data;
    else if (wr_en)  regs[sel] <= wr_data;
  end

  assign rd_data = regs[sel];
  assign regs_o  = regs;

endmodule
