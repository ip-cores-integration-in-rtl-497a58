// ipi_fft_soc: the 8-point FFT IP core integrated behind its interface unit.
//
// Seen from the DSP this is one point-to-point link: the DSP calls the core,
// writes eight complex samples as 16-bit words (8-bit real part above 8-bit
// imaginary part) in the order x0 x2 x4 x6 x1 x3 x5 x7, and reads the eight
// transform outputs X0 .. X7 (scaled by 1/8) in natural order. Inside, the
// interface unit packs the words into two groups of four for the core and
// unpacks the two result groups, so that the core's fixed group order and
// the DSP's serial order meet.
//
// Interface: call, wdata/wvalid/wready, rdata/rvalid/rready, all on the DSP
// side; the DSP itself is outside this module.
// Timing: with a DSP that never waits, one frame takes 33 cycles from the
// call to the last result word (see interface_unit and fft_core).
//
// The structure (DSP - interface unit - FFT core, two groups each way)
// follows the FFT integration example; the handshakes are this design's own.
module ipi_fft_soc
  import ipi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  call,
  input  cplx_t wdata,
  input  logic  wvalid,
  output logic  wready,
  output cplx_t rdata,
  output logic  rvalid,
  input  logic  rready
);

  group_t din, dout;
  logic   din_valid, din_ready, dout_valid, dout_ack;

  interface_unit u_iu (
    .clk, .rst_n,
    .call, .wdata, .wvalid, .wready, .rdata, .rvalid, .rready,
    .din, .din_valid, .din_ready, .dout, .dout_valid, .dout_ack
  );

  fft_core u_fft (
    .clk, .rst_n,
    .din, .din_valid, .din_ready, .dout, .dout_valid, .dout_ack
  );

endmodule
