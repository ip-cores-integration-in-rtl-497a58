// interface_unit: the interface unit that fits the 8-point FFT core to the
// DSP's transfer sequence.
//
// The DSP sends the eight input samples one 16-bit word at a time in the
// order x0 x2 x4 x6 x1 x3 x5 x7 and expects the eight results back one word
// at a time in the order X0 .. X7. The core wants them as two parallel groups
// of four in each direction. The unit holds four 16-bit registers wired to
// the core's ports, a 1->4 demultiplexer that fills them from the serial
// DSP stream, a 4->1 multiplexer that empties them into it, and an 11-state
// controller (iu_controller) that orders it all.
//
// Interface: DSP side call (start of a frame), wdata/wvalid/wready for
// samples in, rdata/rvalid/rready for results out; core side din/din_valid/
// din_ready and dout/dout_valid/dout_ack.
// Timing: with a DSP that never waits a frame takes
//   1 (call) + 2 x (4 words + 1 handover) + core latency
//   + 2 x (1 capture + 4 words)  cycles,
// one word per cycle on the DSP side and one cycle for each transfer
// between the unit and the core.
//
// The parts (four 16-bit registers, 1->4 demultiplexer, 4->1 multiplexer,
// 11-state controller) and the transfer orders follow the FFT example; the
// handshake signals are this design's own choice.
module interface_unit
  import ipi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // DSP side
  input  logic   call,
  input  cplx_t  wdata,
  input  logic   wvalid,
  output logic   wready,
  output cplx_t  rdata,
  output logic   rvalid,
  input  logic   rready,
  // core side
  output group_t din,
  output logic   din_valid,
  input  logic   din_ready,
  input  group_t dout,
  input  logic   dout_valid,
  output logic   dout_ack
);

  logic       buf_wr_en, buf_cap_en;
  logic [1:0] sel;

  iu_controller u_ctrl (
    .clk, .rst_n,
    .call, .wvalid, .wready, .rvalid, .rready,
    .din_valid, .din_ready, .dout_valid, .dout_ack,
    .sel, .buf_wr_en, .buf_cap_en
  );

  iu_buffer u_buf (
    .clk, .rst_n,
    .sel, .wr_en(buf_wr_en), .wr_data(wdata),
    .cap_en(buf_cap_en), .cap_data(dout),
    .rd_data(rdata), .regs_o(din)
  );

  // A result word offered to the DSP stays, unchanged, until taken.
  a_rvalid_hold : assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !rready |=> rvalid && $stable(rdata));

  // The core's input group does not change while it is being offered.
  a_din_hold : assert property (@(posedge clk) disable iff (!rst_n)
    din_valid && !din_ready |=> din_valid && $stable(din));

endmodule
