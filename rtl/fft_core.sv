// fft_core: 8-point complex FFT IP core, built for small area.
//
// Inside are the three functional units of the core: a control unit
// (fft_cu) with a fixed schedule, a memory management unit (fft_mmu) of
// eight 16-bit sample registers, and a processing unit (fft_pu) that is a
// single radix-2 butterfly. The PU and MMU talk over four 16-bit buses, two
// operands in and two results out, one butterfly per clock, twelve in all.
//
// Interface: four 16-bit input ports din (one group of four samples) with
// din_valid/din_ready, four 16-bit output ports dout with dout_valid and
// dout_ack. Input groups are S1 = (x0, x2, x4, x6) then S2 = (x1, x3, x5, x7);
// output groups are S3 = (X0, X1, X2, X3) then S4 = (X4, X5, X6, X7), port i
// carrying the i-th sample of the group. Results are X[k] / 8 (scaled by one
// half per stage).
// Timing: S3 is valid 12 cycles after S2 is taken and stays valid until
// dout_ack; S4 follows in the next cycle and stays until its dout_ack. A new
// S1 is accepted in the cycle after S4 is acknowledged.
//
// The grouping, sample widths, eight registers and four buses follow the FFT
// example; the butterfly schedule, the scaling and the handshakes are this
// design's own choices.
module fft_core
  import ipi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  group_t din,
  input  logic   din_valid,
  output logic   din_ready,
  output group_t dout,
  output logic   dout_valid,
  input  logic   dout_ack
);

  logic       load_en, load_hi, wr_en, out_hi;
  logic [2:0] addr_a, addr_b;
  logic [1:0] tw;
  cplx_t      bus_rd_a, bus_rd_b, bus_wr_a, bus_wr_b;
  cplx_t [N_POINTS-1:0] regs;

  fft_cu u_cu (
    .clk, .rst_n,
    .din_valid, .din_ready,
    .dout_valid, .dout_ack, .out_hi,
    .load_en, .load_hi, .wr_en,
    .addr_a, .addr_b, .tw
  );

  fft_mmu u_mmu (
    .clk, .rst_n,
    .load_en, .load_hi, .load_data(din),
    .rd_addr_a(addr_a), .rd_addr_b(addr_b),
    .rd_a(bus_rd_a), .rd_b(bus_rd_b),
    .wr_en, .wr_addr_a(addr_a), .wr_addr_b(addr_b),
    .wr_a(bus_wr_a), .wr_b(bus_wr_b),
    .regs_o(regs)
  );

  fft_pu u_pu (
    .a(bus_rd_a), .b(bus_rd_b), .tw,
    .a_o(bus_wr_a), .b_o(bus_wr_b)
  );

  // After the last stage X[k] sits in register 0, 2, 1, 3 for k = 0..3 and
  // X[k+4] in register 4, 6, 5, 7.
  always_comb begin
    if (!out_hi) dout = '{regs[3], regs[1], regs[2], regs[0]};
    else         dout = '{regs[7], regs[5], regs[6], regs[4]};
  end

endmodule
