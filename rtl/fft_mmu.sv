// fft_mmu: memory management unit of the 8-point FFT core.
//
// Eight 16-bit registers, each holding one complex sample (8-bit real and
// imaginary parts). They are reached in three ways:
//   * a parallel load of four words into registers 0..3 (load_hi = 0) or
//     4..7 (load_hi = 1), used when an input group arrives from the
//     interface unit;
//   * two read buses and two write buses to the processing unit, the four
//     16-bit PU<->MMU buses, carrying the operands and results of one
//     butterfly per cycle (computation is in place);
//   * all eight registers as a flat output, from which the core picks its
//     result groups by fixed wiring.
// Writes take effect at the rising clock edge; reads are combinational.
// Reset clears every register. A load and a butterfly write never happen
// in the same cycle (the control unit guarantees it); the load wins if they do.
//
// Eight registers and four 16-bit buses follow the FFT example; the load port
// and the flat read-out are this design's own choices.
module fft_mmu
  import ipi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // parallel load from the core's input port
  input  logic       load_en,
  input  logic       load_hi,
  input  group_t     load_data,
  // two read buses
  input  logic [2:0] rd_addr_a,
  input  logic [2:0] rd_addr_b,
  output cplx_t      rd_a,
  output cplx_t      rd_b,
  // two write buses
  input  logic       wr_en,
  input  logic [2:0] wr_addr_a,
  input  logic [2:0] wr_addr_b,
  input  cplx_t      wr_a,
  input  cplx_t      wr_b,
  // all registers
  output cplx_t [N_POINTS-1:0] regs_o
);

  cplx_t [N_POINTS-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else if (load_en) begin
      for (int i = 0; i < int'(N_PORTS); i++)
        regs[(load_hi ? int'(N_PORTS) : 0) + i] <= load_data[i];
    end else if (wr_en) begin
      regs[wr_addr_a] <= wr_a;
      regs[wr_addr_b] <= wr_b;
    end
  end

  assign rd_a   = regs[rd_addr_a];
  assign rd_b   = regs[rd_addr_b];
  assign regs_o = regs;

  // The two butterfly results must land in different registers.
  a_distinct_writes : assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> wr_addr_a != wr_addr_b);

endmodule
