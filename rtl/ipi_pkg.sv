// ipi_pkg: types and constants shared by the 8-point FFT core and its
// interface unit.
//
// A sample is complex, with an 8-bit signed real part and an 8-bit signed
// imaginary part packed into one 16-bit word (real part in the upper byte).
// The core exchanges samples with its interface unit four at a time, and with
// the DSP one word at a time. The sample widths, the point count and the
// four-port grouping follow the FFT example; the byte order inside a word and
// the twiddle format are this design's own choices.
package ipi_pkg;

  localparam int unsigned N_POINTS = 8;   // FFT length
  localparam int unsigned N_PORTS  = 4;   // parallel words per core transfer
  localparam int unsigned PART_W   = 8;   // bits of a real or imaginary part
  localparam int unsigned WORD_W   = 2 * PART_W;  // one complex sample

  // Twiddle factors: signed, TW_W bits, TW_FRAC fractional bits (256 = 1.0).
  localparam int unsigned TW_W    = 10;
  localparam int unsigned TW_FRAC = 8;

  typedef struct packed {
    logic signed [PART_W-1:0] re;
    logic signed [PART_W-1:0] im;
  } cplx_t;

  // One parallel transfer between the interface unit and the core.
  typedef cplx_t [N_PORTS-1:0] group_t;

  // Interface unit controller: 11 states.
  typedef enum logic [3:0] {
    IU_IDLE = 4'd0,
    IU_RX0  = 4'd1,
    IU_RX1  = 4'd2,
    IU_RX2  = 4'd3,
    IU_RX3  = 4'd4,
    IU_CALL = 4'd5,
    IU_WAIT = 4'd6,
    IU_TX0  = 4'd7,
    IU_TX1  = 4'd8,
    IU_TX2  = 4'd9,
    IU_TX3  = 4'd10
  } iu_state_t;

  // FFT core control unit.
  typedef enum logic [2:0] {
    CU_LOAD_S1 = 3'd0,
    CU_LOAD_S2 = 3'd1,
    CU_BFLY    = 3'd2,
    CU_OUT_S3  = 3'd3,
    CU_OUT_S4  = 3'd4
  } cu_state_t;

  // One butterfly of the fixed schedule: two register addresses and the
  // twiddle index k of W8^k.
  typedef struct packed {
    logic [2:0] addr_a;
    logic [2:0] addr_b;
    logic [1:0] tw;
  } bfly_op_t;

  localparam int unsigned N_BFLY = 12;  // (N/2) * log2(N)

endpackage
