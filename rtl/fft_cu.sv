// fft_cu: control unit of the 8-point FFT core.
//
// It steps the core through one transform on a fixed schedule:
//   LOAD_S1  wait for the first input group (x0, x2, x4, x6) and load it into
//            MMU registers 0..3;
//   LOAD_S2  wait for the second group (x1, x3, x5, x7), load it into 4..7;
//   BFLY     twelve cycles, one butterfly each, addresses and twiddle taken
//            from a fixed table (the core's address generator);
//   OUT_S3   present X0..X3 on the output port until the interface unit
//            acknowledges it;
//   OUT_S4   present X4..X7 until acknowledged, then back to LOAD_S1.
// The input order (even samples first) lets the first two butterfly stages
// run as two 4-point transforms in place; the last stage pairs X[k] with
// X[k+4], so each output group is a fixed set of four registers.
//
// Interface: din_valid/din_ready accept an input group, dout_valid/dout_ack
// hand over an output group, out_hi says which of the two is shown.
// Timing: an input group is taken in the cycle din_valid and din_ready are
// both high; the first result group is valid 12 cycles after the second
// input group was taken.
//
// The input and output group order follows the FFT example. The schedule,
// the handshakes and the state encoding are this design's own choices.
module fft_cu
  import ipi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din_valid,
  output logic       din_ready,
  output logic       dout_valid,
  input  logic       dout_ack,
  output logic       out_hi,
  // MMU control
  output logic       load_en,
  output logic       load_hi,
  output logic       wr_en,
  output logic [2:0] addr_a,
  output logic [2:0] addr_b,
  output logic [1:0] tw
);

  cu_state_t  state;
  logic [3:0] step;
  bfly_op_t   op;

  // Fixed butterfly schedule: {addr_a, addr_b, k}.
  always_comb begin
    unique case (step)
      // stage 1: span-2 butterflies of both 4-point halves
      4'd0:  op = '{3'd0, 3'd2, 2'd0};
      4'd1:  op = '{3'd1, 3'd3, 2'd0};
      4'd2:  op = '{3'd4, 3'd6, 2'd0};
      4'd3:  op = '{3'd5, 3'd7, 2'd0};
      // stage 2: finish the two 4-point transforms (W4^1 = W8^2)
      4'd4:  op = '{3'd0, 3'd1, 2'd0};
      4'd5:  op = '{3'd2, 3'd3, 2'd2};
      4'd6:  op = '{3'd4, 3'd5, 2'd0};
      4'd7:  op = '{3'd6, 3'd7, 2'd2};
      // stage 3: X[k] and X[k+4] from E[k] and O[k]
      4'd8:  op = '{3'd0, 3'd4, 2'd0};
      4'd9:  op = '{3'd2, 3'd6, 2'd1};
      4'd10: op = '{3'd1, 3'd5, 2'd2};
      default: op = '{3'd3, 3'd7, 2'd3};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CU_LOAD_S1;
      step  <= '0;
    end else begin
      unique case (state)
        CU_LOAD_S1: if (din_valid) state <= CU_LOAD_S2;
        CU_LOAD_S2: if (din_valid) begin
          state <= CU_BFLY;
          step  <= '0;
        end
        CU_BFLY: begin
          step <= step + 4'd1;
          if (step == 4'(N_BFLY - 1)) state <= CU_OUT_S3;
        end
        CU_OUT_S3: if (dout_ack) state <= CU_OUT_S4;
        CU_OUT_S4: if (dout_ack) state <= CU_LOAD_S1;
        default:   state <= CU_LOAD_S1;
      endcase
    end
  end

  assign din_ready  = (state == CU_LOAD_S1) || (state == CU_LOAD_S2);
  assign load_en    = din_ready && din_valid;
  assign load_hi    = (state == CU_LOAD_S2);
  assign wr_en      = (state == CU_BFLY);
  assign addr_a     = op.addr_a;
  assign addr_b     = op.addr_b;
  assign tw         = op.tw;
  assign dout_valid = (state == CU_OUT_S3) || (state == CU_OUT_S4);
  assign out_hi     = (state == CU_OUT_S4);

  // An acknowledge only answers a shown result group.
  a_ack_needs_valid : assert property (@(posedge clk) disable iff (!rst_n)
    dout_ack |-> dout_valid);

endmodule
