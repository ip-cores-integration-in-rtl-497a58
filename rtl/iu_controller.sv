// iu_controller: the 11-state controller of the FFT interface unit.
//
// It turns the DSP's serial word stream into the core's parallel group
// transfers and back, in the order the DSP uses:
//   S = (x0 x2 x4 x6) (x1 x3 x5 x7) -> core,  (X0..X3) (X4..X7) -> DSP.
//   IDLE      wait for the DSP's call of the core;
//   RX0..RX3  take serial word i from the DSP into buffer register i;
//   CALL      offer the four registers to the core as one input group;
//             after the first group go back to RX0, after the second to WAIT;
//   WAIT      wait for a result group, capture it into the registers and
//             acknowledge it to the core;
//   TX0..TX3  send buffer register i to the DSP; after the first result
//             group go back to WAIT, after the second to IDLE.
// A one-bit group flag tells the first half of a frame from the second, so
// eleven states serve both halves.
//
// Interface: DSP side wvalid/wready (DSP -> core) and rvalid/rready
// (core -> DSP), one word per cycle at most; core side din_valid/din_ready
// and dout_valid/dout_ack. sel drives the buffer's demultiplexer and
// multiplexer.
// Timing: with a DSP that never waits, each word takes one cycle, a group
// handover to the core one cycle (CALL), and a result capture one cycle
// (WAIT).
//
// The eleven states, the serial DSP side and the group order follow the FFT
// example; the meaning of each state, the call input and the handshake
// signals are this design's own choices.
module iu_controller
  import ipi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // DSP side
  input  logic       call,
  input  logic       wvalid,
  output logic       wready,
  output logic       rvalid,
  input  logic       rready,
  // core side
  output logic       din_valid,
  input  logic       din_ready,
  input  logic       dout_valid,
  output logic       dout_ack,
  // buffer control
  output logic [1:0] sel,
  output logic       buf_wr_en,
  output logic       buf_cap_en
);

  iu_state_t state;
  logic      grp;   // 0: first group of the frame, 1: second

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IU_IDLE;
      grp   <= 1'b0;
    end else begin
      unique case (state)
        IU_IDLE: if (call) begin
          state <= IU_RX0;
          grp   <= 1'b0;
        end
        IU_RX0: if (wvalid) state <= IU_RX1;
        IU_RX1: if (wvalid) state <= IU_RX2;
        IU_RX2: if (wvalid) state <= IU_RX3;
        IU_RX3: if (wvalid) state <= IU_CALL;
        IU_CALL: if (din_ready) begin
          state <= grp ? IU_WAIT : IU_RX0;
          grp   <= ~grp;
        end
        IU_WAIT: if (dout_valid) state <= IU_TX0;
        IU_TX0: if (rready) state <= IU_TX1;
        IU_TX1: if (rready) state <= IU_TX2;
        IU_TX2: if (rready) state <= IU_TX3;
        IU_TX3: if (rready) begin
          state <= grp ? IU_IDLE : IU_WAIT;
          grp   <= ~grp;
        end
        default: state <= IU_IDLE;
      endcase
    end
  end

  always_comb begin
    wready     = 1'b0;
    rvalid     = 1'b0;
    din_valid  = 1'b0;
    dout_ack   = 1'b0;
    buf_wr_en  = 1'b0;
    buf_cap_en = 1'b0;
    sel        = 2'd0;
    unique case (state)
      IU_RX0, IU_RX1, IU_RX2, IU_RX3: begin
        sel       = 2'(state - IU_RX0);
        wready    = 1'b1;
        buf_wr_en = wvalid;
      end
      IU_CALL: din_valid = 1'b1;
      IU_WAIT: begin
        buf_cap_en = dout_valid;
        dout_ack   = dout_valid;
      end
      IU_TX0, IU_TX1, IU_TX2, IU_TX3: begin
        sel    = 2'(state - IU_TX0);
        rvalid = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
