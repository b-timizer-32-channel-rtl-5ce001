// jtag_tap -- emulated IEEE 1149.1 TAP controller inside the FPGA.
//
// TCK, TMS and TDI are sampled with the system clock through two-stage
// synchronizers (TCK must be well below a quarter of the system clock), so
// the whole JTAG port lives in the system clock domain.  A rising TCK edge
// gives a one-clock tck_rise pulse: TMS is sampled and the 16-state
// controller of the state diagram moves on; tdi_s is the synchronized TDI value
// to be taken at that edge.  The register logic acts on the state that was current at
// tck_rise (state changes on the same clock).  A falling TCK edge gives
// tck_fall, on which TDO changes, so that captured data is stable for half a
// TCK period as the document describes.  State codes are the numbers printed
// in the state diagram.  Power-up (rst_n low, the diagram's PUR) and five TCK
// rises with TMS high lead to Test-Logic-Reset.  Oversampling TCK is this
// design's choice; the document calls the port emulated and gives no clocking.
module jtag_tap
  import btim_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  output tap_state_t state,
  output logic       tck_rise,
  output logic       tck_fall,
  output logic       tdi_s
);
  logic [2:0] tck_q;
  logic [1:0] tms_q, tdi_q;
  tap_state_t nxt;

  assign tck_rise = tck_q[1] & ~tck_q[2];
  assign tck_fall = ~tck_q[1] & tck_q[2];
  assign tdi_s    = tdi_q[1];

  always_comb begin
    unique case (state)
      TAP_TEST_RESET: nxt = tms_q[1] ? TAP_TEST_RESET : TAP_RUN_IDLE;
      TAP_RUN_IDLE:   nxt = tms_q[1] ? TAP_SEL_DR     : TAP_RUN_IDLE;
      TAP_SEL_DR:     nxt = tms_q[1] ? TAP_SEL_IR     : TAP_CAPT_DR;
      TAP_CAPT_DR:    nxt = tms_q[1] ? TAP_EXIT1_DR   : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   nxt = tms_q[1] ? TAP_EXIT1_DR   : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   nxt = tms_q[1] ? TAP_UPDATE_DR  : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   nxt = tms_q[1] ? TAP_EXIT2_DR   : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   nxt = tms_q[1] ? TAP_UPDATE_DR  : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  nxt = tms_q[1] ? TAP_SEL_DR     : TAP_RUN_IDLE;
      TAP_SEL_IR:     nxt = tms_q[1] ? TAP_TEST_RESET : TAP_CAPT_IR;
      TAP_CAPT_IR:    nxt = tms_q[1] ? TAP_EXIT1_IR   : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   nxt = tms_q[1] ? TAP_EXIT1_IR   : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   nxt = tms_q[1] ? TAP_UPDATE_IR  : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   nxt = tms_q[1] ? TAP_EXIT2_IR   : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   nxt = tms_q[1] ? TAP_UPDATE_IR  : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  nxt = tms_q[1] ? TAP_SEL_DR     : TAP_RUN_IDLE;
      default:        nxt = TAP_TEST_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_q <= '0; tms_q <= '1; tdi_q <= '0;
      state <= TAP_TEST_RESET;
    end else begin
      tck_q <= {tck_q[1:0], tck};
      tms_q <= {tms_q[0], tms};
      tdi_q <= {tdi_q[0], tdi};
      if (tck_rise) state <= nxt;
    end
  end
endmodule
