// jtag_regs -- instruction and data registers behind the emulated TAP.
//
// A 4-bit instruction register selects one of the data registers:
//   0000 Command register, bit-selective reset (capture reads it)
//   0001 Command register, bit-selective set   (capture reads it)
//   0010 Identification Code (B-Timizer ID), 12 bits, read/write
//   0011 Event ID offset, 12 bits, read/write
//   0100 Error flags, 12 bits, read only; latched, cleared when captured
//   0101 Version Code, 12 bits, read only (VERSION)
//   0110 Event data, 32 bits, read only
//   0111-1111 Bypass (1 bit)
// The register map, the set/reset access to the Command register and the
// clear-on-read error flags follow the document.  Shifting is LSB first, TDI
// enters at the top of the selected length, TDO changes on tck_fall.  As in
// IEEE 1149.1, Capture acts at the TCK rising edge that leaves the Capture
// state and Update at the TCK falling edge inside the Update state.
// Capture-IR loads 0001, Test-Logic-Reset selects Bypass.
// Event data register: with JtagRo set it takes one event word from the
// Read Control whenever it holds zero and is cleared when captured, so a
// non-zero value read is a valid word; with JtagRo clear it keeps a sample of
// the last word sent to the serializer.  The reset value of every register
// is zero (design choice).
module jtag_regs
  import btim_pkg::*;
#(
  parameter logic [11:0] VERSION = 12'h001
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tap_state_t        state,
  input  logic              tck_rise,
  input  logic              tck_fall,
  input  logic              tdi_s,
  output logic              tdo,
  // register contents
  output cmd_reg_t          cmd,
  output logic [11:0]       btid,
  output logic [11:0]       evid_offset,
  input  logic [11:0]       err_set,     // error flag sources, OR-ed in every clock
  input  logic              flags_clear, // global reset of the error flags
  // event data register
  input  logic              ev_valid,    // JtagRo word from the Read Control
  input  logic [WORD_W-1:0] ev_word,
  output logic              ev_ready,
  input  logic              mon_valid,   // word accepted by the serializer
  input  logic [WORD_W-1:0] mon_word,
  output logic [3:0]        ir
);
  logic [3:0]        ir_sh;
  logic [WORD_W-1:0] dr_sh;
  logic [11:0]       err_flags;
  logic [WORD_W-1:0] evreg;
  logic              capture_dr, shift_dr, update_dr, capture_ev, capture_err;

  assign capture_dr  = tck_rise && (state == TAP_CAPT_DR);
  assign shift_dr    = tck_rise && (state == TAP_SHIFT_DR);
  assign update_dr   = tck_fall && (state == TAP_UPDATE_DR);
  assign capture_ev  = capture_dr && (ir == IR_EVDATA);
  assign capture_err = capture_dr && (ir == IR_ERRFLAGS);
  assign ev_ready    = cmd.jtag_ro && (evreg == '0);

  // ---- instruction register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= IR_BYPASS; ir_sh <= '0;
    end else if (tck_fall && state == TAP_UPDATE_IR) begin
      ir <= ir_sh;
    end else if (tck_rise) begin
      unique case (state)
        TAP_TEST_RESET: ir <= IR_BYPASS;
        TAP_CAPT_IR:    ir_sh <= 4'b0001;
        TAP_SHIFT_IR:   ir_sh <= {tdi_s, ir_sh[3:1]};
        default: ;
      endcase
    end
  end

  // ---- data shift register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dr_sh <= '0;
    else if (capture_dr) begin
      unique case (ir)
        IR_CMD_RESET, IR_CMD_SET: dr_sh <= {20'd0, cmd};
        IR_IDCODE:                dr_sh <= {20'd0, btid};
        IR_EVOFFSET:              dr_sh <= {20'd0, evid_offset};
        IR_ERRFLAGS:              dr_sh <= {20'd0, err_flags};
        IR_VERSION:               dr_sh <= {20'd0, VERSION};
        IR_EVDATA:                dr_sh <= evreg;
        default:                  dr_sh <= '0;
      endcase
    end else if (shift_dr) begin
      if (ir == IR_EVDATA)       dr_sh <= {tdi_s, dr_sh[WORD_W-1:1]};
      else if (ir[3] || ir[2:0] == 3'b111) dr_sh <= {31'd0, tdi_s};
      else                       dr_sh <= {20'd0, tdi_s, dr_sh[11:1]};
    end
  end

  // ---- TDO changes on the falling TCK edge ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tdo <= 1'b0;
    else if (tck_fall) begin
      if (state == TAP_SHIFT_IR)      tdo <= ir_sh[0];
      else if (state == TAP_SHIFT_DR) tdo <= dr_sh[0];
    end
  end

  // ---- writable registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd <= '0; btid <= '0; evid_offset <= '0;
    end else if (update_dr) begin
      unique case (ir)
        IR_CMD_RESET: cmd <= cmd & ~cmd_reg_t'(dr_sh[11:0]);
        IR_CMD_SET:   cmd <= cmd |  cmd_reg_t'(dr_sh[11:0]);
        IR_IDCODE:    btid <= dr_sh[11:0];
        IR_EVOFFSET:  evid_offset <= dr_sh[11:0];
        default: ;
      endcase
    end
  end

  // ---- latched error flags, cleared by reading ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           err_flags <= '0;
    else if (flags_clear) err_flags <= '0;
    else if (capture_err) err_flags <= err_set;
    else                  err_flags <= err_flags | err_set;
  end

  // ---- event data register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) evreg <= '0;
    else if (cmd.jtag_ro) begin
      if (capture_ev)                 evreg <= '0;
      else if (ev_valid && ev_ready)  evreg <= ev_word;
    end else if (mon_valid)           evreg <= mon_word;
  end
endmodule
