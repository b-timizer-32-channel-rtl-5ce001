// btim_pkg -- shared types, constants and helper functions of the B-Timizer
// FPGA logic (32-channel TDC readout with an L1 event buffer).
//
// Holds the 32-bit word formats of the event record (B-Timizer header and
// trailer, TDC header/data/trailer, merged data, test data, Errors word), the
// fields of the JTAG Command register, the L1 FIFO entry and the byte-parity
// and Hamming helpers used by the Multiplexer, the Read Control and the TTC
// Channel B decoder.  Word-type codes and bit positions follow the published
// data format; the broadcast command encoding (which bits mean L1 accept,
// L1 reset, EC reset) is this design's own choice, since the format of the
// broadcast command itself is not specified.
package btim_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned PAR_W       = 4;          // one even-parity bit per byte
  localparam int unsigned MEM_W       = WORD_W + PAR_W;
  localparam int unsigned SLOT_W      = 6;          // 64 words per event slot
  localparam int unsigned PTR_W       = 12;         // 4K event slots
  localparam int unsigned ADDR_W      = PTR_W + SLOT_W;  // 256K words
  localparam int unsigned EVID_W      = 12;

  // ---- word type identifiers (bits 31:28) --------------------------------
  localparam logic [3:0] WT_BT_HEADER  = 4'b1010;
  localparam logic [3:0] WT_TDC_HEADER = 4'b0010;
  localparam logic [3:0] WT_TDC_DATA   = 4'b0100;
  localparam logic [3:0] WT_TDC_TRAIL  = 4'b0011;
  localparam logic [3:0] WT_TEST       = 4'b1100;
  localparam logic [3:0] WT_BT_TRAIL   = 4'b1101;
  localparam logic [3:0] WT_ERRORS     = 4'b1001;

  // ---- JTAG Command register (12 bits) -----------------------------------
  typedef struct packed {
    logic [1:0] unused;   // 11:10
    logic       merg_en;  // 9
    logic       jtag_ro;  // 8
    logic [2:0] test_id;  // 7:5
    logic [1:0] max_evt;  // 4:3
    logic       sclk_sel; // 2
    logic       ena;      // 1
    logic       rst;      // 0
  } cmd_reg_t;

  // ---- B-Timizer header -------------------------------------------------
  typedef struct packed {
    logic       empty;      // 11
    logic       l1ff_full;  // 10
    logic       l0ff_full;  // 9
    logic       evt_ovf;    // 8
  } hdr_flags_t;

  typedef struct packed {
    logic [3:0]        wtype;     // 1010
    logic [3:0]        btid;      // B-Timizer ID[3:0]
    logic [EVID_W-1:0] evid;      // L0 event ID
    hdr_flags_t        flags;
    logic [7:0]        wcount;    // words incl. both headers and trailers, excl. Errors word
  } bt_header_t;

  // ---- B-Timizer trailer ------------------------------------------------
  typedef struct packed {
    logic [3:0]        wtype;     // 1101
    logic [3:0]        btid_lo;   // B-Timizer ID[3:0]
    logic [EVID_W-1:0] evid;
    logic              err_det;   // 11: OR of all error flags
    logic              par_err;   // 10
    logic              l1ff_full; // 9
    logic              id_err;    // 8: L0 event ID error or broadcast parity error
    logic [7:0]        btid_hi;   // B-Timizer ID[11:4]
  } bt_trailer_t;

  // ---- Errors word flag field (bits 9:0) ---------------------------------
  typedef struct packed {
    logic bc_par_err;   // 9
    logic l1ff_ovf;     // 8
    logic l1ff_full;    // 7
    logic evid_err;     // 6
    logic l1buf_ovf;    // 5
    logic l0ff_ovf;     // 4
    logic empty;        // 3
    logic l1buf_full;   // 2
    logic l0ff_full;    // 1
    logic evt_ovf;      // 0
  } err_flags_t;

  // ---- L1 FIFO entry -----------------------------------------------------
  typedef struct packed {
    logic [PTR_W-1:0] ptr;   // L1 pointer = event slot
    logic [1:0]       id;    // 2-bit event ID from the TTC system
    logic             ovf;   // L1 FIFO overflow flag
  } l1_entry_t;

  // ---- broadcast command decoding (design choice) -------------------------
  // cmd[7:6] = 2'b01 : L1 decision, cmd[5] = 1 accept / 0 reject,
  //                    cmd[1:0] = two LSBs of the event ID
  // cmd[7:6] = 2'b00 : resets, cmd[0] bunch count reset (passed to the TDC),
  //                    cmd[1] event count reset, cmd[2] L1 reset
  localparam logic [1:0] BC_L1_TRIGGER = 2'b01;
  localparam logic [1:0] BC_RESETS     = 2'b00;

  // ---- TAP controller states (codes as numbered in the state diagram) -----
  typedef enum logic [4:0] {
    TAP_TEST_RESET = 5'd1,  TAP_CAPT_IR    = 5'd2,  TAP_UPDATE_IR  = 5'd3,
    TAP_RUN_IDLE   = 5'd4,  TAP_PAUSE_IR   = 5'd5,  TAP_SHIFT_IR   = 5'd6,
    TAP_EXIT1_IR   = 5'd7,  TAP_EXIT2_IR   = 5'd8,  TAP_SEL_DR     = 5'd9,
    TAP_CAPT_DR    = 5'd10, TAP_UPDATE_DR  = 5'd11, TAP_SEL_IR     = 5'd12,
    TAP_PAUSE_DR   = 5'd13, TAP_SHIFT_DR   = 5'd14, TAP_EXIT1_DR   = 5'd15,
    TAP_EXIT2_DR   = 5'd16
  } tap_state_t;

  // ---- JTAG instructions -----------------------------------------------
  localparam logic [3:0] IR_CMD_RESET = 4'b0000;
  localparam logic [3:0] IR_CMD_SET   = 4'b0001;
  localparam logic [3:0] IR_IDCODE    = 4'b0010;
  localparam logic [3:0] IR_EVOFFSET  = 4'b0011;
  localparam logic [3:0] IR_ERRFLAGS  = 4'b0100;
  localparam logic [3:0] IR_VERSION   = 4'b0101;
  localparam logic [3:0] IR_EVDATA    = 4'b0110;
  localparam logic [3:0] IR_BYPASS    = 4'b1111;

  // Even parity per byte: bit i makes byte i plus parity bit have even weight.
  function automatic logic [PAR_W-1:0] byte_parity(input logic [WORD_W-1:0] w);
    logic [PAR_W-1:0] p;
    for (int i = 0; i < PAR_W; i++) p[i] = ^w[8*i +: 8];
    return p;
  endfunction

  // Hamming check bits of an 8-bit broadcast command.
  function automatic logic [3:0] hamming4(input logic [7:0] d);
    logic [3:0] h;
    h[0] = d[7] ^ d[6] ^ d[4] ^ d[3] ^ d[1];
    h[1] = d[7] ^ d[5] ^ d[4] ^ d[2] ^ d[1];
    h[2] = d[6] ^ d[5] ^ d[4] ^ d[0];
    h[3] = d[3] ^ d[2] ^ d[1] ^ d[0];
    return h;
  endfunction

  // Maximum number of stored data words for MaxEvt[1:0].
  function automatic logic [5:0] max_hits(input logic [1:0] max_evt);
    case (max_evt)
      2'd0:    return 6'd7;
      2'd1:    return 6'd15;
      2'd2:    return 6'd31;
      default: return 6'd61;
    endcase
  endfunction

  // Maximum number of test words for TestId[2:0]; codes 5-7 insert none.
  function automatic logic [5:0] max_test(input logic [2:0] test_id);
    case (test_id)
      3'd1:       return 6'd16;
      3'd2:       return 6'd32;
      3'd3, 3'd4: return 6'd63;
      default:    return 6'd0;
    endcase
  endfunction

endpackage
