// btimizer_top -- FPGA logic of the B-Timizer, a 32-channel time digitizer
// board with a 4K-event L1 buffer.
//
// Data path: an L0 trigger is queued in the L0 derandomizer; the Write
// Control reads that event from the TDC and writes it into the 64-word slot
// given by the L0 Pointer of the external 256K x 36 ZBT SRAM (the L1
// buffer), completing it with a B-Timizer header.  L1 decisions arrive as
// Hamming-protected broadcast commands on the serial TTC Channel B; every
// decision advances the L1 Pointer and an accept pushes the slot number into
// the 16-deep L1 FIFO.  The Read Control empties the FIFO: it reads each
// accepted slot back, checks parity and the event ID, appends a trailer and,
// on error, an Errors word, and hands the words to the DS-link serializer, or
// to the JTAG Event data register when JtagRo is set.  The buffer occupation
// (L0 Pointer minus L1 Pointer) stops writing when the buffer is full.  An
// emulated JTAG port holds the Command, ID, offset, error and version
// registers.  Block structure and functions follow the document.
// Clocking (design choice): everything runs on the 80 MHz clock; the
// Multiplexer's slot bit marks the 40 MHz cycles (ce40) on which the TDC
// handshake, the L0 trigger input and the Channel B bit are sampled.  L0
// triggers and Channel B bits must be held for one 40 MHz cycle (two clocks).
// Resets: rst_n is the power-up reset; the L1 reset broadcast and the
// command register's Rst bit reset the data path (pointers, FIFOs, state
// machines, sticky error flags); Rst also clears the JTAG error flags and
// drives the TDC reset.  The bunch-count and event-count reset broadcasts are
// passed on to the TDC; the event-count reset also reloads the L0 event ID
// from the Event ID offset.  The SRAM data bus is brought out as separate
// in/out/enable pins.
module btimizer_top
  import btim_pkg::*;
(
  input  logic              clk,          // 80 MHz, twice the TTC clock
  input  logic              rst_n,        // power-up reset
  input  logic              l0_trigger,   // L0 accept, one 40 MHz cycle
  input  logic              ttc_chb,      // TTC broadcast channel, serial
  // TDC readout
  input  logic              tdc_valid,
  input  logic [WORD_W-1:0] tdc_data,
  output logic              tdc_get,
  output logic              tdc_reset,
  output logic              tdc_bunch_reset,  // broadcast resets passed on,
  output logic              tdc_event_reset,  // two clocks (one 40 MHz cycle) long
  // L1 buffer (ZBT SRAM)
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_we_n,
  output logic [MEM_W-1:0]  sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [MEM_W-1:0]  sram_dq_i,
  // serial event data to the concentrator
  output logic              ds_data,
  output logic              ds_strobe,
  // JTAG
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo,
  // test connector
  output logic              test_mem_write,
  output logic              test_mem_read,
  output logic              test_error
);
  // ---- control registers ----
  cmd_reg_t    cmd;
  logic [11:0] btid, evid_offset;
  logic        ce40, phase;
  logic        sreset;

  // ---- TTC Channel B ----
  logic       l1_accept, l1_reject, bcnt_reset, ec_reset, l1_reset, bc_par_err, bc_corr;
  logic       bcnt_reset_q, ec_reset_q;
  logic [1:0] l1_id;
  logic       bc_err;     // uncorrectable broadcast error, sticky

  assign ce40      = phase;
  assign sreset    = cmd.rst | l1_reset;
  assign tdc_reset = cmd.rst;

  // The TDC counts bunches and events itself: its resets come from Channel B,
  // stretched to one 40 MHz cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt_reset_q <= 1'b0; ec_reset_q <= 1'b0;
      tdc_bunch_reset <= 1'b0; tdc_event_reset <= 1'b0;
    end else begin
      bcnt_reset_q <= bcnt_reset; ec_reset_q <= ec_reset;
      tdc_bunch_reset <= bcnt_reset | bcnt_reset_q;
      tdc_event_reset <= ec_reset | ec_reset_q;
    end
  end

  ttc_chb_decoder u_chb (
    .clk, .rst_n, .bit_en(ce40), .chb(ttc_chb),
    .l1_accept, .l1_reject, .l1_id, .bcnt_reset, .ec_reset, .l1_reset,
    .bc_par_err, .corrected(bc_corr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          bc_err <= 1'b0;
    else if (sreset)     bc_err <= 1'b0;
    else if (bc_par_err) bc_err <= 1'b1;
  end

  // ---- L0 side ----
  logic       l0_pending, l0ff_full, l0ff_ovf, l0_pop;
  logic [3:0] l0_count;
  logic [PTR_W-1:0] l0_ptr, l1_ptr, occupancy;
  logic       slot_done, buf_full;

  l0_derandomizer u_l0ff (
    .clk, .rst_n, .sreset, .l0_trigger(l0_trigger && ce40), .pop(l0_pop),
    .not_empty(l0_pending), .full(l0ff_full), .overflow(l0ff_ovf), .count(l0_count)
  );

  event_pointer #(.PTR_W(PTR_W)) u_l0ptr (
    .clk, .rst_n, .sreset, .inc(slot_done), .ptr(l0_ptr)
  );

  event_pointer #(.PTR_W(PTR_W)) u_l1ptr (
    .clk, .rst_n, .sreset, .inc(l1_accept | l1_reject), .ptr(l1_ptr)
  );

  l1_buffer_occupation #(.PTR_W(PTR_W)) u_occ (
    .l0_ptr, .l1_ptr, .occupancy, .full(buf_full)
  );

  // ---- L1 FIFO ----
  l1_entry_t  fifo_wr, fifo_rd;
  logic       fifo_pop, fifo_not_empty, l1ff_full, l1ff_ovf;
  logic [4:0] fifo_count;

  assign fifo_wr = '{ptr: l1_ptr, id: l1_id, ovf: 1'b0};

  l1_fifo u_l1ff (
    .clk, .rst_n, .sreset, .push(l1_accept), .wr_data(fifo_wr), .pop(fifo_pop),
    .rd_data(fifo_rd), .not_empty(fifo_not_empty), .full(l1ff_full),
    .overflow(l1ff_ovf), .count(fifo_count)
  );

  // ---- Write Control ----
  logic              wr_req, wr_ack;
  logic [ADDR_W-1:0] wr_addr;
  logic [WORD_W-1:0] wr_data;
  logic [EVID_W-1:0] l0_evid;
  logic [5:0]        memfull_cnt;
  logic              l1buf_ovf, ev_overflow, ev_empty;

  write_control u_wc (
    .clk, .rst_n, .sreset, .ec_reset, .ce40, .cmd, .btid, .evid_offset,
    .l0_pending, .l0ff_full, .l0_pop, .l0_ptr, .slot_done, .buf_full, .l1ff_full,
    .tdc_valid, .tdc_data, .tdc_get,
    .wr_req, .wr_addr, .wr_data, .wr_ack,
    .evid(l0_evid), .memfull_cnt, .l1buf_ovf, .ev_overflow, .ev_empty
  );

  // ---- Multiplexer and L1 buffer port ----
  logic              rd_req, rd_valid;
  logic [ADDR_W-1:0] rd_addr;
  logic [WORD_W-1:0] rd_data;
  logic [PAR_W-1:0]  rd_par_err;

  buffer_mux u_mux (
    .clk, .rst_n, .phase,
    .wr_req, .wr_addr, .wr_data, .wr_ack,
    .rd_req, .rd_addr, .rd_valid, .rd_data, .rd_par_err,
    .sram_addr, .sram_we_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i
  );

  // ---- Read Control ----
  logic              out_valid, out_ready, evid_err, hdr_par_err, data_par_err, event_done;
  logic [WORD_W-1:0] out_word;

  read_control u_rc (
    .clk, .rst_n, .sreset, .btid, .ena(cmd.ena),
    .fifo_not_empty, .fifo_data(fifo_rd), .fifo_pop,
    .rd_req, .rd_addr, .rd_valid, .rd_data, .rd_par_err,
    .l0ff_ovf, .l1buf_ovf, .bc_err,
    .out_valid, .out_word, .out_ready,
    .evid_err, .hdr_par_err, .data_par_err, .event_done
  );

  // ---- output: serializer, or JTAG event register when JtagRo ----
  logic ser_ready, ev_ready, frame_done;

  assign out_ready = cmd.jtag_ro ? ev_ready : ser_ready;

  ds_serializer u_ser (
    .clk, .rst_n, .sreset, .sclk_sel(cmd.sclk_sel),
    .valid(out_valid && !cmd.jtag_ro), .word(out_word), .ready(ser_ready),
    .ds_data, .ds_strobe, .frame_done
  );

  // ---- JTAG ----
  tap_state_t  tap_state;
  logic        tck_rise, tck_fall, tdi_s;
  logic [11:0] err_set;
  logic [3:0]  ir;

  assign err_set = {bc_err, data_par_err, hdr_par_err, bc_par_err,
                    l1ff_ovf, l1ff_full, evid_err, l1buf_ovf,
                    l0ff_ovf, buf_full, l0ff_full, ev_overflow};

  jtag_tap u_tap (
    .clk, .rst_n, .tck, .tms, .tdi, .state(tap_state), .tck_rise, .tck_fall, .tdi_s
  );

  jtag_regs u_jregs (
    .clk, .rst_n, .state(tap_state), .tck_rise, .tck_fall, .tdi_s, .tdo,
    .cmd, .btid, .evid_offset, .err_set, .flags_clear(cmd.rst),
    .ev_valid(out_valid && cmd.jtag_ro), .ev_word(out_word), .ev_ready,
    .mon_valid(out_valid && ser_ready && !cmd.jtag_ro), .mon_word(out_word), .ir
  );

  // ---- test connector ----
  assign test_mem_write = wr_ack;
  assign test_mem_read  = rd_valid;
  assign test_error     = |err_set;
endmodule
