// write_control -- moves L0-accepted events from the TDC into the L1 buffer.
//
// Every pending L0 trigger (l0_pending from the derandomizer) makes this
// block read one event from the TDC and store it in event slot l0_ptr, i.e.
// at word addresses l0_ptr*64 .. l0_ptr*64+63:
//   +1            TDC header
//   +2 ..         TDC hits, or merged hit pairs when MergEn is set
//   next          TDC trailer
//   next ..       0 .. TestId-maximum test words (1100 + walking one)
//   +0 (last)     B-Timizer header: ID[3:0], L0 event ID, flags, word count
// The word count is the number of stored words plus one for the B-Timizer
// trailer that the Read Control appends.  After the header the L0 Pointer and
// the L0 event ID counter advance (slot_done).
// Event length limit: data words beyond max_hits(MaxEvt) are skipped until
// the TDC trailer and the Event overflow flag is set.  Buffer full: the TDC
// event is read and dropped and a 6-bit memory-full counter is incremented;
// each counted event is later written as an empty event (header only, Empty
// flag) as soon as the buffer has room again, before any newer event, so the
// slot order stays the L1 trigger order.  With the counter at 63 a further
// dropped event sets the sticky L1-buffer-overflow flag and is lost.
// With Ena clear the TDC is not read: each trigger gives a header with the
// Empty flag plus test words (63 fixed when TestId = 4).
// This follows the document; the TDC handshake, the empty-event replay, the
// walking-one test pattern, the random count (an 8-bit LFSR scaled to
// 0..max) and the clamp of test data to the 64-word slot are design choices.
// Timing: one TDC word per 40 MHz cycle (ce40); every buffer write is a
// wr_req held until wr_ack from the Multiplexer.
module write_control
  import btim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sreset,       // L1 reset / command Rst
  input  logic              ec_reset,     // event count reset
  input  logic              ce40,         // one clock per 40 MHz cycle
  input  cmd_reg_t          cmd,
  input  logic [11:0]       btid,
  input  logic [11:0]       evid_offset,
  // L0 trigger side
  input  logic              l0_pending,
  input  logic              l0ff_full,
  output logic              l0_pop,
  input  logic [PTR_W-1:0]  l0_ptr,
  output logic              slot_done,
  input  logic              buf_full,
  input  logic              l1ff_full,
  // TDC readout
  input  logic              tdc_valid,
  input  logic [WORD_W-1:0] tdc_data,
  output logic              tdc_get,
  // buffer write port
  output logic              wr_req,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [WORD_W-1:0] wr_data,
  input  logic              wr_ack,
  // status
  output logic [EVID_W-1:0] evid,
  output logic [5:0]        memfull_cnt,
  output logic              l1buf_ovf,      // sticky
  output logic              ev_overflow,    // pulse: event truncated
  output logic              ev_empty        // pulse: empty event written
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_TRAIL, S_TEST, S_HDR, S_FLUSH} state_t;
  state_t          state;
  logic [5:0]      offs;        // next word offset in the slot
  logic [5:0]      nhits;       // stored data words
  logic [5:0]      ntest;       // test words still to write
  logic [4:0]      walk;
  logic            pend;        // merge: a hit is waiting for its partner
  logic [WORD_W-1:0] pend_hit, trail_word;
  logic [7:0]      ref_hi;
  logic            first_hit;
  hdr_flags_t      flags;
  logic [7:0]      lfsr;
  logic [WORD_W-1:0] merged;
  logic            take;
  logic [3:0]      wtype;
  logic [5:0]      tmax;
  logic [12:0]     scaled;

  hit_merger u_merge (
    .hit_a(pend_hit), .hit_b(tdc_data), .b_valid(wtype != WT_TDC_TRAIL),
    .ref_coarse_hi(ref_hi), .merged(merged)
  );

  assign tdc_get = (state == S_READ || state == S_FLUSH) && ce40 && !wr_req;
  assign take    = tdc_get && tdc_valid;
  assign wtype   = tdc_data[31:28];
  assign tmax    = max_test(cmd.test_id);
  assign scaled  = 13'(lfsr[6:0]) * 13'(tmax + 6'd1);
  assign l0_pop  = (state == S_IDLE) && !wr_req && l0_pending &&
                   !(memfull_cnt != '0 && !buf_full);

  // free-running pseudo-random source for the test word count
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 8'h5A;
    else        lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
  end

  task automatic put(input logic [5:0] o, input logic [WORD_W-1:0] d);
    wr_req  <= 1'b1;
    wr_addr <= {l0_ptr, o};
    wr_data <= d;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; offs <= '0; nhits <= '0; ntest <= '0; walk <= '0;
      pend <= 1'b0; pend_hit <= '0; trail_word <= '0; ref_hi <= '0; first_hit <= 1'b0;
      flags <= '0; wr_req <= 1'b0; wr_addr <= '0; wr_data <= '0;
      evid <= '0; memfull_cnt <= '0; l1buf_ovf <= 1'b0;
      slot_done <= 1'b0; ev_overflow <= 1'b0; ev_empty <= 1'b0;
    end else if (sreset) begin
      state <= S_IDLE; pend <= 1'b0; wr_req <= 1'b0;
      evid <= evid_offset; memfull_cnt <= '0; l1buf_ovf <= 1'b0;
      slot_done <= 1'b0; ev_overflow <= 1'b0; ev_empty <= 1'b0;
    end else begin
      slot_done   <= 1'b0;
      ev_overflow <= 1'b0;
      ev_empty    <= 1'b0;
      if (wr_ack) wr_req <= 1'b0;
      if (ec_reset) evid <= evid_offset;
      if (slot_done && !ec_reset) evid <= evid + 1'b1;

      if (!wr_req) begin
        unique case (state)
          S_IDLE: begin
            flags <= '0;
            offs  <= 6'd1; nhits <= '0; pend <= 1'b0; walk <= '0; first_hit <= 1'b1;
            if (memfull_cnt != '0 && !buf_full) begin
              // replay one event that was dropped while the buffer was full
              memfull_cnt <= memfull_cnt - 1'b1;
              flags.empty <= 1'b1;
              offs  <= 6'd1;
              state <= S_HDR;
            end else if (l0_pending) begin
              flags.l0ff_full <= l0ff_full;
              if (buf_full) begin
                if (memfull_cnt == 6'd63) l1buf_ovf <= 1'b1;
                else memfull_cnt <= memfull_cnt + 1'b1;
                state <= cmd.ena ? S_FLUSH : S_IDLE;
              end else if (!cmd.ena) begin
                flags.empty <= 1'b1;
                ntest <= (cmd.test_id == 3'd4) ? 6'd63 : scaled[12:7];
                state <= S_TEST;
              end else begin
                state <= S_READ;
              end
            end
          end

          S_READ: if (take) begin
            if (wtype == WT_TDC_HEADER) begin
              put(6'd1, tdc_data);
              offs <= 6'd2;
            end else if (wtype == WT_TDC_TRAIL) begin
              trail_word <= tdc_data;
              ntest <= (cmd.test_id == 3'd4) ? 6'd63 : scaled[12:7];
              if (pend) begin
                put(offs, merged);         // odd hit alone, partner field zero
                offs  <= offs + 1'b1;
                pend  <= 1'b0;
              end
              state <= S_TRAIL;
            end else if (cmd.merg_en) begin
              // a stored word is reserved when the first hit of a pair arrives
              if (first_hit) ref_hi <= tdc_data[18:11];
              first_hit <= 1'b0;
              if (pend) begin
                put(offs, merged);
                offs <= offs + 1'b1;
                pend <= 1'b0;
              end else if (nhits == max_hits(cmd.max_evt)) flags.evt_ovf <= 1'b1;
              else begin
                pend     <= 1'b1;
                pend_hit <= tdc_data;
                nhits    <= nhits + 1'b1;
              end
            end else begin
              if (nhits == max_hits(cmd.max_evt)) flags.evt_ovf <= 1'b1;
              else begin
                put(offs, {tdc_data[31:28], 1'b0, tdc_data[26:0]});
                offs  <= offs + 1'b1;
                nhits <= nhits + 1'b1;
              end
            end
          end

          S_TRAIL: begin
            put(offs, trail_word);
            offs  <= offs + 1'b1;
            state <= S_TEST;
          end

          S_TEST: begin
            if (ntest == '0 || offs == 6'd0) state <= S_HDR;   // offs wrapped: slot full
            else begin
              put(offs, {WT_TEST, 28'(1) << walk});
              offs  <= offs + 1'b1;
              ntest <= ntest - 1'b1;
              walk  <= (walk == 5'd27) ? 5'd0 : walk + 1'b1;
            end
          end

          S_HDR: begin
            put(6'd0, {WT_BT_HEADER, btid[3:0], evid,
                       flags.empty, l1ff_full, flags.l0ff_full, flags.evt_ovf,
                       (offs == 6'd0) ? 8'd65 : 8'(offs) + 8'd1});
            slot_done   <= 1'b1;
            ev_overflow <= flags.evt_ovf;
            ev_empty    <= flags.empty;
            state       <= S_IDLE;
          end

          S_FLUSH: if (take && wtype == WT_TDC_TRAIL) state <= S_IDLE;

          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
