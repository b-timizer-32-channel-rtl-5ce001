// read_control -- sends L1-accepted events from the L1 buffer to the output.
//
// For each entry of the L1 FIFO (slot pointer, 2-bit TTC event ID, FIFO
// overflow flag) this block reads the B-Timizer header from word 0 of the
// slot, compares the two LSBs of its event ID with the TTC ID, and then reads
// words 1 .. wcount-2 of the slot (wcount = header word count, which counts
// the trailer appended here).  Every word read has its byte parity checked by
// the Multiplexer.  If the header carries the L1-FIFO-full flag only header
// and trailer are sent, so that the FIFO drains faster.  The generated
// B-Timizer trailer holds ID[3:0], the event ID, Error Detected, Parity Error,
// L1 FIFO full, "event ID error or broadcast parity error" and ID[11:4].
// When any error flag is set an Errors word follows the trailer (not counted
// in the word count): per-byte parity error summaries of header and data,
// and the ten error flags of the documented Errors word.  The format follows
// the document; reading "TDC/Header Parity" as per-byte parity-error
// indicators and taking "L1 buffer full" for an Empty event while Ena is set
// are this design's reading.
// Interface: buffer reads with rd_req held until rd_valid; the output word
// stream uses valid/ready; one word is read, then sent, then the next read.
module read_control
  import btim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sreset,
  input  logic [11:0]       btid,
  input  logic              ena,
  // L1 FIFO
  input  logic              fifo_not_empty,
  input  l1_entry_t         fifo_data,
  output logic              fifo_pop,
  // buffer read port
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_valid,
  input  logic [WORD_W-1:0] rd_data,
  input  logic [PAR_W-1:0]  rd_par_err,
  // sticky status for the Errors word
  input  logic              l0ff_ovf,
  input  logic              l1buf_ovf,
  input  logic              bc_err,
  // output word stream (to serializer or JTAG event register)
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  input  logic              out_ready,
  // per-event status pulses
  output logic              evid_err,     // header / TTC event ID mismatch
  output logic              hdr_par_err,
  output logic              data_par_err,
  output logic              event_done
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_SEND, S_TRAILER, S_ERRORS} state_t;
  typedef enum logic [1:0] {K_HDR, K_DATA} kind_t;
  state_t      state;
  kind_t       kind;
  l1_entry_t   ent;
  bt_header_t  hdr;
  logic [5:0]  offs, last;
  logic [PAR_W-1:0] hpar, dpar;
  logic        id_mis;
  err_flags_t  ef;
  logic        perr, err_det;

  always_comb begin
    ef            = '0;
    ef.bc_par_err = bc_err;
    ef.l1ff_ovf   = ent.ovf;
    ef.l1ff_full  = hdr.flags.l1ff_full;
    ef.evid_err   = id_mis;
    ef.l1buf_ovf  = l1buf_ovf;
    ef.l0ff_ovf   = l0ff_ovf;
    ef.empty      = hdr.flags.empty;
    ef.l1buf_full = hdr.flags.empty && ena;
    ef.l0ff_full  = hdr.flags.l0ff_full;
    ef.evt_ovf    = hdr.flags.evt_ovf;
  end
  assign perr    = (hpar != '0) || (dpar != '0);
  assign err_det = (ef != '0) || perr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; kind <= K_HDR; ent <= '0; hdr <= '0; offs <= '0; last <= '0;
      hpar <= '0; dpar <= '0; id_mis <= 1'b0;
      fifo_pop <= 1'b0; rd_req <= 1'b0; rd_addr <= '0;
      out_valid <= 1'b0; out_word <= '0;
      evid_err <= 1'b0; hdr_par_err <= 1'b0; data_par_err <= 1'b0; event_done <= 1'b0;
    end else if (sreset) begin
      state <= S_IDLE; fifo_pop <= 1'b0; rd_req <= 1'b0; out_valid <= 1'b0;
      evid_err <= 1'b0; hdr_par_err <= 1'b0; data_par_err <= 1'b0; event_done <= 1'b0;
    end else begin
      fifo_pop     <= 1'b0;
      evid_err     <= 1'b0;
      hdr_par_err  <= 1'b0;
      data_par_err <= 1'b0;
      event_done   <= 1'b0;
      unique case (state)
        S_IDLE: if (fifo_not_empty && !fifo_pop) begin
          ent      <= fifo_data;
          fifo_pop <= 1'b1;
          rd_req   <= 1'b1;
          rd_addr  <= {fifo_data.ptr, 6'd0};
          kind     <= K_HDR;
          hpar     <= '0;
          dpar     <= '0;
          state    <= S_READ;
        end
        S_READ: if (rd_valid) begin
          rd_req    <= 1'b0;
          out_valid <= 1'b1;
          out_word  <= rd_data;
          if (kind == K_HDR) begin
            hdr    <= bt_header_t'(rd_data);
            hpar   <= rd_par_err;
            id_mis <= (rd_data[13:12] != ent.id);
            evid_err    <= (rd_data[13:12] != ent.id);
            hdr_par_err <= (rd_par_err != '0);
            // last data offset: word count minus header and trailer
            if (rd_data[10] || rd_data[7:0] <= 8'd2) last <= 6'd0;
            else if (rd_data[7:0] >= 8'd65)          last <= 6'd63;
            else                                     last <= 6'(rd_data[7:0] - 8'd2);
            offs <= 6'd0;
          end else begin
            dpar <= dpar | rd_par_err;
            data_par_err <= (rd_par_err != '0);
          end
          state <= S_SEND;
        end
        S_SEND: if (out_ready) begin
          out_valid <= 1'b0;
          if (offs != last) begin
            offs    <= offs + 1'b1;
            rd_addr <= {ent.ptr, offs + 6'd1};
            rd_req  <= 1'b1;
            kind    <= K_DATA;
            state   <= S_READ;
          end else begin
            out_valid <= 1'b1;
            out_word  <= {WT_BT_TRAIL, btid[3:0], hdr.evid, err_det, perr,
                          hdr.flags.l1ff_full, id_mis | bc_err, btid[11:4]};
            state     <= S_TRAILER;
          end
        end
        S_TRAILER: if (out_ready) begin
          if (err_det) begin
            out_word <= {WT_ERRORS, btid[3:0], 4'b0000, dpar, hpar, 2'b00, ef};
            state    <= S_ERRORS;
          end else begin
            out_valid  <= 1'b0;
            event_done <= 1'b1;
            state      <= S_IDLE;
          end
        end
        S_ERRORS: if (out_ready) begin
          out_valid  <= 1'b0;
          event_done <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
