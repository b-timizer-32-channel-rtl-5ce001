// ttc_chb_decoder -- receiver of the TTC broadcast channel (Channel B).
//
// The L1 decisions and the resets reach the board as short broadcast frames
// on the serial Channel B, one bit per 40 MHz cycle (bit_en marks the cycle's
// sampling clock).  Frame layout: idle line at 1,
// start bit 0, format bit 0, command bit 7 .. bit 0, Hamming parity bit 4 ..
// bit 0, stop bit.  Check bits 0-3 are the documented Hamming code over the
// 8-bit command; check bit 4 is the even parity of the command.  A non-zero
// syndrome that matches a command bit while bit 4 also mismatches is a single
// error in that bit and is corrected; a one-hot syndrome with a good bit 4 is
// an error in a check bit (command is good); a syndrome of zero with a bad
// bit 4 is an error in bit 4.  Every other combination is taken as a double
// error: the command is dropped and bc_par_err pulses.
// Decoding of the command byte is this design's choice (see btim_pkg):
// 01xxxxxx = L1 decision (bit 5: accept / reject, bits 1:0: event ID),
// 00xxxxxx = resets (bit 0: bunch count reset, bit 1: event count reset,
// bit 2: L1 reset).  Frames in
// long format (format bit 1) are skipped, LONG_SKIP bits long.
// All outputs are single-clock pulses, one clock after the stop bit.
module ttc_chb_decoder
  import btim_pkg::*;
#(
  parameter int unsigned LONG_SKIP = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  input  logic       chb,
  output logic       l1_accept,
  output logic       l1_reject,
  output logic [1:0] l1_id,
  output logic       bcnt_reset,
  output logic       ec_reset,
  output logic       l1_reset,
  output logic       bc_par_err,
  output logic       corrected
);
  typedef enum logic [1:0] {S_IDLE, S_FMT, S_BITS, S_SKIP} state_t;
  state_t     state;
  logic [5:0] cnt;
  logic [12:0] sh;        // command (12:5) then check bits 4..0 (4:0)

  // decode the frame that has just completed
  logic [7:0] cmd, fixed;
  logic [4:0] chk;
  logic [3:0] syn;
  logic       p4_bad, single, ok;

  assign cmd    = sh[12:5];
  assign chk    = sh[4:0];
  assign syn    = hamming4(cmd) ^ chk[3:0];
  assign p4_bad = (^cmd) ^ chk[4];

  always_comb begin
    fixed  = cmd;
    single = 1'b0;
    ok     = 1'b0;
    if (syn == 4'b0000) ok = 1'b1;                       // good or bit 4 error
    else if (!p4_bad && (syn & (syn - 4'd1)) == 4'd0) ok = 1'b1;  // check-bit error
    else if (p4_bad) begin
      ok = 1'b1; single = 1'b1;
      case (syn)
        4'b0011: fixed[7] = ~cmd[7];
        4'b0101: fixed[6] = ~cmd[6];
        4'b0110: fixed[5] = ~cmd[5];
        4'b0111: fixed[4] = ~cmd[4];
        4'b1001: fixed[3] = ~cmd[3];
        4'b1010: fixed[2] = ~cmd[2];
        4'b1011: fixed[1] = ~cmd[1];
        4'b1100: fixed[0] = ~cmd[0];
        default: begin ok = 1'b0; single = 1'b0; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; sh <= '0;
      l1_accept <= 1'b0; l1_reject <= 1'b0; l1_id <= '0;
      bcnt_reset <= 1'b0; ec_reset <= 1'b0; l1_reset <= 1'b0; bc_par_err <= 1'b0; corrected <= 1'b0;
    end else begin
      l1_accept <= 1'b0; l1_reject <= 1'b0; ec_reset <= 1'b0; bcnt_reset <= 1'b0;
      l1_reset <= 1'b0; bc_par_err <= 1'b0; corrected <= 1'b0;
      if (bit_en) begin
        unique case (state)
          S_IDLE: if (!chb) state <= S_FMT;
          S_FMT: begin
            cnt   <= chb ? 6'(LONG_SKIP) : 6'd14;   // 8 + 5 bits + stop
            state <= chb ? S_SKIP : S_BITS;
          end
          S_BITS: begin
            cnt <= cnt - 1'b1;
            if (cnt != 6'd1) sh <= {sh[11:0], chb};
            else begin                               // stop bit
              state <= S_IDLE;
              if (!ok) bc_par_err <= 1'b1;
              else begin
                corrected <= single;
                if (fixed[7:6] == BC_L1_TRIGGER) begin
                  l1_accept <= fixed[5];
                  l1_reject <= ~fixed[5];
                  l1_id     <= fixed[1:0];
                end else if (fixed[7:6] == BC_RESETS) begin
                  bcnt_reset <= fixed[0];
                  ec_reset <= fixed[1];
                  l1_reset <= fixed[2];
                end
              end
            end
          end
          S_SKIP: begin
            cnt <= cnt - 1'b1;
            if (cnt == 6'd1) state <= S_IDLE;
          end
        endcase
      end
    end
  end
endmodule
