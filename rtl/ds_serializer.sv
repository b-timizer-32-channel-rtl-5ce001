// ds_serializer -- DS-link (Data/Strobe) serializer of the L1 event data.
//
// Each 32-bit word is sent as a 35-bit frame, most significant bit first:
// start bit, bit 31 .. bit 0, parity bit, stop bit (frame order as printed in
// the frame diagram).  Data/Strobe encoding: ds_data carries the bit value;
// ds_strobe toggles at every bit boundary at which ds_data does not change,
// so exactly one of the two lines changes per bit and the receiver recovers
// the clock as data XOR strobe.  The bit rate is 80 Mb/s (one bit per 80 MHz
// clock) when sclk_sel is 1 and 40 Mb/s (one bit per two clocks) otherwise.
// Design choices where the document prints no value: start bit = 1,
// stop bit = 0, even parity over the 32 data bits, and the lines simply hold
// their level between frames.  A word is taken when valid && ready; ready is
// high while no frame is in flight, and a new frame may follow the stop bit
// directly.  Frame time: 35 bit periods.
module ds_serializer
  import btim_pkg::*;
(
  input  logic              clk,        // 80 MHz
  input  logic              rst_n,
  input  logic              sreset,
  input  logic              sclk_sel,   // 1: 80 Mb/s, 0: 40 Mb/s
  input  logic              valid,
  input  logic [WORD_W-1:0] word,
  output logic              ready,
  output logic              ds_data,
  output logic              ds_strobe,
  output logic              frame_done  // pulses when a stop bit has been sent
);
  localparam int unsigned FRAME = WORD_W + 3;
  logic [FRAME-1:0] shreg;
  logic [5:0]       bits_left;
  logic             div;
  logic             tick;
  logic             next_bit;

  assign ready    = (bits_left == '0);
  assign tick     = sclk_sel || div;
  assign next_bit = shreg[FRAME-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0; bits_left <= '0; div <= 1'b0;
      ds_data <= 1'b0; ds_strobe <= 1'b0; frame_done <= 1'b0;
    end else if (sreset) begin
      shreg <= '0; bits_left <= '0; div <= 1'b0;
      ds_data <= 1'b0; ds_strobe <= 1'b0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (ready) begin
        div <= 1'b0;
        if (valid) begin
          shreg     <= {1'b1, word, ^word, 1'b0};
          bits_left <= 6'(FRAME);
        end
      end else begin
        div <= ~div;
        if (tick) begin
          ds_data <= next_bit;
          if (next_bit == ds_data) ds_strobe <= ~ds_strobe;
          shreg     <= {shreg[FRAME-2:0], 1'b0};
          bits_left <= bits_left - 1'b1;
          if (bits_left == 6'd1) frame_done <= 1'b1;
        end
      end
    end
  end

  // Data/Strobe rule: never both lines change in the same clock
  a_ds_one_edge: assert property (@(posedge clk) disable iff (!rst_n || sreset)
                   !($changed(ds_data) && $changed(ds_strobe)));
endmodule
