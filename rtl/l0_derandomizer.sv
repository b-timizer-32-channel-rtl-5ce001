// l0_derandomizer -- derandomizing "FIFO" for L0 triggers.
//
// The FIFO carries no data, only the fact that an L0 accept arrived, so it is
// a counter of pending triggers: l0_trigger increments it and pop (the Write
// Control taking the next event) decrements it; both in the same cycle leave
// it unchanged.  not_empty tells the Write Control that an event is waiting.
// That the FIFO is a counter follows the document; its depth (DEPTH), the
// full watermark (FULL_MARK) and the overflow rule are this design's choices:
// full is asserted while FULL_MARK or more triggers are pending, and a trigger
// arriving while DEPTH-1 are pending sets the sticky overflow flag (that
// trigger is lost) until sreset or power-up reset.
// Timing: one clock per update, outputs registered except not_empty/full.
module l0_derandomizer #(
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned FULL_MARK = 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sreset,      // synchronous reset (L1 reset / command Rst)
  input  logic l0_trigger,  // one-cycle pulse per L0 accept
  input  logic pop,         // Write Control starts an event
  output logic not_empty,
  output logic full,
  output logic overflow,
  output logic [$clog2(DEPTH)-1:0] count
);
  localparam int unsigned CW = $clog2(DEPTH);
  logic push_ok;

  assign push_ok   = l0_trigger && (count != CW'(DEPTH - 1));
  assign not_empty = (count != '0);
  assign full      = (count >= CW'(FULL_MARK));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (sreset) begin
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (push_ok && !(pop && not_empty)) count <= count + 1'b1;
      else if (!push_ok && pop && not_empty) count <= count - 1'b1;
      if (l0_trigger && !push_ok) overflow <= 1'b1;
    end
  end
endmodule
