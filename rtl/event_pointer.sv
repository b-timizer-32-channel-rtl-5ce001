// event_pointer -- event slot pointer of the L1 buffer (L0 Pointer, L1 Pointer).
//
// A wrapping PTR_W-bit counter.  As L0 Pointer it advances each time the
// Write Control has filled (or reserved as empty) one 64-word slot; as L1
// Pointer it advances on every L1 accept and L1 reject.  Both are cleared by
// L1 reset (sreset) and not by the event count reset, as the document states.
// The counter is registered; ptr changes one clock after inc.
module event_pointer #(
  parameter int unsigned PTR_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sreset,
  input  logic             inc,
  output logic [PTR_W-1:0] ptr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ptr <= '0;
    else if (sreset) ptr <= '0;
    else if (inc)    ptr <= ptr + 1'b1;
  end
endmodule
