// l1_buffer_occupation -- fill state of the L1 buffer.
//
// The L1 buffer holds 2**PTR_W event slots.  Slots from the L1 Pointer up to
// (not including) the L0 Pointer hold events still waiting for their L1
// decision.  The buffer is full when the L0 Pointer has wrapped around and
// one more slot would make it reach the L1 Pointer; then the Write Control
// must not write a new slot.  The "one slot kept free" rule is this design's
// reading of "L0 Pointer wraps around and reaches the L1 Pointer".
// Purely combinational.
module l1_buffer_occupation #(
  parameter int unsigned PTR_W = 12
) (
  input  logic [PTR_W-1:0] l0_ptr,
  input  logic [PTR_W-1:0] l1_ptr,
  output logic [PTR_W-1:0] occupancy,
  output logic             full
);
  assign occupancy = l0_ptr - l1_ptr;
  assign full      = (occupancy == {PTR_W{1'b1}});
endmodule
