// zbt_sram_model -- behavioural model of the flow-through ZBT SRAM used as
// L1 buffer (256K x 36 on the board).  Not synthesizable logic of the design:
// the real part is an external memory chip.
// The address and write enable are registered on a rising clock edge; for a
// write the data on dq_i is stored at the next rising edge; for a read the
// word appears on dq_o in the cycle after the address edge (flow-through).
module zbt_sram_model #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 36
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we_n,
  input  logic [DW-1:0] dq_i,
  output logic [DW-1:0] dq_o
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] a_q = '0;
  logic          we_q = 1'b0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we_q) mem[a_q] <= dq_i;
    a_q  <= addr;
    we_q <= !we_n;
  end
  assign dq_o = mem[a_q];
endmodule
