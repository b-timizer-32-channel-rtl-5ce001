// l1_fifo -- 16-deep FIFO of L1-accepted events.
//
// On every L1 accept the L1 Pointer, the 2-bit event ID from the TTC system
// and the current overflow flag are written as one l1_entry_t; the Read
// Control pops entries in order.  full (watermark) is asserted while
// FULL_MARK or more entries are stored; the Write Control copies it into the
// B-Timizer header, which makes the Read Control send header and trailer only.
// overflow becomes set when OVF_MARK entries are stored and stays set until
// reset (L1 reset or command Rst).  Depth 16, watermark 12 and overflow at 15
// are the documented numbers.  A push when the FIFO holds DEPTH entries is
// dropped (design choice).  Storage is a register array; rd_data shows the
// oldest entry combinationally (first-word fall-through).
module l1_fifo
  import btim_pkg::*;
#(
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned FULL_MARK = 12,
  parameter int unsigned OVF_MARK  = 15
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sreset,
  input  logic      push,
  input  l1_entry_t wr_data,   // ovf field is filled in here
  input  logic      pop,
  output l1_entry_t rd_data,
  output logic      not_empty,
  output logic      full,
  output logic      overflow,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  l1_entry_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_push, do_pop;
  l1_entry_t entry;

  assign not_empty = (count != '0);
  assign do_pop    = pop && not_empty;
  assign do_push   = push && (count != (AW+1)'(DEPTH) || do_pop);
  assign full      = (count >= (AW+1)'(FULL_MARK));
  assign rd_data   = mem[rp];

  always_comb begin
    entry     = wr_data;
    entry.ovf = overflow;
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else if (sreset) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (count >= (AW+1)'(OVF_MARK)) overflow <= 1'b1;
    end
  end
endmodule
