// buffer_mux -- the Multiplexer between Write Control, Read Control and the
// single-port ZBT SRAM of the L1 buffer.
//
// The SRAM and this block run on the 80 MHz clock.  A phase bit splits every
// 40 MHz system cycle into a write slot (phase 0) and a read slot (phase 1),
// so one write and one read fit into each 40 MHz cycle, as the document
// describes.  In the write slot a pending write request is sent to the SRAM
// and acknowledged with wr_ack; its data, extended by four even byte-parity
// bits, is pipelined by one clock and driven on the data bus in the next
// cycle, which is when a flow-through ZBT SRAM expects write data.  In the
// read slot a pending read request is issued once; the SRAM returns the word
// two clocks later, when it is captured, its byte parity is checked and
// rd_valid pulses for one clock with rd_data and the per-byte mismatch
// rd_par_err.  The requester keeps rd_req high until it sees rd_valid and
// keeps wr_req high until wr_ack.
// The slot split, the flow-through timing and the separate in/out/enable data
// pins (the board's bidirectional bus) are this design's choices.
module buffer_mux
  import btim_pkg::*;
(
  input  logic              clk,        // 80 MHz
  input  logic              rst_n,
  output logic              phase,      // 0: write slot, 1: read slot
  // write side
  input  logic              wr_req,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WORD_W-1:0] wr_data,
  output logic              wr_ack,
  // read side
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_valid,
  output logic [WORD_W-1:0] rd_data,
  output logic [PAR_W-1:0]  rd_par_err,
  // ZBT SRAM
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_we_n,
  output logic [MEM_W-1:0]  sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [MEM_W-1:0]  sram_dq_i
);
  logic [MEM_W-1:0] wdata_pipe;
  logic             wr_issued;     // write address went out last edge
  logic             rd_issued;     // read address went out last edge
  logic             rd_wait;       // SRAM is returning data this cycle
  logic             rd_pending;

  assign wr_ack = (phase == 1'b0) && wr_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= 1'b0;
      sram_addr  <= '0;
      sram_we_n  <= 1'b1;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      wdata_pipe <= '0;
      wr_issued  <= 1'b0;
      rd_issued  <= 1'b0;
      rd_wait    <= 1'b0;
      rd_pending <= 1'b0;
      rd_valid   <= 1'b0;
      rd_data    <= '0;
      rd_par_err <= '0;
    end else begin
      phase     <= ~phase;
      sram_we_n <= 1'b1;
      wr_issued <= 1'b0;
      rd_issued <= 1'b0;
      rd_valid  <= 1'b0;
      // address phase
      if (wr_ack) begin
        sram_addr  <= wr_addr;
        sram_we_n  <= 1'b0;
        wdata_pipe <= {byte_parity(wr_data), wr_data};
        wr_issued  <= 1'b1;
      end else if (phase && rd_req && !rd_pending && !rd_valid) begin
        sram_addr  <= rd_addr;
        rd_issued  <= 1'b1;
        rd_pending <= 1'b1;
      end
      // write data one clock after its address
      sram_dq_oe <= wr_issued;
      if (wr_issued) sram_dq_o <= wdata_pipe;
      // read data one clock after the SRAM registered the address
      rd_wait <= rd_issued;
      if (rd_wait) begin
        rd_valid   <= 1'b1;
        rd_pending <= 1'b0;
        rd_data    <= sram_dq_i[WORD_W-1:0];
        rd_par_err <= byte_parity(sram_dq_i[WORD_W-1:0]) ^ sram_dq_i[MEM_W-1:WORD_W];
      end
    end
  end

  // the bus is never driven in a cycle in which read data is expected
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n) !(sram_dq_oe && rd_wait));
endmodule
