// tb_read_control -- the Read Control reading slots that the testbench has
// placed in a memory model (with byte parity), fed from a queue of L1 FIFO
// entries, with a randomly stalling output.  For each event the expected
// word stream (header, stored words up to the word count, trailer, Errors
// word when an error is flagged) is built here from the documented formats
// and compared: clean events, event ID mismatch, L1-FIFO-full headers (header
// and trailer only), parity errors in header and data, empty events, the
// FIFO overflow flag and a broadcast error.
module tb_read_control;
  import btim_pkg::*;
  logic clk = 0, rst_n = 0, sreset = 0, ena = 1;
  logic [11:0] btid = 12'hC5E;
  logic fifo_pop, rd_req, rd_valid = 0, out_valid, out_ready = 0;
  logic [ADDR_W-1:0] rd_addr;
  logic [WORD_W-1:0] rd_data = '0, out_word;
  logic [PAR_W-1:0] rd_par_err = '0;
  logic l0ff_ovf = 0, l1buf_ovf = 0, bc_err = 0;
  logic evid_err, hdr_par_err, data_par_err, event_done;
  l1_entry_t q [$];
  l1_entry_t head;
  logic [MEM_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [31:0] got [$];
  int checks = 0, failures = 0;

  read_control dut (.clk, .rst_n, .sreset, .btid, .ena,
    .fifo_not_empty(q.size() != 0), .fifo_data(head), .fifo_pop,
    .rd_req, .rd_addr, .rd_valid, .rd_data, .rd_par_err, .l0ff_ovf, .l1buf_ovf, .bc_err,
    .out_valid, .out_word, .out_ready, .evid_err, .hdr_par_err, .data_par_err, .event_done);

  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", m, $time); end
  endtask

  always_comb head = (q.size() != 0) ? q[0] : '0;

  // memory: answer a read two clocks after it is requested
  int rd_wait = 0;
  always @(posedge clk) begin
    out_ready <= $urandom_range(0, 3) != 0;
    if (fifo_pop) void'(q.pop_front());
    if (out_valid && out_ready) got.push_back(out_word);
    rd_valid <= 1'b0;
    if (rd_req && !rd_valid) begin
      rd_wait++;
      if (rd_wait == 2) begin
        automatic logic [MEM_W-1:0] m = mem.exists(rd_addr) ? mem[rd_addr] : '0;
        rd_valid   <= 1'b1;
        rd_data    <= m[31:0];
        rd_par_err <= byte_parity(m[31:0]) ^ m[35:32];
        rd_wait = 0;
      end
    end
  end

  function automatic logic [35:0] stored(logic [31:0] w);
    return {byte_parity(w), w};
  endfunction

  // place an event: header + n words; returns the expected output stream
  task automatic run_event(int slot, logic [11:0] evid, logic [1:0] ttc_id, int n,
                           logic [3:0] hflags, bit fifo_ovf, int bad_byte_hdr, int bad_word, int bad_byte);
    logic [31:0] exp [$];
    logic [31:0] hdr, w;
    logic [3:0] hp = 0, dp = 0;
    logic [9:0] ef;
    bit idm, short_ev, perr, det;
    hdr = {4'b1010, btid[3:0], evid, hflags, 8'(n + 2)};
    mem[{12'(slot), 6'd0}] = stored(hdr);
    if (bad_byte_hdr >= 0) begin mem[{12'(slot), 6'd0}][8 * bad_byte_hdr] ^= 1'b1; hp[bad_byte_hdr] = 1; end
    exp.push_back(mem[{12'(slot), 6'd0}][31:0]);
    short_ev = hflags[2];
    for (int k = 1; k <= n; k++) begin
      w = $urandom;
      mem[{12'(slot), 6'(k)}] = stored(w);
      if (k == bad_word) begin mem[{12'(slot), 6'(k)}][8 * bad_byte + 3] ^= 1'b1; end
      if (!short_ev) begin
        exp.push_back(mem[{12'(slot), 6'(k)}][31:0]);
        if (k == bad_word) dp[bad_byte] = 1;
      end
    end
    idm  = evid[1:0] != ttc_id;
    ef   = {bc_err, fifo_ovf, hflags[2], idm, l1buf_ovf, l0ff_ovf, hflags[3], hflags[3] & ena, hflags[1], hflags[0]};
    perr = (hp != 0) || (dp != 0);
    det  = (ef != 0) || perr;
    exp.push_back({4'b1101, btid[3:0], exp[0][23:12], det, perr, hflags[2], idm | bc_err, btid[11:4]});
    if (det) exp.push_back({4'b1001, btid[3:0], 4'b0000, dp, hp, 2'b00, ef});
    got.delete();
    @(negedge clk);
    q.push_back('{ptr: 12'(slot), id: ttc_id, ovf: fifo_ovf});
    while (!event_done) @(negedge clk);
    @(negedge clk);
    check(got.size() == exp.size(), $sformatf("word count %0d expected %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("word %0d: %h expected %h", i, got[i], exp[i]));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run_event(5, 12'h345, 2'b01, 7, 4'b0000, 0, -1, 0, 0);      // clean
    run_event(6, 12'h346, 2'b10, 3, 4'b0000, 0, -1, 0, 0);      // clean
    run_event(7, 12'h347, 2'b00, 4, 4'b0000, 0, -1, 0, 0);      // event ID mismatch
    run_event(8, 12'h348, 2'b00, 9, 4'b0100, 0, -1, 0, 0);      // L1 FIFO full: short
    run_event(9, 12'h349, 2'b01, 6, 4'b0000, 0, -1, 3, 1);      // data parity error
    run_event(10, 12'h34A, 2'b10, 2, 4'b0000, 0, 2, 0, 0);     // header parity error
    run_event(11, 12'h34B, 2'b11, 0, 4'b1000, 0, -1, 0, 0);     // empty event
    run_event(12, 12'h34C, 2'b00, 61 + 2, 4'b0001, 1, -1, 0, 0); // full slot, overflow flags
    bc_err = 1; l0ff_ovf = 1;
    run_event(4095, 12'hFFF, 2'b11, 1, 4'b0010, 0, -1, 0, 0);  // broadcast error, L0 FIFO flags
    bc_err = 0; l0ff_ovf = 0;
    for (int i = 0; i < 20; i++) run_event(100 + i, 12'(i), 2'(i), $urandom_range(0, 62), 4'b0000, 0, -1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
