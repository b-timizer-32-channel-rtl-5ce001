// tb_write_control -- the Write Control fed by the TDC model, with a
// testbench memory on its write port.  After every event the 64-word slot is
// rebuilt from the TDC model's event and the Command register settings and
// compared word by word (the TDC model only sees triggers while Ena is set): plain hits, the MaxEvt limit with Event overflow,
// merged hits, test data, Ena = 0 with TestId = 4, flushing while the buffer
// is full with later empty events, and the memory-full counter overflow.
// It also checks that hits are taken at one word per 40 MHz cycle.
module tb_write_control;
  import btim_pkg::*;
  localparam int HM = 12;
  logic clk = 0, rst_n = 0, sreset = 0, ec_reset = 0, phase = 0;
  cmd_reg_t cmd = '0;
  logic [11:0] btid = 12'h7A3, evid_offset = 12'h100;
  int pend_cnt = 0;
  logic l0_pending, l0_pop, slot_done, buf_full = 0, l1ff_full = 0, l0_trig = 0;
  logic [PTR_W-1:0] l0_ptr = '0;
  logic tdc_valid, tdc_get, wr_req, wr_ack;
  logic [31:0] tdc_data, wr_data;
  logic [ADDR_W-1:0] wr_addr;
  logic [EVID_W-1:0] evid;
  logic [5:0] memfull_cnt;
  logic l1buf_ovf, ev_overflow, ev_empty;
  logic [31:0] mem [logic [ADDR_W-1:0]];
  int checks = 0, failures = 0, ev_next = 0, n_taken = 0;

  write_control dut (.clk, .rst_n, .sreset, .ec_reset, .ce40(phase), .cmd, .btid, .evid_offset,
    .l0_pending, .l0ff_full(1'b0), .l0_pop, .l0_ptr, .slot_done, .buf_full, .l1ff_full,
    .tdc_valid, .tdc_data, .tdc_get, .wr_req, .wr_addr, .wr_data, .wr_ack,
    .evid, .memfull_cnt, .l1buf_ovf, .ev_overflow, .ev_empty);
  hptdc_model #(.TDC_ID(4'h5), .HIT_MOD(HM)) u_tdc (.clk, .rst_n, .ce40(phase), .l0_trigger(l0_trig && cmd.ena),
    .get(tdc_get), .valid(tdc_valid), .data(tdc_data));

  always #5 clk = ~clk;
  assign l0_pending = pend_cnt != 0;
  assign wr_ack = wr_req && !phase;
  always @(posedge clk) begin
    phase <= ~phase;
    if (wr_ack) mem[wr_addr] = wr_data;
    if (slot_done) l0_ptr <= l0_ptr + 1'b1;
    if (tdc_get && tdc_valid) n_taken++;
    pend_cnt <= pend_cnt + int'(l0_trig && phase) - int'(l0_pop);
  end
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", m, $time); end
  endtask

  task automatic trigger();
    @(negedge clk); while (!phase) @(negedge clk);
    l0_trig = 1; @(negedge clk); @(negedge clk); l0_trig = 0;
  endtask

  task automatic wait_slot();
    int n = 0;
    while (!slot_done && n < 5000) begin @(negedge clk); n++; end
    check(n < 5000, "slot completed");
    @(negedge clk);
    while (wr_req) @(negedge clk);
  endtask

  // compare slot s with the TDC event ev under the current command settings
  task automatic check_event(int s, int ev, int evid_exp);
    automatic int n = u_tdc.nhits(ev);
    automatic int lim = int'(max_hits(cmd.max_evt));
    automatic int ns, o, nt;
    automatic logic [31:0] h = mem[{12'(s), 6'd0}];
    automatic bit ovf;
    ns = cmd.merg_en ? (n + 1) / 2 : n;
    ovf = ns > lim;
    if (cmd.merg_en) ns = (n > 2 * lim) ? lim : (n + 1) / 2; else if (ovf) ns = lim;
    if (cmd.merg_en) ovf = n > 2 * lim;
    check(mem[{12'(s), 6'd1}] == u_tdc.word_of(ev, 0), "TDC header at +1");
    for (int k = 0; k < ns; k++) begin
      automatic logic [31:0] w = mem[{12'(s), 6'(2 + k)}];
      if (!cmd.merg_en) check(w == (u_tdc.word_of(ev, 1 + k) & 32'hF7FF_FFFF), "hit word");
      else begin
        automatic logic [31:0] a = u_tdc.word_of(ev, 1 + 2 * k), b = u_tdc.word_of(ev, 2 + 2 * k);
        automatic bit bv = (2 * k + 1) < n;
        automatic logic [7:0] r = u_tdc.word_of(ev, 1)[18:11];
        check(w[31:27] == 5'b01001, "merged type");
        check(w[12:0] == {a[23:19], a[10:8], a[7:3]}, "merged hit A");
        check(w[25:13] == (bv ? {b[23:19], b[10:8], b[7:3]} : 13'd0), "merged hit B");
        check(w[26] == ((a[18:11] != r) || (bv && b[18:11] != r)), "coarse error bit");
      end
    end
    check(mem[{12'(s), 6'(2 + ns)}] == u_tdc.word_of(ev, n + 1), "TDC trailer");
    o = 3 + ns;
    nt = int'(h[7:0]) - 1 - o;
    check(nt >= 0 && nt <= int'(max_test(cmd.test_id)), "test word count in range");
    for (int k = 0; k < nt; k++)
      check(mem[{12'(s), 6'(o + k)}] == {4'b1100, 28'(1) << (k % 28)}, "test word pattern");
    check(h[31:28] == 4'b1010 && h[27:24] == btid[3:0], "B-Timizer header type / ID");
    check(h[23:12] == 12'(evid_exp), "event ID");
    check(h[11:8] == {1'b0, l1ff_full, 1'b0, ovf}, "header flags");
  endtask

  initial begin
    int s = 0, id = 0, t0;
    repeat (4) @(negedge clk); rst_n = 1;
    @(negedge clk); sreset = 1; @(negedge clk); sreset = 0;   // loads the event ID offset
    // A: plain hits, MaxEvt = 61
    cmd.ena = 1; cmd.max_evt = 3;
    for (int i = 0; i < 6; i++) begin
      trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    end
    // B: MaxEvt = 7 with larger events
    cmd.max_evt = 0; l1ff_full = 1;
    for (int i = 0; i < 6; i++) begin
      trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    end
    l1ff_full = 0;
    // C: merged data
    cmd.max_evt = 3; cmd.merg_en = 1;
    for (int i = 0; i < 8; i++) begin
      trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    end
    cmd.max_evt = 1;
    for (int i = 0; i < 6; i++) begin
      trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    end
    cmd.merg_en = 0;
    // D: random test data up to 16 / 32 words
    cmd.max_evt = 2;
    for (int i = 0; i < 8; i++) begin
      cmd.test_id = (i < 4) ? 3'd1 : 3'd2;
      trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    end
    cmd.test_id = 0;
    // E: Ena = 0, TestId = 4: header plus 63 test words, TDC untouched
    cmd.ena = 0; cmd.test_id = 4;
    trigger(); wait_slot();
    begin
      automatic logic [31:0] h = mem[{12'(s), 6'd0}];
      check(h[7:0] == 8'd65 && h[11] == 1'b1, "test record: 64 stored words, Empty flag");
      check(h[23:12] == 12'('h100 + id), "test record event ID");
      for (int k = 0; k < 63; k++) check(mem[{12'(s), 6'(1 + k)}] == {4'b1100, 28'(1) << (k % 28)}, "fixed test words");
    end
    s++; id++;
    cmd.ena = 1; cmd.test_id = 0;
    trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    // F: buffer full: three events flushed, written later as empty events
    buf_full = 1;
    t0 = n_taken;
    for (int i = 0; i < 3; i++) trigger();
    repeat (400) @(negedge clk);
    check(memfull_cnt == 3, "memory-full counter");
    check(n_taken - t0 == (u_tdc.nhits(ev_next) + u_tdc.nhits(ev_next + 1) + u_tdc.nhits(ev_next + 2) + 6), "flushed events read from TDC");
    check(int'(l0_ptr) == s, "no slot written while full");
    buf_full = 0;
    for (int i = 0; i < 3; i++) begin
      automatic logic [31:0] h;
      wait_slot();
      h = mem[{12'(s), 6'd0}];
      check(h[11] && h[7:0] == 8'd2 && h[23:12] == 12'('h100 + id), "empty event header");
      s++; id++;
    end
    ev_next += 3;
    check(memfull_cnt == 0, "counter back to zero");
    trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    // event count reset reloads the offset
    @(negedge clk); ec_reset = 1; @(negedge clk); ec_reset = 0; id = 0;
    trigger(); wait_slot(); check_event(s, ev_next, 'h100 + id); s++; ev_next++; id++;
    // G: memory-full counter saturates at 63, then buffer overflow
    cmd.ena = 0;
    buf_full = 1;
    for (int i = 0; i < 64; i++) trigger();
    repeat (100) @(negedge clk);
    check(memfull_cnt == 63, "counter at 63");
    check(l1buf_ovf, "L1 buffer overflow");
    @(negedge clk); sreset = 1; @(negedge clk); sreset = 0;
    check(!l1buf_ovf && memfull_cnt == 0, "reset clears overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
