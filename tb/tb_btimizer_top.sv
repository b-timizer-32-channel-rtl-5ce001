// tb_btimizer_top -- end-to-end test of the B-Timizer FPGA logic at its
// default sizes (4K event slots of 64 words, 256K-word buffer).
// Around the design: the TDC model (sees L0 triggers while Ena is set), the
// ZBT SRAM model, a TTC Channel B transmitter, a JTAG master and a DS-link
// receiver.  The testbench keeps a list of the L0 events in slot order and,
// for every event the L1 accepts, compares the serial output with the event
// it expects.  Phases: plain events at 80 and 40 Mb/s with L1 rejects in
// between; merged hits; MaxEvt overflow; test data; event ID mismatch; a
// corrected single-bit and an uncorrectable broadcast error; a parity error
// injected in the SRAM; L1 FIFO watermark (short events); readout through the
// JTAG Event data register; Ena = 0 test records; filling all 4K slots so
// the buffer is full, with the dropped events replayed as empty events; then,
// each followed by an L1 reset, L1 buffer overflow (over 63 dropped events),
// L1 FIFO overflow and L0 derandomizer full/overflow, seen in the JTAG error
// flags.  Every mechanism is counted and one that never happened is a failure.
// The design is observed only at its ports (serial output, JTAG, SRAM bus);
// the one exception is a bit flipped inside the SRAM model to make a parity
// error.
module tb_btimizer_top;
  import btim_pkg::*;
  logic clk = 0, rst_n = 0, l0_trigger = 0, ttc_chb = 1;
  logic tdc_valid, tdc_get, tdc_reset, tdc_bunch_reset, tdc_event_reset;
  logic [31:0] tdc_data;
  logic [ADDR_W-1:0] sram_addr;
  logic sram_we_n, sram_dq_oe;
  logic [MEM_W-1:0] sram_dq_o, sram_dq_i;
  logic ds_data, ds_strobe;
  logic tck = 0, tms = 1, tdi = 0, tdo;
  logic test_mem_write, test_mem_read, test_error;
  int checks = 0, failures = 0;

  btimizer_top dut (.*);
  // The testbench sees the design only through its ports: it keeps its own
  // copy of the Command register and its own 40 MHz phase (an L0 trigger is
  // held for two clocks, so any phase samples it once).
  cmd_reg_t cmd_sh = '0;
  logic ph = 1'b0, rx_hold = 1'b0;
  always @(posedge clk) ph <= ~ph;
  hptdc_model #(.TDC_ID(4'h5), .HIT_MOD(12)) u_tdc (.clk, .rst_n, .ce40(ph),
    .l0_trigger(l0_trigger && cmd_sh.ena), .get(tdc_get), .valid(tdc_valid), .data(tdc_data));
  zbt_sram_model #(.AW(ADDR_W), .DW(MEM_W)) u_sram (.clk, .addr(sram_addr), .we_n(sram_we_n),
    .dq_i(sram_dq_o), .dq_o(sram_dq_i));

  always #6.25 clk = ~clk;     // 80 MHz
  initial begin #60000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", m, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_reject = 0, n_merge = 0, n_evt_ovf = 0, n_test = 0, n_idmis = 0, n_corr = 0, n_bcerr = 0,
      n_par = 0, n_l1ff = 0, n_jtagro = 0, n_ena0 = 0, n_buffull = 0, n_sclk40 = 0, n_sclk80 = 0,
      n_bcr = 0, n_ecr = 0, n_events = 0, n_l1ffovf = 0, n_l1bufovf = 0, n_l0ffovf = 0;

  // broadcast resets passed on to the TDC (pulses of two clocks)
  logic bcr_q = 0, ecr_q = 0;
  always @(posedge clk) begin
    bcr_q <= tdc_bunch_reset; ecr_q <= tdc_event_reset;
    if (rst_n && tdc_bunch_reset && !bcr_q) n_bcr++;
    if (rst_n && tdc_event_reset && !ecr_q) n_ecr++;
  end

  // ---------------- DS receiver ----------------
  logic d_q = 0, s_q = 0;
  logic [34:0] rx;
  int nbits = 0;
  logic [31:0] rxq [$];
  always @(posedge clk) begin
    if (rx_hold) begin                           // around a reset the link restarts
      nbits = 0; d_q <= ds_data; s_q <= ds_strobe;
    end else if (rst_n) begin
      if (ds_data != d_q || ds_strobe != s_q) begin
        rx = {rx[33:0], ds_data};
        nbits++;
        if (nbits == 35) begin
          check(rx[34] && !rx[0] && rx[1] == ^rx[33:2], "serial frame bits");
          rxq.push_back(rx[33:2]);
          if (cmd_sh.sclk_sel) n_sclk80++; else n_sclk40++;
          nbits = 0;
        end
      end
      d_q <= ds_data; s_q <= ds_strobe;
    end
  end

  // ---------------- TTC Channel B ----------------
  function automatic logic [4:0] checkbits(logic [7:0] d);
    return {^d, ^{d[3], d[2], d[1], d[0]}, ^{d[6], d[5], d[4], d[0]},
            ^{d[7], d[5], d[4], d[2], d[1]}, ^{d[7], d[6], d[4], d[3], d[1]}};
  endfunction
  task automatic bcast(logic [7:0] cmd, logic [12:0] flip = '0);
    logic [12:0] f = {cmd, checkbits(cmd)} ^ flip;
    @(negedge clk);
    ttc_chb = 0; repeat (4) @(negedge clk);      // start + format
    for (int i = 12; i >= 0; i--) begin ttc_chb = f[i]; repeat (2) @(negedge clk); end
    ttc_chb = 1; repeat (6) @(negedge clk);
  endtask
  task automatic l1_accept(logic [1:0] id, logic [12:0] flip = '0);
    bcast({2'b01, 1'b1, 3'b000, id}, flip);
  endtask
  task automatic l1_reject();
    bcast(8'b0100_0000); n_reject++;
  endtask

  // ---------------- JTAG master ----------------
  task automatic tcyc(bit m, bit d, output bit o);
    tms = m; tdi = d; repeat (3) @(negedge clk);
    o = tdo; tck = 1; repeat (3) @(negedge clk); tck = 0;
  endtask
  task automatic scan_ir(logic [3:0] v);
    bit o;
    tcyc(1, 0, o); tcyc(1, 0, o); tcyc(0, 0, o); tcyc(0, 0, o);
    for (int i = 0; i < 4; i++) tcyc(i == 3, v[i], o);
    tcyc(1, 0, o); tcyc(0, 0, o);
  endtask
  task automatic scan_dr(int n, logic [31:0] v, output logic [31:0] got);
    bit o;
    got = '0;
    tcyc(1, 0, o); tcyc(0, 0, o); tcyc(0, 0, o);
    for (int i = 0; i < n; i++) begin tcyc(i == n - 1, v[i], o); got[i] = o; end
    tcyc(1, 0, o); tcyc(0, 0, o);
  endtask
  task automatic cmd_set(logic [11:0] b);
    logic [31:0] g; scan_ir(IR_CMD_SET); scan_dr(12, 32'(b), g); cmd_sh = cmd_sh | b;
  endtask
  task automatic cmd_clr(logic [11:0] b);
    logic [31:0] g; scan_ir(IR_CMD_RESET); scan_dr(12, 32'(b), g); cmd_sh = cmd_sh & ~b;
  endtask

  // ---------------- scoreboard of L0 events (slot order) ----------------
  typedef struct { int tdc_ev; logic [11:0] evid; bit merge; int maxh; int test_max; bit ena; } l0ev_t;
  l0ev_t evq [$];
  int tdc_ev_next = 0;
  int slot_next = 0;                  // L0 Pointer as the testbench expects it
  logic [11:0] evid_next;
  localparam logic [11:0] BTID = 12'h9A7, OFFS = 12'h010;

  task automatic l0(int gap = 40);
    l0ev_t e;
    e.tdc_ev = cmd_sh.ena ? tdc_ev_next : -1;
    if (cmd_sh.ena) tdc_ev_next++;
    slot_next = (slot_next + 1) % 4096;
    e.evid = evid_next; evid_next++;
    e.merge = cmd_sh.merg_en; e.maxh = int'(max_hits(cmd_sh.max_evt));
    e.test_max = int'(max_test(cmd_sh.test_id)); e.ena = cmd_sh.ena;
    evq.push_back(e);
    @(negedge clk); l0_trigger = 1; repeat (2) @(negedge clk); l0_trigger = 0;
    repeat (gap) @(negedge clk);
  endtask

  // pull one event (up to and including trailer / Errors word) from the serial stream
  task automatic get_event(output logic [31:0] ws [$]);
    int n = 0;
    ws.delete();
    forever begin
      while (rxq.size() == 0 && n < 200000) begin @(negedge clk); n++; end
      if (rxq.size() == 0) begin check(0, "event arrives"); return; end
      ws.push_back(rxq.pop_front());
      if (ws[$][31:28] == WT_BT_TRAIL) begin
        if (ws[$][11]) begin
          while (rxq.size() == 0 && n < 200000) begin @(negedge clk); n++; end
          if (rxq.size() != 0) ws.push_back(rxq.pop_front());
        end
        return;
      end
    end
  endtask

  // check one received event against the scoreboard entry
  task automatic check_event(logic [31:0] ws [$], l0ev_t e, bit exp_err, string tag);
    logic [31:0] h, t;
    int nh, ns, nw;
    n_events++;
    if (ws.size() < 2) begin check(0, {tag, ": too short"}); return; end
    h = ws[0];
    t = (ws[$][31:28] == WT_ERRORS) ? ws[ws.size() - 2] : ws[$];
    check(h[31:24] == {4'b1010, BTID[3:0]}, {tag, ": header type / ID"});
    check(h[23:12] == e.evid, {tag, ": header event ID"});
    check(t[31:24] == {4'b1101, BTID[3:0]} && t[23:12] == e.evid && t[7:0] == BTID[11:4], {tag, ": trailer"});
    check(t[11] == exp_err, {tag, ": error detected bit"});
    check((ws[$][31:28] == WT_ERRORS) == t[11], {tag, ": Errors word present iff flagged"});
    if (h[10]) begin
      n_l1ff++;
      check(ws.size() == 2 + int'(t[11]), {tag, ": short event"});
      return;
    end
    nw = ws.size() - 1 - int'(t[11]);        // words up to the trailer
    check(int'(h[7:0]) == nw + 1, {tag, ": header word count"}); if (int'(h[7:0]) != nw + 1) $display("wc %0d nw %0d", h[7:0], nw);
    if (!e.ena) begin
      n_ena0++;
      check(h[11], {tag, ": Ena=0 empty flag"});
      for (int k = 1; k < nw; k++) check(ws[k] == {4'b1100, 28'(1) << ((k - 1) % 28)}, {tag, ": test word"});
      n_test += nw - 1;
      return;
    end
    nh = u_tdc.nhits(e.tdc_ev);
    check(ws[1] == u_tdc.word_of(e.tdc_ev, 0), {tag, ": TDC header"});
    ns = e.merge ? (nh + 1) / 2 : nh;
    if (ns > e.maxh) ns = e.maxh;
    check(h[8] == (e.merge ? (nh > 2 * e.maxh) : (nh > e.maxh)), {tag, ": event overflow flag"});
    if (h[8]) n_evt_ovf++;
    for (int k = 0; k < ns; k++) begin
      if (e.merge) begin
        automatic logic [31:0] a = u_tdc.word_of(e.tdc_ev, 1 + 2 * k);
        check(ws[2 + k][27] && ws[2 + k][12:0] == {a[23:19], a[10:8], a[7:3]}, {tag, ": merged word"});
        n_merge++;
      end else check(ws[2 + k] == u_tdc.word_of(e.tdc_ev, 1 + k), {tag, ": hit word"});
    end
    check(ws[2 + ns] == u_tdc.word_of(e.tdc_ev, nh + 1), {tag, ": TDC trailer"});
    for (int k = 3 + ns; k < nw; k++) begin
      check(ws[k] == {4'b1100, 28'(1) << ((k - 3 - ns) % 28)}, {tag, ": test word"});
      n_test++;
    end
    check(nw - 3 - ns <= e.test_max, {tag, ": test word count"});
  endtask

  task automatic accept_and_check(bit exp_err = 0, string tag = "event", logic [12:0] flip = '0);
    logic [31:0] ws [$];
    l0ev_t e = evq.pop_front();
    l1_accept(e.evid[1:0], flip);
    get_event(ws);
    check_event(ws, e, exp_err, tag);
  endtask

  // L1 reset broadcast: the testbench forgets all pending events
  task automatic l1_reset();
    rx_hold = 1;
    bcast(8'b0000_0100);
    rx_hold = 0;
    evq.delete(); rxq.delete();
    evid_next = OFFS; slot_next = 0;
  endtask
  task automatic check_flags_clear();
    logic [31:0] g;
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);     // clear what was latched before the reset
    scan_dr(12, 0, g);
    check(g[11:0] == 0, "no error flags after L1 reset");
  endtask

  initial begin
    logic [31:0] g, ws [$];
    l0ev_t e;
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    // ---- configuration over JTAG ----
    begin bit o; repeat (5) tcyc(1, 0, o); tcyc(0, 0, o); end
    scan_ir(IR_IDCODE);   scan_dr(12, 32'(BTID), g);
    scan_ir(IR_EVOFFSET); scan_dr(12, 32'(OFFS), g);
    scan_ir(IR_VERSION);  scan_dr(12, 0, g);  check(g[11:0] == 12'h001, "version code over JTAG");
    rx_hold = 1;
    cmd_set(12'h001); cmd_clr(12'h001);          // Rst pulse: counters load the offset
    rx_hold = 0;
    evid_next = OFFS; slot_next = 0;
    cmd_set(12'h01E);                            // Ena, SclkSel = 80 Mb/s, MaxEvt = 3
    // ---- plain events, with rejects in between ----
    for (int i = 0; i < 8; i++) l0();
    for (int i = 0; i < 8; i++) begin
      if (i % 3 == 2) begin void'(evq.pop_front()); l1_reject(); end
      else accept_and_check(0, "plain80");
    end
    // ---- 40 Mb/s ----
    cmd_clr(12'h004);
    for (int i = 0; i < 3; i++) begin l0(); accept_and_check(0, "plain40"); end
    cmd_set(12'h004);
    // ---- merged hits, then MaxEvt = 7 ----
    cmd_set(12'h200);
    for (int i = 0; i < 4; i++) begin l0(); accept_and_check(0, "merged"); end
    cmd_clr(12'h200); cmd_clr(12'h018);          // MaxEvt = 0: 7 hits
    for (int i = 0; i < 6; i++) begin
      l0();
      e = evq[0];
      accept_and_check(u_tdc.nhits(e.tdc_ev) > 7, "maxevt");
    end
    cmd_set(12'h018);
    // ---- test data ----
    cmd_set(12'h040);                            // TestId = 2: up to 32 words
    for (int i = 0; i < 4; i++) begin l0(); accept_and_check(0, "testdata"); end
    cmd_clr(12'h040);
    // ---- event ID mismatch ----
    l0();
    e = evq.pop_front();
    l1_accept(e.evid[1:0] ^ 2'b01);
    get_event(ws); check_event(ws, e, 1, "idmismatch");
    if (ws[$][6] && ws[ws.size() - 2][8]) n_idmis++;
    // ---- single-bit broadcast error is corrected ----
    l0(); accept_and_check(0, "bcast-corrected", 13'b0_0100_0000_0000); n_corr++;
    // ---- bunch count and event count reset: passed to the TDC, event ID reloaded ----
    begin
      int b0 = n_bcr, e0 = n_ecr;
      bcast(8'b0000_0011);
      check(n_bcr == b0 + 1 && n_ecr == e0 + 1, "TDC bunch and event count reset pulses");
    end
    evid_next = OFFS;
    for (int i = 0; i < 2; i++) begin l0(); accept_and_check(0, "after-ec-reset"); end
    // ---- parity error injected in the stored TDC header ----
    l0(200);
    u_sram.mem[{12'(slot_next - 1), 6'd1}][9] ^= 1'b1;
    e = evq.pop_front();
    l1_accept(e.evid[1:0]);
    get_event(ws);
    check(ws.size() > 2 && ws[$][31:28] == WT_ERRORS && ws[$][17] && ws[ws.size() - 2][10], "parity error reported");
    if (ws[$][19:16] != 0) n_par++;
    // ---- L1 FIFO watermark: 15 accepts at 40 Mb/s ----
    cmd_clr(12'h004);
    // events written while the FIFO is at its watermark carry the flag
    for (int i = 0; i < 13; i++) l0(10);
    for (int i = 0; i < 13; i++) begin e = evq[i]; l1_accept(e.evid[1:0]); end
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(g[6] && !g[7], "JTAG error flags: L1 FIFO at watermark");
    for (int i = 0; i < 2; i++) l0(10);
    for (int i = 13; i < 15; i++) begin e = evq[i]; l1_accept(e.evid[1:0]); end
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(!g[7], "JTAG error flags: L1 FIFO not overflowed");
    for (int i = 0; i < 15; i++) begin
      get_event(ws);
      e = evq.pop_front();
      check_event(ws, e, ws[0][10], "fifo-watermark");
    end
    cmd_set(12'h004);
    // ---- readout through the JTAG Event data register ----
    cmd_set(12'h100);
    scan_ir(IR_EVDATA);
    scan_dr(32, 0, g);                           // discard the last monitored serial word
    l0(); e = evq.pop_front(); l1_accept(e.evid[1:0]);
    ws.delete();
    for (int k = 0; k < 200 && !(ws.size() > 0 && ws[$][31:28] == WT_BT_TRAIL); k++) begin
      scan_dr(32, 0, g);
      if (g != 0) begin ws.push_back(g); n_jtagro++; end
    end
    check_event(ws, e, 0, "jtag-readout");
    cmd_clr(12'h100);
    // ---- uncorrectable broadcast error ----
    l0();
    bcast(8'b0100_0000, 13'b1_1000_0000_0000);  // double error: dropped
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(g[8] && g[11], "JTAG error flags: broadcast parity / uncorrectable");
    e = evq.pop_front();                         // that decision was lost: resync with an L1 reset
    l1_accept(e.evid[1:0]);
    get_event(ws); check_event(ws, e, 1, "after-bcast-error");
    if (ws[$][9]) n_bcerr++;
    rx_hold = 1;
    bcast(8'b0000_0100);                         // L1 reset (also loads the event ID offset)
    rx_hold = 0;
    evid_next = OFFS; slot_next = 0;
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);     // read once to clear the latched flags
    scan_dr(12, 0, g);
    check(!g[11], "L1 reset clears the uncorrectable-error flag");
    // ---- Ena = 0: test records with 63 words ----
    cmd_clr(12'h002); cmd_set(12'h080);          // TestId = 4
    for (int i = 0; i < 2; i++) begin l0(200); accept_and_check(1, "ena0"); end
    cmd_clr(12'h080);
    // ---- fill all slots: the buffer gets full ----
    for (int i = 0; i < 4095 + 3; i++) l0(6);
    repeat (100) @(negedge clk);
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(g[2], "JTAG error flag: L1 buffer full");
    cmd_set(12'h002);                            // Ena again: the replayed events report buffer full
    for (int i = 0; i < 4; i++) begin void'(evq.pop_front()); l1_reject(); end
    repeat (100) @(negedge clk);
    // skip to the last four slots, then accept the three replayed empty events
    for (int i = 4; i < 4091; i++) begin void'(evq.pop_front()); bcast(8'b0100_0000); end
    n_reject += 4087;
    for (int i = 0; i < 4; i++) begin e = evq[0]; accept_and_check(1, "last-slots"); end
    for (int i = 0; i < 3; i++) begin
      e = evq[0];
      accept_and_check(1, "replayed-empty");
      n_buffull++;
    end
    check(evq.size() == 0, "all events accounted for");
    repeat (200) @(negedge clk);
    check(rxq.size() == 0, "no stray output words");
    // ---- L1 buffer overflow: more dropped events than the 6-bit counter holds ----
    l1_reset();
    cmd_clr(12'h002);                            // Ena = 0, no test data
    for (int i = 0; i < 4095 + 64; i++) l0(6);
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(g[2] && g[4], "JTAG error flags: L1 buffer full and overflow");
    if (g[4]) n_l1bufovf++;
    l1_reset();
    check_flags_clear();
    // ---- L1 FIFO overflow: 17 accepts while the output runs at 40 Mb/s ----
    cmd_set(12'h002); cmd_clr(12'h004);
    for (int i = 0; i < 17; i++) l0(10);
    for (int i = 0; i < 17; i++) begin e = evq[i]; l1_accept(e.evid[1:0]); end
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(g[6] && g[7], "JTAG error flags: L1 FIFO full and overflow");
    if (g[7]) n_l1ffovf++;
    for (int i = 0; i < 17; i++) begin
      get_event(ws);
      e = evq.pop_front();
      check(ws[0][23:12] == e.evid, "event after L1 FIFO overflow");
      if (i == 16) check(ws[$][31:28] == WT_ERRORS && ws[$][8], "Errors word: L1 FIFO overflow");
    end
    l1_reset();
    check_flags_clear();
    // ---- L0 derandomizer full and overflow: triggers in every 40 MHz cycle ----
    cmd_set(12'h004);
    for (int i = 0; i < 24; i++) l0(0);
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(g[1] && g[3], "JTAG error flags: L0 FIFO full and overflow");
    if (g[3]) n_l0ffovf++;
    repeat (20000) @(negedge clk);
    l1_reset();
    check_flags_clear();
    // ---- every mechanism happened ----
    check(n_reject > 0, "L1 reject");        check(n_merge > 0, "merge");
    check(n_evt_ovf > 0, "event overflow");  check(n_test > 0, "test data");
    check(n_idmis > 0, "event ID mismatch"); check(n_corr > 0, "broadcast correction");
    check(n_bcerr > 0, "broadcast error");   check(n_par > 0, "parity error");
    check(n_l1ff > 0, "L1 FIFO full");       check(n_jtagro > 0, "JTAG readout");
    check(n_ena0 > 0, "Ena = 0 records");    check(n_buffull > 0, "buffer full");
    check(n_sclk40 > 0 && n_sclk80 > 0, "both serial rates");
    check(n_l1bufovf > 0, "L1 buffer overflow"); check(n_l1ffovf > 0, "L1 FIFO overflow");
    check(n_l0ffovf > 0, "L0 FIFO overflow");
    check(n_ecr > 0 && n_bcr > 0, "resets passed to the TDC");
    $display("l1bufovf=%0d l1ffovf=%0d l0ffovf=%0d", n_l1bufovf, n_l1ffovf, n_l0ffovf);
    $display("events=%0d rejects=%0d merged=%0d evt_ovf=%0d test=%0d idmis=%0d corr=%0d bcerr=%0d par=%0d l1ff=%0d jtagro=%0d ena0=%0d buffull=%0d f40=%0d f80=%0d",
      n_events, n_reject, n_merge, n_evt_ovf, n_test, n_idmis, n_corr, n_bcerr, n_par, n_l1ff, n_jtagro, n_ena0, n_buffull, n_sclk40, n_sclk80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
