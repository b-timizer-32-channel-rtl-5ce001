// tb_workload_l1_latency -- the board's design point: L0 triggers at an
// average rate of 1 MHz and every L1 decision 2 ms after its L0 trigger, so
// about 2000 events wait in the 4K-slot L1 buffer at any time.
// L0 triggers are random, each 40 MHz cycle with probability 1/40; the TDC
// model gives 0..8 hits per event (well inside the 40 buffer writes per
// 1 us).  A decision process sends, in trigger order, each event's L1
// decision on Channel B as soon as 2 ms have passed since its L0 trigger:
// every 25th event is accepted (a 40 kHz L1 rate), the others rejected.
// Every accepted event read from the 80 Mb/s serial output is compared word
// by word with the TDC model's event.  Checks at the end: the number of
// events waiting reached at least 1900 and never 4095, no error was flagged
// (JTAG error flags and no Errors word), and all accepted events arrived.
// The design is seen only at its ports.
module tb_workload_l1_latency;
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

  localparam int    N_EV    = 4000;          // L0 events in the run
  localparam realtime LATENCY = 2ms;
  localparam int    ACC_EVERY = 25;
  localparam logic [11:0] BTID = 12'h3C5, OFFS = 12'h000;

  btimizer_top dut (.*);
  logic ph = 1'b0;
  always @(posedge clk) ph <= ~ph;
  hptdc_model #(.TDC_ID(4'h5), .HIT_MOD(9)) u_tdc (.clk, .rst_n, .ce40(ph),
    .l0_trigger(l0_trigger), .get(tdc_get), .valid(tdc_valid), .data(tdc_data));
  zbt_sram_model #(.AW(ADDR_W), .DW(MEM_W)) u_sram (.clk, .addr(sram_addr), .we_n(sram_we_n),
    .dq_i(sram_dq_o), .dq_o(sram_dq_i));

  always #6.25ns clk = ~clk;     // 80 MHz
  initial begin #8ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", m, $time); end
  endtask

  // ---------------- DS receiver ----------------
  logic d_q = 0, s_q = 0;
  logic [34:0] rx;
  int nbits = 0;
  logic [31:0] rxq [$];
  always @(posedge clk) begin
    if (rst_n) begin
      if (ds_data != d_q || ds_strobe != s_q) begin
        rx = {rx[33:0], ds_data};
        nbits++;
        if (nbits == 35) begin
          check(rx[34] && !rx[0] && rx[1] == ^rx[33:2], "serial frame bits");
          rxq.push_back(rx[33:2]);
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
  task automatic bcast(logic [7:0] cmd);
    logic [12:0] f = {cmd, checkbits(cmd)};
    @(negedge clk);
    ttc_chb = 0; repeat (4) @(negedge clk);      // start + format
    for (int i = 12; i >= 0; i--) begin ttc_chb = f[i]; repeat (2) @(negedge clk); end
    ttc_chb = 1; repeat (2) @(negedge clk);
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

  // ---------------- traffic ----------------
  realtime l0_time [$];          // trigger time of each event waiting for its decision
  int      acc_ev [$];           // accepted events, in order
  int      n_l0 = 0, n_dec = 0, n_acc = 0, n_rx = 0, max_wait = 0;
  bit      l0_done = 0, dec_done = 0;

  task automatic l0_source();
    while (n_l0 < N_EV) begin
      @(negedge clk);
      if ($urandom % 40 == 0) begin
        l0_trigger = 1;
        l0_time.push_back($realtime);
        n_l0++;
        if (n_l0 - n_dec > max_wait) max_wait = n_l0 - n_dec;
        repeat (2) @(negedge clk);
        l0_trigger = 0;
      end else @(negedge clk);
    end
    l0_done = 1;
  endtask

  task automatic l1_source();
    while (n_dec < N_EV) begin
      while (l0_time.size() == 0 || $realtime < l0_time[0] + LATENCY) @(negedge clk);
      void'(l0_time.pop_front());
      if (n_dec % ACC_EVERY == 0) begin
        bcast({2'b01, 1'b1, 3'b000, 2'(OFFS + 12'(n_dec))});
        acc_ev.push_back(n_dec);
        n_acc++;
      end else bcast(8'b0100_0000);
      n_dec++;
    end
    dec_done = 1;
  endtask

  task automatic sink();
    logic [31:0] w, ws [$];
    int ev, nh;
    while (!(dec_done && acc_ev.size() == 0)) begin
      while (acc_ev.size() == 0 && !dec_done) @(negedge clk);
      if (acc_ev.size() == 0) break;
      ev = acc_ev.pop_front();
      ws.delete();
      begin
        int waited = 0;
        while (waited < 400000) begin
          while (rxq.size() == 0 && waited < 400000) begin @(negedge clk); waited++; end
          if (rxq.size() == 0) break;
          w = rxq.pop_front();
          ws.push_back(w);
          if (w[31:28] == WT_BT_TRAIL) break;
        end
      end
      nh = u_tdc.nhits(ev);
      check(ws.size() == nh + 4, "accepted event length");
      if (ws.size() == nh + 4) begin
        check(ws[0] == {4'b1010, BTID[3:0], OFFS + 12'(ev), 4'b0000, 8'(nh + 4)}, "B-Timizer header");
        for (int k = 0; k < nh + 2; k++) check(ws[1 + k] == u_tdc.word_of(ev, k), "TDC word");
        check(ws[nh + 3] == {4'b1101, BTID[3:0], OFFS + 12'(ev), 4'b0000, BTID[11:4]}, "B-Timizer trailer, no error");
      end
      n_rx++;
    end
  endtask

  initial begin
    logic [31:0] g;
    bit o;
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    repeat (5) tcyc(1, 0, o); tcyc(0, 0, o);
    scan_ir(IR_IDCODE);   scan_dr(12, 32'(BTID), g);
    scan_ir(IR_EVOFFSET); scan_dr(12, 32'(OFFS), g);
    scan_ir(IR_CMD_SET);  scan_dr(12, 32'h001, g);      // Rst: counters load the offset
    scan_ir(IR_CMD_RESET); scan_dr(12, 32'h001, g);
    scan_ir(IR_CMD_SET);  scan_dr(12, 32'h01E, g);      // Ena, 80 Mb/s, MaxEvt = 3
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);            // clear what reset left behind
    fork
      l0_source();
      l1_source();
      sink();
    join
    repeat (1000) @(negedge clk);
    check(rxq.size() == 0, "no stray output words");
    check(n_rx == n_acc && n_acc == (N_EV + ACC_EVERY - 1) / ACC_EVERY, "all accepted events received");
    check(max_wait >= 1900 && max_wait < 4095, "events waiting for L1 fit in the buffer");
    scan_ir(IR_ERRFLAGS); scan_dr(12, 0, g);
    check(g[11:0] == 0, "no error flag during the run");
    $display("L0 events=%0d accepted=%0d received=%0d max waiting=%0d time=%0t",
             n_l0, n_acc, n_rx, max_wait, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
