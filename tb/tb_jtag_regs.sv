// tb_jtag_regs -- drives the emulated JTAG port (TAP controller plus
// registers) through real TCK/TMS/TDI sequences and reads TDO: version code,
// bit-selective set and reset of the Command register, ID and offset
// write/read-back, clear-on-read error flags, the JtagRo event data register
// and the one-bit bypass path; then 60 random set/reset scans checked against
// a reference copy of the Command register and 30 random ID, offset and
// error-flag patterns.
module tb_jtag_regs;
  import btim_pkg::*;
  logic clk = 0, rst_n = 0, tck = 0, tms = 1, tdi = 0, tdo;
  tap_state_t state;
  logic tck_rise, tck_fall, tdi_s;
  cmd_reg_t cmd;
  logic [11:0] btid, evid_offset, err_set = '0;
  logic ev_valid = 0, ev_ready, mon_valid = 0;
  logic [31:0] ev_word = '0, mon_word = '0;
  logic [3:0] ir;
  int checks = 0, failures = 0;

  jtag_tap u_tap (.clk, .rst_n, .tck, .tms, .tdi, .state, .tck_rise, .tck_fall, .tdi_s);
  jtag_regs #(.VERSION(12'h001)) dut (.clk, .rst_n, .state, .tck_rise, .tck_fall, .tdi_s, .tdo,
    .cmd, .btid, .evid_offset, .err_set, .flags_clear(1'b0),
    .ev_valid, .ev_word, .ev_ready, .mon_valid, .mon_word, .ir);

  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic tcyc(bit m, bit d, output bit o);
    tms = m; tdi = d; repeat (4) @(negedge clk);
    o = tdo;
    tck = 1; repeat (4) @(negedge clk);
    tck = 0;
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

  initial begin
    logic [31:0] got;
    bit o;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) tcyc(1, 0, o);
    tcyc(0, 0, o);                                  // Run-Test/Idle
    scan_ir(IR_VERSION);
    check(ir == IR_VERSION, "IR loaded");
    scan_dr(12, 0, got);  check(got[11:0] == 12'h001, "version code");
    scan_ir(IR_CMD_SET);
    scan_dr(12, 32'h2A5, got);  check(got[11:0] == 12'h000, "command reads 0 after reset");
    check(cmd == cmd_reg_t'(12'h2A5), "command bits set");
    scan_dr(12, 32'h010, got);  check(got[11:0] == 12'h2A5, "command read back");
    check(cmd == cmd_reg_t'(12'h2B5), "second set ORs");
    scan_ir(IR_CMD_RESET);
    scan_dr(12, 32'h005, got);  check(got[11:0] == 12'h2B5, "command read via reset IR");
    check(cmd == cmd_reg_t'(12'h2B0), "bits reset");
    scan_ir(IR_IDCODE);
    scan_dr(12, 32'hABC, got);  scan_dr(12, 32'hABC, got);
    check(got[11:0] == 12'hABC && btid == 12'hABC, "ID code write / read");
    scan_ir(IR_EVOFFSET);
    scan_dr(12, 32'h123, got);  scan_dr(12, 32'h123, got);
    check(got[11:0] == 12'h123 && evid_offset == 12'h123, "event ID offset");
    // error flags: pulses are latched, reading clears
    @(negedge clk); err_set = 12'h811; @(negedge clk); err_set = 12'h040; @(negedge clk); err_set = 0;
    scan_ir(IR_ERRFLAGS);
    scan_dr(12, 32'hFFF, got);  check(got[11:0] == 12'h851, "error flags latched");
    scan_dr(12, 32'hFFF, got);  check(got[11:0] == 12'h000, "error flags cleared by read");
    // event data register in JtagRo mode (bit 8)
    scan_ir(IR_CMD_SET);  scan_dr(12, 32'h100, got);
    check(cmd.jtag_ro, "JtagRo set");
    @(negedge clk); ev_word = 32'hA5B6_C7D8; ev_valid = 1;
    while (!ev_ready) @(negedge clk);
    @(negedge clk); ev_valid = 0;
    check(!ev_ready, "register holds a word");
    scan_ir(IR_EVDATA);
    scan_dr(32, 32'h0, got);  check(got == 32'hA5B6_C7D8, "event data word");
    check(ev_ready, "register empty after read");
    scan_dr(32, 32'h0, got);  check(got == 32'h0, "zero means no data");
    // JtagRo off: uncorrelated samples of the serial data
    scan_ir(IR_CMD_RESET);  scan_dr(12, 32'h100, got);
    @(negedge clk); mon_word = 32'h1357_9BDF; mon_valid = 1; @(negedge clk); mon_valid = 0;
    scan_ir(IR_EVDATA);
    scan_dr(32, 32'h0, got);  check(got == 32'h1357_9BDF, "sample of output data");
    // random bit-set / bit-reset sequences against a reference copy
    begin
      logic [11:0] ref_cmd, v;
      logic [3:0] op;
      ref_cmd = 12'(cmd);
      for (int i = 0; i < 60; i++) begin
        v = 12'($urandom) & 12'hEFF;             // keep JtagRo as it is
        op = ($urandom % 2) ? IR_CMD_SET : IR_CMD_RESET;
        scan_ir(op);
        scan_dr(12, 32'(v), got);
        check(got[11:0] == ref_cmd, "command captured before update");
        ref_cmd = (op == IR_CMD_SET) ? (ref_cmd | v) : (ref_cmd & ~v);
        check(12'(cmd) == ref_cmd, "command after bit set / reset");
      end
    end
    // random ID / offset values, and random error-flag patterns
    for (int i = 0; i < 30; i++) begin
      automatic logic [11:0] idv = 12'($urandom), ofv = 12'($urandom), ef = 12'($urandom);
      scan_ir(IR_IDCODE);   scan_dr(12, 32'(idv), got);
      check(btid == idv, "ID register updated");
      scan_ir(IR_EVOFFSET); scan_dr(12, 32'(ofv), got);
      check(evid_offset == ofv, "offset register updated");
      @(negedge clk); err_set = ef; @(negedge clk); err_set = 0;
      scan_ir(IR_ERRFLAGS); scan_dr(12, 0, got);
      check(got[11:0] == ef, "error flags pattern latched");
      scan_dr(12, 0, got);
      check(got[11:0] == 0, "error flags cleared");
    end
    // bypass: one bit of delay
    scan_ir(4'b1010);
    scan_dr(8, 32'hB4, got);  check(got[7:0] == 8'h68, "bypass delays by one bit");
    // Test-Logic-Reset selects bypass
    repeat (5) tcyc(1, 0, o);
    check(ir == IR_BYPASS, "reset selects bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
