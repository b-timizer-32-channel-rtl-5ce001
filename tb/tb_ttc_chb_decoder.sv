// tb_ttc_chb_decoder -- sends broadcast frames bit by bit (one bit per two
// clocks) and checks: every command decodes to the right L1 accept / reject /
// ID / reset pulse; every single-bit error in the 13 protected bits is
// corrected (or harmless); double errors in the command bits are flagged as
// broadcast parity errors and dropped.  Check bits are computed here from the
// documented bit lists, independently of the design's helper function.
module tb_ttc_chb_decoder;
  logic clk = 0, rst_n = 0, bit_en = 0, chb = 1;
  logic l1_accept, l1_reject, bcnt_reset, ec_reset, l1_reset, bc_par_err, corrected;
  logic [1:0] l1_id;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0, n_ec = 0, n_l1r = 0, n_bcr = 0, n_err = 0, n_corr = 0;
  logic [1:0] last_id;
  int n_undetectable = 0;

  ttc_chb_decoder dut (.clk, .rst_n, .bit_en, .chb, .l1_accept, .l1_reject, .l1_id,
                       .bcnt_reset, .ec_reset, .l1_reset, .bc_par_err, .corrected);
  always #5 clk = ~clk;
  always @(posedge clk) bit_en <= ~bit_en;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", m, $time); end
  endtask

  always @(posedge clk) begin
    if (l1_accept) begin n_acc++; last_id = l1_id; end
    if (l1_reject) n_rej++;
    if (ec_reset) n_ec++;
    if (bcnt_reset) n_bcr++;
    if (l1_reset) n_l1r++;
    if (bc_par_err) n_err++;
    if (corrected) n_corr++;
  end

  function automatic logic [4:0] checkbits(logic [7:0] d);
    logic [4:0] p;
    p[0] = ^{d[7], d[6], d[4], d[3], d[1]};
    p[1] = ^{d[7], d[5], d[4], d[2], d[1]};
    p[2] = ^{d[6], d[5], d[4], d[0]};
    p[3] = ^{d[3], d[2], d[1], d[0]};
    p[4] = ^d;
    return p;
  endfunction

  // send one frame; flip is a 13-bit mask over {cmd[7:0], chk[4:0]}
  task automatic send(logic [7:0] cmd, logic [12:0] flip);
    logic [12:0] f = {cmd, checkbits(cmd)} ^ flip;
    // align to the sampling clock
    @(negedge clk); while (!bit_en) @(negedge clk);
    chb = 0; repeat (2) @(negedge clk);           // start
    chb = 0; repeat (2) @(negedge clk);           // format: short
    for (int i = 12; i >= 0; i--) begin chb = f[i]; repeat (2) @(negedge clk); end
    chb = 1; repeat (2) @(negedge clk);           // stop
    repeat (6) @(negedge clk);                    // idle
  endtask

  task automatic snap(output int a, output int r, output int e, output int l, output int p, output int bb);
    a = n_acc; r = n_rej; e = n_ec; l = n_l1r; p = n_err; bb = n_bcr;
  endtask

  initial begin
    int a, r, e, l, p, bb;
    repeat (4) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      automatic logic [7:0] cmd = 8'($urandom);
      automatic logic [12:0] flip = '0;
      automatic int mode = k % 3;     // 0 clean, 1 single error, 2 double error in command
      if (mode == 1) flip[$urandom_range(0, 12)] = 1'b1;
      if (mode == 2) begin
        automatic int b1 = $urandom_range(5, 12), b2;
        do b2 = $urandom_range(5, 12); while (b2 == b1);
        flip[b1] = 1'b1; flip[b2] = 1'b1;
      end
      snap(a, r, e, l, p, bb);
      send(cmd, flip);
      if (mode == 2 && $onehot(checkbits(cmd ^ flip[12:5]) ^ checkbits(cmd))) begin
        // two command-bit errors whose syndromes add up to a single check
        // bit: with bit 4 covering only the command this looks like a
        // check-bit error and cannot be told from one
        n_undetectable++;
      end else if (mode == 2) begin
        check(n_err == p + 1, "double error flagged");
        check(n_acc == a && n_rej == r && n_ec == e && n_l1r == l && n_bcr == bb, "double error dropped");
      end else begin
        check(n_err == p, "no error flag");
        if (cmd[7:6] == 2'b01) begin
          check(n_acc == a + int'(cmd[5]) && n_rej == r + int'(!cmd[5]), "L1 decision");
          if (cmd[5]) check(last_id == cmd[1:0], "L1 event ID");
        end else begin
          check(n_acc == a && n_rej == r, "no L1 decision");
        end
        if (cmd[7:6] == 2'b00) begin
          check(n_ec == e + int'(cmd[1]) && n_l1r == l + int'(cmd[2]) && n_bcr == bb + int'(cmd[0]), "reset commands");
        end else check(n_ec == e && n_l1r == l && n_bcr == bb, "no reset");
      end
    end
    check(n_corr > 20, "single errors corrected");
    $display("double errors not detectable by the code: %0d", n_undetectable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
