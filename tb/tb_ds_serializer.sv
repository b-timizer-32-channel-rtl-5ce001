// tb_ds_serializer -- a Data/Strobe receiver in the testbench recovers the
// bits (one bit at every change of either line) and checks each frame:
// start 1, 32 data bits MSB first, even parity, stop 0; it also checks that
// only one line changes at a time and the bit period (1 clock at 80 Mb/s,
// 2 clocks at 40 Mb/s).
module tb_ds_serializer;
  logic clk = 0, rst_n = 0, sreset = 0, sclk_sel = 1, valid = 0;
  logic [31:0] word = '0;
  logic ready, ds_data, ds_strobe, frame_done;
  int checks = 0, failures = 0;
  logic d_q = 0, s_q = 0;
  logic [34:0] rx;
  int nbits = 0, last_edge = 0, cyc = 0, bad_period = 0;
  logic [31:0] sent [$];

  ds_serializer dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // receiver
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (ds_data != d_q || ds_strobe != s_q) begin
        check(!(ds_data != d_q && ds_strobe != s_q), "one line per bit");
        if (nbits > 0 && nbits < 35 && (cyc - last_edge) != (sclk_sel ? 1 : 2)) bad_period++;
        last_edge = cyc;
        rx = {rx[33:0], ds_data};
        nbits++;
        if (nbits == 35) begin
          logic [31:0] exp;
          exp = sent.pop_front();
          check(rx[34] == 1'b1, "start bit");
          check(rx[33:2] == exp, "data bits"); if (rx[33:2] != exp) $display("rx=%h exp=%h sel=%0d", rx[33:2], exp, sclk_sel);
          check(rx[1] == ^exp, "even parity");
          check(rx[0] == 1'b0, "stop bit");
          nbits = 0;
        end
      end
      d_q <= ds_data; s_q <= ds_strobe;
    end
  end

  task automatic send(logic [31:0] w);
    @(negedge clk);
    valid = 1; word = w;
    while (!ready) @(negedge clk);
    @(posedge clk);
    sent.push_back(w);
    #1 valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      sclk_sel = (m == 0);
      for (int i = 0; i < 40; i++) begin
        send((i % 5 == 0) ? 32'h0 : (i % 7 == 0) ? 32'hFFFF_FFFF : $urandom);
        if (i % 3 == 0) repeat ($urandom_range(1, 10)) @(posedge clk);
      end
      while (!ready) @(posedge clk);
      repeat (4) @(posedge clk);
    end
    check(sent.size() == 0, "all frames received");
    check(bad_period == 0, "bit period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
