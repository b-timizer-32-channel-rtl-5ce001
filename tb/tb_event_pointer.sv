// tb_event_pointer -- checks that the slot pointer counts increments, wraps
// at 2**PTR_W and is cleared by the synchronous reset.
module tb_event_pointer;
  logic clk = 0, rst_n = 0, sreset = 0, inc = 0;
  logic [11:0] ptr;
  int checks = 0, failures = 0, n = 0;

  event_pointer dut (.clk, .rst_n, .sreset, .inc, .ptr);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s ptr=%0d n=%0d", m, ptr, n); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      inc = $urandom_range(0, 3) != 0;
      @(negedge clk);
      if (inc) n++;
      if (i % 50 == 0) check(ptr == 12'(n % 4096), "count");
    end
    inc = 0;
    check(ptr == 12'(n % 4096), "final count");
    check(n > 4096, "wrapped");
    sreset = 1; @(negedge clk); sreset = 0;
    check(ptr == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
