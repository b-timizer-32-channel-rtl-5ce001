// tb_l0_derandomizer -- self-checking test of the L0 trigger derandomizer:
// counting, simultaneous trigger and pop, full watermark, overflow and reset,
// against a counter model kept in the testbench.
module tb_l0_derandomizer;
  logic clk = 0, rst_n = 0, sreset = 0, trig = 0, pop = 0;
  logic not_empty, full, overflow;
  logic [3:0] count;
  int checks = 0, failures = 0;
  int model = 0;
  bit model_ovf = 0;

  l0_derandomizer dut (.clk, .rst_n, .sreset, .l0_trigger(trig), .pop, .not_empty, .full, .overflow, .count);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (count=%0d model=%0d)", m, count, model); end
  endtask


  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill with 20 triggers, no pop
    for (int i = 0; i < 20; i++) begin
      trig = 1; pop = 0; @(negedge clk);
      if (model < 15) model++; else model_ovf = 1;
      check(count == 4'(model), "fill count");
      check(full == (model >= 12), "full watermark");
      check(overflow == model_ovf, "overflow");
    end
    trig = 0;
    // random push / pop
    for (int i = 0; i < 400; i++) begin
      automatic bit t = $urandom_range(0, 1) == 1;
      automatic bit p = $urandom_range(0, 2) != 0;
      trig = t; pop = p;
      check(not_empty == (model != 0), "not_empty");
      @(negedge clk);
      begin
        automatic int m = model;
        automatic bit pushed = t && (m != 15);
        automatic bit popped = p && (m != 0);
        model = m + int'(pushed) - int'(popped);
      end
      check(count == 4'(model), "random count");
    end
    trig = 0; pop = 0;
    sreset = 1; @(negedge clk); sreset = 0;
    check(count == 0 && !overflow && !not_empty, "sreset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
